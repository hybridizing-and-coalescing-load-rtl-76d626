// tb_lvp_stride_adder: self-checking testbench of the stride component's
// value.  For random value pairs that share their upper 48 bits the result
// must be last + (last - second_last); in general it must be
// 2*last - {last[63:16], pval}, computed here with 128-bit arithmetic.
module tb_lvp_stride_adder;
  logic [63:0] last_val, stride_pred;
  logic [15:0] second_pval;

  lvp_stride_adder dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [63:0]  second;
      logic [127:0] wide;
      logic [63:0]  want;
      last_val    = {$urandom, $urandom};
      second_pval = 16'($urandom);
      if (t < 4) begin
        // hand-picked: stride +8, stride -8, stride 0, negative wrap
        last_val    = 64'h0000_1234_5678_0010;
        second_pval = (t == 0) ? 16'h0008 : (t == 1) ? 16'h0018 : (t == 2) ? 16'h0010 : 16'hFFF0;
      end
      #1;
      second = {last_val[63:16], second_pval};
      wide   = {64'b0, last_val} + ({64'b0, last_val} - {64'b0, second});
      want   = wide[63:0];
      checks++;
      if (stride_pred != want) begin
        failures++;
        $display("last %h pval %h: got %h want %h", last_val, second_pval, stride_pred, want);
      end
      if (t == 0) begin
        checks++;
        if (stride_pred != 64'h0000_1234_5678_0018) begin failures++; $display("stride +8 wrong"); end
      end
      if (t == 1) begin
        checks++;
        if (stride_pred != 64'h0000_1234_5678_0008) begin failures++; $display("stride -8 wrong"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
