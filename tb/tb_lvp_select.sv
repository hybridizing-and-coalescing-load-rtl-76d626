// tb_lvp_select: self-checking testbench of the component selector.
// Random confidence vectors (with many ties) and random values: the chosen
// component must be the most confident one, the earliest on a tie; a value
// is predicted only on a tag hit with that confidence at or above the
// threshold; partial values must be joined below the last value's upper
// 48 bits (seen in the predicted value of whichever component wins).  A second instance with the stride component disabled checks
// that a disabled component is never chosen.
module tb_lvp_select;
  localparam int unsigned NPV = 2, NC = 5, THR = 8;

  logic        hit;
  logic [63:0] last_val, stride_pred, reg_val;
  logic [15:0] pvals [NPV];
  logic [3:0]  cnt [NC];
  logic        predict, predict_b;
  logic [63:0] pred_val, pred_val_b;
  logic [2:0]  pred_comp, pred_comp_b;
  logic [3:0]  pred_cnt, pred_cnt_b;

  lvp_select #(.NUM_PVALS(NPV), .CTR_THR(THR)) dut (
    .hit, .last_val, .pvals, .stride_pred, .reg_val, .cnt,
    .predict, .pred_val, .pred_comp, .pred_cnt
  );

  lvp_select #(.NUM_PVALS(NPV), .CTR_THR(THR), .COMP_EN(32'h1E)) dut_b (
    .hit, .last_val, .pvals, .stride_pred, .reg_val, .cnt,
    .predict(predict_b), .pred_val(pred_val_b),
    .pred_comp(pred_comp_b), .pred_cnt(pred_cnt_b)
  );

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void pick(input int unsigned en, output int comp, output int conf);
    comp = -1; conf = -1;
    for (int c = 0; c < int'(NC); c++)
      if (en[c] && int'(cnt[c]) > conf) begin comp = c; conf = int'(cnt[c]); end
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [63:0] vals [NC];
      int comp, conf;
      hit = ($urandom_range(0, 3) != 0);
      last_val = {$urandom, $urandom};
      stride_pred = {$urandom, $urandom};
      reg_val = {$urandom, $urandom};
      foreach (pvals[p]) pvals[p] = 16'($urandom);
      foreach (cnt[c]) cnt[c] = 4'($urandom_range(4, 12));
      #1;
      vals[0] = stride_pred; vals[1] = reg_val; vals[2] = last_val;
      vals[3] = {last_val[63:16], pvals[0]};
      vals[4] = {last_val[63:16], pvals[1]};
      pick(32'h1F, comp, conf);
      checks++;
      if (int'(pred_comp) != comp || int'(pred_cnt) != conf || pred_val != vals[comp] ||
          predict != (hit && conf >= int'(THR))) begin
        failures++;
        $display("cnt %p hit %0b: got comp %0d pred %0b, want comp %0d", cnt, hit, pred_comp, predict, comp);
      end
      pick(32'h1E, comp, conf);
      checks++;
      if (int'(pred_comp_b) != comp || pred_val_b != vals[comp] || predict_b != (hit && conf >= int'(THR))) begin
        failures++;
        $display("disabled stride chosen: got comp %0d want %0d", pred_comp_b, comp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
