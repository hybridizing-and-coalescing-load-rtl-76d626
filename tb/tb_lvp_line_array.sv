// tb_lvp_line_array: self-checking testbench of the predictor line storage.
// Checks the reset clear (ready after LINES cycles, all lines zero), then
// random reads and writes against an array model, including a read of the
// line written in the same cycle, which must return the new data.
module tb_lvp_line_array;
  localparam int unsigned LINES = 32, WIDTH = 155;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             ready, rd_en, wr_en;
  logic [4:0]       rd_idx, wr_idx;
  logic [WIDTH-1:0] rd_data, wr_data;

  lvp_line_array #(.LINES(LINES), .WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0, bypass = 0;
  logic [WIDTH-1:0] model [LINES];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int cycles = 0;
    logic [WIDTH-1:0] exp_rd;
    automatic bit rd_pend = 0;
    rd_en = 0; wr_en = 0; rd_idx = '0; wr_idx = '0; wr_data = '0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!ready) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != LINES) begin failures++; $display("clear took %0d cycles", cycles); end
    for (int t = 0; t < 2000; t++) begin
      if (rd_pend) begin
        checks++;
        if (rd_data != exp_rd) begin failures++; $display("line %0d mismatch", rd_idx); end
      end
      rd_en = $urandom_range(0, 1);
      wr_en = $urandom_range(0, 1);
      rd_idx = 5'($urandom_range(0, LINES - 1));
      wr_idx = ($urandom_range(0, 3) == 0) ? rd_idx : 5'($urandom_range(0, LINES - 1));
      for (int w = 0; w < WIDTH; w += 32) wr_data[w +: 32] = $urandom;
      if (wr_en) model[wr_idx] = wr_data;
      if (wr_en && rd_en && wr_idx == rd_idx) bypass++;
      rd_pend = rd_en;
      exp_rd = model[rd_idx];
      @(negedge clk);
    end
    checks++;
    if (bypass == 0) begin failures++; $display("no same-cycle read and write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
