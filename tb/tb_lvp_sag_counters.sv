// tb_lvp_sag_counters: self-checking testbench of one confidence counter
// table, with the re-fetch setting (5-bit counters, top 31, penalty 16).
// Checks that the table clears itself after reset (ready after exactly
// 2**HIST_W cycles, all counters zero), then applies random reads and
// saturating updates, including reads of the entry being written in the
// same cycle, against an array model.
module tb_lvp_sag_counters;
  localparam int unsigned HIST_W = 6, CNT_W = 5, TOP = 31, PEN = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              ready, rd_en, upd_en, upd_correct;
  logic [HIST_W-1:0] rd_idx, upd_idx;
  logic [CNT_W-1:0]  rd_cnt, upd_old;

  lvp_sag_counters #(.HIST_W(HIST_W), .CNT_W(CNT_W), .CTR_TOP(TOP), .CTR_PEN(PEN)) dut (.*);

  int checks = 0, failures = 0;
  int model [2**HIST_W];
  int sat_top = 0, sat_zero = 0, bypass = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int cycles = 0;
    int exp_rd;
    bit rd_pend;
    rd_en = 0; upd_en = 0; upd_correct = 0; rd_idx = '0; upd_idx = '0; upd_old = '0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!ready) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 2**HIST_W) begin failures++; $display("clear took %0d cycles", cycles); end
    rd_pend = 0;
    for (int t = 0; t < 3000; t++) begin
      int i, j;
      // read-modify-write the way the bank does: read, then update with
      // the value read; sometimes the read address equals the write address
      i = $urandom_range(0, 7);
      j = $urandom_range(0, 7);
      if (rd_pend) begin
        checks++;
        if (int'(rd_cnt) != exp_rd) begin
          failures++;
          $display("read %0d: got %0d want %0d", rd_idx, rd_cnt, exp_rd);
        end
      end
      rd_en = $urandom_range(0, 1);
      rd_idx = HIST_W'(i);
      upd_en = $urandom_range(0, 1);
      upd_idx = HIST_W'(j);
      upd_old = CNT_W'(model[j]);
      upd_correct = (j < 4) ? ($urandom_range(0, 49) != 0) : ($urandom_range(0, 9) < 5);
      if (upd_en) begin
        int n;
        n = upd_correct ? ((model[j] >= TOP) ? TOP : model[j] + 1)
                        : ((model[j] <= PEN) ? 0 : model[j] - PEN);
        if (upd_correct && model[j] == TOP) sat_top++;
        if (!upd_correct && model[j] < PEN) sat_zero++;
        if (rd_en && i == j) bypass++;
        model[j] = n;
      end
      rd_pend = rd_en;
      exp_rd = model[i];
      @(negedge clk);
    end
    checks++;
    if (sat_top == 0 || sat_zero == 0 || bypass == 0) begin
      failures++;
      $display("cases: top %0d zero %0d bypass %0d", sat_top, sat_zero, bypass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
