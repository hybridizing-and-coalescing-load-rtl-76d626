// tb_lvp_configs: the predictor configurations studied beside the main one,
// run side by side on one stimulus, each checked against its own reference
// model.
//
//   refetch   re-fetch counter setting: 5-bit counters, top 31, threshold 16,
//             penalty 16
//   l2pv      last two partial values (one partial value field)
//   l8pv      last eight partial values (seven partial value fields)
//   pv2, pv24 2-bit and 24-bit partial values
//   reg_l3pv  stride component disabled (Reg+L3pV)
//   st_only   only the stride component may be selected
//   small     64 lines per bank (a 256-line predictor in four banks)
//   large     1024 lines per bank (a 4096-line predictor in four banks)
//
// The stimulus is the synthetic load mix of the bank testbench.  Each
// configuration must match its model on every result and must have made at
// least one prediction.
module tb_lvp_configs;
  import lvp_ref_pkg::*;

  localparam int NCFG = 9;
  localparam int NSITE = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        pred_valid = 1'b0, upd_valid = 1'b0;
  int unsigned pred_line = 0, pred_tag = 0, upd_line = 0, upd_tag = 0;
  logic [63:0] pred_reg = '0, upd_val = '0, upd_reg = '0;
  logic [NCFG-1:0] ready;
  int ch [NCFG], fl [NCFG], tk [NCFG], co [NCFG];

  `define LVP_HARNESS(I, NM, L, NPV, PW, CW, TOP, THR, PEN, EN) \
    lvp_bank_harness #(.LINES(L), .NUM_PVALS(NPV), .PVAL_W(PW), .CNT_W(CW), \
      .CTR_TOP(TOP), .CTR_THR(THR), .CTR_PEN(PEN), .COMP_EN(EN), .NAME(NM)) u_``I ( \
      .clk, .rst_n, .ready(ready[I]), .pred_valid, .pred_line, .pred_tag, .pred_reg, \
      .upd_valid, .upd_line, .upd_tag, .upd_val, .upd_reg, \
      .checks(ch[I]), .failures(fl[I]), .taken(tk[I]), .correct(co[I]));

  `LVP_HARNESS(0, "refetch",  16,   2, 16, 5, 31, 16, 16, 32'hFFFF_FFFF)
  `LVP_HARNESS(1, "l2pv",     16,   1, 16, 4, 15,  8,  4, 32'hFFFF_FFFF)
  `LVP_HARNESS(2, "l8pv",     16,   7, 16, 4, 15,  8,  4, 32'hFFFF_FFFF)
  `LVP_HARNESS(3, "pv2",      16,   2,  2, 4, 15,  8,  4, 32'hFFFF_FFFF)
  `LVP_HARNESS(4, "pv24",     16,   2, 24, 4, 15,  8,  4, 32'hFFFF_FFFF)
  `LVP_HARNESS(5, "reg_l3pv", 16,   2, 16, 4, 15,  8,  4, 32'h0000_001E)
  `LVP_HARNESS(6, "st_only",  16,   2, 16, 4, 15,  8,  4, 32'h0000_0001)
  `LVP_HARNESS(7, "small",    64,   2, 16, 4, 15,  8,  4, 32'hFFFF_FFFF)
  `LVP_HARNESS(8, "large",    1024, 2, 16, 4, 15,  8,  4, 32'hFFFF_FFFF)

  `undef LVP_HARNESS

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    load_site        sites [NSITE];
    longint unsigned cv [NSITE], cr [NSITE];
    for (int s = 0; s < NSITE; s++) begin
      longint unsigned v, r;
      sites[s] = new(64'(s), (s < 12) ? s % 6 : 4);
      sites[s].next(v, r);
      cv[s] = v; cr[s] = r;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!(&ready)) @(negedge clk);
    for (int t = 0; t < 8000; t++) begin
      int sp, su;
      @(negedge clk);
      #1;
      sp = (($urandom_range(0, 19) == 0) || (t > 6000 && t % 200 < 6)) ? 12 + (t / 7) % 4
                                                                        : $urandom_range(0, 11);
      su = sp;
      pred_valid = ($urandom_range(0, 2) == 0);
      upd_valid  = ($urandom_range(0, 3) != 0);
      // sites 0..11 own lines 0..11; rare sites share lines 0..3
      pred_line = (sp < 12) ? sp : sp - 12;  pred_tag = sp + 1;
      upd_line  = pred_line;                 upd_tag  = pred_tag;
      pred_reg  = cr[sp];
      upd_val   = cv[su];
      upd_reg   = cr[su];
      if (!pred_valid && upd_valid) begin
        longint unsigned v, r;
        sites[su].next(v, r);
        cv[su] = v; cr[su] = r;
      end
    end
    @(negedge clk);
    pred_valid = 1'b0; upd_valid = 1'b0;
    repeat (6) @(negedge clk);
    for (int i = 0; i < NCFG; i++) begin
      checks += ch[i];
      failures += fl[i];
      checks++;
      if (tk[i] == 0) begin failures++; $display("configuration %0d never predicted", i); end
      $display("configuration %0d: %0d results checked, %0d predictions", i, ch[i], tk[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
