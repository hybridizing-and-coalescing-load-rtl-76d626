// lvp_bank: one bank of the St+Reg+L3pV coalesced-hybrid load value predictor.
//
// Each of the LINES predictor lines holds a b-tag (8-bit partial tag plus a
// miss bit), five 10-bit outcome histories, the full 64-bit last value and
// the 16 low bits of the second and third last values.  Five identical SAg
// confidence estimators (history in the line, saturating counters in a
// shared table indexed by that history) belong to the five components:
// stride (value 2*last - second last, no storage of its own), register (the
// value already in the load's destination register, no storage), and the
// three last values.  The most confident component supplies the prediction,
// which is used only on a tag hit with a counter at or above the threshold.
//
// Pipeline (one operation per cycle, predictions have priority):
//   S0  operation accepted, predictor line read.
//   S1  line available: tag compare, stride adder, component values; the
//       five counter tables are read at the line's five histories.  An update
//       compares each component value with the true value and writes the
//       line back here (histories shifted, values aged, b-tag rule applied).
//   S2  counters available: a prediction selects its component and its
//       result appears on res_* (two cycles after acceptance); an update
//       writes the five counters (+1 if correct, -CTR_PEN if not).
// The line array and the counter tables forward a write to a read of the
// same entry in the same cycle, so back-to-back operations behave exactly as
// if executed one after another.  After reset the bank clears its state,
// with ready low, for max(LINES, 2**HIST_W) cycles.
//
// Indexing: the PC's two low bits are always zero; the next BANK_BITS bits
// choose the bank (outside this module), the next log2(LINES) bits the line
// and the TAG_W bits above them form the partial tag.
// Following the design: line contents and widths, the five estimators, the
// selection and tie order, the b-tag rule, the two-stage pipeline.  This
// design's own choices: the exact stage split, reset clearing, what a line
// takes over on its second miss (the normal update applied to the old
// contents), and that only updates change the miss bit.
module lvp_bank
  import lvp_pkg::*;
#(
  parameter int unsigned LINES     = 1024,
  parameter int unsigned BANK_BITS = 0,
  parameter int unsigned TAG_W     = 8,
  parameter int unsigned HIST_W    = 10,
  parameter int unsigned NUM_PVALS = 2,
  parameter int unsigned PVAL_W    = 16,
  parameter int unsigned CNT_W     = 4,
  parameter int unsigned CTR_TOP   = 15,
  parameter int unsigned CTR_THR   = 8,
  parameter int unsigned CTR_PEN   = 4,
  parameter int unsigned COMP_EN   = 32'hFFFF_FFFF,
  localparam int unsigned NCOMP    = 3 + NUM_PVALS,
  localparam int unsigned COMP_W   = $clog2(NCOMP)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready,
  // prediction requests
  input  logic              pred_valid,
  input  pred_req_t         pred_req,
  // updates (accepted when upd_valid && upd_ready)
  input  logic              upd_valid,
  input  upd_req_t          upd_req,
  output logic              upd_ready,
  // prediction results, two cycles after the request
  output logic              res_valid,
  output logic              res_predict,
  output logic [VAL_W-1:0]  res_value,
  output logic [COMP_W-1:0] res_comp,
  output logic [CNT_W-1:0]  res_cnt,
  output bank_evt_t         evt
);

  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned IDX_LO = 2 + BANK_BITS;
  localparam int unsigned TAG_LO = IDX_LO + IDX_W;

  typedef struct packed {
    logic [TAG_W-1:0]                 tag;
    logic                             miss;
    logic [NCOMP-1:0][HIST_W-1:0]     hist;
    logic [VAL_W-1:0]                 last;
    logic [NUM_PVALS-1:0][PVAL_W-1:0] pval;
  } line_t;

  localparam int unsigned LINE_W = $bits(line_t);

  // ---------------- S0: accept and read the line ----------------
  logic             line_ready;
  logic [NCOMP-1:0] ctr_ready;
  logic             acc_pred, acc_upd, acc;
  logic [PC_W-1:0]  acc_pc;
  logic [IDX_W-1:0] acc_idx;

  assign ready     = line_ready && (&ctr_ready);
  assign acc_pred  = ready && pred_valid;
  assign upd_ready = ready && !pred_valid;
  assign acc_upd   = upd_valid && upd_ready;
  assign acc       = acc_pred || acc_upd;
  assign acc_pc    = acc_pred ? pred_req.pc : upd_req.pc;
  assign acc_idx   = acc_pc[IDX_LO +: IDX_W];

  logic             s1_valid, s1_upd;
  logic [IDX_W-1:0] s1_idx;
  logic [TAG_W-1:0] s1_tag;
  logic [VAL_W-1:0] s1_value, s1_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_upd   <= 1'b0;
    end else begin
      s1_valid <= acc;
      s1_upd   <= acc_upd;
    end
  end

  always_ff @(posedge clk) begin
    if (acc) begin
      s1_idx   <= acc_idx;
      s1_tag   <= acc_pc[TAG_LO +: TAG_W];
      s1_value <= upd_req.value;
      s1_reg   <= acc_pred ? pred_req.reg_val : upd_req.reg_val;
    end
  end

  logic [LINE_W-1:0] line_rd, line_wr;
  logic              line_we;

  lvp_line_array #(.LINES(LINES), .WIDTH(LINE_W)) u_lines (
    .clk, .rst_n, .ready(line_ready),
    .rd_en(acc), .rd_idx(acc_idx), .rd_data(line_rd),
    .wr_en(line_we), .wr_idx(s1_idx), .wr_data(line_wr)
  );

  // ---------------- S1: tag, values, line write-back ----------------
  line_t             line, line_new;
  logic              hit, do_update, replace, new_miss;
  logic [TAG_W-1:0]  new_tag;
  logic [VAL_W-1:0]  stride_pred;
  logic [PVAL_W-1:0] pvals1 [NUM_PVALS];
  logic [VAL_W-1:0]  comp_val1 [NCOMP];
  logic [NCOMP-1:0]  correct;

  assign line = line_t'(line_rd);

  lvp_btag_match #(.TAG_W(TAG_W)) u_match (
    .line_tag(line.tag), .line_miss(line.miss), .req_tag(s1_tag),
    .hit, .do_update, .replace, .new_tag, .new_miss
  );

  lvp_stride_adder #(.VAL_W(VAL_W), .PVAL_W(PVAL_W)) u_adder (
    .last_val(line.last), .second_pval(line.pval[0]), .stride_pred
  );

  always_comb begin
    for (int p = 0; p < int'(NUM_PVALS); p++) pvals1[p] = line.pval[p];
  end

  lvp_comp_values #(.NUM_PVALS(NUM_PVALS), .PVAL_W(PVAL_W)) u_values (
    .last_val(line.last), .pvals(pvals1), .stride_pred,
    .reg_val(s1_reg), .comp_val(comp_val1)
  );

  always_comb begin
    for (int c = 0; c < int'(NCOMP); c++) correct[c] = (comp_val1[c] == s1_value);
    line_new = line;
    if (do_update) begin
      line_new.tag  = new_tag;
      line_new.miss = new_miss;
      for (int c = 0; c < int'(NCOMP); c++) begin
        line_new.hist[c] = {correct[c], line.hist[c][HIST_W-1:1]};
      end
      line_new.last    = s1_value;
      line_new.pval[0] = line.last[PVAL_W-1:0];
      for (int p = 1; p < int'(NUM_PVALS); p++) line_new.pval[p] = line.pval[p-1];
    end else begin
      line_new.miss = new_miss;
    end
  end

  assign line_we = s1_valid && s1_upd;
  assign line_wr = LINE_W'(line_new);

  logic                          s2_valid, s2_upd, s2_do_update, s2_hit, s2_replace;
  logic [NCOMP-1:0][HIST_W-1:0]  s2_hist;
  logic [NCOMP-1:0]              s2_correct;
  logic [VAL_W-1:0]              s2_last, s2_stride, s2_reg;
  logic [PVAL_W-1:0]             s2_pvals [NUM_PVALS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_upd   <= 1'b0;
    end else begin
      s2_valid <= s1_valid;
      s2_upd   <= s1_upd;
    end
  end

  always_ff @(posedge clk) begin
    if (s1_valid) begin
      s2_do_update <= do_update;
      s2_hit       <= hit;
      s2_replace   <= replace;
      s2_hist      <= line.hist;
      s2_correct   <= correct;
      s2_last      <= line.last;
      s2_stride    <= stride_pred;
      s2_reg       <= s1_reg;
      s2_pvals     <= pvals1;
    end
  end

  // ---------------- confidence estimators (read S1, write S2) ----------------
  logic [CNT_W-1:0] cnt [NCOMP];
  logic             ctr_we;

  assign ctr_we = s2_valid && s2_upd && s2_do_update;

  for (genvar c = 0; c < int'(NCOMP); c++) begin : g_ce
    lvp_sag_counters #(
      .HIST_W(HIST_W), .CNT_W(CNT_W), .CTR_TOP(CTR_TOP), .CTR_PEN(CTR_PEN)
    ) u_ctr (
      .clk, .rst_n, .ready(ctr_ready[c]),
      .rd_en(s1_valid), .rd_idx(line.hist[c]), .rd_cnt(cnt[c]),
      .upd_en(ctr_we), .upd_idx(s2_hist[c]), .upd_old(cnt[c]),
      .upd_correct(s2_correct[c])
    );
  end

  // ---------------- S2: selection ----------------
  lvp_select #(
    .NUM_PVALS(NUM_PVALS), .PVAL_W(PVAL_W), .CNT_W(CNT_W),
    .CTR_THR(CTR_THR), .COMP_EN(COMP_EN)
  ) u_select (
    .hit(s2_hit), .last_val(s2_last), .pvals(s2_pvals), .stride_pred(s2_stride),
    .reg_val(s2_reg), .cnt,
    .predict(res_predict), .pred_val(res_value), .pred_comp(res_comp),
    .pred_cnt(res_cnt)
  );

  assign res_valid = s2_valid && !s2_upd;

  always_comb begin
    evt                = '0;
    evt.upd_done       = s2_valid && s2_upd;
    evt.upd_hit        = s2_valid && s2_upd && s2_hit;
    evt.upd_first_miss = s2_valid && s2_upd && !s2_do_update;
    evt.upd_replace    = s2_valid && s2_upd && s2_replace;
    evt.pred_done      = res_valid;
    evt.pred_taken     = res_valid && res_predict;
  end

  initial begin
    assert (NUM_PVALS >= 1) else $error("the stride component needs one partial value");
  end

  // a prediction and an update are never accepted in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(acc_pred && acc_upd));

endmodule
