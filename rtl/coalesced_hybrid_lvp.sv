// coalesced_hybrid_lvp: four-bank St+Reg+L3pV coalesced-hybrid load value
// predictor.
//
// The predictor guesses the value a load will fetch, so that dependent
// instructions can start before memory answers.  Three kinds of predictor
// share one small table: a last-three-value predictor that keeps the full
// last value but only the low 16 bits of the two older values (the upper
// bits are shared with the last value), a stride predictor that has no
// storage because it derives its stride from the last two values, and a
// register predictor that has no storage because it bets that the load's
// destination register already holds the value.  Each of the five
// component values has its own SAg confidence estimator; the most confident
// one is used if it clears the threshold and the partial tag matches.
//
// To serve up to four loads per cycle the predictor is split into NUM_BANKS
// independent banks of LINES/NUM_BANKS lines each.  A fetch block is four
// naturally aligned instructions, so the loads fetched together always have
// different PC bits [3:2]: port b serves the loads whose PC[3:2] equals b
// (checked by an assertion).  Each bank has its own update queue of
// FIFO_DEPTH entries; updates that find it full are dropped (upd_dropped),
// and the queue issues one update per cycle whenever its bank has no
// prediction to serve.  Predictions never write the predictor.
//
// Timing: a prediction requested on pred_valid[b] in cycle t is answered on
// res_*[b] in cycle t+2.  After reset the banks clear their state; requests
// are ignored until ready is high (2**HIST_W cycles with the defaults).
// Defaults follow the design's main configuration: 1024 lines, 8+1-bit
// b-tags, 10-bit histories, 16-bit partial values, 16-entry queues, four
// banks; the counters use the re-execute setting (4 bits, top 15,
// threshold 8, penalty 4).  For re-fetch recovery set CNT_W=5, CTR_TOP=31,
// CTR_THR=16, CTR_PEN=16.  Each bank has its own full set of five counter
// tables; that split is this design's choice.
module coalesced_hybrid_lvp
  import lvp_pkg::*;
#(
  parameter int unsigned NUM_BANKS  = 4,
  parameter int unsigned LINES      = 1024,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned TAG_W      = 8,
  parameter int unsigned HIST_W     = 10,
  parameter int unsigned NUM_PVALS  = 2,
  parameter int unsigned PVAL_W     = 16,
  parameter int unsigned CNT_W      = 4,
  parameter int unsigned CTR_TOP    = 15,
  parameter int unsigned CTR_THR    = 8,
  parameter int unsigned CTR_PEN    = 4,
  parameter int unsigned COMP_EN    = 32'hFFFF_FFFF,
  localparam int unsigned NCOMP     = 3 + NUM_PVALS,
  localparam int unsigned COMP_W    = $clog2(NCOMP),
  localparam int unsigned FCNT_W    = $clog2(FIFO_DEPTH + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic                  ready,
  input  logic [NUM_BANKS-1:0]  pred_valid,
  input  pred_req_t             pred_req    [NUM_BANKS],
  input  logic [NUM_BANKS-1:0]  upd_valid,
  input  upd_req_t              upd_req     [NUM_BANKS],
  output logic [NUM_BANKS-1:0]  upd_dropped,
  output logic [NUM_BANKS-1:0]  res_valid,
  output logic [NUM_BANKS-1:0]  res_predict,
  output logic [VAL_W-1:0]      res_value   [NUM_BANKS],
  output logic [COMP_W-1:0]     res_comp    [NUM_BANKS],
  output logic [CNT_W-1:0]      res_cnt     [NUM_BANKS],
  output logic [FCNT_W-1:0]     fifo_count  [NUM_BANKS],
  output bank_evt_t             evt         [NUM_BANKS]
);

  localparam int unsigned BANK_BITS = $clog2(NUM_BANKS);
  localparam int unsigned BANK_LINES = LINES / NUM_BANKS;

  logic [NUM_BANKS-1:0] bank_ready;

  assign ready = &bank_ready;

  for (genvar b = 0; b < int'(NUM_BANKS); b++) begin : g_bank
    logic     q_not_empty, q_pop, b_upd_ready;
    upd_req_t q_head;

    lvp_update_fifo #(.DEPTH(FIFO_DEPTH)) u_queue (
      .clk, .rst_n,
      .push(upd_valid[b]), .push_data(upd_req[b]), .dropped(upd_dropped[b]),
      .not_empty(q_not_empty), .pop(q_pop), .pop_data(q_head),
      .count(fifo_count[b])
    );

    assign q_pop = q_not_empty && b_upd_ready;

    lvp_bank #(
      .LINES(BANK_LINES), .BANK_BITS(BANK_BITS), .TAG_W(TAG_W),
      .HIST_W(HIST_W), .NUM_PVALS(NUM_PVALS), .PVAL_W(PVAL_W),
      .CNT_W(CNT_W), .CTR_TOP(CTR_TOP), .CTR_THR(CTR_THR),
      .CTR_PEN(CTR_PEN), .COMP_EN(COMP_EN)
    ) u_bank (
      .clk, .rst_n, .ready(bank_ready[b]),
      .pred_valid(pred_valid[b]), .pred_req(pred_req[b]),
      .upd_valid(q_not_empty), .upd_req(q_head), .upd_ready(b_upd_ready),
      .res_valid(res_valid[b]), .res_predict(res_predict[b]),
      .res_value(res_value[b]), .res_comp(res_comp[b]), .res_cnt(res_cnt[b]),
      .evt(evt[b])
    );

    if (BANK_BITS > 0) begin : g_chk
      // loads fetched together sit in different slots of an aligned block
      assert property (@(posedge clk) disable iff (!rst_n)
        pred_valid[b] |-> (32'(pred_req[b].pc[2 +: BANK_BITS]) == b));
      assert property (@(posedge clk) disable iff (!rst_n)
        upd_valid[b] |-> (32'(upd_req[b].pc[2 +: BANK_BITS]) == b));
    end
  end

  initial begin
    assert (LINES % NUM_BANKS == 0) else $error("LINES must split evenly over the banks");
  end

endmodule
