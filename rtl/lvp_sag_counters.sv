// lvp_sag_counters: second level of one SAg confidence estimator.
//
// A table of 2**HIST_W saturating counters, indexed by a prediction outcome
// history kept in the predictor line.  A counter counts up by one after a
// correct prediction (saturating at CTR_TOP) and down by CTR_PEN after an
// incorrect one (saturating at zero).  The defaults are the re-execute
// setting of the design: 4-bit counters, top 15, penalty 4; the re-fetch
// setting is CNT_W=5, CTR_TOP=31, CTR_PEN=16.
//
// Interface and timing: one synchronous read port (rd_en/rd_idx, data on
// rd_cnt in the next cycle) and one update port.  The update port takes the
// counter value the writer read earlier (upd_old) plus the outcome and
// writes the saturated new value; the table needs no second read port.  A
// read and an update to the same entry in the same cycle return the new
// value (write-through bypass), so a pipeline issuing one operation per
// cycle sees strictly sequential behaviour.  After reset the table clears
// itself, one entry per cycle; ready is low for those 2**HIST_W cycles.
// The clearing sweep and the bypass are this design's own choices.
module lvp_sag_counters #(
  parameter int unsigned HIST_W  = 10,
  parameter int unsigned CNT_W   = 4,
  parameter int unsigned CTR_TOP = 15,
  parameter int unsigned CTR_PEN = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready,
  input  logic              rd_en,
  input  logic [HIST_W-1:0] rd_idx,
  output logic [CNT_W-1:0]  rd_cnt,
  input  logic              upd_en,
  input  logic [HIST_W-1:0] upd_idx,
  input  logic [CNT_W-1:0]  upd_old,
  input  logic              upd_correct
);

  localparam int unsigned ENTRIES = 2 ** HIST_W;

  logic [CNT_W-1:0]  mem [ENTRIES];
  logic [CNT_W-1:0]  mem_q;
  logic [CNT_W-1:0]  new_cnt;
  logic [CNT_W-1:0]  byp_q;
  logic              byp_sel_q;
  logic              clearing;
  logic [HIST_W-1:0] clr_idx;

  // saturating update rule
  always_comb begin
    if (upd_correct) begin
      new_cnt = (32'(upd_old) >= CTR_TOP) ? CNT_W'(CTR_TOP) : upd_old + 1'b1;
    end else begin
      new_cnt = (32'(upd_old) <= CTR_PEN) ? '0 : upd_old - CNT_W'(CTR_PEN);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_idx  <= '0;
    end else if (clearing) begin
      clr_idx <= clr_idx + 1'b1;
      if (clr_idx == HIST_W'(ENTRIES - 1)) clearing <= 1'b0;
    end
  end

  assign ready = !clearing;

  always_ff @(posedge clk) begin
    if (clearing)    mem[clr_idx] <= '0;
    else if (upd_en) mem[upd_idx] <= new_cnt;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      mem_q     <= mem[rd_idx];
      byp_sel_q <= upd_en && !clearing && (upd_idx == rd_idx);
      byp_q     <= new_cnt;
    end
  end

  assign rd_cnt = byp_sel_q ? byp_q : mem_q;

  initial begin
    assert (CTR_TOP < 2 ** CNT_W) else $error("CTR_TOP does not fit in CNT_W bits");
  end

endmodule
