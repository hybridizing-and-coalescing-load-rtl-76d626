// lvp_select: confidence comparison and final selection.
//
// The hybrid has NCOMP = 3 + NUM_PVALS components, in priority order:
// stride, register, last value, then the partial values from youngest to
// oldest.  This block forms each component's 64-bit value (lvp_comp_values:
// partial values are joined below the last value's upper VAL_W-PVAL_W bits,
// "concatenate and select value"), then takes the component with
// the highest confidence counter, breaking ties in favour of the lower
// component number ("valid and maximum confidence"), and predicts only if the
// partial tag matched and that counter is at or above CTR_THR
// ("match & >= threshold").  Components whose bit in COMP_EN is clear can never
// be selected; they still keep their state, as in the design's component
// studies.  Tie order and the at-or-above threshold test follow the design;
// the COMP_EN mask is this design's way of expressing those studies.
// Purely combinational.
module lvp_select
  import lvp_pkg::*;
#(
  parameter int unsigned NUM_PVALS = 2,
  parameter int unsigned PVAL_W    = 16,
  parameter int unsigned CNT_W     = 4,
  parameter int unsigned CTR_THR   = 8,
  parameter int unsigned COMP_EN   = 32'hFFFF_FFFF,
  localparam int unsigned NCOMP    = 3 + NUM_PVALS,
  localparam int unsigned COMP_W   = $clog2(NCOMP)
) (
  input  logic              hit,
  input  logic [VAL_W-1:0]  last_val,
  input  logic [PVAL_W-1:0] pvals [NUM_PVALS],
  input  logic [VAL_W-1:0]  stride_pred,
  input  logic [VAL_W-1:0]  reg_val,
  input  logic [CNT_W-1:0]  cnt [NCOMP],
  output logic              predict,
  output logic [VAL_W-1:0]  pred_val,
  output logic [COMP_W-1:0] pred_comp,
  output logic [CNT_W-1:0]  pred_cnt
);

  logic             any_en;
  logic [VAL_W-1:0] comp_val [NCOMP];

  lvp_comp_values #(.NUM_PVALS(NUM_PVALS), .PVAL_W(PVAL_W)) u_values (
    .last_val, .pvals, .stride_pred, .reg_val, .comp_val
  );

  always_comb begin
    any_en    = 1'b0;
    pred_comp = '0;
    pred_cnt  = '0;
    // strict '>' keeps the earliest (highest priority) component on a tie
    for (int c = 0; c < int'(NCOMP); c++) begin
      if (COMP_EN[c] && (!any_en || cnt[c] > pred_cnt)) begin
        any_en    = 1'b1;
        pred_comp = COMP_W'(c);
        pred_cnt  = cnt[c];
      end
    end
    pred_val = comp_val[pred_comp];
    predict  = hit && any_en && (32'(pred_cnt) >= CTR_THR);
  end

endmodule
