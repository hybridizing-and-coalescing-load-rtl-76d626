// lvp_comp_values: the five (in general 3 + NUM_PVALS) component values of
// one predictor line, in priority order: stride (from the adder), register
// (from the register file), last value, then each partial value joined
// below the last value's upper VAL_W-PVAL_W bits.  This joining is the
// "concatenate" part of the design's selection logic; it is shared by the
// update path, which compares every component value with the true value,
// and by the selector.  Purely combinational.
module lvp_comp_values
  import lvp_pkg::*;
#(
  parameter int unsigned NUM_PVALS = 2,
  parameter int unsigned PVAL_W    = 16,
  localparam int unsigned NCOMP    = 3 + NUM_PVALS
) (
  input  logic [VAL_W-1:0]  last_val,
  input  logic [PVAL_W-1:0] pvals [NUM_PVALS],
  input  logic [VAL_W-1:0]  stride_pred,
  input  logic [VAL_W-1:0]  reg_val,
  output logic [VAL_W-1:0]  comp_val [NCOMP]
);

  always_comb begin
    comp_val[COMP_ST]  = stride_pred;
    comp_val[COMP_REG] = reg_val;
    comp_val[COMP_LV]  = last_val;
    for (int p = 0; p < int'(NUM_PVALS); p++) begin
      comp_val[int'(COMP_PV0) + p] = {last_val[VAL_W-1:PVAL_W], pvals[p]};
    end
  end

endmodule
