// lvp_stride_adder: the storage-less stride component's value.
//
// A stride predictor predicts last + (last - second_last).  The line keeps
// the full last value and only the 16 low bits of the second last value; the
// second last value is rebuilt by joining the last value's upper bits with
// that partial value, so the prediction is 2*last - {last[63:16], pval}.
// The stride itself is never stored.  Purely combinational; in the bank it
// works in parallel with the confidence counter read.
module lvp_stride_adder #(
  parameter int unsigned VAL_W  = 64,
  parameter int unsigned PVAL_W = 16
) (
  input  logic [VAL_W-1:0]  last_val,
  input  logic [PVAL_W-1:0] second_pval,
  output logic [VAL_W-1:0]  stride_pred
);

  logic [VAL_W-1:0] second_val;

  always_comb begin
    second_val  = {last_val[VAL_W-1:PVAL_W], second_pval};
    stride_pred = (last_val << 1) - second_val;
  end

endmodule
