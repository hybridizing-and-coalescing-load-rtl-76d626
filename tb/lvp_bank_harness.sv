// lvp_bank_harness: one predictor bank of a given configuration together
// with its reference model, for testbenches that run several
// configurations on the same stimulus.
//
// The driver names each load by its line and tag; the harness turns them
// into a PC for its own number of lines, so every configuration sees the
// same pattern of sharing and aliasing.  Inputs are applied just after the
// falling edge; the harness samples them two time units later, checks the
// bank's result outputs (which depend only on registered state) against the
// model, and feeds the model the operation the bank will accept at the next
// rising edge.
module lvp_bank_harness
  import lvp_pkg::*;
  import lvp_ref_pkg::*;
#(
  parameter int unsigned LINES     = 16,
  parameter int unsigned NUM_PVALS = 2,
  parameter int unsigned PVAL_W    = 16,
  parameter int unsigned CNT_W     = 4,
  parameter int unsigned CTR_TOP   = 15,
  parameter int unsigned CTR_THR   = 8,
  parameter int unsigned CTR_PEN   = 4,
  parameter int unsigned COMP_EN   = 32'hFFFF_FFFF,
  parameter string       NAME      = "bank"
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        ready,
  input  logic        pred_valid,
  input  int unsigned pred_line,
  input  int unsigned pred_tag,
  input  logic [63:0] pred_reg,
  input  logic        upd_valid,
  input  int unsigned upd_line,
  input  int unsigned upd_tag,
  input  logic [63:0] upd_val,
  input  logic [63:0] upd_reg,
  output int          checks,
  output int          failures,
  output int          taken,
  output int          correct
);
  localparam int unsigned NCOMP  = 3 + NUM_PVALS;
  localparam int unsigned COMP_W = $clog2(NCOMP);
  localparam int unsigned IDX_W  = $clog2(LINES);

  pred_req_t         pred_req;
  upd_req_t          upd_req;
  logic              upd_ready, res_valid, res_predict;
  logic [63:0]       res_value;
  logic [COMP_W-1:0] res_comp;
  logic [CNT_W-1:0]  res_cnt;
  bank_evt_t         evt;

  function automatic logic [63:0] pc_of(int unsigned line, int unsigned tag);
    return (64'(tag & 8'hFF) << (2 + IDX_W)) | (64'(line % LINES) << 2);
  endfunction

  always_comb begin
    pred_req.pc      = pc_of(pred_line, pred_tag);
    pred_req.reg_val = pred_reg;
    upd_req.pc       = pc_of(upd_line, upd_tag);
    upd_req.value    = upd_val;
    upd_req.reg_val  = upd_reg;
  end

  lvp_bank #(
    .LINES(LINES), .NUM_PVALS(NUM_PVALS), .PVAL_W(PVAL_W), .CNT_W(CNT_W),
    .CTR_TOP(CTR_TOP), .CTR_THR(CTR_THR), .CTR_PEN(CTR_PEN), .COMP_EN(COMP_EN)
  ) dut (
    .clk, .rst_n, .ready, .pred_valid, .pred_req, .upd_valid, .upd_req, .upd_ready,
    .res_valid, .res_predict, .res_value, .res_comp, .res_cnt, .evt
  );

  typedef struct {
    int              due;
    bit              pred;
    longint unsigned val;
    int unsigned     comp, conf;
  } exp_t;

  exp_t  expq[$];
  lvp_ref model;
  int    cyc = 0;

  initial begin
    checks = 0; failures = 0; taken = 0; correct = 0;
    model = new(LINES, 0, 8, 10, NUM_PVALS, PVAL_W, CTR_TOP, CTR_THR, CTR_PEN, COMP_EN);
  end

  always @(negedge clk) begin
    cyc++;
    #2;
    if (res_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("%s: unexpected result at cycle %0d", NAME, cyc);
      end else begin
        e = expq.pop_front();
        if (e.due != cyc || e.pred != res_predict || e.comp != 32'(res_comp) ||
            e.conf != 32'(res_cnt) || e.val != res_value) begin
          failures++;
          $display("%s cycle %0d: got pred=%0b comp=%0d cnt=%0d, want due=%0d pred=%0b comp=%0d cnt=%0d",
                   NAME, cyc, res_predict, res_comp, res_cnt, e.due, e.pred, e.comp, e.conf);
        end
        if (res_predict) taken++;
      end
    end
    if (rst_n && ready) begin
      if (pred_valid) begin
        exp_t e;
        bit p; longint unsigned v; int unsigned c, k;
        model.predict(pred_req.pc, pred_reg, p, v, c, k);
        e.due = cyc + 2; e.pred = p; e.val = v; e.comp = c; e.conf = k;
        expq.push_back(e);
      end else if (upd_valid) begin
        void'(model.update(upd_req.pc, upd_val, upd_reg));
      end
    end
  end

  // results still owed at the end count as failures
  final begin
    if (expq.size() != 0) $display("%s: %0d results never arrived", NAME, expq.size());
  end
endmodule
