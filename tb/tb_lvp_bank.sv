// tb_lvp_bank: self-checking testbench of one predictor bank.
//
// A small bank (16 lines) is driven with random predictions and updates from
// a set of synthetic load sites whose value sequences suit each component
// (constant, stride, three- and two-value cycles, register-held values,
// random), plus rarely executed sites that alias the same lines under other
// tags.  Every prediction result is compared, field by field and for its
// two-cycle latency, with an untimed reference model fed the same
// operations in the same order.  The test also requires that each component
// supplied at least one prediction and that tag hits, first misses and line
// take-overs all occurred.
module tb_lvp_bank;
  import lvp_pkg::*;
  import lvp_ref_pkg::*;

  localparam int unsigned LINES = 16;
  localparam int unsigned NCOMP = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              ready, pred_valid, upd_valid, upd_ready;
  pred_req_t         pred_req;
  upd_req_t          upd_req;
  logic              res_valid, res_predict;
  logic [63:0]       res_value;
  logic [2:0]        res_comp;
  logic [3:0]        res_cnt;
  bank_evt_t         evt;

  lvp_bank #(.LINES(LINES)) dut (
    .clk, .rst_n, .ready, .pred_valid, .pred_req, .upd_valid, .upd_req, .upd_ready,
    .res_valid, .res_predict, .res_value, .res_comp, .res_cnt, .evt
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_taken[NCOMP];
  int n_correct = 0, n_wrong = 0;
  int n_hit = 0, n_first_miss = 0, n_replace = 0;

  typedef struct {
    int              due;
    bit              pred;
    longint unsigned val;
    int unsigned     comp, conf;
    longint unsigned truth;
  } exp_t;
  exp_t expq[$];

  lvp_ref   model;
  load_site sites[$];

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    finish();
  end

  // compare results and count events at each falling edge
  always @(negedge clk) begin
    cyc++;
    if (evt.upd_hit) n_hit++;
    if (evt.upd_first_miss) n_first_miss++;
    if (evt.upd_replace) n_replace++;
    if (res_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected result at cycle %0d", cyc);
      end else begin
        e = expq.pop_front();
        if (e.due != cyc || e.pred != res_predict || e.comp != res_comp ||
            e.conf != res_cnt || e.val != res_value) begin
          failures++;
          $display("cycle %0d: got pred=%0b comp=%0d cnt=%0d val=%h, want due=%0d pred=%0b comp=%0d cnt=%0d val=%h",
                   cyc, res_predict, res_comp, res_cnt, res_value, e.due, e.pred, e.comp, e.conf, e.val);
        end
        if (res_predict) begin
          n_taken[res_comp]++;
          if (res_value == e.truth) n_correct++; else n_wrong++;
        end
      end
    end
  end

  initial begin
    longint unsigned cur_val[$], cur_reg[$];
    automatic int ops = 0;
    model = new(LINES, 0, 8, 10, 2, 16, 15, 8, 4, 32'hFFFF_FFFF);
    // frequent sites on lines 0..11, two per kind
    for (int s = 0; s < 12; s++) begin
      load_site ls;
      ls = new((64'(s + 1) << 6) | (64'(s) << 2), s % 6);
      sites.push_back(ls);
    end
    // rare sites: same lines 0..3, other tags
    for (int s = 0; s < 4; s++) begin
      load_site ls;
      ls = new((64'(s + 100) << 6) | (64'(s) << 2), 4);
      sites.push_back(ls);
    end
    foreach (sites[s]) begin
      longint unsigned v, r;
      sites[s].next(v, r);
      cur_val.push_back(v);
      cur_reg.push_back(r);
    end
    pred_valid = 1'b0; upd_valid = 1'b0; pred_req = '0; upd_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!ready) @(negedge clk);
    // ready must come after the counter tables are cleared
    checks++;
    if (cyc < 1024) begin failures++; $display("ready too early at %0d", cyc); end

    for (int t = 0; t < 9000; t++) begin
      int sp, su;
      bit dp, du;
      @(negedge clk);
      #1;
      // site choice: a rare site now and then; late in the run, rare sites
      // in bursts so that a line is taken over
      sp = (($urandom_range(0, 19) == 0) || (t > 7000 && t % 200 < 6)) ? 12 + (t / 7) % 4
                                                                        : $urandom_range(0, 11);
      su = sp;
      dp = ($urandom_range(0, 2) == 0);
      du = ($urandom_range(0, 3) != 0);
      pred_valid = dp;
      pred_req.pc = sites[sp].pc;
      pred_req.reg_val = cur_reg[sp];
      upd_valid = du;
      upd_req.pc = sites[su].pc;
      upd_req.value = cur_val[su];
      upd_req.reg_val = cur_reg[su];
      if (dp) begin
        exp_t e;
        bit p; longint unsigned v; int unsigned c, k;
        model.predict(sites[sp].pc, cur_reg[sp], p, v, c, k);
        e.due = cyc + 2; e.pred = p; e.val = v; e.comp = c; e.conf = k;
        e.truth = cur_val[sp];
        expq.push_back(e);
      end else if (du) begin
        longint unsigned v, r;
        void'(model.update(sites[su].pc, cur_val[su], cur_reg[su]));
        sites[su].next(v, r);
        cur_val[su] = v;
        cur_reg[su] = r;
        ops++;
      end
    end
    @(negedge clk);
    pred_valid = 1'b0; upd_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
    for (int c = 0; c < int'(NCOMP); c++) begin
      checks++;
      if (n_taken[c] == 0) begin failures++; $display("component %0d never predicted", c); end
    end
    checks++;
    if (n_hit == 0 || n_first_miss == 0 || n_replace == 0) begin
      failures++;
      $display("b-tag cases: hits %0d first misses %0d take-overs %0d", n_hit, n_first_miss, n_replace);
    end
    $display("updates %0d hits %0d first-miss %0d take-over %0d; taken st %0d reg %0d lv %0d pv2 %0d pv3 %0d; correct %0d wrong %0d",
             ops, n_hit, n_first_miss, n_replace, n_taken[0], n_taken[1], n_taken[2], n_taken[3], n_taken[4],
             n_correct, n_wrong);
    finish();
  end
endmodule
