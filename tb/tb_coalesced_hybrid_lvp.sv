// tb_coalesced_hybrid_lvp: end-to-end, self-checking testbench of the
// four-bank coalesced-hybrid predictor at its default size (1024 lines in
// four banks, 10-bit histories, 16-entry update queues).
//
// Each bank serves its own set of synthetic load sites (PC bits [3:2] equal
// the bank number), with value sequences suited to each component
// (constant, stride, cycles of two and three values sharing their upper
// bits, values already held in the destination register, random) and rarely
// executed sites that alias the same lines under other tags.  Every cycle
// each bank may get a prediction request and an update.  An untimed model
// (one reference bank and one queue per bank) predicts every result and
// every dropped update; results are checked field by field and for their
// two-cycle latency.  The test counts, and requires at least once: a
// prediction from each of the five components, tag hits, first misses and
// line take-overs, four predictions in one cycle, updates held in the queue
// by predictions, and updates dropped from a full queue.
module tb_coalesced_hybrid_lvp;
  import lvp_pkg::*;
  import lvp_ref_pkg::*;

  localparam int unsigned NB = 4, LINES = 1024, DEPTH = 16, NCOMP = 5;
  localparam int unsigned NSITE = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            ready;
  logic [NB-1:0]   pred_valid, upd_valid, upd_dropped, res_valid, res_predict;
  pred_req_t       pred_req [NB];
  upd_req_t        upd_req [NB];
  logic [63:0]     res_value [NB];
  logic [2:0]      res_comp [NB];
  logic [3:0]      res_cnt [NB];
  logic [4:0]      fifo_count [NB];
  bank_evt_t       evt [NB];

  coalesced_hybrid_lvp dut (
    .clk, .rst_n, .ready, .pred_valid, .pred_req, .upd_valid, .upd_req,
    .upd_dropped, .res_valid, .res_predict, .res_value, .res_comp, .res_cnt,
    .fifo_count, .evt
  );

  typedef struct {
    int              due;
    bit              pred;
    longint unsigned val;
    int unsigned     comp, conf;
    longint unsigned truth;
  } exp_t;

  int checks = 0, failures = 0, cyc = 0;
  int n_taken[NCOMP], n_correct = 0, n_wrong = 0;
  int n_hit = 0, n_first_miss = 0, n_replace = 0, n_drop = 0, n_held = 0, n_quad = 0;
  int n_upd = 0, n_pred = 0;

  exp_t            expq [NB][$];
  upd_req_t        qmodel [NB][$];
  lvp_ref          model [NB];
  load_site        sites [NB][NSITE];
  longint unsigned cur_val [NB][NSITE], cur_reg [NB][NSITE];

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    finish();
  end

  // results and events, sampled mid-cycle
  always @(negedge clk) begin
    cyc++;
    for (int b = 0; b < int'(NB); b++) begin
      if (evt[b].upd_hit) n_hit++;
      if (evt[b].upd_first_miss) n_first_miss++;
      if (evt[b].upd_replace) n_replace++;
      if (res_valid[b]) begin
        exp_t e;
        checks++;
        if (expq[b].size() == 0) begin
          failures++;
          $display("bank %0d: unexpected result at cycle %0d", b, cyc);
        end else begin
          e = expq[b].pop_front();
          if (e.due != cyc || e.pred != res_predict[b] || e.comp != res_comp[b] ||
              e.conf != res_cnt[b] || e.val != res_value[b]) begin
            failures++;
            $display("bank %0d cycle %0d: got pred=%0b comp=%0d cnt=%0d val=%h, want due=%0d pred=%0b comp=%0d cnt=%0d val=%h",
                     b, cyc, res_predict[b], res_comp[b], res_cnt[b], res_value[b],
                     e.due, e.pred, e.comp, e.conf, e.val);
          end
          if (res_predict[b]) begin
            n_taken[res_comp[b]]++;
            if (res_value[b] == e.truth) n_correct++; else n_wrong++;
          end
        end
      end
    end
    if (&res_valid) n_quad++;
  end

  function automatic longint unsigned site_pc(int b, int s);
    // frequent sites: lines 8*s, tag s+1; rare sites (12..15): lines of
    // sites 0..3 under tags 200+
    int line = (s < 12) ? 8 * s : 8 * (s - 12);
    int tag  = (s < 12) ? s + 1 : 200 + s;
    return (64'(tag) << 12) | (64'(line) << 4) | (64'(b) << 2);
  endfunction

  initial begin
    automatic int cycles = 0;
    bit drop_exp [NB];
    for (int b = 0; b < int'(NB); b++) begin
      model[b] = new(LINES / NB, 2, 8, 10, 2, 16, 15, 8, 4, 32'hFFFF_FFFF);
      for (int s = 0; s < int'(NSITE); s++) begin
        longint unsigned v, r;
        sites[b][s] = new(site_pc(b, s), (s < 12) ? s % 6 : 4);
        sites[b][s].next(v, r);
        cur_val[b][s] = v;
        cur_reg[b][s] = r;
      end
    end
    pred_valid = '0; upd_valid = '0;
    foreach (pred_req[b]) pred_req[b] = '0;
    foreach (upd_req[b]) upd_req[b] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!ready) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 1024) begin failures++; $display("ready after %0d cycles", cycles); end

    for (int t = 0; t < 12000; t++) begin
      @(negedge clk);
      #1;
      for (int b = 0; b < int'(NB); b++) begin
        int sp, su, pp;
        bit dp, du, e_drop;
        // prediction pressure: normal, then a burst that fills the queues
        pp = ((t % 2000) > 1900) ? 10 : 3;
        sp = (($urandom_range(0, 19) == 0) || (t > 9000 && t % 150 < 8)) ? 12 + (t / 9) % 4
                                                                          : $urandom_range(0, 11);
        su = $urandom_range(0, 19) == 0 ? 12 + (t / 5) % 4 : $urandom_range(0, 11);
        if (t > 9000 && t % 150 < 8) su = sp;
        dp = ($urandom_range(0, 9) < pp);
        du = ($urandom_range(0, 9) < 6);
        pred_valid[b] = dp;
        pred_req[b].pc = sites[b][sp].pc;
        pred_req[b].reg_val = cur_reg[b][sp];
        upd_valid[b] = du;
        upd_req[b].pc = sites[b][su].pc;
        upd_req[b].value = cur_val[b][su];
        upd_req[b].reg_val = cur_reg[b][su];
        // model of the bank for the coming clock edge
        if (dp) begin
          exp_t e;
          bit p; longint unsigned v; int unsigned c, k;
          model[b].predict(sites[b][sp].pc, cur_reg[b][sp], p, v, c, k);
          e.due = cyc + 2; e.pred = p; e.val = v; e.comp = c; e.conf = k;
          e.truth = cur_val[b][sp];
          expq[b].push_back(e);
          n_pred++;
          if (qmodel[b].size() != 0) n_held++;
        end
        e_drop = du && (qmodel[b].size() == DEPTH);
        drop_exp[b] = e_drop;
        checks++;
        if (int'(fifo_count[b]) != qmodel[b].size()) begin
          failures++;
          $display("bank %0d cycle %0d: queue holds %0d, want %0d", b, cyc, fifo_count[b], qmodel[b].size());
        end
        if (!dp && qmodel[b].size() != 0) begin
          upd_req_t u;
          u = qmodel[b].pop_front();
          void'(model[b].update(u.pc, u.value, u.reg_val));
          n_upd++;
        end
        if (du) begin
          longint unsigned v, r;
          if (e_drop) n_drop++;
          else qmodel[b].push_back(upd_req[b]);
          // the load has executed: its site moves on to the next value
          sites[b][su].next(v, r);
          cur_val[b][su] = v;
          cur_reg[b][su] = r;
        end
      end
      #1;
      for (int b = 0; b < int'(NB); b++) begin
        checks++;
        if (upd_dropped[b] != drop_exp[b]) begin
          failures++;
          $display("bank %0d cycle %0d: drop flag %0b, want %0b", b, cyc, upd_dropped[b], drop_exp[b]);
        end
      end
    end
    @(negedge clk);
    pred_valid = '0; upd_valid = '0;
    repeat (40) @(negedge clk);
    for (int b = 0; b < int'(NB); b++) begin
      checks++;
      if (expq[b].size() != 0) begin failures++; $display("bank %0d: %0d results missing", b, expq[b].size()); end
    end
    for (int c = 0; c < int'(NCOMP); c++) begin
      checks++;
      if (n_taken[c] == 0) begin failures++; $display("component %0d never predicted", c); end
    end
    checks++;
    if (n_hit == 0 || n_first_miss == 0 || n_replace == 0 || n_drop == 0 || n_held == 0 || n_quad == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("predictions %0d (four at once %0d), taken: st %0d reg %0d lv %0d pv2 %0d pv3 %0d, correct %0d wrong %0d",
             n_pred, n_quad, n_taken[0], n_taken[1], n_taken[2], n_taken[3], n_taken[4], n_correct, n_wrong);
    $display("updates %0d: hits %0d first misses %0d take-overs %0d; held behind predictions %0d; dropped %0d",
             n_upd, n_hit, n_first_miss, n_replace, n_held, n_drop);
    finish();
  end
endmodule
