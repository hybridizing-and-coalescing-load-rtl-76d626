// tb_lvp_update_fifo: self-checking testbench of the 16-entry update queue.
// Random pushes and pops against a queue model: data order, the count, the
// drop of a push that finds the queue full, and that a drop really happened
// and the queue really emptied at least once.
module tb_lvp_update_fifo;
  import lvp_pkg::*;
  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       push, dropped, not_empty, pop;
  upd_req_t   push_data, pop_data;
  logic [4:0] count;

  lvp_update_fifo #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, drops = 0, empties = 0;
  upd_req_t model[$];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      bit e_drop;
      @(negedge clk);
      // phases of heavy pushing and heavy popping
      push = ($urandom_range(0, 9) < (((t / 300) % 2 == 0) ? 8 : 3));
      pop  = not_empty && ($urandom_range(0, 9) < (((t / 300) % 2 == 0) ? 3 : 8));
      push_data.pc = {$urandom, $urandom};
      push_data.value = {$urandom, $urandom};
      push_data.reg_val = {$urandom, $urandom};
      #1;
      checks++;
      if (int'(count) != model.size() || not_empty != (model.size() != 0)) begin
        failures++; $display("count %0d want %0d", count, model.size());
      end
      if (model.size() == 0) empties++;
      e_drop = push && (model.size() == DEPTH);
      checks++;
      if (dropped != e_drop) begin failures++; $display("drop flag wrong at %0d", t); end
      if (e_drop) drops++;
      if (pop && model.size() != 0) begin
        checks++;
        if (pop_data != model[0]) begin failures++; $display("head wrong at %0d", t); end
        void'(model.pop_front());
      end
      if (push && !e_drop) model.push_back(push_data);
    end
    checks++;
    if (drops == 0 || empties == 0) begin failures++; $display("drops %0d empties %0d", drops, empties); end
    $display("drops %0d", drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
