// tb_lvp_btag_match: exhaustive self-checking testbench of the b-tag rule
// with 4-bit tags: hit, first miss (only the miss bit is set) and second
// miss in a row (the line is taken over).
module tb_lvp_btag_match;
  localparam int unsigned TAG_W = 4;

  logic [TAG_W-1:0] line_tag, req_tag, new_tag;
  logic             line_miss, hit, do_update, replace, new_miss;

  lvp_btag_match #(.TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int lt = 0; lt < 16; lt++)
      for (int rt = 0; rt < 16; rt++)
        for (int m = 0; m < 2; m++) begin
          bit e_hit, e_upd, e_rep, e_miss;
          int e_tag;
          line_tag = TAG_W'(lt); req_tag = TAG_W'(rt); line_miss = m[0];
          #1;
          e_hit  = (lt == rt);
          e_upd  = e_hit || (m == 1);
          e_rep  = !e_hit && (m == 1);
          e_miss = !e_hit && (m == 0);
          e_tag  = e_upd ? rt : lt;
          checks++;
          if (hit != e_hit || do_update != e_upd || replace != e_rep ||
              new_miss != e_miss || int'(new_tag) != e_tag) begin
            failures++;
            $display("tag %0d req %0d miss %0d: got %b%b%b%b %0d", lt, rt, m,
                     hit, do_update, replace, new_miss, new_tag);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
