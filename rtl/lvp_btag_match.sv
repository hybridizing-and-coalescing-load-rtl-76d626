// lvp_btag_match: partial-tag compare and the b-tag update rule.
//
// A b-tag is an 8-bit partial tag plus one miss bit that records whether the
// last update of the line missed.  A prediction may only be used on a tag
// hit.  On an update, a hit updates the line normally and clears the miss
// bit.  The first miss leaves the line alone except for setting the miss
// bit; a second miss in a row takes the line over for the new load (new
// tag, miss bit cleared, normal update).  This keeps rarely executed loads
// from evicting the lines of frequently executed ones.  Only updates touch
// the miss bit; predictions do not write the predictor.
//
// Purely combinational.
module lvp_btag_match #(
  parameter int unsigned TAG_W = 8
) (
  input  logic [TAG_W-1:0] line_tag,
  input  logic             line_miss,
  input  logic [TAG_W-1:0] req_tag,
  output logic             hit,        // partial tag matches
  output logic             do_update,  // update the line's values and confidence
  output logic             replace,    // second miss in a row: line taken over
  output logic [TAG_W-1:0] new_tag,    // b-tag to write back on an update
  output logic             new_miss
);

  always_comb begin
    hit       = (line_tag == req_tag);
    replace   = !hit && line_miss;
    do_update = hit || line_miss;
    new_tag   = do_update ? req_tag : line_tag;
    new_miss  = !hit && !line_miss;
  end

endmodule
