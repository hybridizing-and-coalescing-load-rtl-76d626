// lvp_line_array: the predictor line storage of one bank.
//
// LINES words of WIDTH bits.  In the coalesced hybrid a line holds the b-tag,
// the five outcome histories, the 64-bit last value and the 16-bit partial
// values; the bank packs and unpacks them, this array only stores them.
//
// Interface and timing: a synchronous read port (data on rd_data one cycle
// after rd_en) and a write port.  A read and a write to the same line in the
// same cycle return the written data (write-through bypass), so a
// read-modify-write pipeline that writes one cycle after it reads needs no
// other forwarding.  After reset every line is cleared to zero, one line per
// cycle, with ready low meanwhile; a zero line has b-tag 0 and empty
// histories.  Reset clearing and bypass are this design's own choices.
module lvp_line_array #(
  parameter int unsigned LINES = 1024,
  parameter int unsigned WIDTH = 155
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     ready,
  input  logic                     rd_en,
  input  logic [$clog2(LINES)-1:0] rd_idx,
  output logic [WIDTH-1:0]         rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(LINES)-1:0] wr_idx,
  input  logic [WIDTH-1:0]         wr_data
);

  localparam int unsigned IDX_W = $clog2(LINES);

  logic [WIDTH-1:0] mem [LINES];
  logic [WIDTH-1:0] mem_q;
  logic [WIDTH-1:0] byp_q;
  logic             byp_sel_q;
  logic             clearing;
  logic [IDX_W-1:0] clr_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_idx  <= '0;
    end else if (clearing) begin
      clr_idx <= clr_idx + 1'b1;
      if (clr_idx == IDX_W'(LINES - 1)) clearing <= 1'b0;
    end
  end

  assign ready = !clearing;

  always_ff @(posedge clk) begin
    if (clearing)   mem[clr_idx] <= '0;
    else if (wr_en) mem[wr_idx]  <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      mem_q     <= mem[rd_idx];
      byp_sel_q <= wr_en && !clearing && (wr_idx == rd_idx);
      byp_q     <= wr_data;
    end
  end

  assign rd_data = byp_sel_q ? byp_q : mem_q;

endmodule
