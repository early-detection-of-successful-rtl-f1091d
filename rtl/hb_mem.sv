// hb_mem: storage for the data part Hb_s of the base matrix (mb x kb
// entries, each a shift value or "zero block"). It is loaded entry by entry
// when a code is selected and read one whole column per access: the checker
// folds a data column of all base rows in one step.
//
// Interface: a write port for one entry (row, column); a read port that
// returns all MB_MAX entries of column rd_col. Read data is registered: it
// appears on the clock edge after rd_en. Contents are not reset; entries of
// rows and columns outside the code in use are never looked at.
// The published method says only that each element of Hb is a non-negative shift or
// -1; the column-wide organisation is this design's choice.
module hb_mem
  import ed_pkg::hb_entry_t;
#(
  parameter int unsigned MB_MAX = ed_pkg::MB_MAX,
  parameter int unsigned KB_MAX = ed_pkg::KB_MAX,
  parameter int unsigned ROW_W  = $clog2(MB_MAX),
  parameter int unsigned COL_W  = $clog2(KB_MAX)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [ROW_W-1:0] wr_row,
  input  logic [COL_W-1:0] wr_col,
  input  hb_entry_t        wr_entry,
  input  logic             rd_en,
  input  logic [COL_W-1:0] rd_col,
  output hb_entry_t        rd_data [MB_MAX]
);

  hb_entry_t mem [KB_MAX][MB_MAX];

  always_ff @(posedge clk) begin
    if (we) mem[wr_col][wr_row] <= wr_entry;
    if (rd_en) rd_data <= mem[rd_col];
  end

endmodule
