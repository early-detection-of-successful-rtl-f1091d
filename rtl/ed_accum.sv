// ed_accum: datapath of the early-detection check, the folded parity check of the
// method: sum over all base rows i and data columns j of P(i,j) * s_j, plus p0,
// must be the zero vector for the block to be declared decoded.
//
// The sum is reordered column by column: for one data column j, the
// sub-block s_j is rotated by the shift of every non-zero entry of that
// column (one circ_perm_mul per base row, all in parallel) and the results
// are XOR-ed together with the running z-bit accumulator. Entries of rows at
// or above mb, and -1 (zero-block) entries, add nothing. When `raw` is set
// the sub-block is added unrotated; this is how the first parity sub-block
// p0 enters the sum (the weight-3 column of the dual-diagonal part sums to
// the identity over all rows). The dual-diagonal parity sub-blocks p1..p(mb-1)
// cancel in the sum and are never presented.
//
// Timing: `clr` zeroes the accumulator on the next clock edge; with `en`
// high, one column (or p0) is folded in per clock edge. `zero` is
// combinational from the accumulator. Active-low synchronous reset.
// Column-parallel rotation is this design's choice; the published method gives the
// equation only.
module ed_accum
  import ed_pkg::hb_entry_t;
#(
  parameter int unsigned Z_MAX  = ed_pkg::Z_MAX,
  parameter int unsigned MB_MAX = ed_pkg::MB_MAX,
  parameter int unsigned Z_W    = $clog2(Z_MAX + 1),
  parameter int unsigned MB_W   = $clog2(MB_MAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,             // start a new check
  input  logic             en,              // fold in the presented column
  input  logic             raw,             // add sub_block unrotated (p0)
  input  logic [Z_MAX-1:0] sub_block,       // hard decisions of the column
  input  hb_entry_t        col [MB_MAX],    // Hb_s entries of the column, row 0 first
  input  logic [MB_W-1:0]  mb,              // number of base rows in use
  input  logic [Z_W-1:0]   z,               // expansion factor
  output logic [Z_MAX-1:0] acc,             // running left-hand side of the check
  output logic             zero             // acc is all zeros
);

  logic [Z_MAX-1:0] rot [MB_MAX];
  logic [Z_MAX-1:0] col_sum;
  logic [Z_MAX-1:0] zmask;

  for (genvar i = 0; i < MB_MAX; i++) begin : g_row
    circ_perm_mul #(.Z_MAX(Z_MAX)) u_rot (
      .s_in  (sub_block),
      .shift (col[i].shift[$clog2(Z_MAX)-1:0]),
      .z     (z),
      .s_out (rot[i])
    );
  end

  always_comb begin
    zmask   = (z >= Z_W'(Z_MAX)) ? '1 : ~({Z_MAX{1'b1}} << z);
    col_sum = '0;
    if (raw) begin
      col_sum = sub_block & zmask;
    end else begin
      for (int i = 0; i < MB_MAX; i++) begin
        if (col[i].valid && (MB_W'(i) < mb)) col_sum ^= rot[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) acc <= '0;
    else if (en)       acc <= acc ^ col_sum;
  end

  assign zero = (acc == '0);

  // Shifts of the rows in use must lie below z.
  always_ff @(posedge clk) begin
    if (rst_n && en && !raw)
      for (int i = 0; i < MB_MAX; i++)
        if (col[i].valid && (MB_W'(i) < mb))
          assert (Z_W'(col[i].shift) < z)
            else $error("ed_accum: shift %0d not below z=%0d", col[i].shift, z);
  end

endmodule
