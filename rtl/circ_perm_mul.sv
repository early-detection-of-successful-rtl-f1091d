// circ_perm_mul: multiplies a z-bit sub-block by a z x z circulant
// permutation matrix, i.e. computes P * s^t where P is the identity matrix
// with its rows rotated right by `shift` positions.
//
// Row r of such a P has its single one in column (r + shift) mod z, so
// output bit r is input bit (r + shift) mod z: the sub-block is rotated
// towards bit 0 by `shift`. The expansion factor z is a run-time input (a
// multi-rate decoder changes it per code), so the rotation works inside the
// low z bits of a Z_MAX-bit word: the vector is masked to z bits, shifted down
// by `shift`, OR-ed with the same vector shifted up by (z - shift), and
// masked again. Bits at and above z are always zero at the output.
//
// The circulant definition follows the published method; the masked double-shift
// structure is this design's choice. `shift` must be below z.
// Purely combinational.
module circ_perm_mul #(
  parameter int unsigned Z_MAX   = ed_pkg::Z_MAX,
  parameter int unsigned SHIFT_W = $clog2(Z_MAX),
  parameter int unsigned Z_W     = $clog2(Z_MAX + 1)
) (
  input  logic [Z_MAX-1:0]   s_in,   // sub-block, bit r = coded bit r of the block
  input  logic [SHIFT_W-1:0] shift,  // circulant shift, 0 .. z-1
  input  logic [Z_W-1:0]     z,      // expansion factor, 1 .. Z_MAX
  output logic [Z_MAX-1:0]   s_out   // P * s_in
);

  logic [Z_MAX-1:0] mask;
  logic [Z_MAX-1:0] a;
  logic [Z_W-1:0]   back;

  always_comb begin
    mask  = (z >= Z_W'(Z_MAX)) ? '1 : ~({Z_MAX{1'b1}} << z);
    a     = s_in & mask;
    back  = z - Z_W'(shift);
    s_out = ((a >> shift) | (a << back)) & mask;
  end

endmodule
