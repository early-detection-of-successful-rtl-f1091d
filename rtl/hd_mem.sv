// hd_mem: hard-decision buffer. The decoder writes the current hard
// decision of every z-bit sub-block (one word per base column: data
// sub-blocks s_0..s_(kb-1) at addresses 0..kb-1, parity sub-blocks
// p_0..p_(mb-1) at kb..kb+mb-1). The early-detection check reads only the
// data words and the p_0 word at address kb.
//
// One write port, one read port; read data is registered and appears on the
// clock edge after rd_en. Contents are not reset. The word-per-sub-block
// organisation is this design's choice; the published method does not describe the
// decoder's storage.
module hd_mem #(
  parameter int unsigned Z_MAX  = ed_pkg::Z_MAX,
  parameter int unsigned NB_MAX = ed_pkg::NB_MAX,
  parameter int unsigned ADDR_W = $clog2(NB_MAX)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [Z_MAX-1:0]  wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [Z_MAX-1:0]  rd_data
);

  logic [Z_MAX-1:0] mem [NB_MAX];

  always_ff @(posedge clk) begin
    if (we)    mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
