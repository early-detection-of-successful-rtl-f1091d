// ldpc_early_detect: early detection of successful decoding for
// dual-diagonal block-based LDPC codes, to sit beside an iterative
// belief-propagation decoder (layered or two-phase).
//
// A dual-diagonal code's parity part has one weight-3 column (shifts d, 0, d)
// followed by a staircase of identity blocks. Adding up all mb block rows of
// H c^t = 0 cancels every staircase parity sub-block and leaves z equations
//     sum_i sum_j P(i,j) s_j  +  p0  =  0
// over the data sub-blocks s_j and the first parity sub-block p0 only. The
// decoder may stop as soon as these hold, without waiting for the slowly
// converging degree-2 parity bits. Evaluating them is this block's job.
//
// Structure: hb_mem holds Hb_s of the code in use; hd_mem holds the
// decoder's hard decisions, one z-bit word per base column; ed_ctrl walks the
// data columns and p0; ed_accum rotates each column's sub-block by all its
// shifts, XORs the rotations into a z-bit accumulator and reports whether it
// is zero; stop_ctrl turns the check result into stop / next-iteration
// decisions with an iteration limit.
//
// Use: load Hb_s through the hb_* port and set cfg (z, mb, kb) for the code.
// For each code block pulse frame_start; after each decoding iteration, write
// the hard decisions through hd_* and pulse iter_done. kb+3 cycles later
// check_done pulses with check_ok; one cycle after that either stop (with
// decoded) or next_iter pulses. cfg must stay stable while a check runs, and
// hd_* must not be written then. check_lhs shows the z-bit left-hand side.
// The check equation is the published method's; memories, schedule and handshake are
// this design's choices.
module ldpc_early_detect
  import ed_pkg::hb_entry_t;
#(
  parameter int unsigned Z_MAX    = ed_pkg::Z_MAX,
  parameter int unsigned MB_MAX   = ed_pkg::MB_MAX,
  parameter int unsigned KB_MAX   = ed_pkg::KB_MAX,
  parameter int unsigned NB_MAX   = ed_pkg::NB_MAX,
  parameter int unsigned MAX_ITER = ed_pkg::MAX_ITER,
  parameter int unsigned Z_W      = $clog2(Z_MAX + 1),
  parameter int unsigned MB_W     = $clog2(MB_MAX + 1),
  parameter int unsigned KB_W     = $clog2(KB_MAX + 1),
  parameter int unsigned ROW_W    = $clog2(MB_MAX),
  parameter int unsigned COL_W    = $clog2(KB_MAX),
  parameter int unsigned ADDR_W   = $clog2(NB_MAX),
  parameter int unsigned IT_W     = $clog2(MAX_ITER + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // code selection
  input  logic [Z_W-1:0]    cfg_z,
  input  logic [MB_W-1:0]   cfg_mb,
  input  logic [KB_W-1:0]   cfg_kb,
  // base matrix (data part) load port
  input  logic              hb_we,
  input  logic [ROW_W-1:0]  hb_wr_row,
  input  logic [COL_W-1:0]  hb_wr_col,
  input  hb_entry_t         hb_wr_entry,
  // hard decisions from the decoder
  input  logic              hd_we,
  input  logic [ADDR_W-1:0] hd_wr_addr,
  input  logic [Z_MAX-1:0]  hd_wr_data,
  // decoder iteration handshake
  input  logic              frame_start,
  input  logic              iter_done,
  output logic              next_iter,
  output logic              stop,
  output logic              decoded,
  output logic [IT_W-1:0]   iter_count,
  // check status
  output logic              check_busy,
  output logic              check_done,
  output logic              check_ok,
  output logic [Z_MAX-1:0]  check_lhs
);

  hb_entry_t          hb_col [MB_MAX];
  logic [Z_MAX-1:0]   hd_word;
  logic               hb_rd_en, hd_rd_en;
  logic [COL_W-1:0]   hb_rd_col;
  logic [ADDR_W-1:0]  hd_rd_addr;
  logic               acc_clr, acc_en, acc_raw;
  logic               check_start;
  logic               acc_zero;

  hb_mem #(.MB_MAX(MB_MAX), .KB_MAX(KB_MAX)) u_hb_mem (
    .clk      (clk),
    .we       (hb_we),
    .wr_row   (hb_wr_row),
    .wr_col   (hb_wr_col),
    .wr_entry (hb_wr_entry),
    .rd_en    (hb_rd_en),
    .rd_col   (hb_rd_col),
    .rd_data  (hb_col)
  );

  hd_mem #(.Z_MAX(Z_MAX), .NB_MAX(NB_MAX)) u_hd_mem (
    .clk     (clk),
    .we      (hd_we),
    .wr_addr (hd_wr_addr),
    .wr_data (hd_wr_data),
    .rd_en   (hd_rd_en),
    .rd_addr (hd_rd_addr),
    .rd_data (hd_word)
  );

  ed_ctrl #(.KB_MAX(KB_MAX), .NB_MAX(NB_MAX)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (check_start),
    .kb         (cfg_kb),
    .hb_rd_en   (hb_rd_en),
    .hb_rd_col  (hb_rd_col),
    .hd_rd_en   (hd_rd_en),
    .hd_rd_addr (hd_rd_addr),
    .acc_clr    (acc_clr),
    .acc_en     (acc_en),
    .acc_raw    (acc_raw),
    .busy       (check_busy),
    .done       (check_done)
  );

  ed_accum #(.Z_MAX(Z_MAX), .MB_MAX(MB_MAX)) u_accum (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (acc_clr),
    .en        (acc_en),
    .raw       (acc_raw),
    .sub_block (hd_word),
    .col       (hb_col),
    .mb        (cfg_mb),
    .z         (cfg_z),
    .acc       (check_lhs),
    .zero      (acc_zero)
  );

  stop_ctrl #(.MAX_ITER(MAX_ITER)) u_stop (
    .clk         (clk),
    .rst_n       (rst_n),
    .frame_start (frame_start),
    .iter_done   (iter_done),
    .check_done  (check_done),
    .check_ok    (acc_zero),
    .check_start (check_start),
    .next_iter   (next_iter),
    .stop        (stop),
    .decoded     (decoded),
    .iter_count  (iter_count)
  );

  assign check_ok = acc_zero;

  // The hard decisions must not change under a running check.
  always_ff @(posedge clk) begin
    if (rst_n && check_busy)
      assert (!hd_we) else $error("ldpc_early_detect: hd written during a check");
  end

endmodule
