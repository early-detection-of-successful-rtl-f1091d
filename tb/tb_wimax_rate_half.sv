// tb_wimax_rate_half: end-to-end run of the early-detection unit, at its
// default size, on the rate-1/2 code of IEEE 802.16e: base matrix 12 x 24,
// z = 96 (the (2304,1152) code), and the same table scaled for z = 48 and
// z = 24 with the standard's rule shift' = floor(shift * z / 96).
//
// The shift table below is entered from the standard. The testbench first
// confirms that its parity part has the dual-diagonal shape (weight-3 first
// column with shifts d, 0, d, identity staircase). It then encodes random
// data with the recursive encoder and confirms the codeword against the full
// H. Finally it decodes blocks whose hard decisions carry data errors in early
// iterations and parity errors in the staircase. After each iteration it
// compares check_lhs with the XOR-fold of the full syndrome and check_ok with
// its zero test, and checks the stop / next-iteration decision. Each block is
// also scored with the full parity check: the number of iterations saved by
// the early test is counted and must be positive.
module tb_wimax_rate_half;
  import ed_pkg::hb_entry_t;
  localparam int unsigned Z_MAX = 96, MB_MAX = 12, NB_MAX = 24;

  // IEEE 802.16e rate-1/2 base matrix (z = 96), -1 = zero block
  localparam int HB96 [12][24] = '{
    '{-1, 94, 73, -1, -1, -1, -1, -1, 55, 83, -1, -1,  7,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, 27, -1, -1, -1, 22, 79,  9, -1, -1, -1, 12, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, 24, 22, 81, -1, 33, -1, -1, -1,  0, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1},
    '{61, -1, 47, -1, -1, -1, -1, -1, 65, 25, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, 39, -1, -1, -1, 84, -1, -1, 41, 72, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, -1, 46, 40, -1, 82, -1, -1, -1, 79,  0, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1},
    '{-1, -1, 95, 53, -1, -1, -1, -1, -1, 14, 18, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1},
    '{-1, 11, 73, -1, -1, -1,  2, -1, -1, 47, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1},
    '{12, -1, -1, -1, 83, 24, -1, 43, -1, -1, -1, 51, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1},
    '{-1, -1, -1, -1, -1, 94, -1, 59, -1, -1, 70, 72, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1},
    '{-1, -1,  7, 65, -1, -1, -1, -1, 39, 49, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0},
    '{43, -1, -1, -1, -1, 66, -1, 41, -1, -1, -1, 26,  7, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0}
  };

  logic clk = 0, rst_n;
  logic [6:0] cfg_z;
  logic [3:0] cfg_mb;
  logic [4:0] cfg_kb;
  logic hb_we;
  logic [3:0] hb_wr_row;
  logic [4:0] hb_wr_col;
  hb_entry_t hb_wr_entry;
  logic hd_we;
  logic [4:0] hd_wr_addr;
  logic [Z_MAX-1:0] hd_wr_data;
  logic frame_start, iter_done;
  logic next_iter, stop, decoded, check_busy, check_done, check_ok;
  logic [3:0] iter_count;
  logic [Z_MAX-1:0] check_lhs;

  ldpc_early_detect dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int saved = 0, n_early = 0;
  int z;
  localparam int MB = 12, KB = 12, NB = 24;
  int hb [MB][NB];
  logic [Z_MAX-1:0] cw [NB_MAX];
  logic [Z_MAX-1:0] hd [NB_MAX];

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [z=%0d] %s", z, what);
    end
  endtask

  function automatic logic [Z_MAX-1:0] pmul(logic [Z_MAX-1:0] v, int sh);
    logic [Z_MAX-1:0] r = '0;
    for (int k = 0; k < z; k++) r[k] = v[(k + sh) % z];
    return r;
  endfunction

  task automatic syndrome(input logic [Z_MAX-1:0] x [NB_MAX], output logic [Z_MAX-1:0] syn [MB_MAX]);
    for (int i = 0; i < MB_MAX; i++) syn[i] = '0;
    for (int i = 0; i < MB; i++)
      for (int j = 0; j < NB; j++)
        if (hb[i][j] >= 0) syn[i] ^= pmul(x[j], hb[i][j]);
  endtask

  task automatic setup(int zz);
    int x = -1, d;
    z = zz;
    for (int i = 0; i < MB; i++)
      for (int j = 0; j < NB; j++)
        hb[i][j] = (HB96[i][j] < 0) ? -1 : (HB96[i][j] * zz) / 96;
    // parity part must be dual-diagonal
    d = hb[0][KB];
    expect1(d > 0 && hb[MB-1][KB] == d, "weight-3 column has shift d at both ends");
    for (int i = 1; i < MB - 1; i++) if (hb[i][KB] >= 0) begin
      expect1(x < 0 && hb[i][KB] == 0, "single zero-shift middle entry");
      x = i;
    end
    for (int c = 1; c < MB; c++)
      for (int i = 0; i < MB; i++)
        expect1((hb[i][KB+c] >= 0) == (i == c - 1 || i == c) && hb[i][KB+c] <= 0, "staircase");
    @(negedge clk);
    cfg_z = 7'(z); cfg_mb = 4'(MB); cfg_kb = 5'(KB);
    for (int i = 0; i < MB; i++)
      for (int j = 0; j < KB; j++) begin
        hb_we = 1; hb_wr_row = 4'(i); hb_wr_col = 5'(j);
        hb_wr_entry.valid = (hb[i][j] >= 0);
        hb_wr_entry.shift = (hb[i][j] >= 0) ? 7'(hb[i][j]) : 7'd0;
        @(negedge clk);
      end
    hb_we = 0;
  endtask

  task automatic encode();
    logic [Z_MAX-1:0] lam [MB_MAX];
    logic [Z_MAX-1:0] syn [MB_MAX];
    logic [Z_MAX-1:0] zmask;
    int x = 0;
    zmask = (z == Z_MAX) ? '1 : ~({Z_MAX{1'b1}} << z);
    for (int i = 1; i < MB - 1; i++) if (hb[i][KB] == 0) x = i;
    for (int j = 0; j < NB_MAX; j++) cw[j] = '0;
    for (int j = 0; j < KB; j++) cw[j] = {$urandom, $urandom, $urandom} & zmask;
    for (int i = 0; i < MB; i++) begin
      lam[i] = '0;
      for (int j = 0; j < KB; j++) if (hb[i][j] >= 0) lam[i] ^= pmul(cw[j], hb[i][j]);
    end
    cw[KB] = '0;
    for (int i = 0; i < MB; i++) cw[KB] ^= lam[i];
    cw[KB+1] = lam[0] ^ pmul(cw[KB], hb[0][KB]);
    for (int i = 1; i < MB - 1; i++)
      cw[KB+i+1] = lam[i] ^ cw[KB+i] ^ ((i == x) ? cw[KB] : '0);
    syndrome(cw, syn);
    for (int i = 0; i < MB; i++) expect1(syn[i] == '0, "codeword satisfies full H");
  endtask

  // data errors until iteration data_ok, staircase parity errors until
  // iteration par_ok: the full check passes at max(data_ok, par_ok), the
  // early check at data_ok
  task automatic run_block(int data_ok, int par_ok);
    logic [Z_MAX-1:0] syn [MB_MAX];
    logic [Z_MAX-1:0] fold;
    bit ok, std_ok, fin;
    int it = 0, cyc, std_it = 0;
    @(negedge clk);
    frame_start = 1; @(negedge clk); frame_start = 0;
    fin = 0;
    while (!fin) begin
      it++;
      for (int j = 0; j < NB_MAX; j++) hd[j] = cw[j];
      if (it < data_ok) hd[$urandom % KB][$urandom % z] ^= 1'b1;
      if (it < par_ok)  hd[KB + 1 + ($urandom % (MB - 1))][$urandom % z] ^= 1'b1;
      syndrome(hd, syn);
      fold = '0; std_ok = 1;
      for (int i = 0; i < MB; i++) begin
        fold ^= syn[i];
        if (syn[i] != '0) std_ok = 0;
      end
      ok = (fold == '0);
      for (int j = 0; j < NB; j++) begin
        hd_we = 1; hd_wr_addr = 5'(j); hd_wr_data = hd[j];
        @(negedge clk);
      end
      hd_we = 0; iter_done = 1; @(negedge clk); iter_done = 0;
      cyc = 1;
      while (!check_done && cyc < 100) begin @(negedge clk); cyc++; end
      expect1(cyc == KB + 2, "check latency kb+2");
      expect1(check_lhs == fold, "check_lhs equals folded full syndrome");
      expect1(check_ok == ok, "check_ok");
      @(negedge clk);
      if (ok) begin
        expect1(stop && decoded, "stop with decoded");
        fin = 1;
      end else if (it == 15) begin
        expect1(stop && !decoded, "stop at limit");
        fin = 1;
      end else begin
        expect1(next_iter && !stop, "next iteration");
      end
    end
    // iterations the full parity check would have needed for this block
    std_it = (data_ok > par_ok) ? data_ok : par_ok;
    if (std_it > 15) std_it = 15;
    if (decoded && std_it > it) begin
      saved += std_it - it;
      n_early++;
    end
  endtask

  initial begin
    rst_n = 0; cfg_z = 96; cfg_mb = 12; cfg_kb = 12;
    hb_we = 0; hb_wr_row = 0; hb_wr_col = 0; hb_wr_entry = '0;
    hd_we = 0; hd_wr_addr = 0; hd_wr_data = '0;
    frame_start = 0; iter_done = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int zi = 0; zi < 3; zi++) begin
      setup((zi == 0) ? 96 : (zi == 1) ? 48 : 24);
      for (int b = 0; b < 8; b++) begin
        automatic int d_ok = 1 + int'($urandom % 5);
        automatic int p_ok = d_ok + int'($urandom % 4);
        encode();
        run_block(d_ok, p_ok);
      end
    end
    $display("blocks stopped early: %0d, iterations saved against the full check: %0d", n_early, saved);
    expect1(n_early > 0 && saved > 0, "early detection saved iterations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
