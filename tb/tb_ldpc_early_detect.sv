// tb_ldpc_early_detect: end-to-end test of the early-detection unit at its
// default (full) size, standing in for the decoder.
//
// For each code it builds a random dual-diagonal base matrix of the code's
// dimensions (data part: random shifts with some zero blocks; parity part:
// weight-3 first column with shifts d, 0, d at rows 0, x, mb-1 and an
// identity staircase), encodes random data with the recursive dual-diagonal
// encoder, and confirms that the full H c^t is zero bit by bit. It then
// plays decoding iterations: each iteration writes a hard-decision vector
// (the codeword with chosen bit errors) into the unit and pulses iter_done.
// The reference for the check is computed independently from the complete
// parity-check matrix: the m-bit syndrome H c^t is folded by XOR-ing its mb
// z-bit row groups, which must equal check_lhs; check_ok must be its zero test.
// Also checked: check_done exactly kb+2 cycles after iter_done, and the
// stop / decoded / next_iter decision with the 15-iteration limit.
//
// Codes: the three codes simulated with the method, (2304,1152) z=96,
// (2304,1536) z=96 and (576,384) z=24, plus rate-3/4 and rate-5/6 shapes of
// the same standard family (z=96). Mechanisms counted, each must occur:
//   early stop : check passes although staircase parity bits are still wrong
//                (the full parity check fails) - the point of the method
//   clean stop : check passes on an error-free word
//   continue   : check fails, next iteration requested
//   limit      : 15 iterations without success, stop without decoded
//   p0 reject  : only p0 wrong, the check fails
//   code switch: the unit is reloaded with another code
module tb_ldpc_early_detect;
  import ed_pkg::hb_entry_t;
  localparam int unsigned Z_MAX = 96, MB_MAX = 12, KB_MAX = 20, NB_MAX = 24;

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
  int n_early = 0, n_clean = 0, n_cont = 0, n_limit = 0, n_p0rej = 0, n_switch = 0;

  // code under test
  int z, mb, kb, nb;
  int hb [MB_MAX][NB_MAX];            // full base matrix, -1 = zero block
  logic [Z_MAX-1:0] cw [NB_MAX];      // codeword sub-blocks
  logic [Z_MAX-1:0] hd [NB_MAX];      // hard decisions of one iteration

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [z=%0d mb=%0d kb=%0d] %s", z, mb, kb, what);
    end
  endtask

  // P(shift) * v over z bits
  function automatic logic [Z_MAX-1:0] pmul(logic [Z_MAX-1:0] v, int sh);
    logic [Z_MAX-1:0] r = '0;
    for (int k = 0; k < z; k++) r[k] = v[(k + sh) % z];
    return r;
  endfunction

  // full syndrome H * x^t, one z-bit group per base row
  task automatic syndrome(input logic [Z_MAX-1:0] x [NB_MAX], output logic [Z_MAX-1:0] syn [MB_MAX]);
    for (int i = 0; i < MB_MAX; i++) syn[i] = '0;
    for (int i = 0; i < mb; i++)
      for (int j = 0; j < nb; j++)
        if (hb[i][j] >= 0) syn[i] ^= pmul(x[j], hb[i][j]);
  endtask

  task automatic make_code(int zz, int m, int k);
    int d, x;
    z = zz; mb = m; kb = k; nb = m + k;
    for (int i = 0; i < MB_MAX; i++)
      for (int j = 0; j < NB_MAX; j++) hb[i][j] = -1;
    for (int i = 0; i < mb; i++)
      for (int j = 0; j < kb; j++)
        if ($urandom % 100 < 40) hb[i][j] = int'($urandom % z);
    // make some columns hold repeated shifts, which cancel in the fold
    hb[0][0] = 5 % z; hb[1][0] = 5 % z;
    d = 1 + int'($urandom % (z - 1));
    x = 1 + int'($urandom % (mb - 2));
    hb[0][kb] = d; hb[x][kb] = 0; hb[mb-1][kb] = d;
    for (int c = 1; c < mb; c++) begin
      hb[c-1][kb+c] = 0;
      hb[c][kb+c]   = 0;
    end
  endtask

  task automatic load_code();
    @(negedge clk);
    cfg_z = 7'(z); cfg_mb = 4'(mb); cfg_kb = 5'(kb);
    for (int i = 0; i < mb; i++)
      for (int j = 0; j < kb; j++) begin
        hb_we = 1; hb_wr_row = 4'(i); hb_wr_col = 5'(j);
        hb_wr_entry.valid = (hb[i][j] >= 0);
        hb_wr_entry.shift = (hb[i][j] >= 0) ? 7'(hb[i][j]) : 7'($urandom % z);
        @(negedge clk);
      end
    hb_we = 0;
    n_switch++;
  endtask

  task automatic encode();
    logic [Z_MAX-1:0] lam [MB_MAX];
    logic [Z_MAX-1:0] syn [MB_MAX];
    logic [Z_MAX-1:0] zmask;
    int x = 0;
    zmask = (z == Z_MAX) ? '1 : ~({Z_MAX{1'b1}} << z);
    for (int i = 1; i < mb - 1; i++) if (hb[i][kb] == 0) x = i;
    for (int j = 0; j < NB_MAX; j++) cw[j] = '0;
    for (int j = 0; j < kb; j++) cw[j] = {$urandom, $urandom, $urandom} & zmask;
    for (int i = 0; i < mb; i++) begin
      lam[i] = '0;
      for (int j = 0; j < kb; j++) if (hb[i][j] >= 0) lam[i] ^= pmul(cw[j], hb[i][j]);
    end
    cw[kb] = '0;
    for (int i = 0; i < mb; i++) cw[kb] ^= lam[i];
    cw[kb+1] = lam[0] ^ pmul(cw[kb], hb[0][kb]);
    for (int i = 1; i < mb - 1; i++)
      cw[kb+i+1] = lam[i] ^ cw[kb+i] ^ ((i == x) ? cw[kb] : '0);
    syndrome(cw, syn);
    for (int i = 0; i < mb; i++) expect1(syn[i] == '0, "reference encoder gives a codeword");
  endtask

  // flip one random bit of sub-block j
  task automatic flip(int j);
    hd[j][$urandom % z] ^= 1'b1;
  endtask

  // one decoding iteration with the hard decisions in hd; returns the
  // expected check outcome
  task automatic iteration(output bit ok, output bit std_ok);
    logic [Z_MAX-1:0] syn [MB_MAX];
    logic [Z_MAX-1:0] fold;
    int cyc;
    syndrome(hd, syn);
    fold = '0;
    std_ok = 1;
    for (int i = 0; i < mb; i++) begin
      fold ^= syn[i];
      if (syn[i] != '0) std_ok = 0;
    end
    ok = (fold == '0);
    for (int j = 0; j < nb; j++) begin
      hd_we = 1; hd_wr_addr = 5'(j); hd_wr_data = hd[j];
      @(negedge clk);
    end
    hd_we = 0;
    iter_done = 1;
    @(negedge clk);
    iter_done = 0;
    cyc = 1;
    while (!check_done && cyc < 100) begin @(negedge clk); cyc++; end
    expect1(cyc == kb + 2, $sformatf("check latency %0d cycles, expected %0d", cyc, kb + 2));
    expect1(check_lhs == fold, "check_lhs equals folded full syndrome");
    expect1(check_ok == ok, "check_ok");
    @(negedge clk);
  endtask

  // decode one block: errors(it) sets the hard decisions of iteration it
  // (1-based); data errors vanish at iteration clean_at, parity errors in
  // the staircase stay until park_at (never if 0)
  task automatic run_block(int clean_at, bit stair_err, bit p0_err);
    bit ok, std_ok, done_blk;
    int it;
    @(negedge clk);
    frame_start = 1; @(negedge clk); frame_start = 0;
    it = 0; done_blk = 0;
    while (!done_blk) begin
      it++;
      for (int j = 0; j < NB_MAX; j++) hd[j] = cw[j];
      if (it < clean_at) begin
        flip(int'($urandom % kb));
        if ($urandom % 2) flip(int'($urandom % kb));
      end
      if (stair_err) flip(kb + 1 + int'($urandom % (mb - 1)));
      if (p0_err) flip(kb);
      iteration(ok, std_ok);
      expect1(int'(iter_count) == it, "iteration count");
      if (ok) begin
        expect1(stop && decoded && !next_iter, "stop with decoded");
        if (!std_ok) n_early++; else n_clean++;
        done_blk = 1;
      end else if (it == 15) begin
        expect1(stop && !decoded && !next_iter, "stop at 15 iterations");
        n_limit++;
        done_blk = 1;
      end else begin
        expect1(next_iter && !stop, "next iteration requested");
        n_cont++;
        if (p0_err && it >= clean_at) n_p0rej++;
      end
    end
  endtask

  task automatic run_code(int zz, int m, int k, int blocks);
    make_code(zz, m, k);
    load_code();
    for (int b = 0; b < blocks; b++) begin
      encode();
      case (b % 5)
        0: run_block(1, 0, 0);                              // clean
        1: run_block(1 + int'($urandom % 4), 1, 0);         // early stop
        2: run_block(2 + int'($urandom % 6), 0, 0);         // continue, then clean
        3: run_block(100, 0, 0);                            // never converges
        default: run_block(1 + int'($urandom % 3), 0, 1);   // p0 never right
      endcase
    end
  endtask

  initial begin
    rst_n = 0; cfg_z = 96; cfg_mb = 12; cfg_kb = 12;
    hb_we = 0; hb_wr_row = 0; hb_wr_col = 0; hb_wr_entry = '0;
    hd_we = 0; hd_wr_addr = 0; hd_wr_data = '0;
    frame_start = 0; iter_done = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_code(96, 12, 12, 5);   // (2304,1152) rate 1/2
    run_code(96,  8, 16, 5);   // (2304,1536) rate 2/3
    run_code(24,  8, 16, 5);   // (576,384)   rate 2/3
    run_code(96,  6, 18, 5);   // (2304,1728) rate 3/4
    run_code(96,  4, 20, 5);   // (2304,1920) rate 5/6
    $display("mechanisms: early=%0d clean=%0d continue=%0d limit=%0d p0_reject=%0d code_switch=%0d",
             n_early, n_clean, n_cont, n_limit, n_p0rej, n_switch);
    expect1(n_early  > 0, "early stop with wrong staircase parity occurred");
    expect1(n_clean  > 0, "clean stop occurred");
    expect1(n_cont   > 0, "continue occurred");
    expect1(n_limit  > 0, "iteration limit occurred");
    expect1(n_p0rej  > 0, "p0 reject occurred");
    expect1(n_switch > 1, "code switch occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
