// tb_ed_accum: drives the check datapath with random base-matrix columns
// (random mix of zero blocks and shifts, including rows beyond mb that must
// be ignored) and random sub-blocks for several expansion factors, then a p0
// word in raw mode. After every step the accumulator is compared with a
// reference that expands each circulant bit by bit: reference bit r is the
// XOR over valid rows i < mb of s_j[(r + shift_i) mod z]. Also checks clear,
// hold with en low, and the zero flag.
module tb_ed_accum;
  import ed_pkg::hb_entry_t;
  localparam int unsigned Z_MAX = 96, MB_MAX = 12;
  logic clk = 0, rst_n, clr, en, raw, zero;
  logic [Z_MAX-1:0] sub_block, acc, model;
  hb_entry_t col [MB_MAX];
  logic [3:0] mb;
  logic [6:0] z;
  int checks = 0, failures = 0;
  int zero_seen = 0;

  ed_accum #(.Z_MAX(Z_MAX), .MB_MAX(MB_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [Z_MAX-1:0] ref_col(logic [Z_MAX-1:0] s, int zz, int m);
    logic [Z_MAX-1:0] r = '0;
    for (int i = 0; i < m; i++)
      if (col[i].valid)
        for (int k = 0; k < zz; k++) r[k] ^= s[(k + int'(col[i].shift)) % zz];
    return r;
  endfunction

  task automatic chk(string what);
    checks++;
    if (acc !== model || zero !== (model == '0)) begin
      failures++;
      $display("FAIL %s: acc=%h exp=%h zero=%b", what, acc, model, zero);
    end
    if (zero) zero_seen++;
  endtask

  task automatic rand_col(int zz);
    for (int i = 0; i < MB_MAX; i++) begin
      col[i].valid = ($urandom % 3) != 0;
      col[i].shift = 7'($urandom % zz);
    end
  endtask

  initial begin
    rst_n = 0; clr = 0; en = 0; raw = 0; sub_block = '0; mb = 12; z = 96;
    for (int i = 0; i < MB_MAX; i++) col[i] = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1; model = '0;
    chk("after reset");
    for (int blk = 0; blk < 60; blk++) begin
      automatic int zz = 24 + 4 * int'($urandom % 19);
      automatic int m  = 4 + int'($urandom % 9);
      automatic int k  = 1 + int'($urandom % 20);
      z = 7'(zz); mb = 4'(m);
      clr = 1; @(negedge clk); clr = 0; model = '0;
      chk("clear");
      for (int j = 0; j < k; j++) begin
        rand_col(zz);
        sub_block = {$urandom, $urandom, $urandom};
        en = 1; raw = 0;
        @(negedge clk);
        model ^= ref_col(sub_block, zz, m);
        chk("column");
        en = 0; sub_block = {$urandom, $urandom, $urandom};
        @(negedge clk);
        chk("hold");
      end
      // p0: every other block, make the sum vanish by adding acc itself
      en = 1; raw = 1;
      sub_block = (blk % 2 == 0) ? (acc | ({Z_MAX{1'b1}} << zz)) : {$urandom, $urandom, $urandom};
      @(negedge clk);
      for (int r = 0; r < zz; r++) model[r] ^= sub_block[r];
      chk("p0");
      en = 0; raw = 0;
    end
    checks++;
    if (zero_seen < 30) begin
      failures++;
      $display("FAIL zero flag seen only %0d times", zero_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
