// tb_ed_ctrl: starts checks for every kb from 1 to 20 and records, cycle by
// cycle, what the sequencer does. Expected schedule with start in cycle 0:
// hard-decision reads of addresses 0..kb in cycles 0..kb, Hb_s column reads
// of 0..kb-1 only (none for the p0 word), accumulator clear in cycle 0,
// accumulate enables in cycles 1..kb+1 with raw only in cycle kb+1, done in
// cycle kb+2 and nowhere else, busy in cycles 1..kb+2. Also checks that a
// start while busy is ignored.
module tb_ed_ctrl;
  localparam int unsigned KB_MAX = 20, NB_MAX = 24;
  logic clk = 0, rst_n, start;
  logic [4:0] kb;
  logic hb_rd_en, hd_rd_en, acc_clr, acc_en, acc_raw, busy, done;
  logic [4:0] hb_rd_col, hd_rd_addr;
  int checks = 0, failures = 0;

  ed_ctrl #(.KB_MAX(KB_MAX), .NB_MAX(NB_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what, int cyc);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL kb=%0d cycle %0d %s: got %0d exp %0d", kb, cyc, what, got, exp);
    end
  endtask

  task automatic run(int k, bit poke_start);
    kb = 5'(k);
    start = 1;
    for (int c = 0; c <= k + 4; c++) begin
      #1;  // sample combinational outputs after the driving edge settles
      expect_eq(int'(hd_rd_en), int'(c <= k), "hd_rd_en", c);
      if (c <= k) expect_eq(int'(hd_rd_addr), c, "hd_rd_addr", c);
      expect_eq(int'(hb_rd_en), int'(c < k), "hb_rd_en", c);
      if (c < k) expect_eq(int'(hb_rd_col), c, "hb_rd_col", c);
      expect_eq(int'(acc_clr), int'(c == 0), "acc_clr", c);
      expect_eq(int'(acc_en), int'(c >= 1 && c <= k + 1), "acc_en", c);
      if (acc_en) expect_eq(int'(acc_raw), int'(c == k + 1), "acc_raw", c);
      expect_eq(int'(done), int'(c == k + 2), "done", c);
      expect_eq(int'(busy), int'(c >= 1 && c <= k + 2), "busy", c);
      @(negedge clk);
      start = poke_start && (c < k);  // starts while busy must be ignored
    end
    start = 0;
  endtask

  initial begin
    rst_n = 0; start = 0; kb = 1;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int k = 1; k <= 20; k++) run(k, 1'b0);
    for (int n = 0; n < 10; n++) run(1 + int'($urandom % 20), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
