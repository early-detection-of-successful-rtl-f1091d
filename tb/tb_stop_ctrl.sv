// tb_stop_ctrl: plays the decoder and the checker around the stopping rule.
// For each block a random iteration n_ok (1..20) is chosen at which the
// check first passes; the expected outcome is stop with decoded after n_ok
// iterations when n_ok <= 15, otherwise stop without decoded after exactly
// 15 iterations, with next_iter after every earlier failing check. Also
// checks that iter_done during a pending check is ignored and that the
// pulses last one cycle.
module tb_stop_ctrl;
  localparam int unsigned MAX_ITER = 15;
  logic clk = 0, rst_n, frame_start, iter_done, check_done, check_ok;
  logic check_start, next_iter, stop, decoded;
  logic [3:0] iter_count;
  int checks = 0, failures = 0;
  int n_early = 0, n_limit = 0;

  stop_ctrl #(.MAX_ITER(MAX_ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (iter_count=%0d)", what, iter_count);
    end
  endtask

  task automatic run_block(int n_ok);
    int it = 0;
    bit stopped = 0;
    frame_start = 1; @(negedge clk); frame_start = 0;
    while (!stopped) begin
      it++;
      iter_done = 1; #1;
      expect1(check_start == 1'b1, "check_start on iter_done");
      @(negedge clk);
      // a second iter_done while the check is pending is ignored
      #1; expect1(check_start == 1'b0, "no check_start while pending");
      @(negedge clk);
      iter_done = 0;
      repeat ($urandom % 4) @(negedge clk);
      check_done = 1; check_ok = (it >= n_ok);
      @(negedge clk);
      check_done = 0; check_ok = 0;
      expect1(int'(iter_count) == it, "iter_count");
      if (it >= n_ok) begin
        expect1(stop && decoded && !next_iter, "stop with decoded");
        stopped = 1; n_early++;
      end else if (it == MAX_ITER) begin
        expect1(stop && !decoded && !next_iter, "stop at iteration limit");
        stopped = 1; n_limit++;
      end else begin
        expect1(next_iter && !stop, "next_iter");
      end
      @(negedge clk);
      expect1(!stop && !next_iter, "pulses last one cycle");
    end
    // after stop, iter_done is ignored
    iter_done = 1; #1; expect1(check_start == 1'b0, "ignored after stop");
    @(negedge clk); iter_done = 0;
  endtask

  initial begin
    rst_n = 0; frame_start = 0; iter_done = 0; check_done = 0; check_ok = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    run_block(1); run_block(15); run_block(16);
    for (int n = 0; n < 30; n++) run_block(1 + int'($urandom % 20));
    expect1(n_early > 0 && n_limit > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
