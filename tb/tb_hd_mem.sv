// tb_hd_mem: writes random words to the hard-decision buffer and reads them
// back, checking the one-cycle registered read latency, that a read without
// rd_en holds the previous data, and simultaneous read and write of
// different words.
module tb_hd_mem;
  localparam int unsigned Z_MAX = 96, NB_MAX = 24;
  logic clk = 0;
  logic we, rd_en;
  logic [4:0] wr_addr, rd_addr;
  logic [Z_MAX-1:0] wr_data, rd_data;
  logic [Z_MAX-1:0] model [NB_MAX];
  int checks = 0, failures = 0;

  hd_mem #(.Z_MAX(Z_MAX), .NB_MAX(NB_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [Z_MAX-1:0] e, string what);
    checks++;
    if (rd_data !== e) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, rd_data, e);
    end
  endtask

  initial begin
    we = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    @(negedge clk);
    for (int a = 0; a < NB_MAX; a++) begin
      we = 1; wr_addr = 5'(a); wr_data = {$urandom, $urandom, $urandom};
      model[a] = wr_data;
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 200; n++) begin
      automatic int a = int'($urandom % NB_MAX);
      automatic int w = int'($urandom % NB_MAX);
      rd_en = 1; rd_addr = 5'(a);
      we = (w != a); wr_addr = 5'(w); wr_data = {$urandom, $urandom, $urandom};
      @(negedge clk);
      if (we) model[w] = wr_data;
      chk(model[a], "read");
      // hold: no rd_en, data must not change
      rd_en = 0; we = 0; rd_addr = 5'((a + 1) % NB_MAX);
      @(negedge clk);
      chk(model[a], "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
