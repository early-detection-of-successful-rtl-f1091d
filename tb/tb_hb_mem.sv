// tb_hb_mem: loads a random Hb_s (shift or zero-block per entry) into the
// base-matrix store entry by entry and reads it back a whole column at a
// time, checking every row of every column against a model, including
// overwrites of single entries between reads.
module tb_hb_mem;
  import ed_pkg::hb_entry_t;
  localparam int unsigned MB_MAX = 12, KB_MAX = 20;
  logic clk = 0;
  logic we, rd_en;
  logic [3:0] wr_row;
  logic [4:0] wr_col, rd_col;
  hb_entry_t wr_entry;
  hb_entry_t rd_data [MB_MAX];
  hb_entry_t model [KB_MAX][MB_MAX];
  int checks = 0, failures = 0;

  hb_mem #(.MB_MAX(MB_MAX), .KB_MAX(KB_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int r, int c);
    we = 1; wr_row = 4'(r); wr_col = 5'(c);
    wr_entry.valid = 1'($urandom);
    wr_entry.shift = 7'($urandom % 96);
    model[c][r] = wr_entry;
    @(negedge clk);
    we = 0;
  endtask

  task automatic read_check(int c);
    rd_en = 1; rd_col = 5'(c);
    @(negedge clk);
    rd_en = 0;
    for (int r = 0; r < MB_MAX; r++) begin
      checks++;
      if (rd_data[r] !== model[c][r]) begin
        failures++;
        $display("FAIL col %0d row %0d: got %h exp %h", c, r, rd_data[r], model[c][r]);
      end
    end
  endtask

  initial begin
    we = 0; rd_en = 0; wr_row = 0; wr_col = 0; rd_col = 0; wr_entry = '0;
    @(negedge clk);
    for (int c = 0; c < KB_MAX; c++)
      for (int r = 0; r < MB_MAX; r++) write(r, c);
    for (int c = 0; c < KB_MAX; c++) read_check(c);
    for (int n = 0; n < 60; n++) begin
      automatic int c = int'($urandom % KB_MAX);
      write(int'($urandom % MB_MAX), c);
      read_check(c);
      read_check(int'($urandom % KB_MAX));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
