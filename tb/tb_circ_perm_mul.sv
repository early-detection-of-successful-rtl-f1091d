// tb_circ_perm_mul: checks the circulant-permutation multiply against a
// bit-by-bit reference (out[r] = in[(r + shift) mod z], zero above z) for
// every 802.16e expansion factor z = 24..96 (step 4) and random shifts and
// data, plus the corner shifts 0 and z-1. Combinational block; a watchdog
// bounds the run.
module tb_circ_perm_mul;
  localparam int unsigned Z_MAX = 96;
  logic [Z_MAX-1:0] s_in, s_out, expct;
  logic [6:0] shift, z;
  int checks = 0, failures = 0;

  circ_perm_mul #(.Z_MAX(Z_MAX)) dut (.s_in(s_in), .shift(shift), .z(z), .s_out(s_out));

  function automatic logic [Z_MAX-1:0] ref_rot(logic [Z_MAX-1:0] v, int sh, int zz);
    logic [Z_MAX-1:0] r = '0;
    for (int k = 0; k < zz; k++) r[k] = v[(k + sh) % zz];
    return r;
  endfunction

  task automatic try(int zz, int sh);
    s_in  = {$urandom, $urandom, $urandom};
    z     = 7'(zz);
    shift = 7'(sh);
    #1;
    expct = ref_rot(s_in, sh, zz);
    checks++;
    if (s_out !== expct) begin
      failures++;
      $display("FAIL z=%0d shift=%0d in=%h out=%h exp=%h", zz, sh, s_in, s_out, expct);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int zz = 24; zz <= 96; zz += 4) begin
      try(zz, 0);
      try(zz, zz - 1);
      for (int n = 0; n < 20; n++) try(zz, int'($urandom % zz));
    end
    for (int n = 0; n < 50; n++) begin
      automatic int zz = 1 + int'($urandom % Z_MAX);
      try(zz, int'($urandom % zz));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
