// tb_rns2bin_mod: checks the modified RNS-to-binary converter at N = 8 with
// 24-bit inputs (three chunks) and 18-bit inputs (two chunks plus two bits,
// as at the bottom MLRNS level). A random X below M = 255*256*257 is chosen;
// each input is a random value of the input width congruent to X modulo its
// channel's modulus. The output must be X. Vectors are applied on a clock
// edge and checked one time step later; a watchdog ends a run that hangs.
module tb_rns2bin_mod;

  logic [23:0] u1, u2, u3, ux;
  logic [17:0] w1, w2, w3;
  logic [23:0] wx;
  logic        clk = 1'b0;
  int unsigned checks = 0, failures = 0, cycles = 0;

  rns2bin_mod #(.N(8), .WI(24)) u_wide   (.v_m1(u1), .v_m(u2), .v_p1(u3), .x(ux));
  rns2bin_mod #(.N(8), .WI(18)) u_narrow (.v_m1(w1), .v_m(w2), .v_p1(w3), .x(wx));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // A random value below 2^width that is congruent to r modulo m.
  function automatic longint rep(longint r, longint m, int width);
    longint k = longint'($urandom) % (((longint'(1) << width) - 1 - r) / m + 1);
    return r + k * m;
  endfunction

  initial begin
    longint x, mm;
    mm = 255 * 256 * 257;
    u1 = '0; u2 = '0; u3 = '0; w1 = '0; w2 = '0; w3 = '0;
    for (int i = 0; i < 60000; i++) begin
      @(posedge clk);
      x  = longint'($urandom) % mm;
      u1 = 24'(rep(x % 255, 255, 24));
      u2 = 24'(rep(x % 256, 256, 24));
      u3 = 24'(rep(x % 257, 257, 24));
      w1 = 18'(rep(x % 255, 255, 18));
      w2 = 18'(rep(x % 256, 256, 18));
      w3 = 18'(rep(x % 257, 257, 18));
      #1;
      check("wide",   longint'(ux), x);
      check("narrow", longint'(wx), x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
