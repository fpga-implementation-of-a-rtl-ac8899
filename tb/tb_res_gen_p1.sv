// tb_res_gen_p1: checks the modulo 2^N+1 residue generator at N = 8 and
// N = 11. Every (A, B) pair is tried at N = 8 with a random C (zero a quarter
// of the time); N = 11 takes random chunks. r must equal <A - B + C> modulo
// 2^N+1 exactly, in [0, 2^N]; the testbench also counts the result 2^N,
// which must occur. Vectors are applied on a clock edge and checked one time
// step later; a watchdog ends a run that hangs.
module tb_res_gen_p1;

  logic [7:0]  a8, b8, c8;
  logic [8:0]  r8;
  logic [10:0] a11, b11, c11;
  logic [11:0] r11;
  logic        clk = 1'b0;
  int unsigned checks = 0, failures = 0, cycles = 0, n_top = 0;

  res_gen_p1 #(.N(8))  u8  (.a(a8),  .b(b8),  .c(c8),  .r(r8));
  res_gen_p1 #(.N(11)) u11 (.a(a11), .b(b11), .c(c11), .r(r11));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic int mod_ref(int a, int b, int c, int m);
    return ((a - b + c) % m + m) % m;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    a8 = '0; b8 = '0; c8 = '0; a11 = '0; b11 = '0; c11 = '0;
    for (int i = 0; i < (1 << 16); i++) begin
      @(posedge clk);
      a8  = 8'(i);
      b8  = 8'(i >> 8);
      c8  = ($urandom_range(0, 3) == 0) ? 8'd0 : 8'($urandom);
      a11 = 11'($urandom);
      b11 = ($urandom_range(0, 7) == 0) ? a11 + 11'd1 : 11'($urandom);
      c11 = ($urandom_range(0, 1) == 0) ? 11'd0 : 11'($urandom);
      #1;
      check("n8",  int'(r8),  mod_ref(a8, b8, c8, 257));
      check("n11", int'(r11), mod_ref(a11, b11, c11, 2049));
      if (r8[8]) n_top++;
    end
    check("2^n seen", int'(n_top > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
