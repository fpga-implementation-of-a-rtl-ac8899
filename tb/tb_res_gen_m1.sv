// tb_res_gen_m1: checks the modulo 2^N-1 residue generator.
// N = 8 without a third chunk, exhaustively: r must be A+B folded once
// (A+B, or A+B-2^N+1 when A+B >= 2^N), which is congruent to A+B and keeps
// the all-ones second zero code. N = 7 with a third chunk, at random: r must
// be congruent to A+B+C modulo 2^N-1. Vectors are applied on a clock edge and
// checked one time step later; a watchdog ends a run that hangs.
module tb_res_gen_m1;

  logic [7:0] a8, b8, c8, r8;
  logic [6:0] a7, b7, c7, r7;
  logic       clk = 1'b0;
  int unsigned checks = 0, failures = 0, cycles = 0;
  int unsigned n_zero_code = 0;

  res_gen_m1 #(.N(8), .HAS_C(1'b0)) u_two   (.a(a8), .b(b8), .c(c8), .r(r8));
  res_gen_m1 #(.N(7), .HAS_C(1'b1)) u_three (.a(a7), .b(b7), .c(c7), .r(r7));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int s;
    a8 = '0; b8 = '0; c8 = '0; a7 = '0; b7 = '0; c7 = '0;
    for (int i = 0; i < (1 << 16); i++) begin
      @(posedge clk);
      a8 = 8'(i);
      b8 = 8'(i >> 8);
      c8 = 8'($urandom);   // ignored without a third chunk
      a7 = 7'($urandom);
      b7 = 7'($urandom);
      c7 = 7'($urandom);
      #1;
      s = int'(a8) + int'(b8);
      if (s >= 256) s = s - 255;
      check("two", int'(r8), s);
      check("three", int'(r7) % 127, (int'(a7) + int'(b7) + int'(c7)) % 127);
      if (r8 == 8'hff) n_zero_code++;
    end
    check("zero code seen", int'(n_zero_code > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
