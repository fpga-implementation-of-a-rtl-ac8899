// tb_bin2rns: checks the binary-to-RNS converter for {2^9-1, 2^9, 2^9+1}
// with an 18-bit input (two chunks, as in the forward path) and a 27-bit
// input (three chunks, as in the reverse path), at random. r_m and r_p1 must
// equal x mod 2^9 and x mod 2^9+1 exactly; r_m1 must be congruent to x
// modulo 2^9-1. Vectors are applied on a clock edge and checked one time
// step later; a watchdog ends a run that hangs.
module tb_bin2rns;

  localparam int unsigned N = 9;

  logic [2*N-1:0] xa;
  logic [3*N-1:0] xb;
  logic [N-1:0]   a_m1, a_m, b_m1, b_m;
  logic [N:0]     a_p1, b_p1;
  logic           clk = 1'b0;
  int unsigned    checks = 0, failures = 0, cycles = 0;

  bin2rns #(.N(N), .WI(2*N)) u_two   (.x(xa), .r_m1(a_m1), .r_m(a_m), .r_p1(a_p1));
  bin2rns #(.N(N), .WI(3*N)) u_three (.x(xb), .r_m1(b_m1), .r_m(b_m), .r_p1(b_p1));

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

  initial begin
    longint m1, m, p1;
    m1 = (1 << N) - 1;
    m  = 1 << N;
    p1 = (1 << N) + 1;
    xa = '0; xb = '0;
    for (int i = 0; i < 50000; i++) begin
      @(posedge clk);
      xa = (2*N)'($urandom);
      xb = (3*N)'($urandom);
      if (i < 600) xa = (2*N)'(i * 511);   // multiples of the moduli
      #1;
      check("a_m1", longint'(a_m1) % m1, longint'(xa) % m1);
      check("a_m",  longint'(a_m),       longint'(xa) % m);
      check("a_p1", longint'(a_p1),      longint'(xa) % p1);
      check("b_m1", longint'(b_m1) % m1, longint'(xb) % m1);
      check("b_m",  longint'(b_m),       longint'(xb) % m);
      check("b_p1", longint'(b_p1),      longint'(xb) % p1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
