// tb_mlrns2bin: checks the three-level MLRNS-to-binary conversion at
// W = 32 and at the default W = 64. The testbench draws random operands X and
// Y, forms their 27 residues itself with the % operator (exact residues,
// level by level), multiplies them lane by lane and feeds the 27 products
// in. The output must equal X*Y. Vectors are applied on a clock edge and
// checked one time step later; a watchdog ends a run that hangs.
module tb_mlrns2bin;
  import mlrns_pkg::*;

  localparam int unsigned WA = 32;
  localparam int unsigned WB = 64;
  localparam int unsigned NA3 = next_n(next_n(next_n(WA)));
  localparam int unsigned NB3 = next_n(next_n(next_n(WB)));

  logic [LANES-1:0][2*NA3+1:0] pa;
  logic [LANES-1:0][2*NB3+1:0] pb;
  logic [2*WA-1:0]             za;
  logic [2*WB-1:0]             zb;
  logic                        clk = 1'b0;
  int unsigned                 checks = 0, failures = 0, cycles = 0;

  mlrns2bin #(.W(WA)) u_a (.p(pa), .z(za));
  mlrns2bin #(.W(WB)) u_b (.p(pb), .z(zb));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic [127:0] modulus(int unsigned n, int ch);
    return (128'd1 << n) + 128'(ch) - 1;   // 2^n-1, 2^n, 2^n+1
  endfunction

  function automatic void ref_all(logic [127:0] x, int unsigned w, output logic [127:0] r [27]);
    int unsigned n1 = next_n(w), n2 = next_n(n1), n3 = next_n(n2);
    for (int j1 = 0; j1 < 3; j1++)
      for (int j2 = 0; j2 < 3; j2++)
        for (int j3 = 0; j3 < 3; j3++)
          r[9*j1 + 3*j2 + j3] = x % modulus(n1, j1) % modulus(n2, j2) % modulus(n3, j3);
  endfunction

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [127:0] xa [27], ya [27], xb [27], yb [27];
    logic [WA-1:0] a1, a2;
    logic [WB-1:0] b1, b2;
    pa = '0;
    pb = '0;
    for (int i = 0; i < 20000; i++) begin
      @(posedge clk);
      a1 = WA'($urandom);
      a2 = WA'($urandom);
      b1 = {32'($urandom), 32'($urandom)};
      b2 = {32'($urandom), 32'($urandom)};
      if (i == 0) begin a1 = '1; a2 = '1; b1 = '1; b2 = '1; end
      if (i == 1) begin a1 = WA'(1) << 22; a2 = a1; b1 = WB'(1) << 43; b2 = b1; end
      ref_all(128'(a1), WA, xa);
      ref_all(128'(a2), WA, ya);
      ref_all(128'(b1), WB, xb);
      ref_all(128'(b2), WB, yb);
      for (int l = 0; l < LANES; l++) begin
        pa[l] = (2*NA3+2)'(xa[l] * ya[l]);
        pb[l] = (2*NB3+2)'(xb[l] * yb[l]);
      end
      #1;
      check("w32", 128'(za), 128'(a1) * 128'(a2));
      check("w64", 128'(zb), 128'(b1) * 128'(b2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
