// tb_rns2bin: checks the RNS-to-binary converter at N = 8 and N = 20.
// A random X below M = (2^N-1) 2^N (2^N+1) is chosen, its residues are
// formed in the testbench and fed in; the output must be X. The alternative
// codes the converter must accept are mixed in: 2^N-1 for a zero residue
// modulo 2^N-1, and X3 + 2^N+1 where that is still below 2^(N+1).
// Vectors are applied on a clock edge and checked one time step later; a
// watchdog ends a run that hangs.
module tb_rns2bin;

  logic [7:0]   a1, a2;
  logic [8:0]   a3;
  logic [23:0]  ax;
  logic [19:0]  b1, b2;
  logic [20:0]  b3;
  logic [59:0]  bx;
  logic         clk = 1'b0;
  int unsigned  checks = 0, failures = 0, cycles = 0;

  rns2bin #(.N(8))  u8  (.x1(a1), .x2(a2), .x3(a3), .x(ax));
  rns2bin #(.N(20)) u20 (.x1(b1), .x2(b2), .x3(b3), .x(bx));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [63:0] rnd64();
    return {32'($urandom), 32'($urandom)};
  endfunction

  initial begin
    logic [63:0] xa, xb, ma, mb;
    ma = 64'(255) * 256 * 257;
    mb = 64'((1 << 20) - 1) * (1 << 20) * ((1 << 20) + 1);
    a1 = '0; a2 = '0; a3 = '0; b1 = '0; b2 = '0; b3 = '0;
    for (int i = 0; i < 60000; i++) begin
      @(posedge clk);
      xa = (i < 300) ? 64'(i) * 255 : rnd64() % ma;   // first: multiples of 2^8-1
      if (i >= 300 && i < 600) xa = ma - 64'(i - 299);
      xb = rnd64() % mb;
      if (i < 100) xb = mb - 64'(i + 1);
      a1 = 8'(xa % 255);
      a2 = 8'(xa % 256);
      a3 = 9'(xa % 257);
      b1 = 20'(xb % ((1 << 20) - 1));
      b2 = 20'(xb % (1 << 20));
      b3 = 21'(xb % ((1 << 20) + 1));
      if (a1 == 0 && $urandom_range(0, 1) == 1) a1 = 8'hff;
      if (a3 < 255 && $urandom_range(0, 3) == 0) a3 = a3 + 9'd257;
      if (b3 < 21'h0fffff && $urandom_range(0, 3) == 0) b3 = b3 + 21'h100001;
      #1;
      check("n8",  64'(ax), xa);
      check("n20", 64'(bx), xb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
