// tb_bin2mlrns: checks the three-level binary-to-MLRNS conversion at
// W = 32 (moduli exponents 22, 15, 11) and at the default W = 64 (43, 29, 20).
// A reference model in the testbench repeats the conversion with plain
// arithmetic: modulo 2^n it keeps the low bits, modulo 2^n+1 it uses the %
// operator, and modulo 2^n-1 it adds the two n-bit halves and folds the carry
// once (A+B, or A+B-2^n+1 when A+B >= 2^n), which is the code the design is
// specified to produce, including the all-ones second zero. All 27 residues
// must match exactly. Vectors are applied on a clock edge and checked one
// time step later; a watchdog ends a run that hangs.
module tb_bin2mlrns;
  import mlrns_pkg::*;

  localparam int unsigned WA = 32;
  localparam int unsigned WB = 64;
  localparam int unsigned NA3 = next_n(next_n(next_n(WA)));
  localparam int unsigned NB3 = next_n(next_n(next_n(WB)));

  logic [WA-1:0]               xa;
  logic [WB-1:0]               xb;
  logic [LANES-1:0][NA3:0]     ra;
  logic [LANES-1:0][NB3:0]     rb;
  logic                        clk = 1'b0;
  int unsigned                 checks = 0, failures = 0, cycles = 0;
  int unsigned                 n_zero_code = 0, n_top = 0;

  bin2mlrns #(.W(WA)) u_a (.x(xa), .res(ra));
  bin2mlrns #(.W(WB)) u_b (.x(xb), .res(rb));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // Residue of v for channel ch of a level with exponent n.
  function automatic logic [127:0] ref_res(logic [127:0] v, int unsigned n, int ch);
    logic [127:0] one = 128'd1;
    logic [127:0] lo, hi, s;
    lo = v & ((one << n) - 1);
    hi = v >> n;
    case (ch)
      0: begin
        s = lo + hi;
        if (s >= (one << n)) s = s - (one << n) + 1;
        return s;
      end
      1: return lo;
      default: return v % ((one << n) + 1);
    endcase
  endfunction

  // All 27 reference residues of operand x of width w.
  function automatic void ref_all(logic [127:0] x, int unsigned w, output logic [127:0] r [27]);
    int unsigned n1 = next_n(w), n2 = next_n(n1), n3 = next_n(n2);
    for (int j1 = 0; j1 < 3; j1++) begin
      logic [127:0] v1 = ref_res(x, n1, j1);
      for (int j2 = 0; j2 < 3; j2++) begin
        logic [127:0] v2 = ref_res(v1, n2, j2);
        for (int j3 = 0; j3 < 3; j3++)
          r[9*j1 + 3*j2 + j3] = ref_res(v2, n3, j3);
      end
    end
  endfunction

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [127:0] ea [27];
    logic [127:0] eb [27];
    xa = '0;
    xb = '0;
    for (int i = 0; i < 20000; i++) begin
      @(posedge clk);
      xa = WA'($urandom);
      xb = {32'($urandom), 32'($urandom)};
      case (i)
        0: begin xa = '0; xb = '0; end
        1: begin xa = '1; xb = '1; end
        2: begin xa = (WA'(1) << 22) - 1; xb = (WB'(1) << 43) - 1; end   // zero code, level 1
        3: begin xa = WA'(1) << 22;       xb = WB'(1) << 43;       end   // 2^n, level 1
        default: ;
      endcase
      #1;
      ref_all(128'(xa), WA, ea);
      ref_all(128'(xb), WB, eb);
      for (int l = 0; l < LANES; l++) begin
        check($sformatf("w32 lane %0d", l), 128'(ra[l]), ea[l]);
        check($sformatf("w64 lane %0d", l), 128'(rb[l]), eb[l]);
        if (l % 3 == 0 && ra[l][NA3-1:0] == '1) n_zero_code++;
        if (l % 3 == 2 && ra[l][NA3]) n_top++;
      end
    end
    check("level-3 zero code seen", 128'(n_zero_code > 0), 1);
    check("level-3 residue 2^n seen", 128'(n_top > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
