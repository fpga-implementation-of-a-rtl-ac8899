// tb_ks_mod_adder: checks the Kogge-Stone end-around-carry adder in both
// modes, exhaustively at N = 8 and with random operands at N = 13 (a width
// that is not a power of two).
//   EAC  : s must equal a+b, minus 2^N-1 when a+b >= 2^N (exact code,
//          including the all-ones second zero).
//   IEAC : {all_p, s} read as all_p ? 2^N : s must equal <a+b+1> mod 2^N+1.
// The adder is combinational; vectors are applied on a clock edge and
// checked one time step later. A watchdog ends a run that hangs.
module tb_ks_mod_adder;

  localparam int unsigned NA = 8;
  localparam int unsigned NB = 13;

  logic [NA-1:0] a8, b8, se8, si8;
  logic          pe8, pi8;
  logic [NB-1:0] a13, b13, se13, si13;
  logic          pe13, pi13;
  logic          clk = 1'b0;
  int unsigned   checks = 0, failures = 0, cycles = 0;

  ks_mod_adder #(.N(NA), .INV_EAC(1'b0)) u_e8  (.a(a8),  .b(b8),  .s(se8),  .all_p(pe8));
  ks_mod_adder #(.N(NA), .INV_EAC(1'b1)) u_i8  (.a(a8),  .b(b8),  .s(si8),  .all_p(pi8));
  ks_mod_adder #(.N(NB), .INV_EAC(1'b0)) u_e13 (.a(a13), .b(b13), .s(se13), .all_p(pe13));
  ks_mod_adder #(.N(NB), .INV_EAC(1'b1)) u_i13 (.a(a13), .b(b13), .s(si13), .all_p(pi13));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic longint unsigned eac_ref(longint unsigned a, longint unsigned b, int n);
    longint unsigned s = a + b;
    if (s >= (64'd1 << n)) s = s - (64'd1 << n) + 1;
    return s;
  endfunction

  function automatic longint unsigned ieac_ref(longint unsigned a, longint unsigned b, int n);
    return (a + b + 1) % ((64'd1 << n) + 1);
  endfunction

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    a8 = '0; b8 = '0; a13 = '0; b13 = '0;
    for (int i = 0; i < (1 << 16); i++) begin
      @(posedge clk);
      a8  = NA'(i);
      b8  = NA'(i >> 8);
      a13 = NB'($urandom);
      b13 = ($urandom_range(0, 3) == 0) ? ~a13 : NB'($urandom);
      #1;
      check("eac8",  se8, eac_ref(a8, b8, NA));
      check("ieac8", pi8 ? (64'd1 << NA) : si8, ieac_ref(a8, b8, NA));
      check("eac13", se13, eac_ref(a13, b13, NB));
      check("ieac13", pi13 ? (64'd1 << NB) : si13, ieac_ref(a13, b13, NB));
      check("allp8", pe8, (a8 ^ b8) == '1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
