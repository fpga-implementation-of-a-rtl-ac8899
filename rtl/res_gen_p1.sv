// res_gen_p1: residue generator modulo 2^N+1.
//
// Computes r = <A - B + C> modulo 2^N+1, exactly, in [0, 2^N], for the N-bit
// chunks of X = A + B*2^N + C*2^(2N) (2^N = -1 modulo 2^N+1). The forward
// conversion always has C = 0.
//
// How it works: modulo 2^N+1 the bitwise complement ~B equals -B-2, so
// A - B + C = (A + ~B + C + 1) + 1. A row of full adders reduces A, ~B and C
// to a sum word S and a carry word. The carry leaving bit N-1 has weight
// 2^N = -1; writing it as (1 - c) - 1 it re-enters bit 0 inverted, and the
// -1 cancels the +1 above, so S + Y = A + ~B + C + 1 with
// Y = {carries, ~c}. An augmented diminished-1 adder then adds the last +1:
// an inverted-end-around-carry Kogge-Stone adder plus an AND of all bit
// propagates, which flags the one result (2^N) that does not fit in N bits.
// The residue is the concatenation {AND, adder sum}.
//
// The use of full adders and an augmented diminished-1 (IEAC + AND) adder
// follows the design description; the exact operand encoding above is this
// design's own. Purely combinational.
module res_gen_p1 #(
  parameter int unsigned N = 20
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N:0]   r
);

  logic [N-1:0] nb, sum, cy, op_y, s;
  logic         top;

  assign nb   = ~b;
  assign sum  = a ^ nb ^ c;
  assign cy   = (a & nb) | (a & c) | (nb & c);
  assign op_y = {cy[N-2:0], ~cy[N-1]};   // x2 with inverted end-around carry

  ks_mod_adder #(.N(N), .INV_EAC(1'b1)) u_ieac (
    .a(sum), .b(op_y), .s(s), .all_p(top)
  );

  assign r = {top, s};

endmodule
