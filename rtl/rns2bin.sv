// rns2bin: RNS-to-binary converter for the moduli set {2^N-1, 2^N, 2^N+1}.
//
// With X1 = <X> mod 2^N-1, X2 = <X> mod 2^N and X3 = <X> mod 2^N+1, the value
// X in [0, M), M = (2^N-1) 2^N (2^N+1), is rebuilt as
//   X = 2^N * Y + X2,   Y = <v1 + v21 + v22 + v3> modulo 2^(2N)-1
//   v1  = <-2^N X2>                 v21 = <2^(N-1) X3>
//   v22 = <-2^(2N-1) X3>            v3  = <2^(N-1) (2^N+1) X1>
// Modulo 2^(2N)-1 a multiplication by 2^p is a left rotation of the 2N-bit
// word and a negation is a bitwise complement, so the four terms are pure
// wiring: (2^N+1) X1 is X1 written twice side by side. The terms are added
// with two rows of full adders whose carry out of the top bit wraps to bit 0,
// and one end-around-carry Kogge-Stone adder. Because Y < 2^(2N)-1, an
// all-ones sum (the second code for zero) is mapped to 0. The final
// concatenation {Y, X2} is the binary value.
//
// X1 may be the all-ones code for zero, and X3 may be any value below 2^(N+1)
// congruent to the residue; the result is unchanged. The term structure
// follows the design description (v21 and v22 scale X3); the adder tree is
// this design's own. Purely combinational.
module rns2bin #(
  parameter int unsigned N = 20
) (
  input  logic [N-1:0]   x1,
  input  logic [N-1:0]   x2,
  input  logic [N:0]     x3,
  output logic [3*N-1:0] x
);

  localparam int unsigned W2 = 2 * N;

  // Left rotation of a W2-bit word by k places (multiplication by 2^k
  // modulo 2^W2-1).
  function automatic logic [W2-1:0] rotl(input logic [W2-1:0] v, input int unsigned k);
    return (k == 0) ? v : ((v << k) | (v >> (W2 - k)));
  endfunction

  logic [W2-1:0] v1, v21, v22, v3;
  logic [W2-1:0] s0, c0, s1, c1, y_raw, y;
  logic          unused_p;

  assign v1  = ~{x2, {N{1'b0}}};
  assign v21 = rotl(W2'(x3), N - 1);
  assign v22 = ~rotl(W2'(x3), W2 - 1);
  assign v3  = rotl({x1, x1}, N - 1);

  // Carry-save stage 1: v1 + v21 + v22.
  always_comb begin
    logic [W2-1:0] cy;
    s0 = v1 ^ v21 ^ v22;
    cy = (v1 & v21) | (v1 & v22) | (v21 & v22);
    c0 = {cy[W2-2:0], cy[W2-1]};
  end

  // Carry-save stage 2: + v3.
  always_comb begin
    logic [W2-1:0] cy;
    s1 = s0 ^ c0 ^ v3;
    cy = (s0 & c0) | (s0 & v3) | (c0 & v3);
    c1 = {cy[W2-2:0], cy[W2-1]};
  end

  ks_mod_adder #(.N(W2), .INV_EAC(1'b0)) u_eac (
    .a(s1), .b(c1), .s(y_raw), .all_p(unused_p)
  );

  assign y = (&y_raw) ? '0 : y_raw;
  assign x = {y, x2};

endmodule
