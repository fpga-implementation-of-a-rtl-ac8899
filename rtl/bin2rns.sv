// bin2rns: binary-to-RNS converter for the moduli set {2^N-1, 2^N, 2^N+1}.
//
// The input word is split into N-bit chunks, X = A + B*2^N + C*2^(2N).
// The three residues are produced side by side:
//   r_m  = A                       (modulo 2^N: the low chunk)
//   r_m1 = <A + B + C> mod 2^N-1   (res_gen_m1, all ones is a second zero)
//   r_p1 = <A - B + C> mod 2^N+1   (res_gen_p1, exact, in [0, 2^N])
// WI may be at most 3N. When WI <= 2N the chunk C is absent (the forward
// MLRNS levels, where each input is a residue of at most n+1 bits of a level
// with a larger n) and the modulo 2^N-1 channel is a single end-around-carry
// adder. The chunk split and the per-channel generators follow the design
// description; allowing a third chunk is this design's own, for the reverse
// conversion. Purely combinational.
module bin2rns #(
  parameter int unsigned N  = 20,
  parameter int unsigned WI = 2 * N
) (
  input  logic [WI-1:0] x,
  output logic [N-1:0]  r_m1,
  output logic [N-1:0]  r_m,
  output logic [N:0]    r_p1
);

  localparam bit HAS_C = (WI > 2 * N);

  logic [3*N-1:0] xw;
  logic [N-1:0]   ca, cb, cc;

  assign xw = (3*N)'(x);
  assign ca = xw[N-1:0];
  assign cb = xw[2*N-1:N];
  assign cc = xw[3*N-1:2*N];

  assign r_m = ca;

  res_gen_m1 #(.N(N), .HAS_C(HAS_C)) u_m1 (.a(ca), .b(cb), .c(cc), .r(r_m1));
  res_gen_p1 #(.N(N))                u_p1 (.a(ca), .b(cb), .c(cc), .r(r_p1));

  initial assert (WI <= 3 * N) else $error("bin2rns: WI must be at most 3N");

endmodule
