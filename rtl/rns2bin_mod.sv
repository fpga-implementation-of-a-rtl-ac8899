// rns2bin_mod: modified RNS-to-binary converter, the building block of the
// reverse MLRNS conversion.
//
// On the way back up the MLRNS levels, each channel carries a full value
// (a product of two residues, or the output of the converter one level
// below), which is larger than its own modulus. This block first reduces the
// three input values to their moduli, v_m1 mod 2^N-1, v_m mod 2^N and
// v_p1 mod 2^N+1, with the same residue generators as the forward path, and
// then converts the three residues to binary with rns2bin. Inputs may be up
// to 3N bits wide; a third N-bit chunk then takes part in the reduction.
// The output is the binary value in [0, (2^N-1) 2^N (2^N+1)).
// The reduce-then-convert structure follows the design description; the
// reuse of the forward generators is this design's own. Purely combinational.
module rns2bin_mod #(
  parameter int unsigned N  = 20,
  parameter int unsigned WI = 2 * N + 2
) (
  input  logic [WI-1:0]  v_m1,
  input  logic [WI-1:0]  v_m,
  input  logic [WI-1:0]  v_p1,
  output logic [3*N-1:0] x
);

  localparam bit HAS_C = (WI > 2 * N);

  logic [3*N-1:0] w_m1, w_m, w_p1;
  logic [N-1:0]   x1;
  logic [N:0]     x3;

  assign w_m1 = (3*N)'(v_m1);
  assign w_m  = (3*N)'(v_m);
  assign w_p1 = (3*N)'(v_p1);

  res_gen_m1 #(.N(N), .HAS_C(HAS_C)) u_m1 (
    .a(w_m1[N-1:0]), .b(w_m1[2*N-1:N]), .c(w_m1[3*N-1:2*N]), .r(x1)
  );
  res_gen_p1 #(.N(N)) u_p1 (
    .a(w_p1[N-1:0]), .b(w_p1[2*N-1:N]), .c(w_p1[3*N-1:2*N]), .r(x3)
  );

  rns2bin #(.N(N)) u_cvt (.x1(x1), .x2(w_m[N-1:0]), .x3(x3), .x(x));

  initial assert (WI <= 3 * N) else $error("rns2bin_mod: WI must be at most 3N");

endmodule
