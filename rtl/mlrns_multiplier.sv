// mlrns_multiplier: W x W -> 2W bit multiplier in a three-level multi-level
// residue number system (MLRNS).
//
// Both operands are converted into 27 small residues by bin2mlrns: each level
// splits every value into residues modulo {2^n-1, 2^n, 2^n+1}, with the
// exponent shrinking by about a third per level (for W = 64: n = 43, 29, 20).
// The 27 residue pairs are multiplied in parallel by mlrns_mul_array, and
// mlrns2bin climbs back up the levels, at each one reducing the products to
// that level's moduli and rebuilding the binary value, until X*Y appears.
//
// Interface: x, y (W bits, unsigned) in, z = x*y (2W bits) out. The whole
// datapath is combinational; there is no clock, reset or handshake, and the
// result is valid one combinational delay after the operands settle. This
// follows the design description; add registers around it for a pipelined use.
module mlrns_multiplier
  import mlrns_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0]   x,
  input  logic [W-1:0]   y,
  output logic [2*W-1:0] z
);

  localparam int unsigned N3 = next_n(next_n(next_n(W)));

  logic [LANES-1:0][N3:0]     xr, yr;
  logic [LANES-1:0][2*N3+1:0] zr;

  bin2mlrns #(.W(W)) u_fwd_x (.x(x), .res(xr));
  bin2mlrns #(.W(W)) u_fwd_y (.x(y), .res(yr));

  mlrns_mul_array #(.N3(N3)) u_mul (.a(xr), .b(yr), .p(zr));

  mlrns2bin #(.W(W)) u_rev (.p(zr), .z(z));

endmodule
