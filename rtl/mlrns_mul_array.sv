// mlrns_mul_array: the 27 parallel channel multipliers of the MLRNS
// multiplier.
//
// Lane i computes p[i] = a[i] * b[i] on (N3+1)-bit residues, without any
// modular reduction: the reverse conversion expects the full product, which
// is at most 2^(2*N3). The multiplications are written as plain products so
// that an FPGA flow can map each lane onto a DSP slice, as the design
// description does. Purely combinational.
module mlrns_mul_array
  import mlrns_pkg::*;
#(
  parameter int unsigned N3 = 20
) (
  input  logic [LANES-1:0][N3:0]     a,
  input  logic [LANES-1:0][N3:0]     b,
  output logic [LANES-1:0][2*N3+1:0] p
);

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    assign p[i] = (2*N3+2)'(a[i]) * (2*N3+2)'(b[i]);
  end

endmodule
