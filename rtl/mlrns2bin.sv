// mlrns2bin: MLRNS-to-binary conversion, three levels.
//
// The 27 channel products arrive in the lane order of bin2mlrns
// (9*j1 + 3*j2 + j3). On level 3, nine modified RNS-to-binary converters
// (rns2bin_mod, moduli exponent N3) each take three lanes and rebuild the
// unreduced product of two level-2 residues, a value below
// (2^N3-1) 2^N3 (2^N3+1). On level 2, three converters (N2) rebuild the
// products of the level-1 residues, and on level 1 one converter (N1)
// rebuilds X*Y, which is below 2^(2W) and hence below the level-1 range.
// Each converter first reduces its inputs to its own moduli, since the values
// it receives are wider than its moduli.
// The level structure follows the design description. Purely combinational.
module mlrns2bin
  import mlrns_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  logic [LANES-1:0][2*next_n(next_n(next_n(W)))+1:0] p,
  output logic [2*W-1:0]                                    z
);

  localparam int unsigned N1 = next_n(W);
  localparam int unsigned N2 = next_n(N1);
  localparam int unsigned N3 = next_n(N2);

  logic [8:0][3*N3-1:0] lvl3;
  logic [2:0][3*N2-1:0] lvl2;
  logic [3*N1-1:0]      lvl1;

  for (genvar i = 0; i < 9; i++) begin : g_l3
    rns2bin_mod #(.N(N3), .WI(2*N3+2)) u_cv (
      .v_m1(p[3*i]), .v_m(p[3*i+1]), .v_p1(p[3*i+2]), .x(lvl3[i])
    );
  end

  for (genvar i = 0; i < 3; i++) begin : g_l2
    rns2bin_mod #(.N(N2), .WI(3*N3)) u_cv (
      .v_m1(lvl3[3*i]), .v_m(lvl3[3*i+1]), .v_p1(lvl3[3*i+2]), .x(lvl2[i])
    );
  end

  rns2bin_mod #(.N(N1), .WI(3*N2)) u_l1 (
    .v_m1(lvl2[0]), .v_m(lvl2[1]), .v_p1(lvl2[2]), .x(lvl1)
  );

  assign z = lvl1[2*W-1:0];

endmodule
