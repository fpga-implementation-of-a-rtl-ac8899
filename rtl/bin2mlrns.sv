// bin2mlrns: binary-to-MLRNS conversion, three levels.
//
// Level 1 converts the W-bit operand into three residues for the moduli set
// {2^N1-1, 2^N1, 2^N1+1}. Each of those residues is again converted, on
// level 2, into three residues for {2^N2-1, 2^N2, 2^N2+1} (3 converters in
// parallel), and each of those on level 3 for {2^N3-1, 2^N3, 2^N3+1}
// (9 converters in parallel), giving 27 small residues. The exponents follow
// n(k+1) = floor(2 n(k) / 3) + 1 with n(0) = W, so that each level can hold
// the unreduced product of two residues of the level above.
//
// Lane j of a level-k word is the modulus 2^n-1 (j = 0), 2^n (j = 1) or
// 2^n+1 (j = 2). The output lane index is 9*j1 + 3*j2 + j3. Every residue is
// carried as an (n+1)-bit word; only the 2^n+1 lanes use the top bit. The
// modulo 2^n-1 lanes may hold 2^n-1 as a second code for zero.
// The level structure follows the design description; the lane order is this
// design's own. Purely combinational, no clock.
module bin2mlrns
  import mlrns_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0]                    x,
  output logic [LANES-1:0][next_n(next_n(next_n(W))):0] res
);

  localparam int unsigned N1 = next_n(W);
  localparam int unsigned N2 = next_n(N1);
  localparam int unsigned N3 = next_n(N2);

  logic [2:0][N1:0] lvl1;
  logic [8:0][N2:0] lvl2;

  // Level 1: one converter on the operand itself.
  bin2rns #(.N(N1), .WI(W)) u_l1 (
    .x(x), .r_m1(lvl1[0][N1-1:0]), .r_m(lvl1[1][N1-1:0]), .r_p1(lvl1[2])
  );
  assign lvl1[0][N1] = 1'b0;
  assign lvl1[1][N1] = 1'b0;

  // Level 2: three converters in parallel.
  for (genvar i = 0; i < 3; i++) begin : g_l2
    bin2rns #(.N(N2), .WI(N1+1)) u_cv (
      .x(lvl1[i]), .r_m1(lvl2[3*i][N2-1:0]), .r_m(lvl2[3*i+1][N2-1:0]),
      .r_p1(lvl2[3*i+2])
    );
    assign lvl2[3*i][N2]   = 1'b0;
    assign lvl2[3*i+1][N2] = 1'b0;
  end

  // Level 3: nine converters in parallel.
  for (genvar i = 0; i < 9; i++) begin : g_l3
    bin2rns #(.N(N3), .WI(N2+1)) u_cv (
      .x(lvl2[i]), .r_m1(res[3*i][N3-1:0]), .r_m(res[3*i+1][N3-1:0]),
      .r_p1(res[3*i+2])
    );
    assign res[3*i][N3]   = 1'b0;
    assign res[3*i+1][N3] = 1'b0;
  end

endmodule
