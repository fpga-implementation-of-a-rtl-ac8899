// ks_mod_adder: N-bit Kogge-Stone parallel-prefix adder with end-around carry.
//
// INV_EAC = 0 (EAC): s = <a + b> modulo 2^N-1. The carry out of the top bit
// (weight 2^N = 1) is added back at bit 0. The result 2^N-1 (all ones) is a
// second code for zero and is kept, so the adder needs no correction step.
//
// INV_EAC = 1 (IEAC): the diminished-1 adder used for modulo 2^N+1. The
// inverted carry out is added back at bit 0, so s = a + b + 1 modulo 2^N+1 as
// long as a + b != 2^N-1. In that one case every bit propagates, the sum bits
// are all zero and all_p = 1: the true value is 2^N, so {all_p, s} is always
// the exact value <a + b + 1> in [0, 2^N].
//
// Structure: bit generate/propagate, ceil(log2 N) Kogge-Stone prefix levels
// giving the group (G, P) of every prefix [i:0], then one more level that
// merges the end-around carry. The carry-in is the group generate of the
// whole word (inverted for IEAC), so there is no combinational loop. Purely
// combinational. The Kogge-Stone choice and the EAC/IEAC use follow the
// design description; the loop-free carry merge is this design's own.
module ks_mod_adder #(
  parameter int unsigned N       = 20,
  parameter bit          INV_EAC = 1'b0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         all_p
);

  localparam int unsigned STAGES = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] g0, p0;
  logic [N-1:0] gg [STAGES+1];
  logic [N-1:0] pp [STAGES+1];
  logic         cin;
  logic [N-1:0] carry;

  assign g0 = a & b;
  assign p0 = a ^ b;
  assign gg[0] = g0;
  assign pp[0] = p0;

  // Kogge-Stone prefix network: after stage k, (gg, pp)[i] covers bits
  // [i : max(0, i-2^(k+1)+1)].
  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    localparam int unsigned D = 1 << k;
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= D) begin : g_merge
        assign gg[k+1][i] = gg[k][i] | (pp[k][i] & gg[k][i-D]);
        assign pp[k+1][i] = pp[k][i] & pp[k][i-D];
      end else begin : g_pass
        assign gg[k+1][i] = gg[k][i];
        assign pp[k+1][i] = pp[k][i];
      end
    end
  end

  // End-around carry: the carry out of the whole word, re-entered at bit 0.
  assign cin   = INV_EAC ? ~gg[STAGES][N-1] : gg[STAGES][N-1];
  assign all_p = pp[STAGES][N-1];

  always_comb begin
    carry[0] = cin;
    for (int i = 1; i < N; i++)
      carry[i] = gg[STAGES][i-1] | (pp[STAGES][i-1] & cin);
  end

  assign s = p0 ^ carry;

endmodule
