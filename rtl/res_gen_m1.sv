// res_gen_m1: residue generator modulo 2^N-1.
//
// Computes r = <A + B + C> modulo 2^N-1 for the N-bit chunks of a binary
// word X = A + B*2^N + C*2^(2N), since 2^N = 1 modulo 2^N-1. With HAS_C = 0
// (the forward conversion, where C is always zero) this is a single
// end-around-carry Kogge-Stone adder on A and B, as in the design
// description. With HAS_C = 1 a row of full adders first compresses the three
// chunks into two words; its carry out of bit N-1 has weight 2^N = 1 and is
// wrapped to bit 0. This third-chunk path is this design's own addition for the
// reverse conversion, whose inputs can be up to 3N bits wide.
//
// The result 2^N-1 (all ones) is a second code for zero and is not
// corrected: everything downstream treats residues only modulo 2^N-1.
// Purely combinational; port c is unused when HAS_C = 0.
module res_gen_m1 #(
  parameter int unsigned N     = 20,
  parameter bit          HAS_C = 1'b0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] r
);

  logic [N-1:0] op_a, op_b;
  logic         unused_p;

  if (HAS_C) begin : g_csa
    logic [N-1:0] sum, cy;
    assign sum  = a ^ b ^ c;
    assign cy   = (a & b) | (a & c) | (b & c);
    assign op_a = sum;
    assign op_b = {cy[N-2:0], cy[N-1]};   // x2 with end-around carry
  end else begin : g_two
    assign op_a = a;
    assign op_b = b;
  end

  ks_mod_adder #(.N(N), .INV_EAC(1'b0)) u_eac (
    .a(op_a), .b(op_b), .s(r), .all_p(unused_p)
  );

endmodule
