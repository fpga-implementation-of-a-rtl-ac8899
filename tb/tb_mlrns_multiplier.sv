// tb_mlrns_multiplier: end-to-end test of the MLRNS multiplier at its default
// size (W = 64).
//
// Random, sparse and corner operands are applied; the product is checked
// against a plain 128-bit multiplication done in the testbench. The design is
// combinational, so each vector is checked one time step after it is
// applied, on the rising edge of a free-running clock that also paces the
// watchdog. Directed vectors make each special mechanism of the datapath
// happen, and the testbench counts them from the design's internal nets:
//   - the second zero code (all ones) of a modulo 2^n-1 residue,
//   - the residue 2^n of a modulo 2^n+1 channel (the AND-flagged result),
//   - a third non-zero chunk in a reverse-path reduction (product 2^(2n)),
//   - the all-ones-to-zero correction of the RNS-to-binary converter.
// A mechanism that never happened counts as a failure.
module tb_mlrns_multiplier;
  import mlrns_pkg::*;

  localparam int unsigned W  = 64;
  localparam int unsigned N1 = next_n(W);
  localparam int unsigned NVEC = 20000;

  logic [W-1:0]   x, y;
  logic [2*W-1:0] z;
  logic           clk = 1'b0;
  int unsigned    checks = 0, failures = 0, cycles = 0;
  int unsigned    n_dzero = 0, n_top = 0, n_chunk = 0, n_norm = 0;

  mlrns_multiplier dut (.x(x), .y(y), .z(z));

  always #5 clk = ~clk;

  // Watchdog.
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 10 * NVEC + 1000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v = {v[W-33:0], 32'($urandom)};
    case ($urandom_range(0, 5))
      0: v = v & {W{1'b0}} | (W'(1) << $urandom_range(0, W-1));   // one bit
      1: v = ~(W'(1) << $urandom_range(0, W-1));                   // one zero
      2: v = v >> $urandom_range(0, W-1);                          // short
      default: ;
    endcase
    return v;
  endfunction

  task automatic apply(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [2*W-1:0] exp_z;
    @(posedge clk);
    x = a;
    y = b;
    #1;
    exp_z = (2*W)'(a) * (2*W)'(b);
    checks++;
    if (z !== exp_z) begin
      failures++;
      if (failures < 10) $display("mismatch: %h * %h = %h, got %h", a, b, exp_z, z);
    end
    if (dut.u_fwd_x.lvl1[0][N1-1:0] == {N1{1'b1}}) n_dzero++;
    if (dut.u_fwd_x.lvl1[2][N1]) n_top++;
    if ((dut.u_rev.lvl2[2] >> (2 * N1)) != 0) n_chunk++;
    if (&dut.u_rev.u_l1.u_cvt.y_raw) n_norm++;
  endtask

  initial begin
    x = '0;
    y = '0;
    // Corners.
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply(W'(1), '1);
    // Level-1 modulo 2^n-1 channel gives the all-ones zero code: A + B = 2^n-1.
    apply((W'(1) << N1) - 1, W'(12345));
    apply(W'(5) << N1 | ((W'(1) << N1) - 6), '1);
    // Level-1 modulo 2^n+1 channel gives 2^n: B = A + 1.
    apply(W'(1) << N1, W'(3));
    // Both operands 2^n modulo 2^n+1: the level-1 product is 2^(2n).
    apply(W'(1) << N1, W'(1) << N1);
    apply((W'(8) << N1) | W'(7), (W'(1) << N1));
    for (int i = 0; i < NVEC; i++) apply(rnd(), rnd());
    if (n_dzero == 0) begin failures++; $display("all-ones zero code never seen"); end
    if (n_top   == 0) begin failures++; $display("residue 2^n never seen"); end
    if (n_chunk == 0) begin failures++; $display("third reduction chunk never seen"); end
    if (n_norm  == 0) begin failures++; $display("converter zero correction never seen"); end
    $display("mechanisms: zero_code=%0d top_2n=%0d third_chunk=%0d zero_fix=%0d",
             n_dzero, n_top, n_chunk, n_norm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
