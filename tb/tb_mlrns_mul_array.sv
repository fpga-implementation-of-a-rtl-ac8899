// tb_mlrns_mul_array: checks the 27 channel multipliers at the default
// residue width (N3 = 20, 21-bit residues) with random and extreme residues;
// every lane's product is compared with a 64-bit multiplication done in the
// testbench. Vectors are applied on a clock edge and checked one time step
// later; a watchdog ends a run that hangs.
module tb_mlrns_mul_array;
  import mlrns_pkg::*;

  localparam int unsigned N3 = 20;

  logic [LANES-1:0][N3:0]     a, b;
  logic [LANES-1:0][2*N3+1:0] p;
  logic                       clk = 1'b0;
  int unsigned                checks = 0, failures = 0, cycles = 0;

  mlrns_mul_array #(.N3(N3)) dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    a = '0;
    b = '0;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      for (int l = 0; l < LANES; l++) begin
        a[l] = (N3+1)'($urandom);
        b[l] = (N3+1)'($urandom);
        if (i == 0) begin a[l] = {1'b1, {N3{1'b0}}}; b[l] = a[l]; end   // 2^N3 * 2^N3
        if (i == 1) begin a[l] = '1; b[l] = '1; end
      end
      #1;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (64'(p[l]) != 64'(a[l]) * 64'(b[l])) begin
          failures++;
          if (failures < 10) $display("lane %0d: %0d * %0d gave %0d", l, a[l], b[l], p[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
