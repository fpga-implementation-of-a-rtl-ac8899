// tb_table1_sizes: runs the MLRNS multiplier at the two other operand widths
// of the published resource table, W = 32 (moduli exponents 22, 15, 11) and
// W = 128 (86, 58, 39); the default W = 64 is covered by
// tb_mlrns_multiplier. Random, sparse and corner operand pairs are multiplied
// and compared with a plain wide multiplication done in the testbench.
// The design is combinational: each vector is applied on a clock edge and
// checked one time step later. A watchdog ends a run that hangs.
module tb_table1_sizes;

  localparam int unsigned NVEC = 10000;

  logic [31:0]  xa, ya;
  logic [63:0]  za;
  logic [127:0] xb, yb;
  logic [255:0] zb;
  logic         clk = 1'b0;
  int unsigned  checks = 0, failures = 0, cycles = 0;

  mlrns_multiplier #(.W(32))  u_w32  (.x(xa), .y(ya), .z(za));
  mlrns_multiplier #(.W(128)) u_w128 (.x(xb), .y(yb), .z(zb));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 4 * NVEC) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic [127:0] rnd128();
    logic [127:0] v = {32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom)};
    case ($urandom_range(0, 4))
      0: v = 128'(1) << $urandom_range(0, 127);
      1: v = v >> $urandom_range(0, 127);
      default: ;
    endcase
    return v;
  endfunction

  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    xa = '0; ya = '0; xb = '0; yb = '0;
    for (int i = 0; i < NVEC; i++) begin
      @(posedge clk);
      xa = 32'(rnd128());
      ya = 32'(rnd128());
      xb = rnd128();
      yb = rnd128();
      case (i)
        0: begin xa = '1; ya = '1; xb = '1; yb = '1; end
        1: begin xa = 32'(1) << 22; ya = xa; xb = 128'(1) << 86; yb = xb; end
        2: begin xa = (32'(1) << 22) - 1; ya = '1; xb = (128'(1) << 86) - 1; yb = '1; end
        default: ;
      endcase
      #1;
      check("w32",  256'(za), 256'(64'(xa) * 64'(ya)));
      check("w128", zb, 256'(xb) * 256'(yb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
