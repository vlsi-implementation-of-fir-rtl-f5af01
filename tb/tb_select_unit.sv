// tb_select_unit: drives a select unit from a precomputer bank and checks
// x*nib for all sixteen nibbles over corner and random samples. Also checks
// the example of a nibble 1100 selecting 3X shifted left by two.
module tb_select_unit;
  import cshm_pkg::*;
  localparam int unsigned DW = DEF_DATA_W;
  localparam int unsigned AW = DW + ALPHA_EXT;

  int checks = 0, failures = 0;

  logic [DW-1:0]              x;
  logic [N_ALPHA-1:0][AW-1:0] alpha;
  logic [NIB_W-1:0]           nib;
  logic [AW-1:0]              prod;

  precomputer u_pre (.x(x), .alpha(alpha));
  select_unit dut   (.alpha(alpha), .nib(nib), .prod(prod));

  task automatic check(input logic [DW-1:0] xv);
    longint xs;
    x = xv;
    xs = longint'($signed(xv));
    for (int n = 0; n < 16; n++) begin
      nib = NIB_W'(n);
      #1;
      checks++;
      if ($signed(prod) != xs * n) begin
        failures++;
        $display("FAIL x=%0d nib=%b prod=%0d", xs, nib, $signed(prod));
      end
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(DW'(1));
    check('1);
    check({1'b1, {(DW-1){1'b0}}});
    check({1'b0, {(DW-1){1'b1}}});
    for (int i = 0; i < 500; i++) check(DW'($urandom));
    // nibble 1100: the SHIFTER yields select 001 and a shift of two
    x = DW'(7); nib = 4'b1100;
    #1;
    checks++;
    if (dut.sel !== 3'b001 || dut.shamt !== 2'd2 || prod !== AW'(84)) begin
      failures++;
      $display("FAIL 1100 example sel=%b shamt=%0d prod=%0d", dut.sel, dut.shamt, prod);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
