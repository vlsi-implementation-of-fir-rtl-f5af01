// tb_precomputer: checks the eight alphabet outputs of the 17-bit
// precomputer bank, alpha[i] == (2i+1)*x, for corner and random samples.
module tb_precomputer;
  import cshm_pkg::*;
  localparam int unsigned DW = DEF_DATA_W;
  localparam int unsigned AW = DW + ALPHA_EXT;

  int checks = 0, failures = 0;

  logic [DW-1:0]                  x;
  logic [N_ALPHA-1:0][AW-1:0]     alpha;

  precomputer dut (.x(x), .alpha(alpha));

  task automatic check(input logic [DW-1:0] xv);
    longint xs, exp;
    x = xv;
    #1;
    xs = longint'($signed(xv));
    for (int i = 0; i < N_ALPHA; i++) begin
      exp = xs * (2 * i + 1);
      checks++;
      if ($signed(alpha[i]) != exp) begin
        failures++;
        $display("FAIL x=%0d alpha[%0d]=%0d expected %0d", xs, i, $signed(alpha[i]), exp);
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
    check('0);
    check(DW'(1));
    check('1);
    check({1'b1, {(DW-1){1'b0}}});   // most negative
    check({1'b0, {(DW-1){1'b1}}});   // most positive
    for (int i = 0; i < 2000; i++) check(DW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
