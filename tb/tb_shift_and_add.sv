// tb_shift_and_add: one S&A fed by a precomputer bank. Checks x*C for
// sign-magnitude coefficients: corners (zero, +/- largest magnitude, single
// nibbles, negative zero) and random values.
module tb_shift_and_add;
  import cshm_pkg::*;
  localparam int unsigned DW = DEF_DATA_W;
  localparam int unsigned NB = DEF_NIBBLES;
  localparam int unsigned AW = DW + ALPHA_EXT;
  localparam int unsigned CW = NIB_W * NB + 1;
  localparam int unsigned PW = DW + NIB_W * NB;

  int checks = 0, failures = 0;

  logic [DW-1:0]              x;
  logic [N_ALPHA-1:0][AW-1:0] alpha;
  logic [CW-1:0]              coef;
  logic [PW-1:0]              prod;

  precomputer   u_pre (.x(x), .alpha(alpha));
  shift_and_add dut   (.alpha(alpha), .coef(coef), .prod(prod));

  task automatic check(input logic [DW-1:0] xv, input logic [CW-1:0] cv);
    longint exp;
    x = xv; coef = cv;
    #1;
    exp = longint'($signed(xv)) * longint'(cv[CW-2:0]);
    if (cv[CW-1]) exp = -exp;
    checks++;
    if ($signed(prod) != exp) begin
      failures++;
      $display("FAIL x=%0d coef=%h prod=%0d expected %0d", $signed(xv), cv, $signed(prod), exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] xc [4];
    xc[0] = DW'(1); xc[1] = '1; xc[2] = {1'b1, {(DW-1){1'b0}}}; xc[3] = {1'b0, {(DW-1){1'b1}}};
    foreach (xc[i]) begin
      check(xc[i], '0);
      check(xc[i], {1'b1, {(CW-1){1'b0}}});     // negative zero
      check(xc[i], {1'b0, {(CW-1){1'b1}}});
      check(xc[i], '1);
      for (int j = 0; j < NB; j++)
        for (int n = 1; n < 16; n++) begin
          check(xc[i], CW'(n << (NIB_W * j)));
          check(xc[i], CW'(n << (NIB_W * j)) | {1'b1, {(CW-1){1'b0}}});
        end
    end
    for (int i = 0; i < 5000; i++) check(DW'($urandom), CW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
