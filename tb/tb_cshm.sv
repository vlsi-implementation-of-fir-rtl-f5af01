// tb_cshm: the 17x17 computation sharing multiplier (one lane,
// combinational) on random and corner operands, and a three-lane instance
// with the alphabet register, which must give all three products of the
// same sample one clock after it was presented.
module tb_cshm;
  import cshm_pkg::*;
  localparam int unsigned DW = DEF_DATA_W;
  localparam int unsigned NB = DEF_NIBBLES;
  localparam int unsigned CW = NIB_W * NB + 1;
  localparam int unsigned PW = DW + NIB_W * NB;
  localparam int unsigned L  = 3;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [DW-1:0]        x1;
  logic [0:0][CW-1:0]   c1;
  logic [0:0][PW-1:0]   p1;

  logic [DW-1:0]        x3;
  logic [L-1:0][CW-1:0] c3;
  logic [L-1:0][PW-1:0] p3;

  cshm dut (.clk(clk), .rst_n(rst_n), .x(x1), .coef(c1), .prod(p1));
  cshm #(.LANES(L), .PRE_REG(1'b1)) dut3 (.clk(clk), .rst_n(rst_n), .x(x3), .coef(c3), .prod(p3));

  function automatic longint ref_mul(input logic [DW-1:0] xv, input logic [CW-1:0] cv);
    longint r = longint'($signed(xv)) * longint'(cv[CW-2:0]);
    return cv[CW-1] ? -r : r;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] xprev;
    // combinational 17x17 multiplier
    for (int i = 0; i < 3000; i++) begin
      x1 = DW'($urandom);
      c1[0] = CW'($urandom);
      if (i < 4) x1 = (i[0]) ? {1'b1, {(DW-1){1'b0}}} : {1'b0, {(DW-1){1'b1}}};
      if (i < 4) c1[0] = (i[1]) ? '1 : {1'b0, {(CW-1){1'b1}}};
      #1;
      checks++;
      if ($signed(p1[0]) != ref_mul(x1, c1[0])) begin
        failures++;
        $display("FAIL x=%0d c=%h p=%0d", $signed(x1), c1[0], $signed(p1[0]));
      end
    end
    // registered three-lane vector-scalar product
    x3 = '0; c3 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    xprev = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      // products now belong to the sample registered at the last edge
      for (int k = 0; k < L; k++) begin
        checks++;
        if ($signed(p3[k]) != ref_mul(xprev, c3[k])) begin
          failures++;
          $display("FAIL lane %0d x=%0d c=%h p=%0d", k, $signed(xprev), c3[k], $signed(p3[k]));
        end
      end
      x3 = DW'($urandom);
      for (int k = 0; k < L; k++) c3[k] = CW'($urandom);
      @(posedge clk);
      xprev = x3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
