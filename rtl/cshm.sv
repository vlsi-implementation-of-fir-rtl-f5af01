// cshm: computation sharing multiplier for a vector-scalar product.
//
// One precomputer bank forms the alphabet multiples 1X..15X of the sample x
// once; LANES shift-and-add units share them, each multiplying x by its own
// sign-magnitude coefficient. With LANES = 1 this is the stand-alone 17x17
// multiplier; the FIR filter uses one lane per tap.
//
// PRE_REG = 1 puts a register between the precomputer bank and the S&As
// (the delay drawn after the precomputer in the filter); x is then taken
// at every rising clk edge and prod follows one cycle later, on the
// coefficients present at that time. PRE_REG = 0 makes the unit purely
// combinational; clk and rst_n are then unused. rst_n is asynchronous and
// active low and clears the register.
//
// Ports: x, DATA_W-bit two's complement; coef[k], 4*NIBBLES+1 bits,
// sign-magnitude; prod[k] = x*coef[k], DATA_W+4*NIBBLES bits.
//
// One precomputer bank shared by all S&As is the published idea; the LANES
// and PRE_REG parameters are this implementation's way of serving both the
// stand-alone multiplier and the filter.
module cshm
  import cshm_pkg::*;
#(
  parameter int unsigned DATA_W  = cshm_pkg::DEF_DATA_W,
  parameter int unsigned NIBBLES = cshm_pkg::DEF_NIBBLES,
  parameter int unsigned LANES   = 1,
  parameter bit          PRE_REG = 1'b0
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  logic [DATA_W-1:0]                             x,
  input  logic [LANES-1:0][NIB_W*NIBBLES:0]             coef,
  output logic [LANES-1:0][DATA_W+NIB_W*NIBBLES-1:0]    prod
);
  localparam int unsigned AW = DATA_W + ALPHA_EXT;

  logic [N_ALPHA-1:0][AW-1:0] alpha, alpha_q;

  precomputer #(.DATA_W(DATA_W)) u_pre (
    .x    (x),
    .alpha(alpha)
  );

  if (PRE_REG) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) alpha_q <= '0;
      else        alpha_q <= alpha;
    end
  end else begin : g_noreg
    assign alpha_q = alpha;
  end

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    shift_and_add #(.DATA_W(DATA_W), .NIBBLES(NIBBLES)) u_sa (
      .alpha(alpha_q),
      .coef (coef[k]),
      .prod (prod[k])
    );
  end
endmodule
