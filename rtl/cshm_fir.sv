// cshm_fir: programmable FIR filter in transposed direct form, built on the
// computation sharing multiplier.
//
//   y(n) = sum_{k=0}^{TAPS-1} C[k] * x(n-k)
//
// Each new sample goes through one precomputer bank, and its alphabet
// multiples 1X..15X are registered. TAPS shift-and-add units (one per
// coefficient) then form all products C[k]*x at once, and these are
// registered too. A transposed adder chain with one register between taps
// accumulates them. Tap TAPS-1 starts the chain, and tap 0's adder drives y.
// All additions use the carry-select adder with add-one circuits.
//
// Coefficients are sign-magnitude, 4*NIBBLES magnitude bits plus a sign bit
// on top. They are held in a register file written one at a time through
// coef_we/coef_addr/coef_wdata, and take effect on the S&As from the next
// cycle. Samples are two's complement and one is taken every clock.
//
// Timing: x presented before rising edge t is in the alphabet register after
// t and in the product registers after t+1, so y (combinational from the
// product register of tap 0 and the chain register of tap 1) shows y(n) for
// that sample from edge t+1 on: a latency of two cycles, one sample per
// cycle. y is ACC_W = DATA_W + 4*NIBBLES + clog2(TAPS) bits wide, enough for
// the full sum without overflow. rst_n is asynchronous, active low, and
// clears the coefficients and all pipeline and delay registers.
//
// The transposed structure with registers after the precomputer, after
// each S&A and between the chain adders follows the published filter; the
// 8-tap default is the length the design is mostly described at. The
// coefficient write port, reset, output width and unregistered y are this
// implementation's choices.
module cshm_fir
  import cshm_pkg::*;
#(
  parameter int unsigned DATA_W  = cshm_pkg::DEF_DATA_W,
  parameter int unsigned NIBBLES = cshm_pkg::DEF_NIBBLES,
  parameter int unsigned TAPS    = cshm_pkg::DEF_TAPS,
  localparam int unsigned CW     = NIB_W * NIBBLES + 1,
  localparam int unsigned PW     = DATA_W + NIB_W * NIBBLES,
  localparam int unsigned AddrW  = clog2_min1(TAPS),
  localparam int unsigned ACC_W  = PW + clog2_min1(TAPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // coefficient programming
  input  logic              coef_we,
  input  logic [AddrW-1:0]  coef_addr,
  input  logic [CW-1:0]     coef_wdata,
  // sample stream
  input  logic [DATA_W-1:0] x,
  output logic [ACC_W-1:0]  y
);
  logic [TAPS-1:0][CW-1:0]  coef_q;
  logic [TAPS-1:0][PW-1:0]  prod, prod_q;
  logic [TAPS-1:0][ACC_W-1:0] sum;   // output of each tap's adder
  logic [TAPS-1:1][ACC_W-1:0] z_q;   // z_q[k]: chain register feeding tap k-1

  // coefficient register file
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef_q <= '0;
    end else if (coef_we && (32'(coef_addr) < TAPS)) begin
      coef_q[coef_addr] <= coef_wdata;
    end
  end

  // shared precomputer, alphabet register, one S&A per tap
  cshm #(
    .DATA_W (DATA_W),
    .NIBBLES(NIBBLES),
    .LANES  (TAPS),
    .PRE_REG(1'b1)
  ) u_cshm (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (x),
    .coef (coef_q),
    .prod (prod)
  );

  // product registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prod_q <= '0;
    else        prod_q <= prod;
  end

  // transposed adder chain
  assign sum[TAPS-1] = ACC_W'($signed(prod_q[TAPS-1]));
  for (genvar k = 0; k < TAPS - 1; k++) begin : g_tap
    logic unused_cout;
    csel_adder #(.W(ACC_W)) u_add (
      .a   (ACC_W'($signed(prod_q[k]))),
      .b   (z_q[k+1]),
      .cin (1'b0),
      .sum (sum[k]),
      .cout(unused_cout)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) z_q <= '0;
    else        z_q <= sum[TAPS-1:1];
  end

  assign y = sum[0];
endmodule
