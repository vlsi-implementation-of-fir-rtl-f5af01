// shift_and_add: one shift-and-add unit (S&A) of the CSHM.
//
// Multiplies the sample whose alphabet multiples arrive on alpha by one
// sign-magnitude coefficient. Magnitude nibble j (coef bits 4j+3..4j) goes
// to select unit j; the final adder weights the select outputs by 16**j,
// adds them and applies the sign bit (coef's top bit). Purely combinational.
//
// Ports: alpha, precomputer outputs (DATA_W+4 bits each); coef,
// 4*NIBBLES+1 bits, sign in the MSB; prod = X*coef, DATA_W+4*NIBBLES bits,
// two's complement.
//
// Four select units on C<0-3>..C<12-15> and the sign bit C<16> going to the
// final adder follow the published 17x17 multiplier.
module shift_and_add
  import cshm_pkg::*;
#(
  parameter int unsigned DATA_W  = cshm_pkg::DEF_DATA_W,
  parameter int unsigned NIBBLES = cshm_pkg::DEF_NIBBLES
) (
  input  logic [N_ALPHA-1:0][DATA_W+ALPHA_EXT-1:0] alpha,
  input  logic [NIB_W*NIBBLES:0]                   coef,
  output logic [DATA_W+NIB_W*NIBBLES-1:0]          prod
);
  localparam int unsigned AW = DATA_W + ALPHA_EXT;

  logic [NIBBLES-1:0][AW-1:0] part;

  for (genvar j = 0; j < NIBBLES; j++) begin : g_sel
    select_unit #(.DATA_W(DATA_W)) u_sel (
      .alpha(alpha),
      .nib  (coef[NIB_W*j +: NIB_W]),
      .prod (part[j])
    );
  end

  final_adder #(.DATA_W(DATA_W), .NIBBLES(NIBBLES)) u_final (
    .part(part),
    .sign(coef[NIB_W*NIBBLES]),
    .prod(prod)
  );
endmodule
