// precomputer: bank of precomputers for the computation sharing multiplier.
//
// Forms the eight "alphabet" multiples of the input sample that every
// coefficient nibble is built from:
//   1X = X          3X = 2X + X      5X = 4X + X      7X = 8X - X
//   9X = 8X + X    11X = 8X + 3X    13X = 8X + 5X    15X = 16X - X
// The powers of two are wiring (left shifts); each remaining sum is one
// carry-select adder. A difference adds the bitwise inverse of X with a
// carry-in of one. 11X and 13X take 2X+X and 4X+X from the 3X and 5X
// adders instead of repeating those additions. Purely combinational.
//
// Ports: x, DATA_W-bit two's complement sample; alpha[i] = (2i+1)*x as a
// two's complement number of DATA_W+4 bits (15X fits exactly).
//
// The eight alphabets and their shift-and-add decompositions follow the
// published precomputer; reusing 3X and 5X and the output width are this
// implementation's choices.
module precomputer
  import cshm_pkg::*;
#(
  parameter int unsigned DATA_W = cshm_pkg::DEF_DATA_W
) (
  input  logic [DATA_W-1:0]                          x,
  output logic [N_ALPHA-1:0][DATA_W+ALPHA_EXT-1:0]   alpha
);
  localparam int unsigned AW = DATA_W + ALPHA_EXT;

  logic [AW-1:0] x1, x2, x4, x8, x16;
  logic [AW-1:0] x3, x5, x7, x9, x11, x13, x15;

  assign x1  = AW'($signed(x));
  assign x2  = x1 << 1;
  assign x4  = x1 << 2;
  assign x8  = x1 << 3;
  assign x16 = x1 << 4;

  // carry outs fall outside the AW-bit result and are not needed
  logic unused_cout3, unused_cout5, unused_cout7, unused_cout9;
  logic unused_cout11, unused_cout13, unused_cout15;

  csel_adder #(.W(AW)) u_add3  (.a(x2),  .b(x1),  .cin(1'b0), .sum(x3),  .cout(unused_cout3));
  csel_adder #(.W(AW)) u_add5  (.a(x4),  .b(x1),  .cin(1'b0), .sum(x5),  .cout(unused_cout5));
  csel_adder #(.W(AW)) u_sub7  (.a(x8),  .b(~x1), .cin(1'b1), .sum(x7),  .cout(unused_cout7));
  csel_adder #(.W(AW)) u_add9  (.a(x8),  .b(x1),  .cin(1'b0), .sum(x9),  .cout(unused_cout9));
  csel_adder #(.W(AW)) u_add11 (.a(x8),  .b(x3),  .cin(1'b0), .sum(x11), .cout(unused_cout11));
  csel_adder #(.W(AW)) u_add13 (.a(x8),  .b(x5),  .cin(1'b0), .sum(x13), .cout(unused_cout13));
  csel_adder #(.W(AW)) u_sub15 (.a(x16), .b(~x1), .cin(1'b1), .sum(x15), .cout(unused_cout15));

  assign alpha[0] = x1;
  assign alpha[1] = x3;
  assign alpha[2] = x5;
  assign alpha[3] = x7;
  assign alpha[4] = x9;
  assign alpha[5] = x11;
  assign alpha[6] = x13;
  assign alpha[7] = x15;
endmodule
