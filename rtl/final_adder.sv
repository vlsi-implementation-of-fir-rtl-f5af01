// final_adder: final adder of one shift-and-add unit (S&A).
//
// Adds the NIBBLES select-unit outputs, nibble j weighted by 16**j, and
// applies the coefficient's sign, giving X*C in two's complement.
//   1. Carry-save array: a row of 3:2 compressors per operand reduces the
//      sign-extended, shifted partial products to a sum vector S and a
//      carry vector K with S+K = P, the unsigned-coefficient product.
//   2. XOR gate array: S and K are XORed with the sign bit, i.e. inverted
//      for a negative coefficient.
//   3. Carry-select adder: adds the two vectors with the sign bit as its
//      carry-in.
// Inverting both vectors gives ~S + ~K = -(S+K) - 2, and the carry-in
// restores only one of the two missing ones. The design therefore adds
// one more row to the carry-save array, all ones when the sign bit is set
// (that is, -1), so that S+K = P-1 and ~S + ~K + 1 = -P exactly. For a
// positive coefficient the extra row is zero and nothing is inverted.
// Purely combinational; all sums are modulo 2**PW, which the product fits.
//
// Ports: part[j], select unit j output (DATA_W+4 bits, two's complement);
// sign, coefficient sign bit; prod, DATA_W+4*NIBBLES bits.
//
// The carry-save array -> XOR array -> carry-select adder order is the
// published structure; the linear array and the -1 sign row are this
// implementation's choices.
module final_adder
  import cshm_pkg::*;
#(
  parameter int unsigned DATA_W  = cshm_pkg::DEF_DATA_W,
  parameter int unsigned NIBBLES = cshm_pkg::DEF_NIBBLES
) (
  input  logic [NIBBLES-1:0][DATA_W+ALPHA_EXT-1:0] part,
  input  logic                                     sign,
  output logic [DATA_W+NIB_W*NIBBLES-1:0]          prod
);
  localparam int unsigned PW   = DATA_W + NIB_W * NIBBLES;
  localparam int unsigned NOPS = NIBBLES + 1;   // partial products + sign row

  // operands of the carry-save array
  logic [NOPS-1:0][PW-1:0] op;
  for (genvar j = 0; j < NIBBLES; j++) begin : g_op
    assign op[j] = PW'($signed(part[j])) << (NIB_W * j);
  end
  assign op[NIBBLES] = {PW{sign}};

  // carry-save array: row r folds operand r+2 into (s[r], k[r])
  logic [NOPS-1:0][PW-1:0] s, k;
  assign s[1] = op[0];
  assign k[1] = op[1];
  for (genvar r = 2; r < NOPS; r++) begin : g_row
    assign s[r] = s[r-1] ^ k[r-1] ^ op[r];
    assign k[r] = ((s[r-1] & k[r-1]) | (op[r] & (s[r-1] ^ k[r-1]))) << 1;
  end
  // rows 0 of s and k are not used
  assign s[0] = '0;
  assign k[0] = '0;

  // XOR gate array: conditional inversion by the coefficient sign
  logic [PW-1:0] sx, kx;
  assign sx = s[NOPS-1] ^ {PW{sign}};
  assign kx = k[NOPS-1] ^ {PW{sign}};

  logic unused_cout;
  csel_adder #(.W(PW)) u_csel (
    .a   (sx),
    .b   (kx),
    .cin (sign),
    .sum (prod),
    .cout(unused_cout)
  );
endmodule
