// add_one: add-one circuit with first-zero (all-one) finding.
//
// Produces s1 = s0 + 1 without a second adder. Scanning from the LSB, every
// bit of s0 up to and including the first zero is inverted and the bits
// above it are kept. A bit is therefore inverted exactly when all bits below
// it are one, so a prefix AND chain of s0 drives one XOR per bit. all_one,
// the carry out of the increment, is one only when every bit of s0 is one.
// Purely combinational.
//
// Ports: s0 (W bits); s1 (W bits), all_one.
//
// The first-zero inversion rule and the all-one carry are the published
// add-one circuit; the prefix-AND formulation is this implementation's.
module add_one #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] s0,
  output logic [W-1:0] s1,
  output logic         all_one
);
  // ones[i]: bits 0..i-1 of s0 are all one
  logic [W:0] ones;

  assign ones[0] = 1'b1;
  for (genvar i = 0; i < W; i++) begin : g_bit
    assign s1[i]     = s0[i] ^ ones[i];
    assign ones[i+1] = ones[i] & s0[i];
  end
  assign all_one = ones[W];
endmodule
