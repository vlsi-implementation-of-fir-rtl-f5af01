// rca: W-bit ripple carry adder.
//
// A chain of full adders, bit 0 first, each passing its carry to the next.
// In the carry-select adder it is the single adder of each block and is fed
// a carry-in of zero, so its bit-0 stage is effectively the half adder drawn
// at the start of the 4-bit block. Purely combinational.
//
// Ports: a, b (W bits), cin; sum (W bits), cout.
//
// The 4-bit half-adder/full-adder chain is the published block adder; the
// cin port is added here so the module also works stand-alone.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign cout = c[W];
endmodule
