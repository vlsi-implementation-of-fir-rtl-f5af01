// csel_adder: carry-select adder with one ripple carry adder and one add-one
// circuit per block.
//
// The operands are cut into BLK-bit blocks (the last block takes what is
// left). Each block adds its slice once, with carry-in 0, in an rca giving
// S0 and C0. An add_one circuit forms S1 = S0 + 1, the result for carry-in
// 1, and the block's carry out for carry-in 1 is C0 OR all_one(S0): the
// incremented sum overflows only when S0 is all ones. The carry arriving at
// the block then selects S0/S1 and the matching carry out through
// multiplexers, so the only serial path between blocks is one multiplexer
// per block. The first block is built the same way, with the external cin
// as its select. Purely combinational.
//
// Ports: a, b (W bits), cin; sum (W bits), cout.
//
// The single RCA plus add-one block with carry-in-selected multiplexers is
// the published 4-bit structure; cascading blocks for wider adders and the
// narrower last block are this implementation's choices.
module csel_adder #(
  parameter int unsigned W   = 33,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NBLK = (W + BLK - 1) / BLK;

  // carry into each block, and out of the last
  logic [NBLK:0] c;

  assign c[0] = cin;
  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned LO = k * BLK;
    localparam int unsigned BW = (LO + BLK <= W) ? BLK : W - LO;

    logic [BW-1:0] s0, s1;
    logic          c0, ones;

    rca #(.W(BW)) u_rca (
      .a   (a[LO +: BW]),
      .b   (b[LO +: BW]),
      .cin (1'b0),
      .sum (s0),
      .cout(c0)
    );

    add_one #(.W(BW)) u_add_one (
      .s0     (s0),
      .s1     (s1),
      .all_one(ones)
    );

    // carry-in selects the precomputed result of this block
    assign sum[LO +: BW] = c[k] ? s1 : s0;
    assign c[k+1]        = c[k] ? (c0 | ones) : c0;
  end
  assign cout = c[NBLK];
endmodule
