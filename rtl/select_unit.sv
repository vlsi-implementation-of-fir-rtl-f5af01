// select_unit: turns the shared alphabet multiples into X times one
// coefficient nibble.
//
// Every non-zero 4-bit nibble is an odd alphabet (1,3,...,15) shifted left by
// 0..3 places. The SHIFTER shifts the nibble right until its LSB is one; the
// odd value it reaches gives the 8:1 multiplexer select ((odd-1)/2) and the
// number of places shifted gives the inverse shift. The multiplexer picks
// that precomputer output and the ISHIFTER, a barrel shifter, shifts it back
// left by the same amount. A nibble of 0000 has no odd alphabet, so AND
// gates force the output to zero. Example: nibble 1100 -> odd 0011, select
// 001 (3X), shift 2, output 12X. Purely combinational.
//
// Ports: alpha, the eight precomputer outputs; nib, the coefficient nibble;
// prod = X*nib, two's complement, DATA_W+4 bits (|X*nib| <= |15X|).
//
// SHIFTER, MUX(8:1), ISHIFTER (max. shift 3) and the zero AND gates are the
// published structure; the priority-logic SHIFTER is this implementation's.
module select_unit
  import cshm_pkg::*;
#(
  parameter int unsigned DATA_W = cshm_pkg::DEF_DATA_W
) (
  input  logic [N_ALPHA-1:0][DATA_W+ALPHA_EXT-1:0] alpha,
  input  logic [NIB_W-1:0]                         nib,
  output logic [DATA_W+ALPHA_EXT-1:0]              prod
);
  localparam int unsigned AW = DATA_W + ALPHA_EXT;

  logic [SHIFT_W-1:0] shamt;   // SHIFTER: places shifted right
  logic [2:0]         sel;     // MUX(8:1) select: odd nibble without its LSB
  logic               nz;      // nibble is not 0000
  logic [AW-1:0]      chosen;  // MUX output
  logic [AW-1:0]      shifted; // ISHIFTER output

  // SHIFTER
  always_comb begin
    if (nib[0]) begin
      shamt = 2'd0;
      sel   = nib[3:1];
    end else if (nib[1]) begin
      shamt = 2'd1;
      sel   = 3'(nib >> 2);
    end else if (nib[2]) begin
      shamt = 2'd2;
      sel   = 3'(nib >> 3);
    end else begin
      shamt = 2'd3;
      sel   = 3'd0;
    end
  end
  assign nz  = |nib;

  // MUX(8:1)
  assign chosen = alpha[sel];

  // ISHIFTER: two-stage barrel shifter, by 1 then by 2
  logic [AW-1:0] stage1;
  assign stage1  = shamt[0] ? {chosen[AW-2:0], 1'b0} : chosen;
  assign shifted = shamt[1] ? {stage1[AW-3:0], 2'b00} : stage1;

  // AND gates for the zero nibble
  assign prod = shifted & {AW{nz}};
endmodule
