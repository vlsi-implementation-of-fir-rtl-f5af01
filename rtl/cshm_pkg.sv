// cshm_pkg: sizes shared by the computation sharing multiplier (CSHM) and
// the FIR filter built on it.
//
// The multiplier takes a two's complement sample X of DATA_W bits and a
// sign-magnitude coefficient of COEF_W bits: NIBBLES four-bit magnitude
// nibbles plus a sign bit on top. With the defaults (17-bit X, 17-bit
// coefficient) this is the 17x17 CSHM. The precomputer forms the eight odd
// "alphabet" multiples 1X..15X of the sample, each ALPHA_EXT bits wider than
// X. TAPS is the filter length of the programmable FIR filter.
package cshm_pkg;
  parameter int unsigned NIB_W     = 4;   // bits per coefficient nibble
  parameter int unsigned N_ALPHA   = 8;   // alphabets 1,3,5,...,15
  parameter int unsigned ALPHA_EXT = 4;   // 15X needs 4 bits more than X
  parameter int unsigned SHIFT_W   = 2;   // inverse shift 0..3
  parameter int unsigned DEF_DATA_W  = 17;  // input sample width
  parameter int unsigned DEF_NIBBLES = 4;   // magnitude nibbles per coefficient
  parameter int unsigned DEF_TAPS    = 8;   // FIR filter length

  // Width of the coefficient, sign bit included.
  function automatic int unsigned coef_w(int unsigned nibbles);
    return nibbles * NIB_W + 1;
  endfunction

  // Width of a product X*C: the magnitude adds nibbles*4 bits to X.
  function automatic int unsigned prod_w(int unsigned data_w, int unsigned nibbles);
    return data_w + nibbles * NIB_W;
  endfunction

  // Bits needed for ceil(log2(n)), at least 1.
  function automatic int unsigned clog2_min1(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction
endpackage
