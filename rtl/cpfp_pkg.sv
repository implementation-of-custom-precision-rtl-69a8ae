// cpfp_pkg -- shared constants and types of the (1,6,10) custom-precision
// floating-point format.
//
// A word is 17 bits: bit 16 is the sign S, bits 15..10 the biased exponent E
// and bits 9..0 the unsigned mantissa M with a hidden leading one, so that a
// normal word means (-1)^S * 1.M * 2^(E - BIAS). The bias is 2^(E_W-1) - 1,
// i.e. 31 for the six exponent bits. An exponent field of zero stands for
// zero whatever the mantissa holds, and an all-ones exponent is the largest
// magnitude (the "infinity" of the format). The integer side is a 12-bit
// two's-complement number. These widths and the bias follow the document;
// the struct and the helper function are this design's own packaging.
package cpfp_pkg;

  localparam int unsigned INT_W = 12;  // signed binary integer width
  localparam int unsigned EXP_W = 6;   // exponent field width
  localparam int unsigned MAN_W = 10;  // mantissa field width (hidden 1 not stored)
  localparam int unsigned FP_W  = 1 + EXP_W + MAN_W;  // 17

  // Exponent bias 2^(e-1) - 1 for an e-bit exponent field.
  function automatic int unsigned bias_of(input int unsigned exp_w);
    return (1 << (exp_w - 1)) - 1;
  endfunction

  localparam int unsigned BIAS = bias_of(EXP_W);  // 31

  // Field view of a default-size word, bit 16 down to bit 0.
  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exponent;
    logic [MAN_W-1:0] mantissa;
  } cpfp_t;

endpackage
