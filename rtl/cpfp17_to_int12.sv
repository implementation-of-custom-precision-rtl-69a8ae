// cpfp17_to_int12 -- pipelined conversion of a (1,6,10) custom-precision
// floating-point number into a signed binary integer.
//
// How it works: the word is split into sign (R1), mantissa with the hidden
// one restored (R2, 11 bits) and biased exponent (R3); the bias is
// subtracted to give the signed shift count (R4); the mantissa is shifted so
// that only its integer part remains (R5, the unsigned magnitude); a negative
// word has that magnitude two's-complemented into the output register R6.
// Rounding is toward zero: fraction bits are dropped, so any word below 1.0
// in magnitude gives 0. An exponent field of zero gives 0 whatever the
// mantissa. A word too large for the integer (unbiased exponent above 10,
// the all-ones "infinity" exponent included) saturates to the largest
// magnitude, +2047 or -2047.
//
// Interface: one word per clock may enter with in_valid; out_valid marks the
// integer. Latency is four clock cycles (registers R1/R2/R3, R4, R5, R6),
// throughput one word per cycle. rst_n is an asynchronous, active-low reset.
//
// From the document: registers R1..R6 and their widths, restoring the hidden
// one, subtracting the bias of 31, the zero-exponent rule, the exponent-driven
// shift and the final two's complement. The document phrases the shift for
// exponents 0..9 as a shift of 10..1 places "towards left (MSB)"; its
// simulation results (e.g. 0 011111 0000000000 -> +1) require that the
// mantissa's integer part be kept, which is a shift of 10..1 places toward
// the LSB, and that is what is built. Own choices: the valid signal, the
// reset, truncation for negative exponents, saturation on overflow, and
// carrying sign and mantissa alongside the exponent so that a new word may
// enter every cycle.
module cpfp17_to_int12
  import cpfp_pkg::*;
#(
  parameter int unsigned INT_W_P = cpfp_pkg::INT_W,  // integer width (12)
  parameter int unsigned EXP_W_P = cpfp_pkg::EXP_W,  // exponent width (6)
  parameter int unsigned MAN_W_P = cpfp_pkg::MAN_W   // mantissa width (10)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [EXP_W_P+MAN_W_P:0] in_data,   // {sign, exponent, mantissa}
  output logic                     out_valid,
  output logic [INT_W_P-1:0]       out_data   // two's complement
);

  localparam int unsigned BIAS_P = cpfp_pkg::bias_of(EXP_W_P);
  localparam int unsigned R4_W   = EXP_W_P + 2;           // signed, 8 bits
  localparam int unsigned MAG_W  = INT_W_P - 1;           // R5 width (11)
  localparam int unsigned E_MAX  = INT_W_P - 2;           // largest exponent that fits
  localparam int unsigned SH_W   = MAN_W_P + 1 + INT_W_P; // shifter width

  // ---------------------------------------------------------------- stage 1
  logic               r1;            // sign
  logic [MAN_W_P:0]   r2;            // 1.M
  logic [EXP_W_P-1:0] r3;            // biased exponent
  logic               v1;

  // ---------------------------------------------------------------- stage 2
  logic signed [R4_W-1:0] r4;        // unbiased exponent
  logic [MAN_W_P:0]       r2_d;
  logic                   s2, z2, v2;

  // ---------------------------------------------------------------- stage 3
  logic [MAG_W-1:0]   r5;            // magnitude
  logic               s3, v3;

  // ---------------------------------------------------------------- stage 4
  logic [INT_W_P-1:0] r6;
  logic               v4;

  // Normalisation: keep the integer part of 1.M * 2^R4.
  logic [SH_W-1:0]  shifted;
  logic [MAG_W-1:0] mag_next;

  always_comb begin
    shifted = ({{INT_W_P{1'b0}}, r2_d} << r4[R4_W-2:0]) >> MAN_W_P;
    if (z2 || r4 < 0)
      mag_next = '0;
    else if (r4 > R4_W'(E_MAX))
      mag_next = '1;                 // saturate
    else
      mag_next = shifted[MAG_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= 1'b0; r2 <= '0; r3 <= '0; v1 <= 1'b0;
      r4 <= '0; r2_d <= '0; s2 <= 1'b0; z2 <= 1'b0; v2 <= 1'b0;
      r5 <= '0; s3 <= 1'b0; v3 <= 1'b0;
      r6 <= '0; v4 <= 1'b0;
    end else begin
      // R1 / R2 / R3: split the word, restore the hidden one.
      r1 <= in_data[EXP_W_P+MAN_W_P];
      r2 <= {1'b1, in_data[MAN_W_P-1:0]};
      r3 <= in_data[EXP_W_P+MAN_W_P-1:MAN_W_P];
      v1 <= in_valid;
      // R4: remove the bias.
      r4   <= $signed({2'b00, r3}) - $signed(R4_W'(BIAS_P));
      z2   <= (r3 == '0);
      r2_d <= r2;
      s2   <= r1;
      v2   <= v1;
      // R5: integer part of the mantissa.
      r5 <= mag_next;
      s3 <= s2;
      v3 <= v2;
      // R6: apply the sign.
      r6 <= s3 ? (~{1'b0, r5} + INT_W_P'(1)) : {1'b0, r5};
      v4 <= v3;
    end
  end

  assign out_data  = r6;
  assign out_valid = v4;

endmodule
