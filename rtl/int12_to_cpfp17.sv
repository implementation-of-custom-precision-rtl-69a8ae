// int12_to_cpfp17 -- pipelined conversion of a signed binary integer into the
// (1,6,10) custom-precision floating-point format.
//
// How it works: the sample is registered (R1); a negative sample is replaced
// by its two's complement so that R2 holds the magnitude; a priority search
// finds the highest set bit of R2, whose position is the unbiased exponent
// (R3) and below which lie the fraction bits (R4); the exponent is biased
// (R5) and the fraction bits are shifted up against the binary point to
// fill the mantissa field (R6); sign, exponent and mantissa are packed into
// the output register R7. A zero sample gives the all-zero word.
//
// Interface: one sample per clock may enter with in_valid; out_valid marks
// the converted word. Latency is five clock cycles (registers R1, R2, R3/R4,
// R5/R6, R7), throughput one sample per cycle. rst_n is an asynchronous,
// active-low reset that clears every register.
//
// From the document: the register chain R1..R7 and their widths at the
// default sizes, the magnitude / leading-one / bias / normalise sequence and
// the bias of 31. Own choices: the valid signal, the reset, carrying the sign
// and a zero flag down the pipeline next to the data (so a new sample may
// enter every cycle), and letting the search also look at the top bit of R2
// so that the most negative integer (-2048) converts exactly to
// -1.0 * 2^11 instead of being taken for zero.
module int12_to_cpfp17
  import cpfp_pkg::*;
#(
  parameter int unsigned INT_W_P = cpfp_pkg::INT_W,  // integer width (12)
  parameter int unsigned EXP_W_P = cpfp_pkg::EXP_W,  // exponent width (6)
  parameter int unsigned MAN_W_P = cpfp_pkg::MAN_W   // mantissa width (10)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic [INT_W_P-1:0]             in_data,   // two's complement
  output logic                           out_valid,
  output logic [EXP_W_P+MAN_W_P:0]       out_data   // {sign, exponent, mantissa}
);

  localparam int unsigned CNT_W = $clog2(INT_W_P);       // R3 width (4)
  localparam int unsigned R4_W  = INT_W_P - 2;           // R4 width (10)
  localparam int unsigned BIAS_P = cpfp_pkg::bias_of(EXP_W_P);

  // ---------------------------------------------------------------- stage 1
  logic [INT_W_P-1:0] r1;
  logic               v1;

  // ---------------------------------------------------------------- stage 2
  logic [INT_W_P-1:0] r2;
  logic               v2, s2;

  // ---------------------------------------------------------------- stage 3
  logic [CNT_W-1:0]   r3;      // position of the leading one
  logic [R4_W-1:0]    r4;      // bits below the leading one, right-aligned
  logic               v3, s3, z3;

  // ---------------------------------------------------------------- stage 4
  logic [EXP_W_P-1:0] r5;      // biased exponent
  logic [MAN_W_P-1:0] r6;      // mantissa field
  logic               v4, s4;

  // ---------------------------------------------------------------- stage 5
  logic [EXP_W_P+MAN_W_P:0] r7;
  logic                     v5;

  // Leading-one search over the magnitude.
  logic [CNT_W-1:0]   lead_pos;
  logic               lead_found;
  logic [INT_W_P-1:0] below;

  always_comb begin
    lead_pos   = '0;
    lead_found = 1'b0;
    for (int unsigned i = 0; i < INT_W_P; i++) begin
      if (r2[i]) begin
        lead_pos   = CNT_W'(i);
        lead_found = 1'b1;
      end
    end
    // Clear the leading one; what remains are the fraction bits.
    below = r2 & ~(INT_W_P'(1) << lead_pos);
  end

  // Align the fraction bits under the binary point: the bit just below the
  // leading one lands in the mantissa MSB.
  logic [R4_W+MAN_W_P-1:0] align;
  always_comb align = {r4, {MAN_W_P{1'b0}}} >> r3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0; v1 <= 1'b0;
      r2 <= '0; v2 <= 1'b0; s2 <= 1'b0;
      r3 <= '0; r4 <= '0; v3 <= 1'b0; s3 <= 1'b0; z3 <= 1'b0;
      r5 <= '0; r6 <= '0; v4 <= 1'b0; s4 <= 1'b0;
      r7 <= '0; v5 <= 1'b0;
    end else begin
      // R1: hold the input sample.
      r1 <= in_data;
      v1 <= in_valid;
      // R2: magnitude (two's complement of a negative sample).
      r2 <= r1[INT_W_P-1] ? (~r1 + INT_W_P'(1)) : r1;
      s2 <= r1[INT_W_P-1];
      v2 <= v1;
      // R3 / R4: leading-one position and the bits below it.
      r3 <= lead_pos;
      r4 <= below[R4_W-1:0];
      z3 <= ~lead_found;
      s3 <= s2;
      v3 <= v2;
      // R5 / R6: biased exponent and normalised mantissa.
      r5 <= z3 ? '0 : EXP_W_P'(r3) + EXP_W_P'(BIAS_P);
      r6 <= align[MAN_W_P-1:0];
      s4 <= s3;
      v4 <= v3;
      // R7: pack the word.
      r7 <= {s4, r5, r6};
      v5 <= v4;
    end
  end

  assign out_data  = r7;
  assign out_valid = v5;

endmodule
