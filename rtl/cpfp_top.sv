// cpfp_top -- the custom-precision floating-point conversion core: both
// converters of the (1,6,10) format, side by side.
//
// The integer-to-float path takes a 12-bit two's-complement sample (such as an
// ADC reading) and returns the 17-bit word {sign, 6-bit exponent, 10-bit
// mantissa} five cycles later. The float-to-integer path takes a 17-bit word
// and returns the 12-bit integer (rounded toward zero, saturated) four cycles
// later. Both run from one clock and one asynchronous active-low reset, accept
// a new value every cycle and are otherwise independent, each with its own
// valid-in / valid-out pair. The document builds and tests each converter as
// a design of its own; sharing clock and reset in one top is this design's
// choice.
module cpfp_top
  import cpfp_pkg::*;
#(
  parameter int unsigned INT_W_P = cpfp_pkg::INT_W,  // 12
  parameter int unsigned EXP_W_P = cpfp_pkg::EXP_W,  // 6
  parameter int unsigned MAN_W_P = cpfp_pkg::MAN_W   // 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // integer -> float
  input  logic                     i2f_in_valid,
  input  logic [INT_W_P-1:0]       i2f_in_data,
  output logic                     i2f_out_valid,
  output logic [EXP_W_P+MAN_W_P:0] i2f_out_data,
  // float -> integer
  input  logic                     f2i_in_valid,
  input  logic [EXP_W_P+MAN_W_P:0] f2i_in_data,
  output logic                     f2i_out_valid,
  output logic [INT_W_P-1:0]       f2i_out_data
);

  int12_to_cpfp17 #(
    .INT_W_P(INT_W_P), .EXP_W_P(EXP_W_P), .MAN_W_P(MAN_W_P)
  ) u_i2f (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (i2f_in_valid),
    .in_data  (i2f_in_data),
    .out_valid(i2f_out_valid),
    .out_data (i2f_out_data)
  );

  cpfp17_to_int12 #(
    .INT_W_P(INT_W_P), .EXP_W_P(EXP_W_P), .MAN_W_P(MAN_W_P)
  ) u_f2i (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (f2i_in_valid),
    .in_data  (f2i_in_data),
    .out_valid(f2i_out_valid),
    .out_data (f2i_out_data)
  );

endmodule
