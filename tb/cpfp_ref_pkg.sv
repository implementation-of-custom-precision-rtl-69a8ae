// cpfp_ref_pkg -- reference models of the two conversions of the (1,6,10)
// format, used by the testbenches to work out expected results without
// reusing any of the RTL's structure.
//
// ref_i2f finds the exponent by halving the magnitude as a real number until
// it falls below 2, then reads the mantissa off the remaining fraction.
// ref_f2i evaluates (1 + M/1024) * 2^(E-31) in real arithmetic, truncates
// toward zero and saturates at 2047 in magnitude; an exponent field of zero
// means zero.
package cpfp_ref_pkg;

  function automatic logic [16:0] ref_i2f(input logic [11:0] x);
    int   v;
    real  mag;
    int   e;
    logic s;
    int   man;
    v = int'($signed(x));
    if (v == 0) return 17'd0;
    s   = (v < 0);
    mag = (v < 0) ? real'(-v) : real'(v);
    e   = 0;
    while (mag >= 2.0) begin
      mag = mag / 2.0;
      e   = e + 1;
    end
    // mag is now 1.f; the ten mantissa bits are floor(f * 1024).
    man = $rtoi((mag - 1.0) * 1024.0);
    return {s, 6'(e + 31), 10'(man)};
  endfunction

  function automatic logic [11:0] ref_f2i(input logic [16:0] w);
    int  e, m, r;
    real val;
    e = int'(w[15:10]);
    m = int'(w[9:0]);
    if (e == 0) return 12'd0;
    val = (1024.0 + real'(m)) / 1024.0 * (2.0 ** (e - 31));
    if (val >= 2047.0) r = 2047;
    else r = $rtoi(val);
    if (w[16]) r = -r;
    return 12'(r);
  endfunction

endpackage
