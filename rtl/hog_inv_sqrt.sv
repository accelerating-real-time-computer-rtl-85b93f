// hog_inv_sqrt: approximate 1/sqrt(x) of a block energy.
//
// Block normalisation divides every histogram bin by the square root of the
// block energy.  Instead of a divider and a square root this unit follows the
// well-known IEEE754 shortcut named in the design description:
//   1. x (unsigned integer) is converted to a single-precision pattern
//      (mantissa truncated to 23 bits);
//   2. the seed is y0 = 0x5F3759DF - (pattern >> 1), read back as a float;
//   3. one Newton step refines it: y1 = y0 * (3 - x*y0^2) / 2.
// Step 3 is done in fixed point on the 24-bit mantissas rather than with
// floating-point units: x*y0^2 is formed as Mx * (My^2 >> 24), scaled to a
// Q.30 number near 1, and (3 - t)/2 multiplies My before the result is
// normalised back to a float.  This fixed-point datapath, the truncations in
// it and the output y = 0 for x = 0 are this design's choices.  The relative
// error after the Newton step stays below about 0.2 %.
// Purely combinational: y follows x in the same cycle.  The sign bit of y
// is always 0, since 1/sqrt(x) is never negative; it is kept so that y is a
// complete IEEE754 single.
module hog_inv_sqrt
  import hog_pkg::*;
(
  input  logic [ENERGY_W-1:0] x,        // unsigned integer
  output logic [31:0]         y_seed,   // IEEE754 seed y0
  output logic [31:0]         y         // IEEE754 result y1
);

  logic [5:0]  e;          // index of the leading one of x
  logic [31:0] xn;         // x shifted so that bit 31 is the leading one
  logic [31:0] xbits;      // x as an IEEE754 single
  logic [7:0]  ey;         // biased exponent of y0
  logic [23:0] mx, my;     // mantissas with the hidden one
  logic [47:0] p, q;
  logic [23:0] p24;
  int          sh;
  logic [32:0] t_q30;      // x*y0^2, Q.30
  logic [32:0] f_q30;      // (3 - t)/2, Q.30
  logic [55:0] m;          // my * f
  logic [5:0]  lm;
  logic [55:0] mnorm;
  logic [9:0]  ey1;

  always_comb begin
    e = '0;
    for (int i = 0; i < 32; i++) if (x[i]) e = 6'(i);
    xn     = x << (6'd31 - e);
    mx     = xn[31:8];
    xbits  = {1'b0, 8'(e) + 8'd127, xn[30:8]};
    y_seed = ISR_MAGIC - (xbits >> 1);
    ey     = y_seed[30:23];
    my     = {1'b1, y_seed[22:0]};
    p      = 48'(my) * 48'(my);
    p24    = p[47:24];
    q      = 48'(mx) * 48'(p24);
    // t = q * 2^(e + 2*ey - 299); in Q.30 that is q * 2^(e + 2*ey - 269)
    sh     = 269 - int'(e) - 2 * int'(ey);
    if (sh >= 48)     t_q30 = '0;
    else if (sh >= 0) t_q30 = 33'(q >> sh);
    else              t_q30 = {1'b1, 32'h0};   // seed far too large: t >= 4
    f_q30  = (33'd3 << 29) - (t_q30 >> 1);
    if (t_q30 >= (33'd3 << 30)) f_q30 = '0;   // t >= 3
    m      = 56'(my) * 56'(f_q30);
    lm     = msb_index56(m);
    mnorm  = m << (6'd55 - lm);
    // y1 = m * 2^(ey - 180): biased exponent ey + lm - 53
    ey1    = 10'(ey) + 10'(lm) - 10'd53;
    if (x == '0 || m == '0) y = '0;
    else                    y = {1'b0, ey1[7:0], mnorm[54:32]};
  end

endmodule
