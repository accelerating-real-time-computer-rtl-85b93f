// hog_feat_scale: one normalised HOG feature, h * isr, truncated.
//
// Multiplies an integer histogram bin h by the block's inverse square root
// (an IEEE754 single) and returns the product as an IEEE754 single, then
// truncates it: a feature larger than CLIP is replaced by CLIP.  Because
// both numbers are positive, the float comparison is a plain unsigned
// comparison of the bit patterns.  The product is formed on the 24-bit
// mantissa (h * My, 40 bits) and renormalised with truncation.  The
// truncation step follows the design description ("cell truncation"); the
// level 0.2 is the usual HOG choice and this design's default.
// Purely combinational.
module hog_feat_scale
  import hog_pkg::*;
#(
  parameter logic [31:0] CLIP = CLIP_0P2
) (
  input  logic [HBIN_W-1:0] h,
  input  logic [31:0]       isr,
  output logic [31:0]       feat,
  output logic              clipped
);

  logic [23:0] my;
  logic [39:0] p;
  logic [5:0]  l;
  logic [55:0] pn;
  logic [9:0]  ex;
  logic [31:0] raw;

  always_comb begin
    my  = {1'b1, isr[22:0]};
    p   = 40'(h) * 40'(my);
    l   = msb_index56(56'(p));
    pn  = 56'(p) << (6'd55 - l);
    // h * isr = p * 2^(e_isr - 150): biased exponent e_isr + l - 23
    ex  = 10'(isr[30:23]) + 10'(l) - 10'd23;
    if (h == '0 || isr[30:0] == '0) raw = '0;
    else                             raw = {1'b0, ex[7:0], pn[54:32]};
    clipped = (raw > CLIP);
    feat    = clipped ? CLIP : raw;
  end

endmodule
