// hog_grad_mag: shift-and-add approximation of the gradient magnitude.
//
// Replaces sqrt(dx^2 + dy^2) by
//     a = max(|dx|, |dy|),  b = min(|dx|, |dy|)
//     mag = max(a - (a >> 3) + (b >> 1), a)
// which needs no multiplier.  The formula is the one the design description
// gives; the shifts truncate (integer arithmetic), which is this design's
// reading of it.  Purely combinational: mag follows dx/dy in the same cycle.
// Interface: dx, dy signed -255..255; mag unsigned 0..351.
module hog_grad_mag
  import hog_pkg::*;
(
  input  logic signed [GRAD_W-1:0] dx,
  input  logic signed [GRAD_W-1:0] dy,
  output logic        [MAG_W-1:0]  mag
);

  logic [GRAD_W-1:0] adx, ady;   // absolute values, 0..255
  logic [GRAD_W-1:0] a, b;
  logic [MAG_W:0]    approx;

  always_comb begin
    adx    = dx[GRAD_W-1] ? GRAD_W'(-dx) : GRAD_W'(dx);
    ady    = dy[GRAD_W-1] ? GRAD_W'(-dy) : GRAD_W'(dy);
    a      = (adx >= ady) ? adx : ady;
    b      = (adx >= ady) ? ady : adx;
    approx = (MAG_W+1)'(a) - (MAG_W+1)'(a >> 3) + (MAG_W+1)'(b >> 1);
    mag    = (approx > (MAG_W+1)'(a)) ? MAG_W'(approx) : MAG_W'(a);
  end

endmodule
