// hog_orient_bin: orientation bin of a gradient without an arctangent.
//
// Nine unsigned bins of 20 degrees cover 0..180 degrees.  Bin i is centred
// on i*20 degrees, so its edges lie at the odd multiples of 10 degrees and
// bin 0 wraps around 0/180.  Following the design description, the angle is
// never computed: dy is compared with dx*tan(theta) for theta = 10, 30, 50,
// 70 degrees, and a gradient in the second quadrant is mirrored into the
// first by negating dx.  Gradients with dy < 0 are first rotated by 180
// degrees (both signs flipped), which leaves an unsigned orientation
// unchanged.  The tangents are Q.16 constants from hog_pkg.
//   first quadrant  (dx > 0):  bin = k
//   second quadrant (dx <= 0): bin = (k == 0) ? 0 : 9 - k
// where k (0..4) counts the boundaries with dy*2^16 >= |dx|*tan_q16.
// dx = dy = 0 gives bin 0 (its magnitude is zero, so the vote is empty).
// Purely combinational.
module hog_orient_bin
  import hog_pkg::*;
(
  input  logic signed [GRAD_W-1:0]    dx,
  input  logic signed [GRAD_W-1:0]    dy,
  output logic        [BIN_IDX_W-1:0] bin
);

  logic signed [GRAD_W-1:0] fx, fy;     // rotated so that fy >= 0
  logic        [GRAD_W-2:0] ux, uy;     // magnitudes of fx, fy (0..255)
  logic                     mirrored;
  logic [2:0]               k;
  logic [8+TAN_FRAC+2:0]    lhs, rhs;

  always_comb begin
    if (dy < 0) begin
      fx = -dx;
      fy = -dy;
    end else begin
      fx = dx;
      fy = dy;
    end
    mirrored = (fx <= 0);
    ux = mirrored ? (GRAD_W-1)'(-fx) : (GRAD_W-1)'(fx);
    uy = (GRAD_W-1)'(fy);
    lhs = {3'b0, uy, {TAN_FRAC{1'b0}}};
    k = '0;
    for (int j = 0; j < 4; j++) begin
      rhs = ($bits(rhs))'(ux) * ($bits(rhs))'(TAN_Q16[j]);
      if (lhs >= rhs) k = k + 3'd1;
    end
    if (fx == 0 && fy == 0)  bin = '0;
    else if (!mirrored)      bin = BIN_IDX_W'(k);
    else if (k == 0)         bin = '0;
    else                     bin = BIN_IDX_W'(4'd9 - BIN_IDX_W'(k));
  end

endmodule
