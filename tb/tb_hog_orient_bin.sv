// tb_hog_orient_bin: exhaustive test of the tangent-comparison binning.
// For every (dx, dy) in -255..255 the expected bin is found from the
// unsigned angle atan2(dy, dx) folded into 0..180 degrees: bin i covers
// [20i-10, 20i+10) and bin 0 also [170, 180).  Points lying within 0.02
// degrees of a bin edge are skipped (the Q.16 tangents decide those).
// (0, 0) must give bin 0, straight-up gradients bin 5 (90 degrees sits on
// the 90/110 side), and every bin must occur.
module tb_hog_orient_bin;
  import hog_pkg::*;

  logic signed [GRAD_W-1:0]    dx, dy;
  logic        [BIN_IDX_W-1:0] bin;
  int checks = 0, failures = 0;
  int seen [9];

  hog_orient_bin dut (.dx(dx), .dy(dy), .bin(bin));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ang, edge_dist, r;
    int want, skipped;
    skipped = 0;
    for (int k = 0; k < 9; k++) seen[k] = 0;
    for (int i = -255; i <= 255; i++) begin
      for (int j = -255; j <= 255; j++) begin
        dx = GRAD_W'(i);
        dy = GRAD_W'(j);
        #1;
        if (i == 0 && j == 0) begin
          checks++;
          if (bin != 0) failures++;
          continue;
        end
        ang = $atan2(real'(j), real'(i)) * 180.0 / 3.14159265358979;
        if (ang < 0.0) ang += 180.0;
        if (ang >= 180.0) ang -= 180.0;
        // distance to the nearest edge (odd multiple of 10 degrees)
        r = ang - 10.0;
        while (r >= 20.0) r -= 20.0;
        while (r < 0.0) r += 20.0;
        edge_dist = (r < 10.0) ? r : 20.0 - r;
        if (edge_dist < 0.02 && !(i == 0)) begin
          skipped++;
          continue;
        end
        want = (i == 0) ? 5 : int'($floor((ang + 10.0) / 20.0));
        if (want == 9) want = 0;
        checks++;
        seen[bin]++;
        if (int'(bin) != want) begin
          failures++;
          if (failures < 10) $display("dx=%0d dy=%0d angle=%f got %0d want %0d", i, j, ang, bin, want);
        end
      end
    end
    for (int k = 0; k < 9; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("skipped %0d points on bin edges", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
