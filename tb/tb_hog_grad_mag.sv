// tb_hog_grad_mag: exhaustive test of the magnitude approximation.
// Every (dx, dy) in -255..255 is applied.  Each result is compared with the
// formula evaluated in testbench integer arithmetic, and must lie within
// [0.95*|g|, 1.12*|g|] of the true Euclidean length |g|.  Over the whole range
// the mean absolute error must come out at 1.9075 and the mean relative
// error at 0.98 %, the accuracy figures quoted for this approximation.
module tb_hog_grad_mag;
  import hog_pkg::*;

  logic signed [GRAD_W-1:0] dx, dy;
  logic        [MAG_W-1:0]  mag;
  int checks = 0, failures = 0;
  real t, d, mean_abs, mean_rel;
  longint acc_abs = 0, acc_rel = 0, cnt = 0;   // errors summed in units of 1e-6 and 1e-9

  hog_grad_mag dut (.dx(dx), .dy(dy), .mag(mag));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, m;

    for (int i = -255; i <= 255; i++) begin
      for (int j = -255; j <= 255; j++) begin
        dx = GRAD_W'(i);
        dy = GRAD_W'(j);
        #1;
        a = (i < 0 ? -i : i);
        b = (j < 0 ? -j : j);
        if (b > a) begin m = a; a = b; b = m; end
        m = a - a / 8 + b / 2;
        if (m < a) m = a;
        checks++;
        if (int'(mag) != m) begin
          failures++;
          if (failures < 10) $display("mismatch dx=%0d dy=%0d got %0d want %0d", i, j, mag, m);
        end
        t = $sqrt(real'(i * i + j * j));
        if (t > 0.0) begin
          checks++;
          if (real'(mag) < 0.95 * t - 1.0 || real'(mag) > 1.12 * t + 1.0) begin
            failures++;
            if (failures < 10) $display("out of bounds dx=%0d dy=%0d mag=%0d true=%f", i, j, mag, t);
          end
          d = real'(mag) - t;
          if (d < 0.0) d = -d;
          acc_abs += longint'(d * 1.0e6);
          acc_rel += longint'(d / t * 1.0e9);
          cnt++;
        end
      end
    end
    mean_abs = real'(acc_abs) / 1.0e6 / real'(cnt);
    mean_rel = 100.0 * real'(acc_rel) / 1.0e9 / real'(cnt);
    $display("mean abs error %f, mean rel error (percent) %f", mean_abs, mean_rel);
    checks++;
    if (!(mean_abs >= 1.90 && mean_abs <= 1.915)) failures++;
    checks++;
    if (!(mean_rel >= 0.975 && mean_rel <= 0.985)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
