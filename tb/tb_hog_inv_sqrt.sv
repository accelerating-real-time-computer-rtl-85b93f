// tb_hog_inv_sqrt: accuracy of the inverse square root unit.
// Applies small integers, powers of two and their neighbours, and random
// 32-bit values of every magnitude.  The seed must lie within 3.5 % of
// 1/sqrt(x) and the refined result within 0.2 % (one Newton step on the
// magic-constant seed).  x = 0 must give 0.  Also checks one known seed:
// for x = 1 the seed pattern is 0x5F3759DF - (0x3F800000 >> 1).
module tb_hog_inv_sqrt;
  import hog_pkg::*;
  import tb_util_pkg::*;

  logic [31:0] x, y, ys;
  int checks = 0, failures = 0;

  hog_inv_sqrt dut (.x(x), .y_seed(ys), .y(y));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [31:0] v);
    real want;
    x = v;
    #1;
    want = 1.0 / $sqrt(real'(v));
    checks++;
    if (!rel_close(f32_to_real(ys), want, 0.035, 0.0)) begin
      failures++;
      $display("seed x=%0d got %e want %e", v, f32_to_real(ys), want);
    end
    checks++;
    if (!rel_close(f32_to_real(y), want, 0.002, 0.0)) begin
      failures++;
      $display("x=%0d got %e want %e", v, f32_to_real(y), want);
    end
  endtask

  initial begin
    #1;
    x = 32'd1;
    #1;
    checks++;
    if (ys != 32'h5F3759DF - (32'h3F800000 >> 1)) failures++;
    x = 32'd0;
    #1;
    checks++;
    if (y != 32'h0) failures++;
    for (int i = 1; i <= 5000; i++) check_one(32'(i));
    for (int s = 0; s < 32; s++) begin
      check_one(32'd1 << s);
      if (s > 1) check_one((32'd1 << s) - 1);
      check_one((32'd1 << s) + 1);
    end
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] v;
      v = $urandom() >> ($urandom() % 32);
      if (v == 0) v = 1;
      check_one(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
