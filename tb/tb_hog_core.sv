// tb_hog_core: one accelerator, two frames, through its stream ports.
// A 32x24 image (4x3 cells, 6 blocks, 216 features) is sent as packed words
// and the features are compared with the reference model (0.3 % relative
// tolerance).  Frame 1 is sent and drained without stalls, and the time from
// the first word to frame_done must be W*H (load) + 10*(W/8)*H (gradients)
// + 42 per block + 4 cycles of latency and hand-over.  Frame 2 is random noise sent with random
// gaps and drained with random back-pressure.  in_ready must stay low
// outside the load phase.
module tb_hog_core;
  import hog_pkg::*;
  import tb_util_pkg::*;
  import tb_hog_ref_pkg::*;

  localparam int W = 32, H = 24, NB = (W / 8 - 1) * (H / 8 - 1), NW = W * H / 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_last, out_ready, frame_done, feat_clipped;
  logic [31:0] in_data, out_data;
  logic [1:0]  phase;
  int checks = 0, failures = 0;
  int wi, nout, ndone, cycles;
  bit rnd, sending;

  always #5 clk = ~clk;

  hog_core #(.IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready,
    .out_valid, .out_data, .out_last, .out_ready,
    .phase, .frame_done, .feat_clipped
  );

  function automatic logic [31:0] word_of(input int k);
    return {img[4 * k + 3], img[4 * k + 2], img[4 * k + 1], img[4 * k]};
  endfunction

  always @(negedge clk) begin
    in_valid  = sending && (wi < NW) && (!rnd || ($urandom() % 3 != 0));
    in_data   = word_of((wi < NW) ? wi : 0);
    out_ready = !rnd || ($urandom() % 4 != 0);
  end

  always @(posedge clk) begin
    if (in_valid && in_ready) wi++;
    if (in_ready && phase != 2'd0) failures++;
    if (out_valid && out_ready) begin
      checks++;
      if (nout >= NB * 36 || !rel_close(f32_to_real(out_data), feats[nout], 0.003, 1.0e-9)) begin
        failures++;
        if (failures < 10) $display("feature %0d got %e want %e", nout, f32_to_real(out_data), feats[nout]);
      end
      nout++;
    end
    if (frame_done) ndone++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input bit r);
    img_w = W; img_h = H;
    compute_cells();
    compute_feats(W / 8, H / 8, 0.2);
    rnd = r; wi = 0; nout = 0; ndone = 0; cycles = 0;
    sending = 1'b1;
    while (wi == 0) @(negedge clk);
    cycles = 1;
    while (ndone == 0) begin
      @(negedge clk);
      cycles++;
    end
    sending = 1'b0;
    checks++;
    if (nout != NB * 36) begin failures++; $display("%0d features", nout); end
    if (!r) begin
      checks++;
      if (cycles != W * H + 10 * (W / 8) * H + 42 * NB + 4) begin
        failures++;
        $display("frame took %0d cycles, want %0d", cycles, W * H + 10 * (W / 8) * H + 42 * NB + 4);
      end
    end
  endtask

  initial begin
    sending = 1'b0; wi = 0; rnd = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y * W + x] = (x > 8 && x < 14 && y > 3 && y < 20) || (y > 12 && y < 16 && x > 4) ? 8'd240 : 8'd10;
    run_frame(1'b0);
    for (int i = 0; i < W * H; i++) img[i] = 8'($urandom());
    run_frame(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
