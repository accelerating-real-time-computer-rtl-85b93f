// tb_hog_pl_top: end-to-end run of the full-size design (128x128 image).
// A host model writes two frames back to back into the write FIFO (4096
// packed words each) whenever it is not full, and reads features from the
// read FIFO with random pauses plus one long pause.  All 2 x 8100 features
// are compared with the reference model (0.3 % relative tolerance).
// Frame 1 is a handwritten-style "4" of thick strokes on a black page, frame
// 2 is a smooth ramp with noise.  Each mechanism of the design must occur at
// least once, and is counted: host stalled by a full write FIFO, accelerator
// stalled by a full read FIFO, feature truncation, zero-energy block,
// second-quadrant mirroring in the binning, magnitude taken from the outer
// max, and each of the three phases (load, gradients, normalisation) on
// both frames.  The top runs with its default parameters.
module tb_hog_pl_top;
  import hog_pkg::*;
  import tb_util_pkg::*;
  import tb_hog_ref_pkg::*;

  localparam int W = 128, H = 128, NW = W * H / 4, NF = (W / 8 - 1) * (H / 8 - 1) * 36;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_wr_en, host_wr_full, host_rd_en, host_rd_empty;
  logic [31:0] host_wr_data, host_rd_data;
  logic [1:0]  phase;
  logic        frame_done, feat_clipped;

  logic [31:0] words [2*NW];
  real         want  [2*NF];
  int checks = 0, failures = 0;
  int wi = 0, ri = 0, nframes = 0;
  int n_wr_stall = 0, n_rd_stall = 0, n_clip_seen = 0, pause = 0;
  bit paused = 1'b0;
  int n_phase [3];
  int ev_zero, ev_mirror, ev_floor, ev_clip;
  logic [1:0] phase_q;

  always #5 clk = ~clk;

  hog_pl_top dut (
    .clk, .rst_n,
    .host_wr_en, .host_wr_data, .host_wr_full,
    .host_rd_en, .host_rd_data, .host_rd_empty,
    .phase, .frame_done, .feat_clipped
  );

  // host model: drive at the falling edge, act at the rising edge
  always @(negedge clk) begin
    host_wr_en   = rst_n && (wi < 2 * NW) && !host_wr_full;
    host_wr_data = words[(wi < 2 * NW) ? wi : 0];
    if (pause > 0) pause--;
    if (ri == 3000 && !paused) begin   // long pause once: the read FIFO fills up
      pause  = 3000;
      paused = 1'b1;
    end
    host_rd_en = rst_n && !host_rd_empty && (pause == 0) && ($urandom() % 5 != 0);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if ((wi < 2 * NW) && host_wr_full) n_wr_stall++;
      if (dut.u_core.out_valid && !dut.u_core.out_ready) n_rd_stall++;
      if (feat_clipped && dut.u_core.out_ready) n_clip_seen++;
      if (phase != phase_q) n_phase[phase]++;
      phase_q <= phase;
      if (frame_done) nframes++;
      if (host_wr_en) wi++;
      if (host_rd_en) begin
        checks++;
        if (ri >= 2 * NF || !rel_close(f32_to_real(host_rd_data), want[ri], 0.003, 1.0e-9)) begin
          failures++;
          if (failures < 10) $display("feature %0d got %e want %e", ri, f32_to_real(host_rd_data), want[ri]);
        end
        ri++;
      end
    end
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_event(input string what, input int n);
    checks++;
    $display("%-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("  never happened: %s", what);
    end
  endtask

  task automatic prepare(input int f);
    compute_cells();
    compute_feats(W / 8, H / 8, 0.2);
    for (int k = 0; k < NW; k++)
      words[f * NW + k] = {img[4 * k + 3], img[4 * k + 2], img[4 * k + 1], img[4 * k]};
    for (int k = 0; k < NF; k++) want[f * NF + k] = feats[k];
  endtask

  initial begin
    int v;
    img_w = W; img_h = H;
    n_mirror = 0; n_mag_floor = 0; n_zero_block = 0; n_clip = 0;
    for (int p = 0; p < 3; p++) n_phase[p] = 0;
    phase_q = 2'd0;
    // frame 1: a "4" drawn with thick strokes
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        v = 0;
        if (x >= 40 && x < 52 && y >= 20 && y < 80) v = 1;          // left vertical
        if (y >= 70 && y < 82 && x >= 40 && x < 100) v = 1;         // bar
        if (x >= 78 && x < 90 && y >= 16 && y < 112) v = 1;         // right vertical
        if (x + y >= 60 && x + y < 72 && x >= 20 && x < 50) v = 1;  // slanted tick
        img[y * W + x] = v ? 8'd250 : 8'd0;
      end
    prepare(0);
    // frame 2: smooth ramp plus noise
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y * W + x] = 8'((x + 2 * y) / 2 + ($urandom() % 40));
    prepare(1);
    ev_zero = n_zero_block; ev_mirror = n_mirror; ev_floor = n_mag_floor; ev_clip = n_clip;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (nframes < 2 || ri < 2 * NF) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (ri != 2 * NF || !host_rd_empty) failures++;
    expect_event("host waits on full write FIFO", n_wr_stall);
    expect_event("accelerator waits on full read FIFO", n_rd_stall);
    expect_event("features truncated", n_clip_seen);
    expect_event("zero-energy blocks", ev_zero);
    expect_event("second-quadrant gradients mirrored", ev_mirror);
    expect_event("magnitude from outer max", ev_floor);
    expect_event("entries into gradient phase", n_phase[1] >= 2 ? n_phase[1] : 0);
    expect_event("entries into normalisation phase", n_phase[2] >= 2 ? n_phase[2] : 0);
    expect_event("returns to load phase", n_phase[0] >= 2 ? n_phase[0] : 0);
    // features within the inverse-square-root error of 0.2 may fall either side
    checks++;
    if (n_clip_seen < ev_clip - ev_clip / 100 - 2 || n_clip_seen > ev_clip + ev_clip / 100 + 2) begin
      failures++;
      $display("truncated %0d, reference %0d", n_clip_seen, ev_clip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
