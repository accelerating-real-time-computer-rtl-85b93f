// tb_hog_digit_run: a run of 20 digits through the full-size design, as the
// recognizer sends them: 20 pre-processed 128x128 digit windows written back
// to back, the features of each read as soon as they appear.
// The digits 0..9 are drawn twice from thick seven-segment strokes on a black
// page: upright with 8-pixel strokes, then slanted with 12-pixel strokes.
// Every one of the 20 x 8100 features is compared with the reference model
// (0.3 % relative tolerance).
// Timing checks, with the host never holding the accelerator back:
//   * each frame takes exactly W*H + 10*(W/8)*H + 42*blocks + 4 = 46 318
//     cycles inside the accelerator, from its first word to frame_done;
//   * the interval between two frame_done pulses is at most the 90 672-cycle
//     initiation interval of the HLS design this follows;
//   * the whole run, first host word to last feature, fits in 20 x 90 672
//     cycles (14.4 ms at 125 MHz).
// The top runs with its default parameters.
module tb_hog_digit_run;
  import hog_pkg::*;
  import tb_util_pkg::*;
  import tb_hog_ref_pkg::*;

  localparam int W = 128, H = 128, NW = W * H / 4, NF = (W / 8 - 1) * (H / 8 - 1) * 36;
  localparam int ND = 20;
  localparam int FRAME_CYC = W * H + 10 * (W / 8) * H + 42 * (W / 8 - 1) * (H / 8 - 1) + 4;
  localparam int II_REF = 90672;

  // seven-segment masks {a,b,c,d,e,f,g} for the digits 0..9
  localparam logic [6:0] SEGS [10] = '{7'b1111110, 7'b0110000, 7'b1101101, 7'b1111001,
                                       7'b0110011, 7'b1011011, 7'b1011111, 7'b1110000,
                                       7'b1111111, 7'b1111011};

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_wr_en, host_wr_full, host_rd_en, host_rd_empty;
  logic [31:0] host_wr_data, host_rd_data;
  logic [1:0]  phase;
  logic        frame_done, feat_clipped;

  logic [31:0] words [ND*NW];
  real         want  [ND*NF];
  int checks = 0, failures = 0;
  int wi = 0, ri = 0, nframes = 0;
  longint cyc = 0, t_first_wr = -1, t_last_rd = 0, t_frame_start = -1, t_prev_done = -1;
  int n_frame_ok = 0, max_interval = 0;

  always #5 clk = ~clk;

  hog_pl_top dut (
    .clk, .rst_n,
    .host_wr_en, .host_wr_data, .host_wr_full,
    .host_rd_en, .host_rd_data, .host_rd_empty,
    .phase, .frame_done, .feat_clipped
  );

  // host model: write whenever there is room, read whenever there is a word
  always @(negedge clk) begin
    host_wr_en   = rst_n && (wi < ND * NW) && !host_wr_full;
    host_wr_data = words[(wi < ND * NW) ? wi : 0];
    host_rd_en   = rst_n && !host_rd_empty;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (host_wr_en) begin
        if (t_first_wr < 0) t_first_wr = cyc;
        wi++;
      end
      // accelerator-side frame time: first word taken to frame_done
      if (t_frame_start < 0 && dut.u_core.in_valid && dut.u_core.in_ready) t_frame_start = cyc;
      if (frame_done) begin
        checks++;
        if (cyc - t_frame_start + 1 != longint'(FRAME_CYC)) begin
          failures++;
          $display("frame %0d took %0d cycles, want %0d", nframes, cyc - t_frame_start + 1, FRAME_CYC);
        end else n_frame_ok++;
        if (t_prev_done >= 0) begin
          checks++;
          if (int'(cyc - t_prev_done) > max_interval) max_interval = int'(cyc - t_prev_done);
          if (cyc - t_prev_done > longint'(II_REF)) begin
            failures++;
            $display("frame interval %0d cycles exceeds %0d", cyc - t_prev_done, II_REF);
          end
        end
        t_prev_done   = cyc;
        t_frame_start = -1;
        nframes++;
      end
      if (host_rd_en) begin
        checks++;
        if (ri >= ND * NF || !rel_close(f32_to_real(host_rd_data), want[ri], 0.003, 1.0e-9)) begin
          failures++;
          if (failures < 10) $display("digit %0d feature %0d got %e want %e",
                                      ri / NF, ri % NF, f32_to_real(host_rd_data), want[ri]);
        end
        ri++;
        t_last_rd = cyc;
      end
    end
  end

  initial begin
    repeat (ND * FRAME_CYC + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one digit: seven segments in a 48x80 box centred in the window
  task automatic draw_digit(input int d, input int t, input int slant);
    int xs, l, r, tp, m, b;
    bit on;
    l = 40; r = 88; tp = 24; m = 64; b = 104;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        xs = x + (slant * (y - m)) / 16;
        on = 1'b0;
        if (SEGS[d][6] && y >= tp && y < tp + t && xs >= l && xs < r) on = 1'b1;         // a
        if (SEGS[d][5] && xs >= r - t && xs < r && y >= tp && y < m) on = 1'b1;          // b
        if (SEGS[d][4] && xs >= r - t && xs < r && y >= m && y < b) on = 1'b1;           // c
        if (SEGS[d][3] && y >= b - t && y < b && xs >= l && xs < r) on = 1'b1;           // d
        if (SEGS[d][2] && xs >= l && xs < l + t && y >= m && y < b) on = 1'b1;           // e
        if (SEGS[d][1] && xs >= l && xs < l + t && y >= tp && y < m) on = 1'b1;          // f
        if (SEGS[d][0] && y >= m - t / 2 && y < m + t / 2 && xs >= l && xs < r) on = 1'b1; // g
        img[y * W + x] = on ? 8'd240 : 8'd0;
      end
  endtask

  initial begin
    img_w = W; img_h = H;
    for (int k = 0; k < ND; k++) begin
      if (k < 10) draw_digit(k, 8, 0);
      else        draw_digit(k - 10, 12, 3);
      compute_cells();
      compute_feats(W / 8, H / 8, 0.2);
      for (int i = 0; i < NW; i++)
        words[k * NW + i] = {img[4 * i + 3], img[4 * i + 2], img[4 * i + 1], img[4 * i]};
      for (int i = 0; i < NF; i++) want[k * NF + i] = feats[i];
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (nframes < ND || ri < ND * NF) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (ri != ND * NF || !host_rd_empty || nframes != ND) begin
      failures++;
      $display("%0d frames, %0d features read", nframes, ri);
    end
    checks++;
    $display("digits %0d, frames with the exact cycle count %0d", ND, n_frame_ok);
    $display("longest frame interval %0d cycles", max_interval);
    $display("run: %0d cycles = %0d us at 125 MHz", t_last_rd - t_first_wr + 1,
             (t_last_rd - t_first_wr + 1) / 125);
    if (t_last_rd - t_first_wr + 1 > longint'(ND) * II_REF) begin
      failures++;
      $display("run exceeds %0d cycles", ND * II_REF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
