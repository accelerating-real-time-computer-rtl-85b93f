// tb_hog_gradient_scan: cell histograms of random and structured images.
// A 32x24 image (4x3 cells) is held in a testbench model of the banked
// frame buffer that returns the column of rows y-1, y, y+1 one cycle after
// the request (edge rows repeated).  Every cell histogram the
// scan writes is compared with the reference model, the cell energy written
// with it with the sum of the model's 9 squared bins, each cell must be
// written exactly once, and done must come 10*(W/8)*H + 1 cycles after start
// (8 pixels per 10 cycles).  Three
// images are run: random noise, a bright disc on a dark ground and a flat
// grey image (all histograms zero).
module tb_hog_gradient_scan;
  import hog_pkg::*;
  import tb_hog_ref_pkg::*;

  localparam int W = 32, H = 24, CX = W / 8, CY = H / 8;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic [$clog2(W)-1:0] fb_rx;
  logic [$clog2(H)-1:0] fb_ry;
  logic [7:0]  fb_up, fb_mid, fb_dn;
  logic        cb_we;
  logic [$clog2(CX*CY)-1:0] cb_waddr;
  cell_rec_t   cb_wdata;
  longint      e_want;
  int checks = 0, failures = 0;
  int writes [CX*CY];
  int cycles;

  always #5 clk = ~clk;

  hog_gradient_scan #(.IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst_n, .start, .busy, .done,
    .fb_rx, .fb_ry, .fb_up, .fb_mid, .fb_dn, .cb_we, .cb_waddr, .cb_wdata
  );

  // frame buffer model: column of three rows, edge rows repeated, one cycle late
  always_ff @(posedge clk) begin
    fb_up  <= 8'(pix(int'(fb_rx), int'(fb_ry) - 1));
    fb_mid <= 8'(pix(int'(fb_rx), int'(fb_ry)));
    fb_dn  <= 8'(pix(int'(fb_rx), int'(fb_ry) + 1));
  end

  always @(posedge clk) begin
    if (cb_we) begin
      writes[cb_waddr]++;
      e_want = 0;
      for (int b = 0; b < 9; b++) begin
        checks++;
        e_want += longint'(cellh[int'(cb_waddr) * 9 + b]) * cellh[int'(cb_waddr) * 9 + b];
        if (int'(cb_wdata.hist[b]) != cellh[int'(cb_waddr) * 9 + b]) begin
          failures++;
          if (failures < 10)
            $display("cell %0d bin %0d got %0d want %0d", cb_waddr, b, cb_wdata.hist[b], cellh[int'(cb_waddr) * 9 + b]);
        end
      end
      checks++;
      if (longint'(cb_wdata.energy) != e_want) begin
        failures++;
        if (failures < 10) $display("cell %0d energy got %0d want %0d", cb_waddr, cb_wdata.energy, e_want);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame();
    for (int c = 0; c < CX * CY; c++) writes[c] = 0;
    compute_cells();
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != 10 * (W / 8) * H + 1) begin
      failures++;
      $display("frame took %0d cycles, want %0d", cycles, 10 * (W / 8) * H + 1);
    end
    @(negedge clk);
    checks++;
    if (busy) failures++;
    for (int c = 0; c < CX * CY; c++) begin
      checks++;
      if (writes[c] != 1) failures++;
    end
  endtask

  initial begin
    img_w = W;
    img_h = H;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < W * H; i++) img[i] = 8'($urandom());
    run_frame();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y * W + x] = ((x - 13) * (x - 13) + (y - 11) * (y - 11) < 64) ? 8'd220 : 8'd20;
    run_frame();
    for (int i = 0; i < W * H; i++) img[i] = 8'd128;
    run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
