// tb_hog_frame_buf: three-row column reads from the banked frame buffer.
// A 40x13 image of random pixels is written in raster order (13 rows, so
// the three banks hold 5, 4 and 4 rows).  Then random columns and centre rows
// are read, including the top and bottom rows; one cycle later up/mid/dn
// must equal rows y-1, y, y+1 of that column, with the edge row repeated.
module tb_hog_frame_buf;
  localparam int W = 40, H = 13;

  logic clk = 1'b0;
  logic we;
  logic [5:0] wx, rx;
  logic [3:0] wy, ry;
  logic [7:0] wdata, up, mid, dn;
  logic [7:0] img [W*H];
  int checks = 0, failures = 0;
  int ex_up, ex_mid, ex_dn;
  bit pend;

  always #5 clk = ~clk;

  hog_frame_buf #(.IMG_W(W), .IMG_H(H)) dut (.clk, .we, .wx, .wy, .wdata, .rx, .ry, .up, .mid, .dn);

  function automatic int px(input int x, input int y);
    if (y < 0) y = 0;
    if (y > H - 1) y = H - 1;
    return int'(img[y * W + x]);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; wx = '0; wy = '0; wdata = '0; rx = '0; ry = '0; pend = 1'b0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        img[y * W + x] = 8'($urandom());
        we = 1'b1; wx = 6'(x); wy = 4'(y); wdata = img[y * W + x];
      end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (int'(up) != ex_up || int'(mid) != ex_mid || int'(dn) != ex_dn) begin
          failures++;
          if (failures < 10) $display("got %h %h %h want %h %h %h", up, mid, dn, ex_up, ex_mid, ex_dn);
        end
      end
      rx = 6'($urandom() % W);
      ry = (i % 5 == 0) ? 4'(0) : (i % 5 == 1) ? 4'(H - 1) : 4'($urandom() % H);
      ex_up  = px(int'(rx), int'(ry) - 1);
      ex_mid = px(int'(rx), int'(ry));
      ex_dn  = px(int'(rx), int'(ry) + 1);
      pend = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
