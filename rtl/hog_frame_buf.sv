// hog_frame_buf: image buffer that returns a 3-pixel column per cycle.
//
// The gradient at a pixel needs the pixels above and below it.  To read
// rows y-1, y and y+1 of one column in the same cycle, the image is kept in
// three banks (sdp_ram), row r living in bank r mod 3 at address
// (r div 3)*IMG_W + x.  Any three consecutive rows fall into three different
// banks, so one read of each bank delivers the column.
// Write port: one pixel per cycle at (wx, wy).
// Read port: present the column rx and the centre row ry; one cycle later
// up/mid/dn hold the pixels of rows ry-1, ry, ry+1 at column rx.  At the top
// and bottom edges the missing row is replaced by row ry (the edge pixel is
// repeated).  The banking is this design's way of giving the pipelined
// gradient stage its bandwidth; the contents are not reset.
module hog_frame_buf
  import hog_pkg::*;
#(
  parameter int unsigned IMG_W = 128,
  parameter int unsigned IMG_H = 128,
  localparam int unsigned XW = $clog2(IMG_W),
  localparam int unsigned YW = $clog2(IMG_H)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [XW-1:0]    wx,
  input  logic [YW-1:0]    wy,
  input  logic [PIX_W-1:0] wdata,
  input  logic [XW-1:0]    rx,
  input  logic [YW-1:0]    ry,
  output logic [PIX_W-1:0] up,
  output logic [PIX_W-1:0] mid,
  output logic [PIX_W-1:0] dn
);

  localparam int unsigned BANK_ROWS = (IMG_H + 2) / 3;
  localparam int unsigned DEPTH     = BANK_ROWS * IMG_W;
  localparam int unsigned AW        = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [AW-1:0]    waddr;
  logic [AW-1:0]    raddr [3];
  logic [PIX_W-1:0] rdata [3];
  logic [1:0]       wbank, rm, rm_q;
  logic             top_q, bot_q;

  always_comb begin
    int r;
    wbank = 2'(int'(wy) % 3);
    waddr = AW'((int'(wy) / 3) * IMG_W + int'(wx));
    rm    = 2'(int'(ry) % 3);
    // bank b serves the row among ry-1, ry, ry+1 that is congruent to b
    for (int b = 0; b < 3; b++) begin
      if (b == int'(rm))                r = int'(ry);
      else if (b == (int'(rm) + 1) % 3) r = int'(ry) + 1;
      else                              r = int'(ry) - 1;
      if (r < 0) r = 0;
      if (r > int'(IMG_H) - 1) r = int'(IMG_H) - 1;
      raddr[b] = AW'((r / 3) * IMG_W + int'(rx));
    end
  end

  for (genvar b = 0; b < 3; b++) begin : g_bank
    sdp_ram #(.DATA_W(PIX_W), .DEPTH(DEPTH)) u_bank (
      .clk, .we(we && (wbank == 2'(b))), .waddr, .wdata,
      .raddr(raddr[b]), .rdata(rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    rm_q  <= rm;
    top_q <= (ry == '0);
    bot_q <= (ry == YW'(IMG_H - 1));
  end

  always_comb begin
    mid = rdata[rm_q];
    up  = top_q ? mid : rdata[(rm_q == 2'd0) ? 2'd2 : rm_q - 2'd1];
    dn  = bot_q ? mid : rdata[(rm_q == 2'd2) ? 2'd0 : rm_q + 2'd1];
  end

endmodule
