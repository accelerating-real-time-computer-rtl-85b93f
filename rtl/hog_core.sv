// hog_core: the HOG feature-extraction accelerator.
//
// Takes one IMG_W x IMG_H 8-bit grayscale image as packed 32-bit words
// (four pixels per word, lowest byte first) and returns its HOG descriptor:
// for each of the (IMG_W/8-1) x (IMG_H/8-1) overlapping 2x2-cell blocks,
// 36 normalised features as IEEE754 singles, one per output word.  With the
// default 128x128 image that is 4096 words in and 15*15*36 = 8100 words out.
//
// A frame runs through three phases, one after the other:
//   LOAD  pixel_unpack splits the words; each pixel is written to the
//         three-bank frame buffer (one pixel per cycle, IMG_W*IMG_H cycles);
//   GRAD  hog_gradient_scan fills the cell buffer with 9-bin histograms
//         and cell energies (pipelined, 10 cycles per 8 pixels);
//   NORM  hog_block_norm streams the block features (42 cycles per block
//         without back-pressure).
// Without back-pressure a frame takes, from the first word accepted to
// frame_done, W*H + 10*(W/8)*H + 42*blocks + 4 cycles: 46 318 for the
// default 128x128 image.
// The next frame's words are accepted only when NORM has finished, so
// in_ready is low during GRAD and NORM.  frame_done pulses when the last
// feature of a frame has been accepted.  Both interfaces are valid/ready
// streams; a word moves when valid and ready are both high.
// Which computations are done (gradients, magnitude and binning
// approximations, cells, blocks, normalisation, truncation) follows the design
// description; the phase-by-phase schedule and the buffers are this design's
// choices.
module hog_core
  import hog_pkg::*;
#(
  parameter int unsigned IMG_W = 128,
  parameter int unsigned IMG_H = 128,
  parameter logic [31:0] CLIP  = CLIP_0P2
) (
  input  logic        clk,
  input  logic        rst_n,
  // packed pixel words
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        in_ready,
  // features
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic        out_last,
  input  logic        out_ready,
  // status
  output logic [1:0]  phase,
  output logic        frame_done,
  output logic        feat_clipped
);

  localparam int unsigned CELL    = 8;
  localparam int unsigned CELLS_X = IMG_W / CELL;
  localparam int unsigned CELLS_Y = IMG_H / CELL;
  localparam int unsigned NPIX    = IMG_W * IMG_H;
  localparam int unsigned NWORDS  = NPIX / 4;
  localparam int unsigned FB_AW   = $clog2(NPIX);
  localparam int unsigned XW      = $clog2(IMG_W);
  localparam int unsigned YW      = $clog2(IMG_H);
  localparam int unsigned CB_AW   = (CELLS_X * CELLS_Y > 1) ? $clog2(CELLS_X * CELLS_Y) : 1;

  typedef enum logic [1:0] {P_LOAD, P_GRAD, P_NORM} phase_t;

  phase_t            ph_q;
  logic [FB_AW:0]    words_q;      // words accepted in this frame
  logic [FB_AW:0]    pix_q;        // pixels written in this frame
  logic              grad_start, grad_busy, grad_done;
  logic              norm_start, norm_busy, norm_done;

  logic              up_in_valid, up_in_ready;
  logic              pix_valid, pix_ready;
  logic [PIX_W-1:0]  pix_data;

  logic [XW-1:0]     fb_rx, wx_q;
  logic [YW-1:0]     fb_ry, wy_q;
  logic [PIX_W-1:0]  fb_up, fb_mid, fb_dn;
  logic              cb_we;
  logic [CB_AW-1:0]  cb_waddr, cb_raddr;
  cell_rec_t         cb_wdata, cb_rdata;

  assign phase = ph_q;

  // ---- LOAD: unpack and fill the frame buffer ------------------------------
  assign up_in_valid = in_valid && (ph_q == P_LOAD) && (words_q != (FB_AW+1)'(NWORDS));
  assign in_ready    = up_in_ready && (ph_q == P_LOAD) && (words_q != (FB_AW+1)'(NWORDS));
  assign pix_ready   = (ph_q == P_LOAD);

  pixel_unpack u_unpack (
    .clk, .rst_n,
    .in_valid(up_in_valid), .in_data, .in_ready(up_in_ready),
    .pix_valid, .pix_data, .pix_ready
  );

  hog_frame_buf #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_frame_buf (
    .clk,
    .we(pix_valid && pix_ready), .wx(wx_q), .wy(wy_q), .wdata(pix_data),
    .rx(fb_rx), .ry(fb_ry), .up(fb_up), .mid(fb_mid), .dn(fb_dn)
  );

  // ---- GRAD: gradients and cell histograms --------------------------------
  hog_gradient_scan #(.IMG_W(IMG_W), .IMG_H(IMG_H), .CELL(CELL)) u_grad (
    .clk, .rst_n, .start(grad_start), .busy(grad_busy), .done(grad_done),
    .fb_rx, .fb_ry, .fb_up, .fb_mid, .fb_dn, .cb_we, .cb_waddr, .cb_wdata
  );

  sdp_ram #(.DATA_W($bits(cell_rec_t)), .DEPTH(CELLS_X * CELLS_Y)) u_cell_buf (
    .clk,
    .we(cb_we), .waddr(cb_waddr), .wdata(cb_wdata),
    .raddr(cb_raddr), .rdata(cb_rdata)
  );

  // ---- NORM: block features ------------------------------------------------
  hog_block_norm #(.CELLS_X(CELLS_X), .CELLS_Y(CELLS_Y), .CLIP(CLIP)) u_norm (
    .clk, .rst_n, .start(norm_start), .busy(norm_busy), .done(norm_done),
    .cb_raddr, .cb_rdata,
    .out_valid, .out_data, .out_last, .out_ready, .out_clipped(feat_clipped)
  );

  // ---- phase control ------------------------------------------------------------
  assign grad_start = (ph_q == P_LOAD) && (pix_q == (FB_AW+1)'(NPIX));
  assign norm_start = (ph_q == P_GRAD) && grad_done;
  assign frame_done = norm_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q    <= P_LOAD;
      words_q <= '0;
      pix_q   <= '0;
      wx_q    <= '0;
      wy_q    <= '0;
    end else begin
      unique case (ph_q)
        P_LOAD: begin
          if (in_valid && in_ready)  words_q <= words_q + 1'b1;
          if (pix_valid && pix_ready) begin
            pix_q <= pix_q + 1'b1;
            if (wx_q == XW'(IMG_W - 1)) begin
              wx_q <= '0;
              wy_q <= wy_q + 1'b1;
            end else begin
              wx_q <= wx_q + 1'b1;
            end
          end
          if (grad_start) ph_q <= P_GRAD;
        end
        P_GRAD: if (norm_start) ph_q <= P_NORM;
        P_NORM: begin
          if (norm_done) begin
            ph_q    <= P_LOAD;
            words_q <= '0;
            pix_q   <= '0;
            wx_q    <= '0;
            wy_q    <= '0;
          end
        end
        default: ph_q <= P_LOAD;
      endcase
    end
  end

  a_grad_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                (ph_q == P_LOAD) |-> !grad_busy && !norm_busy);

endmodule
