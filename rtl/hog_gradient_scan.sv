// hog_gradient_scan: pipelined gradients, orientation votes and cell histograms.
//
// Walks the image cell by cell (cells in raster order) and, inside a cell,
// row by row.  For one 8-pixel row of a cell it requests ten columns
// x = cx0-1 .. cx0+8 (clamped to the image) from the banked frame buffer,
// one per cycle.  Each column arrives one cycle later as three pixels (rows
// y-1, y, y+1), and a three-column window is kept.  When column x+1
// arrives, pixel x has all four neighbours:
//     dx = I(x+1,y) - I(x-1,y),   dy = I(x,y+1) - I(x,y-1)
// and it votes its approximate magnitude (hog_grad_mag) into one of nine
// orientation bins (hog_orient_bin) of the cell's register histogram.  When
// the 64th pixel of a cell has voted, the cell energy (the sum of the 9
// squared bins, formed in parallel) is computed, and histogram and energy
// are written to the cell buffer at address cy*CELLS_X + cx; the histogram
// is then cleared.  At the image border the
// missing neighbour is the border pixel itself (replicated border).
//
// Timing: requests stream without a gap, so 8 pixels take 10 cycles and a
// frame takes 10*(IMG_W/8)*IMG_H cycles plus one cycle of read latency.
// A start pulse begins a frame; done pulses in the cycle the last cell
// histogram is written.  The difference filter, the magnitude and binning
// approximations, the 8x8 cells and computing the energy per cell follow
// the design description; pipelining
// the per-pixel work follows its use of pipelining for pixel-level
// operations.  The scan order, the border rule, the 10-column schedule and
// whole-vote (no interpolation) binning are this design's choices.
module hog_gradient_scan
  import hog_pkg::*;
#(
  parameter int unsigned IMG_W = 128,
  parameter int unsigned IMG_H = 128,
  parameter int unsigned CELL  = 8,
  localparam int unsigned CELLS_X = IMG_W / CELL,
  localparam int unsigned CELLS_Y = IMG_H / CELL,
  localparam int unsigned XW      = $clog2(IMG_W),
  localparam int unsigned YW      = $clog2(IMG_H),
  localparam int unsigned CB_AW   = (CELLS_X * CELLS_Y > 1) ? $clog2(CELLS_X * CELLS_Y) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  // frame buffer column read (data one cycle after the request)
  output logic [XW-1:0]    fb_rx,
  output logic [YW-1:0]    fb_ry,
  input  logic [PIX_W-1:0] fb_up,
  input  logic [PIX_W-1:0] fb_mid,
  input  logic [PIX_W-1:0] fb_dn,
  // cell buffer write port: histogram and energy of a finished cell
  output logic             cb_we,
  output logic [CB_AW-1:0] cb_waddr,
  output cell_rec_t        cb_wdata
);

  localparam int unsigned CXW = (CELLS_X > 1) ? $clog2(CELLS_X) : 1;
  localparam int unsigned CYW = (CELLS_Y > 1) ? $clog2(CELLS_Y) : 1;
  localparam int unsigned RW  = $clog2(CELL);
  localparam int unsigned NCOL = CELL + 2;

  // request side
  logic           req_q;                 // a request is issued this cycle
  logic [CXW-1:0] cx_q;                  // cell column
  logic [CYW-1:0] cy_q;                  // cell row
  logic [RW-1:0]  r_q;                   // row inside the cell
  logic [3:0]     j_q;                   // column step 0..CELL+1
  logic           last_req;

  // response side (one cycle behind)
  logic           rsp_q;
  logic [3:0]     rj_q;
  logic           rlast_row_q;           // response belongs to the cell's last row
  logic           rlast_cell_q;          // ... of the frame's last cell
  logic [CB_AW-1:0] rcell_q;
  logic [PIX_W-1:0] p_up_q, p_mid_q, p_dn_q;   // column x
  logic [PIX_W-1:0] p2_mid_q;                  // column x-1
  cell_hist_t     hist_q;

  logic signed [GRAD_W-1:0] dx, dy;
  logic [MAG_W-1:0]         mag;
  logic [BIN_IDX_W-1:0]     bin;
  logic                     vote, cell_end;
  cell_hist_t               hist_next;
  logic [CELL_E_W-1:0]      cell_energy;
  int                       col;

  // column request, clamped to the image
  always_comb begin
    col   = int'(cx_q) * CELL + int'(j_q) - 1;
    if (col < 0) col = 0;
    if (col > int'(IMG_W) - 1) col = int'(IMG_W) - 1;
    fb_rx = XW'(col);
    fb_ry = YW'(int'(cy_q) * CELL + int'(r_q));
  end

  assign last_req = (j_q == 4'(NCOL - 1)) && (r_q == RW'(CELL - 1))
                    && (cx_q == CXW'(CELLS_X - 1)) && (cy_q == CYW'(CELLS_Y - 1));

  // window: the arriving column is x+1, p_* is x, p2_mid is x-1
  assign dx = GRAD_W'({1'b0, fb_mid}) - GRAD_W'({1'b0, p2_mid_q});
  assign dy = GRAD_W'({1'b0, p_dn_q}) - GRAD_W'({1'b0, p_up_q});

  hog_grad_mag   u_mag (.dx(dx), .dy(dy), .mag(mag));
  hog_orient_bin u_bin (.dx(dx), .dy(dy), .bin(bin));

  assign vote     = rsp_q && (rj_q >= 4'd2);
  assign cell_end = vote && rlast_row_q && (rj_q == 4'(NCOL - 1));

  always_comb begin
    hist_next = hist_q;
    for (int b = 0; b < NBINS; b++) begin
      if (bin == BIN_IDX_W'(b)) hist_next[b] = hist_q[b] + HBIN_W'(mag);
    end
  end

  // energy of the finished cell: 9 squares in parallel
  always_comb begin
    cell_energy = '0;
    for (int b = 0; b < NBINS; b++)
      cell_energy = cell_energy + CELL_E_W'(hist_next[b]) * CELL_E_W'(hist_next[b]);
  end

  assign cb_we    = cell_end;
  assign cb_waddr = rcell_q;
  assign cb_wdata = '{energy: cell_energy, hist: hist_next};
  assign done     = cell_end && rlast_cell_q;
  assign busy     = req_q || rsp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_q        <= 1'b0;
      cx_q         <= '0;
      cy_q         <= '0;
      r_q          <= '0;
      j_q          <= '0;
      rsp_q        <= 1'b0;
      rj_q         <= '0;
      rlast_row_q  <= 1'b0;
      rlast_cell_q <= 1'b0;
      rcell_q      <= '0;
      p_up_q       <= '0;
      p_mid_q      <= '0;
      p_dn_q       <= '0;
      p2_mid_q     <= '0;
      hist_q       <= '0;
    end else begin
      // ---- request side
      if (!req_q) begin
        if (start && !rsp_q) begin
          req_q <= 1'b1;
          cx_q  <= '0;
          cy_q  <= '0;
          r_q   <= '0;
          j_q   <= '0;
        end
      end else begin
        if (last_req) begin
          req_q <= 1'b0;
        end else if (j_q != 4'(NCOL - 1)) begin
          j_q <= j_q + 4'd1;
        end else begin
          j_q <= '0;
          if (r_q != RW'(CELL - 1)) begin
            r_q <= r_q + 1'b1;
          end else begin
            r_q <= '0;
            if (cx_q != CXW'(CELLS_X - 1)) begin
              cx_q <= cx_q + 1'b1;
            end else begin
              cx_q <= '0;
              cy_q <= cy_q + 1'b1;
            end
          end
        end
      end
      rsp_q        <= req_q;
      rj_q         <= j_q;
      rlast_row_q  <= (r_q == RW'(CELL - 1));
      rlast_cell_q <= (cx_q == CXW'(CELLS_X - 1)) && (cy_q == CYW'(CELLS_Y - 1));
      rcell_q      <= CB_AW'(int'(cy_q) * CELLS_X + int'(cx_q));
      // ---- response side
      if (rsp_q) begin
        p2_mid_q <= p_mid_q;
        p_up_q   <= fb_up;
        p_mid_q  <= fb_mid;
        p_dn_q   <= fb_dn;
        if (vote) hist_q <= cell_end ? '0 : hist_next;
      end
    end
  end

endmodule
