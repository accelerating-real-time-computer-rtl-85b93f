// hog_block_norm: block aggregation, normalisation and truncation.
//
// A block is 2x2 neighbouring cells; blocks overlap, moving by one cell, so
// an image of CELLS_X x CELLS_Y cells has (CELLS_X-1) x (CELLS_Y-1) blocks.
// For every block, in raster order, the unit
//   READ   reads the 4 cells from the cell buffer (top-left, top-right,
//          bottom-left, bottom-right; 5 cycles with the one-cycle read
//          latency): their histograms go into 36 registers, and the cell
//          energies stored with them are added up to the block energy;
//   ISR    registers 1/sqrt(energy) from hog_inv_sqrt (1 cycle);
//   OUT    emits the 36 features h*isr, truncated at CLIP, as IEEE754
//          singles on a valid/ready stream, cell by cell and bin 0..8 in
//          each cell (36 cycles when out_ready stays high).
// A block therefore takes 42 cycles without back-pressure.  The feature
// stream stalls while out_ready is low.  out_last marks the last feature of
// the last block; done pulses once after it has been accepted.
// The block energy as a sum of cell energies, the inverse square root,
// scaling and truncation follow the design description; the feature order,
// the schedule and the zero output for an all-zero block are this design's
// choices.
module hog_block_norm
  import hog_pkg::*;
#(
  parameter int unsigned CELLS_X = 16,
  parameter int unsigned CELLS_Y = 16,
  parameter logic [31:0] CLIP    = CLIP_0P2,
  localparam int unsigned CB_AW  = (CELLS_X * CELLS_Y > 1) ? $clog2(CELLS_X * CELLS_Y) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  // cell buffer read port (data one cycle after address)
  output logic [CB_AW-1:0] cb_raddr,
  input  cell_rec_t        cb_rdata,
  // feature stream
  output logic             out_valid,
  output logic [31:0]      out_data,
  output logic             out_last,
  input  logic             out_ready,
  // observation: the feature now offered was truncated
  output logic             out_clipped
);

  localparam int unsigned NF = 4 * NBINS;   // 36 features per block

  typedef enum logic [1:0] {S_IDLE, S_READ, S_ISR, S_OUT} state_t;

  state_t              st_q;
  logic [7:0]          bx_q, by_q;     // block position (top-left cell)
  logic [5:0]          cnt_q;          // step counter inside a state
  logic [HBIN_W-1:0]   hb_q [NF];      // the block's 36 bins
  logic [ENERGY_W-1:0] energy_q;
  logic [31:0]         isr_q;
  logic [31:0]         isr_c, seed_c;
  logic [31:0]         feat_c;
  logic                clip_c;
  logic [1:0]          rd_cell;
  logic                last_block;

  assign busy       = (st_q != S_IDLE);
  assign last_block = (bx_q == 8'(CELLS_X - 2)) && (by_q == 8'(CELLS_Y - 2));

  // cell read address: cnt 0..3 selects the four cells of the block
  always_comb begin
    rd_cell  = cnt_q[1:0];
    cb_raddr = CB_AW'((int'(by_q) + int'(rd_cell[1])) * CELLS_X
                      + int'(bx_q) + int'(rd_cell[0]));
  end

  hog_inv_sqrt u_isr (.x(energy_q), .y_seed(seed_c), .y(isr_c));

  hog_feat_scale #(.CLIP(CLIP)) u_scale (
    .h(hb_q[cnt_q]), .isr(isr_q), .feat(feat_c), .clipped(clip_c)
  );

  assign out_valid   = (st_q == S_OUT);
  assign out_data    = feat_c;
  assign out_clipped = out_valid && clip_c;
  assign out_last    = out_valid && last_block && (cnt_q == 6'(NF - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= S_IDLE;
      bx_q     <= '0;
      by_q     <= '0;
      cnt_q    <= '0;
      energy_q <= '0;
      isr_q    <= '0;
      done     <= 1'b0;
      for (int i = 0; i < NF; i++) hb_q[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        S_IDLE: begin
          if (start) begin
            st_q  <= S_READ;
            bx_q  <= '0;
            by_q  <= '0;
            cnt_q <= '0;
          end
        end
        S_READ: begin
          if (cnt_q != 6'd0) begin
            for (int b = 0; b < NBINS; b++)
              hb_q[(int'(cnt_q) - 1) * NBINS + b] <= cb_rdata.hist[b];
            energy_q <= energy_q + ENERGY_W'(cb_rdata.energy);
          end else begin
            energy_q <= '0;
          end
          if (cnt_q == 6'd4) begin
            st_q  <= S_ISR;
            cnt_q <= '0;
          end else begin
            cnt_q <= cnt_q + 6'd1;
          end
        end
        S_ISR: begin
          isr_q <= isr_c;
          st_q  <= S_OUT;
        end
        S_OUT: begin
          if (out_ready) begin
            if (cnt_q != 6'(NF - 1)) begin
              cnt_q <= cnt_q + 6'd1;
            end else begin
              cnt_q <= '0;
              if (last_block) begin
                st_q <= S_IDLE;
                done <= 1'b1;
              end else begin
                st_q <= S_READ;
                if (bx_q == 8'(CELLS_X - 2)) begin
                  bx_q <= '0;
                  by_q <= by_q + 8'd1;
                end else begin
                  bx_q <= bx_q + 8'd1;
                end
              end
            end
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
