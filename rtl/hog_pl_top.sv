// hog_pl_top: programmable-logic side of the HOG co-processor.
//
// The host processor runs the application (capture, pre-processing,
// classification) and hands only HOG feature extraction to the logic.  Data
// crosses between the two through a pair of FIFOs: the host writes packed
// pixel words into the write FIFO, the accelerator (hog_core) reads them and
// writes its features into the read FIFO, which the host drains.  This
// module holds both FIFOs and the accelerator; the bus bridge on the host
// side is outside it, so its ports are the host ends of the two FIFOs:
//   host_wr_en / host_wr_data / host_wr_full   - into the write FIFO
//   host_rd_en / host_rd_data / host_rd_empty  - out of the read FIFO
//                                                (first-word fall-through)
// Per frame the host writes IMG_W*IMG_H/4 words and reads
// (IMG_W/8-1)*(IMG_H/8-1)*36 feature words.  When the read FIFO is full the
// accelerator stalls; when the write FIFO is full the host must wait.
// The FIFO depth and the 32-bit word are this design's choices.
module hog_pl_top
  import hog_pkg::*;
#(
  parameter int unsigned IMG_W      = 128,
  parameter int unsigned IMG_H      = 128,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_wr_en,
  input  logic [31:0] host_wr_data,
  output logic        host_wr_full,
  input  logic        host_rd_en,
  output logic [31:0] host_rd_data,
  output logic        host_rd_empty,
  output logic [1:0]  phase,
  output logic        frame_done,
  output logic        feat_clipped
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  logic        wf_empty, wf_rd;
  logic [31:0] wf_data;
  logic        core_in_ready;
  logic        core_out_valid, core_out_last;
  logic [31:0] core_out_data;
  logic        rf_full;
  logic [CW-1:0] wf_count, rf_count;

  sync_fifo #(.DATA_W(32), .DEPTH(FIFO_DEPTH)) u_write_fifo (
    .clk, .rst_n,
    .wr_en(host_wr_en), .wdata(host_wr_data), .full(host_wr_full),
    .rd_en(wf_rd), .rdata(wf_data), .empty(wf_empty), .count(wf_count)
  );

  assign wf_rd = !wf_empty && core_in_ready;

  hog_core #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_core (
    .clk, .rst_n,
    .in_valid(!wf_empty), .in_data(wf_data), .in_ready(core_in_ready),
    .out_valid(core_out_valid), .out_data(core_out_data), .out_last(core_out_last),
    .out_ready(!rf_full),
    .phase, .frame_done, .feat_clipped
  );

  sync_fifo #(.DATA_W(32), .DEPTH(FIFO_DEPTH)) u_read_fifo (
    .clk, .rst_n,
    .wr_en(core_out_valid && !rf_full), .wdata(core_out_data), .full(rf_full),
    .rd_en(host_rd_en), .rdata(host_rd_data), .empty(host_rd_empty), .count(rf_count)
  );

endmodule
