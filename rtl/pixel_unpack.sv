// pixel_unpack: turns packed 32-bit words back into 8-bit pixels.
//
// To cut the traffic between processor and logic by four, the host packs
// four 8-bit pixels into every 32-bit word.  This block takes one word
// (valid/ready handshake), then emits its four pixels one per cycle on a
// second valid/ready stream, lowest byte first (the byte order of a
// little-endian processor storing the pixels in sequence; the order is this
// design's choice).  It holds one word at a time and accepts the next word in
// the cycle its last pixel leaves, so an unstalled stream moves one pixel per
// cycle with no bubble.
module pixel_unpack
  import hog_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [31:0]      in_data,
  output logic             in_ready,
  output logic             pix_valid,
  output logic [PIX_W-1:0] pix_data,
  input  logic             pix_ready
);

  logic [31:0] word_q;
  logic [1:0]  idx_q;
  logic        full_q;
  logic        last_out;

  assign pix_valid = full_q;
  assign pix_data  = word_q[8*idx_q +: 8];
  assign last_out  = full_q && pix_ready && (idx_q == 2'd3);
  assign in_ready  = !full_q || last_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q <= '0;
      idx_q  <= '0;
      full_q <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        word_q <= in_data;
        idx_q  <= '0;
        full_q <= 1'b1;
      end else if (full_q && pix_ready) begin
        idx_q <= idx_q + 2'd1;
        if (idx_q == 2'd3) full_q <= 1'b0;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           pix_valid && !pix_ready |=> pix_valid && $stable(pix_data));

endmodule
