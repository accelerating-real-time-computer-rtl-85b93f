// sync_fifo: single-clock first-in first-out buffer.
//
// Models the pair of FIFOs through which the host processor and the
// programmable logic exchange data: one carries packed pixels to the
// accelerator, the other carries features back.  The word width and depth
// are this design's choice (32 bits, 512 words by default).
// Write side: wdata is stored when wr_en is high and full is low.
// Read side: first-word fall-through, rdata holds the oldest word whenever
// empty is low, and rd_en removes it.  count gives the number of words held.
// A write while full or a read while empty is ignored and flagged by an
// assertion.
module sync_fifo #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 512,
  localparam int unsigned PTR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wdata,
  output logic              full,
  input  logic              rd_en,
  output logic [DATA_W-1:0] rdata,
  output logic              empty,
  output logic [PTR_W:0]    count
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  wptr, rptr;
  logic              do_wr, do_rd;

  assign full  = (count == (PTR_W+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rdata = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == PTR_W'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == PTR_W'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (PTR_W+1)'(do_wr) - (PTR_W+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
