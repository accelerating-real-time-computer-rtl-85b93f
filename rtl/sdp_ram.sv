// sdp_ram: simple dual-port RAM, one write port and one read port.
//
// Used twice in the accelerator: as the frame buffer that holds the input
// image and as the buffer that holds every cell's 9-bin histogram.  It maps
// onto an FPGA block RAM: the write takes effect at the clock edge and the
// read is synchronous, so rdata shows the word at raddr one cycle after raddr
// is presented.  A read of the address being written returns the old word.
// The contents are not reset; every word is written before it is read.
module sdp_ram #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 16384,
  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
