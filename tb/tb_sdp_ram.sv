// tb_sdp_ram: write, then read back, with one cycle of read latency.
// A 256 x 16 RAM is filled with random words, then read at random
// addresses while other addresses are rewritten; the data must follow the
// address by exactly one cycle, and a read of the word being written must
// return the old contents.
module tb_sdp_ram;
  logic clk = 1'b0;
  logic we;
  logic [7:0]  waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [256];
  logic [15:0] expect_q;
  bit          check_q = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sdp_ram #(.DATA_W(16), .DEPTH(256)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(i); wdata = 16'($urandom()); model[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (check_q) begin
        checks++;
        if (rdata != expect_q) begin
          failures++;
          if (failures < 10) $display("read got %h want %h", rdata, expect_q);
        end
      end
      raddr = 8'($urandom());
      we = ($urandom() % 2) == 1;
      waddr = (i % 7 == 0) ? raddr : 8'($urandom());
      wdata = 16'($urandom());
      expect_q = model[raddr];       // old contents, even when written now
      check_q = 1'b1;
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
