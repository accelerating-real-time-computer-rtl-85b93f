// tb_sync_fifo: order, full/empty flags and count of a 16-deep FIFO.
// Random writes and reads (never writing while full nor reading while
// empty) are checked against a queue model; full, empty and count must
// match the model every cycle, and both the full and the empty state must
// occur.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en, rd_en, full, empty;
  logic [31:0] wdata, rdata;
  logic [4:0]  count;
  logic [31:0] q [$];
  int checks = 0, failures = 0, nfull = 0, nempty = 0;

  always #5 clk = ~clk;

  sync_fifo #(.DATA_W(32), .DEPTH(16)) dut (.clk, .rst_n, .wr_en, .wdata, .full, .rd_en, .rdata, .empty, .count);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1'b0; rd_en = 1'b0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (full != (q.size() == 16) || empty != (q.size() == 0) || int'(count) != q.size()) begin
        failures++;
        if (failures < 10) $display("flags full=%b empty=%b count=%0d model %0d", full, empty, count, q.size());
      end
      if (full) nfull++;
      if (empty) nempty++;
      if (!empty) begin
        checks++;
        if (rdata != q[0]) failures++;
      end
      // phases: mostly writing, then mostly reading
      wr_en = !full && ($urandom() % 100 < ((i / 500) % 2 ? 30 : 70));
      rd_en = !empty && ($urandom() % 100 < ((i / 500) % 2 ? 70 : 30));
      wdata = $urandom();
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wdata);
    end
    checks++;
    if (nfull == 0 || nempty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
