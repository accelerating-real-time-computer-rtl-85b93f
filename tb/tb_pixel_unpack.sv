// tb_pixel_unpack: byte order, throughput and back-pressure of the unpacker.
// 600 random words are offered with random gaps while the pixel side is
// stalled at random.  Every pixel must come out in order, lowest byte of
// each word first.  A second run with both sides always ready must move the
// 4*200 pixels of 200 words in 4*200 + 1 cycles (one pixel per cycle).
module tb_pixel_unpack;
  import hog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, pix_valid, pix_ready;
  logic [31:0] in_data;
  logic [7:0]  pix_data;
  logic [31:0] words [600];
  int checks = 0, failures = 0;
  int wi, pi, cyc;
  bit rnd;

  always #5 clk = ~clk;

  pixel_unpack dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .pix_valid, .pix_data, .pix_ready);

  always @(negedge clk) begin
    in_valid  = (wi < 600) && (!rnd || ($urandom() % 4 != 0));
    in_data   = words[(wi < 600) ? wi : 0];
    pix_ready = !rnd || ($urandom() % 3 != 0);
  end

  always @(posedge clk) begin
    if (in_valid && in_ready) wi++;
    if (pix_valid && pix_ready) begin
      checks++;
      if (pix_data != words[pi / 4][8 * (pi % 4) +: 8]) begin
        failures++;
        if (failures < 10) $display("pixel %0d got %h", pi, pix_data);
      end
      pi++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) words[i] = $urandom();
    wi = 600; pi = 0; rnd = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    wi = 0;
    while (pi < 2400) @(negedge clk);
    checks++;
    if (pix_valid) failures++;
    // unstalled: 200 words
    rnd = 1'b0; wi = 400; pi = 1600; cyc = 0;
    while (pi < 2400) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 801) begin
      failures++;
      $display("800 pixels took %0d cycles", cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
