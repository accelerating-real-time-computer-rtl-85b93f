// tb_hog_block_norm: block features from prepared cell histograms.
// A 5x4 grid of cells (12 blocks) is held in a testbench memory with one
// cycle of read latency; each cell is stored with its energy, the sum of
// its 9 squared bins, as the gradient stage writes it.  Every feature leaving the unit is compared with
// h / sqrt(block energy), truncated at 0.2 (0.3 % relative tolerance).
// Histograms are random (a cell never holds more than 64*351 votes in
// total), with one corner of zero cells (a zero-energy block)
// and one cell dominated by a single bin (forces truncation).  The first
// run keeps out_ready high and checks 42 cycles per block; the second drops
// out_ready at random and checks that nothing is lost or repeated.
module tb_hog_block_norm;
  import hog_pkg::*;
  import tb_util_pkg::*;
  import tb_hog_ref_pkg::*;

  localparam int CX = 5, CY = 4, NB = (CX - 1) * (CY - 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic [$clog2(CX*CY)-1:0] cb_raddr;
  cell_rec_t   cb_rdata;
  logic        out_valid, out_last, out_ready, out_clipped;
  logic [31:0] out_data;
  int checks = 0, failures = 0;
  int nout, nclip, nlast, cycles;
  bit random_ready;

  always #5 clk = ~clk;

  hog_block_norm #(.CELLS_X(CX), .CELLS_Y(CY)) dut (
    .clk, .rst_n, .start, .busy, .done, .cb_raddr, .cb_rdata,
    .out_valid, .out_data, .out_last, .out_ready, .out_clipped
  );

  always_ff @(posedge clk) begin
    longint e;
    e = 0;
    for (int b = 0; b < 9; b++) begin
      cb_rdata.hist[b] <= HBIN_W'(cellh[int'(cb_raddr) * 9 + b]);
      e += longint'(cellh[int'(cb_raddr) * 9 + b]) * cellh[int'(cb_raddr) * 9 + b];
    end
    cb_rdata.energy <= CELL_E_W'(e);
  end

  always @(negedge clk) out_ready = random_ready ? ($urandom() % 3 != 0) : 1'b1;

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks++;
      if (nout >= NB * 36 || !rel_close(f32_to_real(out_data), feats[nout], 0.003, 1.0e-9)) begin
        failures++;
        if (failures < 10)
          $display("feature %0d got %e want %e", nout, f32_to_real(out_data), (nout < NB*36) ? feats[nout] : -1.0);
      end
      if (out_clipped) nclip++;
      if (out_last) nlast++;
      checks++;
      if (out_last != (nout == NB * 36 - 1)) failures++;
      nout++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit rr);
    random_ready = rr;
    nout = 0; nclip = 0; nlast = 0;
    n_clip = 0; n_zero_block = 0;
    compute_feats(CX, CY, 0.2);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (nout != NB * 36) begin failures++; $display("got %0d features", nout); end
    checks++;
    if (nlast != 1) failures++;
    checks++;
    if (nclip != n_clip || n_clip == 0) begin
      failures++;
      $display("clipped %0d, reference %0d", nclip, n_clip);
    end
    checks++;
    if (n_zero_block == 0) failures++;
    if (!rr) begin
      checks++;
      if (cycles != NB * 42 + 1) begin
        failures++;
        $display("took %0d cycles, want %0d", cycles, NB * 42 + 1);
      end
    end
  endtask

  initial begin
    for (int c = 0; c < CX * CY; c++)
      for (int b = 0; b < 9; b++) cellh[c * 9 + b] = $urandom() % 2497;
    // zero cells: the top-left block has no energy
    for (int b = 0; b < 9; b++) begin
      cellh[0 * 9 + b] = 0; cellh[1 * 9 + b] = 0;
      cellh[CX * 9 + b] = 0; cellh[(CX + 1) * 9 + b] = 0;
    end
    // one dominant bin
    for (int b = 0; b < 9; b++) cellh[(2 * CX + 3) * 9 + b] = (b == 4) ? 22440 : 3;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1'b0);
    repeat (5) @(negedge clk);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
