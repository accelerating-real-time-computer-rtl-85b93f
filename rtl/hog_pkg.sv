// hog_pkg: widths, constants and small shared types of the HOG accelerator.
//
// The accelerator extracts Histogram-of-Oriented-Gradients features from an
// 8-bit grayscale image: 8x8-pixel cells, 9 unsigned orientation bins of 20
// degrees, 2x2-cell blocks moved by one cell, 36 features per block.  Those
// numbers follow the design description; the word widths below are this
// design's own choice, sized so that no sum can overflow:
//   dx, dy           : 9-bit signed, -255..255
//   magnitude        : 9 bits, at most 255 - 31 + 127 = 351
//   cell bin         : 16 bits, at most 64 * 351 = 22464
//   cell energy      : 29 bits, sum of 9 squared bins, at most 22464^2
//                      (the 9 bins of a cell add up to at most 22464)
//   block energy     : 32 bits, sum of 4 cell energies, at most 4 * 22464^2
//   feature          : IEEE754 single precision bit pattern
package hog_pkg;

  localparam int unsigned PIX_W    = 8;
  localparam int unsigned GRAD_W   = 9;
  localparam int unsigned MAG_W    = 9;
  localparam int unsigned HBIN_W   = 16;
  localparam int unsigned NBINS    = 9;
  localparam int unsigned CELL_E_W = 29;
  localparam int unsigned ENERGY_W = 32;
  localparam int unsigned FEAT_W   = 32;
  localparam int unsigned BIN_IDX_W = 4;

  // Tangents of the bin boundaries 10, 30, 50 and 70 degrees, unsigned Q.16:
  // round(tan(theta) * 2^16).  Boundaries above 90 degrees are handled by
  // mirroring dx into the first quadrant.
  localparam int unsigned TAN_FRAC = 16;
  localparam logic [17:0] TAN_Q16 [4] = '{18'd11556, 18'd37837, 18'd78103, 18'd180059};

  // Magic constant of the inverse square root seed.
  localparam logic [31:0] ISR_MAGIC = 32'h5F37_59DF;

  // 0.2 as an IEEE754 single: the default truncation level of a feature.
  localparam logic [31:0] CLIP_0P2 = 32'h3E4C_CCCD;

  typedef logic [HBIN_W-1:0] hbin_t;
  typedef logic [NBINS-1:0][HBIN_W-1:0] cell_hist_t;

  // One cell as stored in the cell buffer: its histogram and its energy.
  typedef struct packed {
    logic [CELL_E_W-1:0] energy;
    cell_hist_t          hist;
  } cell_rec_t;

  // Index of the most significant set bit of a 56-bit value (0 when zero).
  function automatic logic [5:0] msb_index56(input logic [55:0] v);
    logic [5:0] idx;
    idx = '0;
    for (int i = 0; i < 56; i++) begin
      if (v[i]) idx = 6'(i);
    end
    return idx;
  endfunction

endpackage
