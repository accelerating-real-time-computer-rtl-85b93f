// tb_hog_ref_pkg: reference model of the HOG computation for the testbenches.
//
// Works on an image held in the package (img, img_w, img_h).  Gradients are
// centred differences with the border pixel repeated; the magnitude is the
// shift-and-add approximation in integer arithmetic; the bin is found with
// real-valued tangents of 10, 30, 50 and 70 degrees (not the fixed-point
// constants of the design).  Cell histograms, block energies and the
// normalised, truncated features (real numbers, exact square root) follow.
// It also counts how often each special case of the datapath occurs.
package tb_hog_ref_pkg;

  int          img_w, img_h;
  logic [7:0]  img   [128*128];
  int          cellh [16*16*9];
  real         feats [15*15*36];
  int          n_feats;
  // event counters
  int          n_mirror;       // gradients with dx <= 0 after folding (second quadrant)
  int          n_mag_floor;    // magnitude taken as max(|dx|,|dy|) by the outer max
  int          n_zero_block;   // blocks whose energy is 0
  int          n_clip;         // features truncated

  function automatic int pix(input int x, input int y);
    if (x < 0) x = 0;
    if (x >= img_w) x = img_w - 1;
    if (y < 0) y = 0;
    if (y >= img_h) y = img_h - 1;
    return int'(img[y * img_w + x]);
  endfunction

  function automatic int ref_mag(input int dx, input int dy);
    int a, b, m;
    a = dx < 0 ? -dx : dx;
    b = dy < 0 ? -dy : dy;
    if (b > a) begin m = a; a = b; b = m; end
    m = a - a / 8 + b / 2;
    if (m < a) begin
      m = a;
      if (a != 0) n_mag_floor++;
    end
    return m;
  endfunction

  function automatic int ref_bin(input int dx, input int dy);
    real t [4];
    int k;
    bit mir;
    t[0] = 0.17632698070846498; t[1] = 0.5773502691896257;
    t[2] = 1.1917535925942100;  t[3] = 2.7474774194546216;
    if (dx == 0 && dy == 0) return 0;
    if (dy < 0) begin dx = -dx; dy = -dy; end
    mir = (dx <= 0);
    if (mir) begin dx = -dx; n_mirror++; end
    k = 0;
    for (int j = 0; j < 4; j++) if (real'(dy) >= real'(dx) * t[j]) k++;
    if (!mir) return k;
    return (k == 0) ? 0 : 9 - k;
  endfunction

  // fills cellh[] (cell-major, 9 bins each) for the current image
  function automatic void compute_cells();
    int cx_n, dx, dy, c;
    cx_n = img_w / 8;
    for (int i = 0; i < 16 * 16 * 9; i++) cellh[i] = 0;
    for (int y = 0; y < img_h; y++) begin
      for (int x = 0; x < img_w; x++) begin
        dx = pix(x + 1, y) - pix(x - 1, y);
        dy = pix(x, y + 1) - pix(x, y - 1);
        c = (y / 8) * cx_n + (x / 8);
        cellh[c * 9 + ref_bin(dx, dy)] += ref_mag(dx, dy);
      end
    end
  endfunction

  // fills feats[] from cellh[] for a grid of cx_n x cy_n cells
  function automatic void compute_feats(input int cx_n, input int cy_n, input real clip);
    longint e;
    int h, c;
    real s, f;
    n_feats = 0;
    for (int by = 0; by < cy_n - 1; by++) begin
      for (int bx = 0; bx < cx_n - 1; bx++) begin
        e = 0;
        for (int k = 0; k < 4; k++) begin
          c = (by + k / 2) * cx_n + bx + k % 2;
          for (int b = 0; b < 9; b++) e += longint'(cellh[c * 9 + b]) * longint'(cellh[c * 9 + b]);
        end
        if (e == 0) n_zero_block++;
        s = (e == 0) ? 0.0 : 1.0 / $sqrt(real'(e));
        for (int k = 0; k < 4; k++) begin
          c = (by + k / 2) * cx_n + bx + k % 2;
          for (int b = 0; b < 9; b++) begin
            h = cellh[c * 9 + b];
            f = real'(h) * s;
            if (f > clip) begin f = clip; n_clip++; end
            feats[n_feats] = f;
            n_feats++;
          end
        end
      end
    end
  endfunction

endpackage
