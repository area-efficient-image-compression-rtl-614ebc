// qtd_ref_pkg: reference models used by the testbenches of the quadrant-tree
// compressor. They are written from the geometry of the image (rows, columns,
// square blocks) rather than from tree-address bit slicing, so that they check
// the RTL independently. Images are at most 16x16 (log2 up to 4).
package qtd_ref_pkg;

  typedef int img_t [16][16];
  typedef img_t cimg_t [3];  // colour image, up to three components
  typedef bit flags_t [85];   // up to (4**4-1)/3 flags

  // 1-bit backward-adaptive DPCM, same rules as the RTL quantizer.
  class adpcm_model;
    int r1, r2, r3, step, qprev, have;
    int pix_max, step_init, step_max;
    int n_grow, n_reset, n_clamp;
    function new(int pix_w, int s_init, int s_max);
      pix_max = (1 << pix_w) - 1;
      step_init = s_init;
      step_max = s_max;
      n_grow = 0; n_reset = 0; n_clamp = 0;
      clear();
    endfunction
    function void clear();
      r1 = (pix_max + 1) / 2; r2 = r1; r3 = r1;
      step = step_init; qprev = 0; have = 0;
    endfunction
    function void run(int pix, output int code, output int recon);
      int pred, st, v;
      pred = (2 * r1 + r2 + r3) / 4;
      code = (pix >= pred) ? 1 : 0;
      if (have && code == qprev) begin
        st = step * 2;
        if (st > step_max) st = step_max;
        n_grow++;
      end else begin
        st = step_init;
        if (have) n_reset++;
      end
      v = code ? pred + st : pred - st;
      if (v < 0) begin v = 0; n_clamp++; end
      if (v > pix_max) begin v = pix_max; n_clamp++; end
      recon = v;
      r3 = r2; r2 = r1; r1 = v;
      step = st; qprev = code; have = 1;
    endfunction
  endclass

  // Row and column of the n-th pixel in quadrant-tree order: the image is
  // split into quadrants top-left, bottom-left, top-right, bottom-right,
  // recursively.
  function automatic void tree_pos(int n, int log2, output int row, output int col);
    int q;
    row = 0; col = 0;
    for (int lvl = log2 - 1; lvl >= 0; lvl--) begin
      q = (n / (4 ** lvl)) % 4;
      if (q == 1 || q == 3) row += (1 << lvl);
      if (q == 2 || q == 3) col += (1 << lvl);
    end
  endfunction

  // Index, in tree order, of block (brow, bcol) of a layer with 2**l blocks
  // per side.
  function automatic int block_index(int brow, int bcol, int l);
    int idx;
    idx = 0;
    for (int k = l - 1; k >= 0; k--)
      idx = idx * 4 + ((brow >> k) & 1) + 2 * ((bcol >> k) & 1);
    return idx;
  endfunction

  function automatic int base_of(int l);
    return ((4 ** l) - 1) / 3;
  endfunction

  // Untrimmed flags of an image of ncomp components: 1 when max - min <= thr
  // over the block in every component.
  function automatic void raw_flags(input cimg_t img, int ncomp, int log2, int thr, output flags_t f);
    int side, s, mn, mx;
    bit u;
    f = '{default: 0};
    side = 1 << log2;
    for (int l = 0; l < log2; l++) begin
      s = side >> l;
      for (int br = 0; br < (1 << l); br++)
        for (int bc = 0; bc < (1 << l); bc++) begin
          u = 1;
          for (int k = 0; k < ncomp; k++) begin
            mn = 1 << 30; mx = -1;
            for (int r = br * s; r < br * s + s; r++)
              for (int c = bc * s; c < bc * s + s; c++) begin
                if (img[k][r][c] < mn) mn = img[k][r][c];
                if (img[k][r][c] > mx) mx = img[k][r][c];
              end
            if (mx - mn > thr) u = 0;
          end
          f[base_of(l) + block_index(br, bc, l)] = u;
        end
    end
  endfunction

  // Trimmed flags: a flag stays only if no larger block around it is uniform.
  function automatic void trim_flags(input flags_t raw, int log2, output flags_t t);
    int side, s, br, bc, pbr, pbc;
    bit anc;
    t = '{default: 0};
    side = 1 << log2;
    for (int l = 0; l < log2; l++)
      for (br = 0; br < (1 << l); br++)
        for (bc = 0; bc < (1 << l); bc++) begin
          anc = 0;
          for (int a = 0; a < l; a++) begin
            pbr = br >> (l - a); pbc = bc >> (l - a);
            if (raw[base_of(a) + block_index(pbr, pbc, a)]) anc = 1;
          end
          t[base_of(l) + block_index(br, bc, l)] = raw[base_of(l) + block_index(br, bc, l)] && !anc;
        end
  endfunction

  // Read-out decision for the pixel at (row, col) given trimmed flags.
  function automatic void decode(input flags_t t, int log2, int row, int col,
                                 output bit send, output bit covered, output int level);
    int s;
    send = 1; covered = 0; level = log2;
    for (int l = 0; l < log2; l++) begin
      s = (1 << log2) >> l;
      if (!covered && t[base_of(l) + block_index(row / s, col / s, l)]) begin
        covered = 1;
        level = l;
        send = (row % s == 0) && (col % s == 0);
      end
    end
  endfunction

endpackage
