// qtd_compressor_16x16_tb: the end-to-end test of qtd_compressor_top_tb run on an image of
// 16x16 pixels (IMG_LOG2 = 4), 85 flag bits in 4 layers, to show that the design scales with IMG_LOG2. Each image has
// three 8-bit colour components. For a set of colour
// images (flat, patchy, gradient, random, with a saturated corner; the three
// components drawn from different patterns) and thresholds it loads the image
// in raster order, starts a run, records the output stream and compares it
// with a reference: a DPCM model per component run over the image in
// quadrant-tree order, the min/max flags of the reconstructed image, trimming,
// the trimmed flags sent first, then the sent pixels re-quantized by freshly
// cleared DPCM models. Checks the cycle of the first flag and of done, and
// that busy/done drop after the run. Counts how often
// each mechanism happened (uniform block in each layer, division down to
// single pixels, a flag cleared by trimming, pixels skipped, step growth and
// step reset, clamping) and fails if any never did.
module qtd_compressor_16x16_tb;
  import qtd_ref_pkg::*;
  localparam int L = 4, W = qtd_pkg::PIX_W, NC = qtd_pkg::NCOMP, N = 1 << L;
  localparam int NPIX = N * N, NF = ((4 ** L) - 1) / 3, LW = $clog2(L + 1);
  localparam int SI = 4, SM = 64;           // the top's default step sizes
  localparam int RUN_CYCLES = 2 * NPIX + NF + 3;   // start edge to done
  localparam int FLAG_CYCLES = NPIX + 3;           // start edge to first flag

  logic clk = 0, rst_n = 0;
  logic load_en = 0;
  logic [L-1:0] load_row = '0, load_col = '0;
  logic [NC-1:0][W-1:0] load_data = '0;
  logic [W-1:0] threshold = '0;
  logic start = 0, busy, done;
  logic out_valid, out_is_flag, out_flag;
  logic [NC-1:0] out_code;
  logic [NC-1:0][W-1:0] out_pixel;
  logic [2*L-1:0] out_addr;
  logic [LW-1:0] out_level;

  int checks = 0, failures = 0;
  int m_uniform [L+1];
  int m_pixels = 0, m_trimmed = 0, m_skipped = 0, m_grow = 0, m_reset = 0, m_clamp = 0;
  cimg_t img;
  int edge_cnt = 0, first_flag_edge = -1;

  typedef struct { bit is_flag; bit flag; bit [NC-1:0] code; bit [NC-1:0][W-1:0] pixel; int addr; int level; } rec_t;
  rec_t got [$];

  qtd_compressor_top #(.IMG_LOG2(L)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    edge_cnt <= edge_cnt + 1;
    if (out_valid) begin
      got.push_back('{out_is_flag, out_flag, out_code, out_pixel, int'(out_addr), int'(out_level)});
      if (first_flag_edge < 0) first_flag_edge = edge_cnt;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pattern(int kind, int r, int c);
    case (kind % 6)
      0: return 100;
      1: return ((r / 4) * 2 + (c / 4)) * 60;
      2: return ((r / 2) + (c / 2) * 3) * 17 % 256;
      3: return r * 30 + c * 2;
      4: return $urandom_range(0, 255);
      default: return (r < 4 && c < 4) ? 255 : ((r / 2 + c / 2) % 2) * 8;
    endcase
  endfunction

  // component k of image kind uses pattern kind (k = 0) or a neighbour
  // pattern; images 0..5 have all components alike
  function automatic void make_image(int kind);
    for (int k = 0; k < NC; k++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          img[k][r][c] = pattern((kind < 6) ? kind : kind + k, r, c) % 256;
  endfunction

  task automatic compress(int thr);
    adpcm_model m [NC];
    cimg_t recon;
    flags_t raw, t;
    rec_t exp_q [$];
    rec_t e;
    int r, c, code, rv, lv, cycles, start_edge;
    bit sd, cv;

    // reference
    for (int k = 0; k < NC; k++) m[k] = new(W, SI, SM);
    for (int n = 0; n < NPIX; n++) begin
      tree_pos(n, L, r, c);
      for (int k = 0; k < NC; k++) begin
        m[k].run(img[k][r][c], code, rv);
        recon[k][r][c] = rv;
      end
    end
    raw_flags(recon, NC, L, thr, raw);
    trim_flags(raw, L, t);
    for (int i = 0; i < NF; i++) begin
      exp_q.push_back('{1'b1, t[i], '0, '0, i, 0});
      if (raw[i] && !t[i]) m_trimmed++;
    end
    for (int k = 0; k < NC; k++) m[k].clear();
    for (int n = 0; n < NPIX; n++) begin
      tree_pos(n, L, r, c);
      decode(t, L, r, c, sd, cv, lv);
      if (sd) begin
        e = '{1'b0, 1'b0, '0, '0, n, lv};
        for (int k = 0; k < NC; k++) begin
          m[k].run(img[k][r][c], code, rv);
          e.code[k] = code[0];
          e.pixel[k] = W'(rv);
        end
        exp_q.push_back(e);
        m_uniform[lv]++;
        m_pixels++;
      end else m_skipped++;
    end
    for (int k = 0; k < NC; k++) begin
      m_grow += m[k].n_grow; m_reset += m[k].n_reset; m_clamp += m[k].n_clamp;
    end

    // load and run
    for (int rr = 0; rr < N; rr++)
      for (int cc = 0; cc < N; cc++) begin
        @(negedge clk);
        load_en = 1; load_row = L'(rr); load_col = L'(cc); for (int k = 0; k < NC; k++) load_data[k] = W'(img[k][rr][cc]);
      end
    @(negedge clk);
    load_en = 0;
    got.delete();
    first_flag_edge = -1;
    threshold = W'(thr);
    start = 1;
    start_edge = edge_cnt;           // the next edge takes start
    @(negedge clk);
    start = 0;
    threshold = '0;  // sampled at start only
    cycles = 1;
    while (!done && cycles < 10 * RUN_CYCLES) begin
      @(negedge clk);
      cycles++;
    end
    // the monitor samples an output word at the edge after the one that
    // produced it, and cycles counts the falling edge after the start edge too
    checks++;
    if (first_flag_edge - start_edge - 1 != FLAG_CYCLES) begin
      failures++;
      $display("thr=%0d: first flag %0d edges after start, want %0d", thr, first_flag_edge - start_edge - 1, FLAG_CYCLES);
    end
    checks++;
    if (cycles - 1 != RUN_CYCLES) begin
      failures++;
      $display("thr=%0d: done after %0d cycles, want %0d", thr, cycles - 1, RUN_CYCLES);
    end
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("busy/done still high after the run"); end

    checks++;
    if (got.size() != exp_q.size()) begin
      failures++;
      $display("thr=%0d: %0d outputs, want %0d", thr, got.size(), exp_q.size());
    end
    for (int i = 0; i < got.size() && i < exp_q.size(); i++) begin
      checks++;
      if (got[i] != exp_q[i]) begin
        failures++;
        $display("thr=%0d out %0d: flag?%0b f=%0b code=%b pix=%h addr=%0d lvl=%0d want flag?%0b f=%0b code=%b pix=%h addr=%0d lvl=%0d",
                 thr, i, got[i].is_flag, got[i].flag, got[i].code, got[i].pixel, got[i].addr, got[i].level,
                 exp_q[i].is_flag, exp_q[i].flag, exp_q[i].code, exp_q[i].pixel, exp_q[i].addr, exp_q[i].level);
      end
    end
  endtask

  initial begin
    int thrs [5] = '{0, 8, 16, 40, 255};
    for (int l = 0; l <= L; l++) m_uniform[l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int k = 0; k < 12; k++) begin
      make_image(k);
      foreach (thrs[j]) compress(thrs[j]);
    end
    for (int l = 0; l <= L; l++) begin
      checks++;
      if (m_uniform[l] == 0) begin failures++; $display("no block sent at layer %0d", l); end
    end
    checks++;
    if (m_trimmed == 0 || m_skipped == 0 || m_grow == 0 || m_reset == 0 || m_clamp == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    for (int l = 0; l <= L; l++)
      $display("blocks sent for layer %0d (%0d = single pixels): %0d", l, L, m_uniform[l]);
    $display("pixels sent %0d skipped %0d, flags trimmed %0d, step grow %0d reset %0d, clamps %0d",
             m_pixels, m_skipped, m_trimmed, m_grow, m_reset, m_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
