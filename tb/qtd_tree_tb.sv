// qtd_tree_tb: streams images in quadrant-tree order into the tree builder
// and compares the flags of every layer with a reference computed from the
// blocks' minimum and maximum, then trims for one cycle and compares with the
// reference trimming. Images are made of uniform patches of random size plus
// noise, with several thresholds, so that uniform and divided blocks occur in
// every layer and trimming clears flags. A second trim cycle must change
// nothing. Gaps with valid low are inserted in the stream. Pixels have three
// colour components; some images differ in one component only, so a block
// must fail the test when a single component is out of range.
module qtd_tree_tb;
  import qtd_ref_pkg::*;
  localparam int L = 3, W = 8, NC = 3, N = 1 << L, NF = ((4 ** L) - 1) / 3;
  logic clk = 0, rst_n = 0, const_trim = 1, valid = 0;
  logic [2*L-1:0] addr = '0;
  logic [NC-1:0][W-1:0] pixel = '0;
  logic [W-1:0] threshold = '0;
  logic [NF-1:0] flags;
  int checks = 0, failures = 0;
  int n_uniform [L];
  int n_divided = 0, n_trimmed = 0;
  cimg_t img;

  qtd_tree dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_image(int kind);
    int s;
    s = (kind % 4 == 0) ? 8 : (kind % 4 == 1) ? 4 : (kind % 4 == 2) ? 2 : 1;
    for (int k = 0; k < NC; k++)
      for (int br = 0; br < N; br += s)
        for (int bc = 0; bc < N; bc += s) begin
          int v;
          v = $urandom_range(0, 255);
          for (int r = br; r < br + s; r++)
            for (int c = bc; c < bc + s; c++)
              img[k][r][c] = ($urandom_range(0, 3) == 0) ? v : v ^ $urandom_range(0, 3);
        end
    // patch some random 2x2 and 4x4 squares to be exactly uniform
    for (int p = 0; p < ((kind % 4 == 0) ? 0 : 3); p++) begin
      int s2, r0, c0;
      s2 = (p == 0) ? 4 : 2;
      r0 = $urandom_range(0, N / s2 - 1) * s2;
      c0 = $urandom_range(0, N / s2 - 1) * s2;
      for (int k = 0; k < NC; k++) begin
        int v;
        v = $urandom_range(0, 255);
        for (int r = r0; r < r0 + s2; r++)
          for (int c = c0; c < c0 + s2; c++) img[k][r][c] = v;
      end
    end
    // every fifth image: one component gets an outlier in one pixel
    if (kind % 5 == 4) img[kind % NC][$urandom_range(0, N - 1)][$urandom_range(0, N - 1)] ^= 8'h80;
  endfunction

  task automatic run_image(int thr);
    flags_t raw, trimmed;
    int r, c;
    threshold = W'(thr);
    for (int n = 0; n < N * N; n++) begin
      tree_pos(n, L, r, c);
      addr = (2*L)'(n);
      for (int k = 0; k < NC; k++) pixel[k] = W'(img[k][r][c]);
      valid = 1;
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        valid = 0;
        addr = '0;  // must not be taken
        @(negedge clk);
      end
    end
    valid = 0;
    @(negedge clk);
    raw_flags(img, NC, L, thr, raw);
    for (int i = 0; i < NF; i++) begin
      checks++;
      if (flags[i] !== raw[i]) begin
        failures++;
        $display("thr=%0d raw flag %0d: got %0b want %0b", thr, i, flags[i], raw[i]);
      end
    end
    const_trim = 0;
    @(negedge clk);
    const_trim = 1;
    trim_flags(raw, L, trimmed);
    for (int i = 0; i < NF; i++) begin
      checks++;
      if (flags[i] !== trimmed[i]) begin
        failures++;
        $display("thr=%0d trimmed flag %0d: got %0b want %0b", thr, i, flags[i], trimmed[i]);
      end
      if (raw[i] && !trimmed[i]) n_trimmed++;
    end
    for (int l = 0; l < L; l++)
      for (int j = 0; j < 4 ** l; j++)
        if (trimmed[base_of(l) + j]) n_uniform[l]++;
        else if (!raw[base_of(l) + j]) n_divided++;
    // trimming again changes nothing
    const_trim = 0;
    @(negedge clk);
    const_trim = 1;
    for (int i = 0; i < NF; i++) begin
      checks++;
      if (flags[i] !== trimmed[i]) begin
        failures++;
        $display("second trim changed flag %0d", i);
      end
    end
  endtask

  initial begin
    for (int l = 0; l < L; l++) n_uniform[l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 24; k++) begin
      make_image(k);
      run_image((k % 3 == 0) ? 0 : (k % 3 == 1) ? 3 : $urandom_range(0, 40));
    end
    for (int l = 0; l < L; l++) begin
      checks++;
      if (n_uniform[l] == 0) begin failures++; $display("no uniform block in layer %0d", l); end
    end
    checks++;
    if (n_divided == 0 || n_trimmed == 0) begin failures++; $display("no divided or no trimmed block"); end
    $display("uniform per layer: %0d %0d %0d, divided %0d, trimmed %0d",
             n_uniform[0], n_uniform[1], n_uniform[2], n_divided, n_trimmed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
