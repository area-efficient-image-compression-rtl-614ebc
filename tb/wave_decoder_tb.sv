// wave_decoder_tb: for trimmed trees of many random patchy images (and for
// untrimmed flag sets), checks the send / covered / level decision of every
// pixel against a reference that works on rows, columns and square blocks.
// Also checks that the number of pixels sent equals the number of uniform
// blocks plus the pixels under no uniform block.
module wave_decoder_tb;
  import qtd_ref_pkg::*;
  localparam int L = 3, N = 1 << L, NF = ((4 ** L) - 1) / 3, LW = $clog2(L + 1);
  logic [NF-1:0] flags = '0;
  logic [2*L-1:0] addr = '0;
  logic send, covered;
  logic [LW-1:0] level;
  int checks = 0, failures = 0;
  int n_cov_level [L+1];
  cimg_t img;

  wave_decoder #(.IMG_LOG2(L)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l <= L; l++) n_cov_level[l] = 0;
    for (int k = 0; k < 200; k++) begin
      flags_t raw, t;
      int sent, expect_sent, s;
      s = 1 << (k % 4);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) img[0][r][c] = 0;
      for (int br = 0; br < N; br += s)
        for (int bc = 0; bc < N; bc += s) begin
          int v;
          v = $urandom_range(0, 3);
          for (int r = br; r < br + s; r++)
            for (int c = bc; c < bc + s; c++) img[0][r][c] = v + (($urandom_range(0, 5) == 0) ? 1 : 0);
        end
      raw_flags(img, 1, L, (k % 2), raw);
      if (k % 10 == 9) t = raw;  // untrimmed: shallowest flag must win
      else trim_flags(raw, L, t);
      for (int i = 0; i < NF; i++) flags[i] = t[i];
      sent = 0;
      for (int n = 0; n < N * N; n++) begin
        int r, c, lv;
        bit sd, cv;
        tree_pos(n, L, r, c);
        addr = (2*L)'(n);
        #1;
        decode(t, L, r, c, sd, cv, lv);
        checks++;
        if (send !== sd || covered !== cv || level !== LW'(lv)) begin
          failures++;
          $display("img %0d pixel %0d: send=%0b cov=%0b lvl=%0d want %0b %0b %0d", k, n, send, covered, level, sd, cv, lv);
        end
        if (send) begin sent++; n_cov_level[lv]++; end
      end
      if (k % 10 != 9) begin
        expect_sent = 0;
        for (int i = 0; i < NF; i++) expect_sent += t[i];
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++) begin
            bit sd, cv;
            int lv;
            decode(t, L, r, c, sd, cv, lv);
            if (!cv) expect_sent++;
          end
        checks++;
        if (sent != expect_sent) begin failures++; $display("img %0d: %0d sent, want %0d", k, sent, expect_sent); end
      end
    end
    for (int l = 0; l <= L; l++) begin
      checks++;
      if (n_cov_level[l] == 0) begin failures++; $display("no pixel sent for layer %0d", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
