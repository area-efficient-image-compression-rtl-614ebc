// frame_store_tb: writes a random 8x8 image in raster order, reads every
// pixel back in a scrambled order and checks the value and the one-cycle read
// latency, and that rd_data holds while rd_en is low.
module frame_store_tb;
  localparam int L = 3, W = 8, N = 1 << L;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [L-1:0] wr_row = '0, wr_col = '0, rd_row = '0, rd_col = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  int img [N][N];

  frame_store #(.IMG_LOG2(L), .PIX_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        img[r][c] = $urandom_range(0, 255);
        @(negedge clk);
        wr_en = 1; wr_row = L'(r); wr_col = L'(c); wr_data = W'(img[r][c]);
      end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < N * N; i++) begin
      int a, r, c;
      a = (i * 37 + 11) % (N * N);
      r = a / N; c = a % N;
      rd_en = 1; rd_row = L'(r); rd_col = L'(c);
      @(negedge clk);
      checks++;
      if (rd_data !== W'(img[r][c])) begin
        failures++;
        $display("read (%0d,%0d): got %0d want %0d", r, c, rd_data, img[r][c]);
      end
    end
    // hold while rd_en is low
    rd_en = 0; rd_row = 0; rd_col = 0;
    begin
      logic [W-1:0] held;
      held = rd_data;
      repeat (3) @(negedge clk);
      checks++;
      if (rd_data !== held) begin failures++; $display("rd_data changed while idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
