// adpcm_quantizer_tb: drives the 1-bit adaptive DPCM with flat areas, ramps,
// steps to both ends of the range and random pixels, and compares code, step
// and reconstruction pixel by pixel with a reference model. Checks that the
// step grew, was reset and saturated, that the output clamped at both ends,
// that clear restarts the history and that the state holds while valid is low.
module adpcm_quantizer_tb;
  import qtd_ref_pkg::*;
  localparam int W = 8, SI = 4, SM = 64;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [W-1:0] pixel = '0, pred, step, recon;
  logic code;
  int checks = 0, failures = 0;
  int n_sat = 0, n_lo = 0, n_hi = 0;
  adpcm_model m;

  adpcm_quantizer #(.PIX_W(W), .STEP_INIT(SI), .STEP_MAX(SM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int p);
    int c, r, st;
    st = m.step;
    pixel = W'(p);
    valid = 1;
    #1;
    m.run(p, c, r);
    checks++;
    if (code !== c[0] || recon !== W'(r) || step !== W'(m.step)) begin
      failures++;
      $display("pixel %0d: code=%0b recon=%0d step=%0d want %0d %0d %0d", p, code, recon, step, c, r, m.step);
    end
    if (m.step == SM) n_sat++;
    if (r == 0) n_lo++;
    if (r == 255) n_hi++;
    @(negedge clk);
    valid = 0;
  endtask

  initial begin
    m = new(W, SI, SM);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 20; i++) apply(128);          // flat
    for (int i = 0; i < 40; i++) apply(i * 6);         // ramp up
    for (int i = 0; i < 20; i++) apply(255);           // top end
    for (int i = 0; i < 20; i++) apply(0);             // bottom end
    for (int i = 0; i < 300; i++) apply($urandom_range(0, 255));
    // idle cycles with a changing pixel must not move the state
    pixel = 8'd200;
    repeat (3) @(negedge clk);
    apply(77);
    // clear restarts the history
    clear = 1;
    @(negedge clk);
    clear = 0;
    m.clear();
    for (int i = 0; i < 30; i++) apply((i < 15) ? 250 : 10);
    checks++;
    if (m.n_grow == 0 || m.n_reset == 0 || n_sat == 0 || n_lo == 0 || n_hi == 0) begin
      failures++;
      $display("mechanism missing: grow=%0d reset=%0d sat=%0d lo=%0d hi=%0d", m.n_grow, m.n_reset, n_sat, n_lo, n_hi);
    end
    $display("step grow=%0d reset=%0d saturated=%0d clamp low=%0d high=%0d", m.n_grow, m.n_reset, n_sat, n_lo, n_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
