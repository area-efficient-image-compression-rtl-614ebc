// qtd_ctrl_tb: runs the control circuit with a behavioural scan counter and
// checks, cycle by cycle, the phase sequence of one compression: NPIX
// construction cycles with reads, one drain cycle, one trim cycle (Const/Trim
// low, quantizer clear), NF flag cycles with indices 0..NF-1, NPIX read-out
// cycles, one flush cycle with done. Checks the total of 2*NPIX+NF+3 cycles,
// that start is ignored while busy, and runs two images back to back.
module qtd_ctrl_tb;
  import qtd_pkg::*;
  localparam int L = 3, NPIX = 4 ** L, NF = ((4 ** L) - 1) / 3, FW = $clog2(NF);
  logic clk = 0, rst_n = 0, start = 0, scan_last;
  phase_e phase;
  logic scan_clear, scan_step, rd_en, const_trim, adpcm_clear, flag_valid, busy, done;
  logic [FW-1:0] flag_idx;
  int cnt = 0;
  int checks = 0, failures = 0;

  qtd_ctrl #(.IMG_LOG2(L)) dut (.*);

  always #5 clk = ~clk;

  // scan counter model
  always_ff @(posedge clk)
    if (scan_clear) cnt <= 0;
    else if (scan_step) cnt <= (cnt + 1) % NPIX;
  assign scan_last = (cnt == NPIX - 1);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(string what, phase_e ph, bit rd, bit ct, bit fv, int fi, bit dn);
    checks++;
    if (phase !== ph || rd_en !== rd || scan_step !== rd || const_trim !== ct ||
        flag_valid !== fv || (fv && flag_idx !== FW'(fi)) || done !== dn || busy !== 1'b1) begin
      failures++;
      $display("%s: phase=%0d rd=%0b ct=%0b fv=%0b fi=%0d done=%0b busy=%0b", what, phase, rd_en,
               const_trim, flag_valid, flag_idx, done, busy);
    end
  endtask

  task automatic run_one();
    int cycles;
    @(negedge clk);
    start = 1;
    #1;
    checks++;
    if (!scan_clear || !adpcm_clear || busy) begin failures++; $display("start not taken in idle"); end
    @(negedge clk);
    start = 0;
    cycles = 0;
    for (int i = 0; i < NPIX; i++) begin
      if (i == 5) start = 1;  // ignored while busy
      expect_cycle("construct", PH_CONSTRUCT, 1, 1, 0, 0, 0);
      checks++;
      if (cnt != i || scan_clear) begin failures++; $display("scan address %0d at construct cycle %0d", cnt, i); end
      @(negedge clk); cycles++;
      start = 0;
    end
    expect_cycle("drain", PH_DRAIN, 0, 1, 0, 0, 0);
    @(negedge clk); cycles++;
    expect_cycle("trim", PH_TRIM, 0, 0, 0, 0, 0);
    checks++;
    if (!adpcm_clear) begin failures++; $display("no quantizer clear in trim"); end
    @(negedge clk); cycles++;
    for (int i = 0; i < NF; i++) begin
      expect_cycle("flags", PH_FLAGS, 0, 1, 1, i, 0);
      @(negedge clk); cycles++;
    end
    for (int i = 0; i < NPIX; i++) begin
      expect_cycle("readout", PH_READOUT, 1, 1, 0, 0, 0);
      @(negedge clk); cycles++;
    end
    expect_cycle("flush", PH_FLUSH, 0, 1, 0, 0, 1);
    @(negedge clk); cycles++;
    checks++;
    if (busy || phase !== PH_IDLE || cycles != 2 * NPIX + NF + 3) begin
      failures++;
      $display("end: busy=%0b phase=%0d cycles=%0d", busy, phase, cycles);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (busy || done || rd_en) begin failures++; $display("not idle after reset"); end
    run_one();
    run_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
