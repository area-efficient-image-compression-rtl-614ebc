// zscan_2d1d_tb: steps the scan counter through a whole 8x8 image twice and
// checks that pixel n maps to the row and column of the n-th pixel of a
// recursive quadrant order, that last flags only the final pixel, that the
// counter wraps, holds without step, and that clear wins over step.
module zscan_2d1d_tb;
  import qtd_ref_pkg::*;
  localparam int L = 3;
  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  logic [2*L-1:0] addr;
  logic [L-1:0] row, col;
  logic last;
  int checks = 0, failures = 0;

  zscan_2d1d #(.IMG_LOG2(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_pos(int n);
    int r, c;
    tree_pos(n, L, r, c);
    checks++;
    if (addr !== (2*L)'(n) || row !== L'(r) || col !== L'(c) || last !== (n == 4**L - 1)) begin
      failures++;
      $display("n=%0d: addr=%0d row=%0d col=%0d last=%0b want row=%0d col=%0d", n, addr, row, col, last, r, c);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_pos(0);
    for (int pass = 0; pass < 2; pass++)
      for (int n = 0; n < 4**L; n++) begin
        expect_pos(n);
        step = 1;
        @(negedge clk);
        step = 0;
        if (n % 5 == 0) begin
          @(negedge clk);  // a cycle without step: must hold
          expect_pos((n + 1) % (4**L));
        end
      end
    // advance to 10, then clear together with step
    step = 1;
    repeat (10) @(negedge clk);
    expect_pos(10);
    clear = 1;
    @(negedge clk);
    clear = 0; step = 0;
    expect_pos(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
