// zscan_2d1d: the "2D to 1D" stage. It turns the two-dimensional pixel array
// into a one-dimensional stream in quadrant-tree order.
//
// A counter steps through the tree addresses 0 .. 4**IMG_LOG2-1. In tree
// order every quadrant, at every layer, is a run of consecutive addresses,
// so the tree builder can finish a block as soon as its last pixel arrives.
// The row of a pixel is made of the even bits of its tree address and the
// column of the odd bits, as the source describes. The mapping and the
// scan order follow the source; the counter and its handshake are this
// design's choice.
//
// Interface: clear returns the counter to 0; step advances it by one (it
// wraps after the last pixel). addr/row/col show the current count; last is
// high while the count is the final address. Both controls act at the clock
// edge; clear wins over step.
module zscan_2d1d #(
  parameter int unsigned IMG_LOG2 = qtd_pkg::IMG_LOG2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  step,
  output logic [2*IMG_LOG2-1:0] addr,
  output logic [IMG_LOG2-1:0]   row,
  output logic [IMG_LOG2-1:0]   col,
  output logic                  last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     addr <= '0;
    else if (clear) addr <= '0;
    else if (step)  addr <= addr + 1'b1;
  end

  always_comb begin
    for (int k = 0; k < int'(IMG_LOG2); k++) begin
      row[k] = addr[2*k];
      col[k] = addr[2*k+1];
    end
  end

  assign last = &addr;

endmodule
