// wave_decoder: decodes the trimmed quadrant tree for the read-out sequence.
//
// For the tree address of a pixel it looks up, in every layer at once, the
// flag of the block that holds the pixel. If one of them is set the pixel lies
// in a uniform block: only the first pixel of that block (offset 0 in tree
// order) is sent, standing for the whole block, and the others are skipped.
// A pixel under no set flag is sent on its own. The outputs also give the
// layer of the block the pixel is sent for (0 = whole image, IMG_LOG2 = a
// single pixel), which is what a receiver needs to paint it.
//
// The decoder is pure logic with no flip-flops or pipeline stages between the
// flag registers and the read-out control: the "wave decoding" style that
// replaces synchronising flip-flops by plain gates and buffers, so the
// decision settles in the same cycle as the address. Using the flags to skip
// compressed pixels during read-out follows the source; the exact outputs and
// the rule "send the first pixel of a uniform block" are this design's choice.
// If the flags are untrimmed, the shallowest set flag on the path is used.
module wave_decoder #(
  parameter int unsigned IMG_LOG2 = qtd_pkg::IMG_LOG2,
  localparam int unsigned NF      = qtd_pkg::num_flags(IMG_LOG2),
  localparam int unsigned LVL_W   = $clog2(IMG_LOG2 + 1)
) (
  input  logic [NF-1:0]         flags,
  input  logic [2*IMG_LOG2-1:0] addr,
  output logic                  send,
  output logic                  covered,
  output logic [LVL_W-1:0]      level
);

  always_comb begin
    logic found, first;
    found = 1'b0;
    first = 1'b1;
    level = LVL_W'(IMG_LOG2);
    for (int l = 0; l < int'(IMG_LOG2); l++) begin
      int unsigned sh, base, node;
      logic [2*IMG_LOG2-1:0] offs_mask;
      sh        = 2 * (IMG_LOG2 - l);
      base      = qtd_pkg::layer_base(l);
      offs_mask = (2*IMG_LOG2)'((64'(1) << sh) - 1);
      node      = int'(32'(addr) >> sh);
      if (!found && flags[base + node]) begin
        found = 1'b1;
        first = (addr & offs_mask) == '0;
        level = LVL_W'(l);
      end
    end
    covered = found;
    send    = !found || first;
  end

endmodule
