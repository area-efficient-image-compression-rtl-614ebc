// qtd_tree: builds the quadrant tree of an image in a single scan and trims it
// in a single clock cycle.
//
// Pixels arrive in tree order (see zscan_2d1d), so each block of each layer
// is a run of consecutive pixels. For every layer l (0 = root) the module keeps
// one running minimum and maximum. A pixel whose offset inside its layer-l
// block is 0 restarts that layer's pair; when the block's last pixel arrives,
// the flag of the block is written: 1 if max - min <= threshold (the block is
// uniform and will be sent as one pixel), 0 if it must be divided into four.
// All layers are updated in the same cycle, so the whole hierarchy is ready
// one clock after the last pixel. With threshold 0 the test is plain equality,
// the XNOR case of a 1-bit quantizer; wider pixels use the digital comparator.
// A pixel has NCOMP colour components, each with its own min/max pair; a
// block is uniform only if every component passes the test, so one tree
// serves the whole colour image.
//
// Modes (const_trim): 1 = tree construction, the flags are written as blocks
// complete, when valid is high. 0 = tree trimming, performed on the whole tree
// at once in one clock: a flag is reset if the flag of its parent is 1, so
// that after trimming at most one flag is set on any path from the root to a
// pixel, and it marks the largest uniform block on that path. Trimming
// repeatedly changes nothing more.
//
// Follows the source: the min/max criterion against a threshold, single-pass
// construction of every layer during the scan, the Const/Trim mode signal
// with 0 meaning trim, flag 1 for a block that is not divided, single-cycle
// trimming driven by the parent flag, and flag bits held in flip-flops. This
// design's choice: one min/max pair per layer (enough in tree order), the
// flag ordering (see qtd_pkg) and the flag reset value 0.
//
// Outputs: flags, all layers, registered; NF = (4**IMG_LOG2-1)/3 bits.
module qtd_tree #(
  parameter int unsigned IMG_LOG2 = qtd_pkg::IMG_LOG2,
  parameter int unsigned PIX_W    = qtd_pkg::PIX_W,
  parameter int unsigned NCOMP    = qtd_pkg::NCOMP,
  localparam int unsigned NF      = qtd_pkg::num_flags(IMG_LOG2)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  const_trim,
  input  logic                  valid,
  input  logic [2*IMG_LOG2-1:0] addr,
  input  logic [NCOMP-1:0][PIX_W-1:0] pixel,
  input  logic [PIX_W-1:0]      threshold,
  output logic [NF-1:0]         flags
);

  logic [NCOMP-1:0][PIX_W-1:0] acc_min [IMG_LOG2];
  logic [NCOMP-1:0][PIX_W-1:0] acc_max [IMG_LOG2];
  logic [NCOMP-1:0][PIX_W-1:0] nxt_min [IMG_LOG2];
  logic [NCOMP-1:0][PIX_W-1:0] nxt_max [IMG_LOG2];
  logic [NF-1:0]    flags_nxt;

  always_comb begin
    flags_nxt = flags;
    for (int l = 0; l < int'(IMG_LOG2); l++) begin
      int unsigned sh, base, node;
      logic [2*IMG_LOG2-1:0] offs_mask;
      logic first, lastp, uniform;
      sh        = 2 * (IMG_LOG2 - l);
      base      = qtd_pkg::layer_base(l);
      offs_mask = (2*IMG_LOG2)'((64'(1) << sh) - 1);
      first     = (addr & offs_mask) == '0;
      lastp     = (addr & offs_mask) == offs_mask;
      node      = int'(32'(addr) >> sh);
      uniform   = 1'b1;
      for (int c = 0; c < int'(NCOMP); c++) begin
        nxt_min[l][c] = (first || pixel[c] < acc_min[l][c]) ? pixel[c] : acc_min[l][c];
        nxt_max[l][c] = (first || pixel[c] > acc_max[l][c]) ? pixel[c] : acc_max[l][c];
        if ((nxt_max[l][c] - nxt_min[l][c]) > threshold) uniform = 1'b0;
      end
      if (const_trim) begin
        if (valid && lastp)
          flags_nxt[base + node] = uniform;
      end else if (l > 0) begin
        for (int j = 0; j < (4 ** l); j++)
          if (flags[qtd_pkg::layer_base(l - 1) + (j >> 2)])
            flags_nxt[base + j] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags <= '0;
      for (int l = 0; l < int'(IMG_LOG2); l++) begin
        acc_min[l] <= '0;
        acc_max[l] <= '0;
      end
    end else begin
      flags <= flags_nxt;
      if (const_trim && valid) begin
        for (int l = 0; l < int'(IMG_LOG2); l++) begin
          acc_min[l] <= nxt_min[l];
          acc_max[l] <= nxt_max[l];
        end
      end
    end
  end

endmodule
