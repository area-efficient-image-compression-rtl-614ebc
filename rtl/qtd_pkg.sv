// qtd_pkg: sizes and derived constants shared by the quadrant-tree image
// compressor.
//
// The image is a square of 2**IMG_LOG2 pixels on a side (8x8 by default, the
// size the compressor is demonstrated on). Each pixel has NCOMP colour
// components (3, red/green/blue) of PIX_W bits (8), 24 bits in all. A pixel is named by its tree address: IMG_LOG2 pairs of
// bits, the most significant pair choosing the quadrant of the whole image and
// each following pair the quadrant inside that. Row bit k of the pixel is tree
// address bit 2k (the even bits) and column bit k is bit 2k+1 (the odd bits).
//
// The quadrant tree has IMG_LOG2 layers of flag bits above the pixels: layer
// 0 is the root (the whole image), layer l has 4**l nodes, each covering a
// square of 2**(IMG_LOG2-l) pixels on a side. All flags are kept in one vector,
// layer by layer, root first; layer l starts at index (4**l-1)/3. A flag of 1
// means the block is uniform (max - min <= threshold) and is sent as a single
// pixel; for a colour image every component of the block must pass the test.
package qtd_pkg;

  localparam int unsigned IMG_LOG2 = 3;
  localparam int unsigned PIX_W    = 8;
  localparam int unsigned NCOMP    = 3;

  // Number of flag bits of a tree over a 2**log2 x 2**log2 image.
  function automatic int unsigned num_flags(int unsigned log2);
    return ((4 ** log2) - 1) / 3;
  endfunction

  // Index of the first flag of layer l.
  function automatic int unsigned layer_base(int unsigned l);
    return ((4 ** l) - 1) / 3;
  endfunction

  // Phase of the compressor, as seen on its output.
  typedef enum logic [2:0] {
    PH_IDLE      = 3'd0,
    PH_CONSTRUCT = 3'd1,
    PH_DRAIN     = 3'd2,
    PH_TRIM      = 3'd3,
    PH_FLAGS     = 3'd4,
    PH_READOUT   = 3'd5,
    PH_FLUSH     = 3'd6
  } phase_e;

endpackage
