// frame_store: the image memory the compressor scans twice.
//
// The pixel array of the imager is read once while the quadrant tree is built
// and a second time during read-out, when only the pixels that the tree does
// not compress are fetched. This module stands for that array: a
// 2**IMG_LOG2 x 2**IMG_LOG2 memory of PIX_W-bit pixels, addressed by row and
// column. The write port loads an image in any order (for instance raster
// order from a camera); the read port is synchronous, so rd_data holds the
// pixel at (rd_row, rd_col) one clock after rd_en. Holding the image in a
// clocked memory with one write and one read port is this design's choice;
// the source only says that the pixel array is accessed again during read-out.
// The memory has no reset: an image must be written before it is read.
module frame_store #(
  parameter int unsigned IMG_LOG2 = qtd_pkg::IMG_LOG2,
  parameter int unsigned PIX_W    = qtd_pkg::PIX_W
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic [IMG_LOG2-1:0] wr_row,
  input  logic [IMG_LOG2-1:0] wr_col,
  input  logic [PIX_W-1:0]    wr_data,
  input  logic                rd_en,
  input  logic [IMG_LOG2-1:0] rd_row,
  input  logic [IMG_LOG2-1:0] rd_col,
  output logic [PIX_W-1:0]    rd_data
);

  logic [PIX_W-1:0] mem [2**(2*IMG_LOG2)];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_row, wr_col}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_row, rd_col}];
  end

endmodule
