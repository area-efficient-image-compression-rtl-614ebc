// qtd_compressor_top: area-efficient colour image compressor built on
// adaptive DPCM and one-pass quadrant-tree decomposition.
//
// Data flow (one image of 2**IMG_LOG2 x 2**IMG_LOG2 pixels, each pixel NCOMP
// colour components of PIX_W bits):
//   frame_store     -> the image, loaded through the load_* port (camera side)
//   zscan_2d1d      -> reads it as a 1-D stream in quadrant-tree order
//   adpcm_quantizer -> one per colour component: 1-bit backward-adaptive
//                      DPCM and the reconstructed component
//   qtd_tree        -> flag of every block of every layer, built during the
//                      scan from the reconstructed pixels, then trimmed in
//                      one cycle
//   wave_decoder    -> register-free decision, per pixel, to send or skip it
//   qtd_ctrl        -> sequences the phases
//
// After a start pulse the compressor (1) scans the image once, quantizing each
// pixel and building the tree on the reconstructed values, (2) trims the tree,
// (3) sends the NF trimmed flag bits (out_is_flag = 1, out_flag, out_addr =
// flag index), (4) scans the image again and, with the quantizers restarted,
// quantizes and sends only the pixels that the decoder marks for sending
// (out_is_flag = 0): one pixel per uniform block and every pixel of blocks
// that were divided down to single pixels. For each sent pixel out_code holds
// the 1-bit DPCM code of every component, out_pixel the reconstructed
// components, out_addr its tree address and out_level the layer of the block
// it stands for (IMG_LOG2 = a lone pixel). threshold is sampled at start.
//
// Timing: the first flag appears on the output 67 clocks after the edge that
// takes start (NPIX + 3); done is high for one cycle 2*NPIX + NF + 3 clocks
// after that edge (152 for 8x8), the cycle in which the word of the last pixel
// (tree address NPIX-1) appears if that pixel is sent. start is ignored while
// busy. Each output word is valid for one cycle; there is no back-pressure.
// out_level is 2 bits for 8x8, where the source's example format for the
// block size is 7 bits wide; 2 bits cover the 3 layers of this image size.
//
// The chain of the overall block diagram (2-D to 1-D, adaptive DPCM, QTD, wave
// decoding, output) follows the source. The output format, the handshake,
// building the tree on the reconstructed pixel values and sharing one tree
// among the colour components are this design's own choices.
module qtd_compressor_top #(
  parameter int unsigned IMG_LOG2  = qtd_pkg::IMG_LOG2,
  parameter int unsigned PIX_W     = qtd_pkg::PIX_W,
  parameter int unsigned NCOMP     = qtd_pkg::NCOMP,
  parameter int unsigned STEP_INIT = 4,
  parameter int unsigned STEP_MAX  = 64,
  localparam int unsigned NF       = qtd_pkg::num_flags(IMG_LOG2),
  localparam int unsigned AW       = 2 * IMG_LOG2,
  localparam int unsigned LVL_W    = $clog2(IMG_LOG2 + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // image load (camera or stored image)
  input  logic                          load_en,
  input  logic [IMG_LOG2-1:0]           load_row,
  input  logic [IMG_LOG2-1:0]           load_col,
  input  logic [NCOMP-1:0][PIX_W-1:0]   load_data,
  // control
  input  logic                          start,
  input  logic [PIX_W-1:0]              threshold,
  output logic                          busy,
  output logic                          done,
  // compressed stream
  output logic                          out_valid,
  output logic                          out_is_flag,
  output logic                          out_flag,
  output logic [NCOMP-1:0]              out_code,
  output logic [NCOMP-1:0][PIX_W-1:0]   out_pixel,
  output logic [AW-1:0]                 out_addr,
  output logic [LVL_W-1:0]              out_level
);

  import qtd_pkg::*;

  localparam int unsigned FI_W = (NF > 1) ? $clog2(NF) : 1;

  phase_e              phase;
  logic                scan_clear, scan_step, scan_last, rd_en;
  logic                const_trim, adpcm_clear, flag_valid, ctrl_done;
  logic [FI_W-1:0]     flag_idx;
  logic [AW-1:0]       scan_addr;
  logic [IMG_LOG2-1:0] scan_row, scan_col;
  logic [NCOMP-1:0][PIX_W-1:0] rd_data;
  logic [PIX_W-1:0]    thr_q;

  // data stage: the pixel read in the previous cycle
  logic                d_valid, d_readout;
  logic [AW-1:0]       d_addr;

  logic                q_valid;
  logic [NCOMP-1:0]    q_code;
  logic [NCOMP-1:0][PIX_W-1:0] q_recon;
  logic [NF-1:0]       flags;
  logic                dec_send, dec_covered;
  logic [LVL_W-1:0]    dec_level;

  qtd_ctrl #(.IMG_LOG2(IMG_LOG2)) u_ctrl (
    .clk, .rst_n, .start, .scan_last, .phase, .scan_clear, .scan_step, .rd_en,
    .const_trim, .adpcm_clear, .flag_valid, .flag_idx, .busy, .done(ctrl_done)
  );

  zscan_2d1d #(.IMG_LOG2(IMG_LOG2)) u_scan (
    .clk, .rst_n, .clear(scan_clear), .step(scan_step),
    .addr(scan_addr), .row(scan_row), .col(scan_col), .last(scan_last)
  );

  // one word holds all colour components of a pixel
  frame_store #(.IMG_LOG2(IMG_LOG2), .PIX_W(NCOMP * PIX_W)) u_mem (
    .clk, .wr_en(load_en), .wr_row(load_row), .wr_col(load_col),
    .wr_data(load_data), .rd_en, .rd_row(scan_row), .rd_col(scan_col),
    .rd_data
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid   <= 1'b0;
      d_readout <= 1'b0;
      d_addr    <= '0;
      thr_q     <= '0;
    end else begin
      d_valid   <= rd_en;
      d_readout <= (phase == PH_READOUT);
      d_addr    <= scan_addr;
      if (scan_clear) thr_q <= threshold;
    end
  end

  // the covered output is not needed here: send already accounts for it
  wave_decoder #(.IMG_LOG2(IMG_LOG2)) u_dec (
    .flags, .addr(d_addr), .send(dec_send), .covered(dec_covered),
    .level(dec_level)
  );

  // construction pass: every pixel; read-out pass: only the pixels sent
  assign q_valid = d_valid && (!d_readout || dec_send);

  for (genvar c = 0; c < int'(NCOMP); c++) begin : g_comp
    logic [PIX_W-1:0] pred_unused, step_unused;
    adpcm_quantizer #(.PIX_W(PIX_W), .STEP_INIT(STEP_INIT), .STEP_MAX(STEP_MAX)) u_q (
      .clk, .rst_n, .clear(adpcm_clear), .valid(q_valid), .pixel(rd_data[c]),
      .code(q_code[c]), .pred(pred_unused), .step(step_unused), .recon(q_recon[c])
    );
  end

  qtd_tree #(.IMG_LOG2(IMG_LOG2), .PIX_W(PIX_W), .NCOMP(NCOMP)) u_tree (
    .clk, .rst_n, .const_trim, .valid(d_valid && !d_readout), .addr(d_addr),
    .pixel(q_recon), .threshold(thr_q), .flags
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done        <= 1'b0;
      out_valid   <= 1'b0;
      out_is_flag <= 1'b0;
      out_flag    <= 1'b0;
      out_code    <= '0;
      out_pixel   <= '0;
      out_addr    <= '0;
      out_level   <= '0;
    end else begin
      done        <= ctrl_done;
      out_valid   <= flag_valid || (d_valid && d_readout && dec_send);
      out_is_flag <= flag_valid;
      out_flag    <= flag_valid ? flags[flag_idx] : 1'b0;
      out_code    <= flag_valid ? '0 : q_code;
      out_pixel   <= flag_valid ? '0 : q_recon;
      out_addr    <= flag_valid ? AW'(flag_idx) : d_addr;
      out_level   <= flag_valid ? '0 : dec_level;
    end
  end

endmodule
