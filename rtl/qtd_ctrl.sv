// qtd_ctrl: the control circuit of the compressor.
//
// One start pulse runs one image through these phases, one state each:
//   CONSTRUCT  NPIX cycles: every pixel is read in tree order, quantized and
//              fed to the tree builder (Const/Trim = 1).
//   DRAIN      1 cycle: the last pixel, read in the previous cycle, is used.
//   TRIM       1 cycle: Const/Trim = 0, the whole tree is trimmed at once; the
//              quantizer is cleared for the second pass.
//   FLAGS      NF cycles: the trimmed flag bits are sent, index 0 first.
//   READOUT    NPIX cycles: the pixel array is read again in tree order; the
//              data path sends the pixels the tree did not compress.
//   FLUSH      1 cycle: the last read-out pixel is used; done pulses.
// A run thus takes 2*NPIX + NF + 3 cycles from the cycle after start to the
// done pulse (152 for an 8x8 image). start is ignored while busy.
//
// The two modes, construction then trimming, the transmission of the flags
// before the pixels and the second, skipping, read-out pass follow the source.
// The one-cycle drain and flush states (they match a frame store with a
// one-cycle read) and the start/busy/done handshake are this design's choice.
//
// Assertions check that trimming lasts one cycle, that done is followed by
// idle and that reads happen only during the scans.
//
// scan_clear/scan_step drive a zscan_2d1d counter; scan_last comes back from
// it. rd_en is the read request for the pixel at the counter's address.
module qtd_ctrl #(
  parameter int unsigned IMG_LOG2 = qtd_pkg::IMG_LOG2,
  localparam int unsigned NF      = qtd_pkg::num_flags(IMG_LOG2),
  localparam int unsigned FI_W    = (NF > 1) ? $clog2(NF) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                scan_last,
  output qtd_pkg::phase_e     phase,
  output logic                scan_clear,
  output logic                scan_step,
  output logic                rd_en,
  output logic                const_trim,
  output logic                adpcm_clear,
  output logic                flag_valid,
  output logic [FI_W-1:0]     flag_idx,
  output logic                busy,
  output logic                done
);

  import qtd_pkg::*;

  phase_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= PH_IDLE;
      flag_idx <= '0;
    end else begin
      unique case (state)
        PH_IDLE:      if (start) state <= PH_CONSTRUCT;
        PH_CONSTRUCT: if (scan_last) state <= PH_DRAIN;
        PH_DRAIN:     state <= PH_TRIM;
        PH_TRIM: begin
          state    <= PH_FLAGS;
          flag_idx <= '0;
        end
        PH_FLAGS: begin
          flag_idx <= flag_idx + 1'b1;
          if (flag_idx == FI_W'(NF - 1)) state <= PH_READOUT;
        end
        PH_READOUT:   if (scan_last) state <= PH_FLUSH;
        PH_FLUSH:     state <= PH_IDLE;
        default:      state <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    phase       = state;
    scan_clear  = (state == PH_IDLE) && start;
    scan_step   = (state == PH_CONSTRUCT) || (state == PH_READOUT);
    rd_en       = scan_step;
    const_trim  = (state != PH_TRIM);
    adpcm_clear = scan_clear || (state == PH_TRIM);
    flag_valid  = (state == PH_FLAGS);
    busy        = (state != PH_IDLE);
    done        = (state == PH_FLUSH);
  end

  // Rules of the sequence: trimming lasts exactly one cycle, a run ends in
  // idle, and the frame store is read only during the two scans.
  a_trim_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    !const_trim |=> const_trim);
  a_done_then_idle: assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !busy);
  a_read_in_scan: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> (state == PH_CONSTRUCT || state == PH_READOUT));

endmodule
