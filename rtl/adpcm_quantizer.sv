// adpcm_quantizer: backward-adaptive DPCM with a 1-bit quantizer and an
// adaptive step size.
//
// Three registers R1, R2, R3 hold the last three reconstructed pixels (R1 the
// newest). The predictor forms pred = (2*R1 + R2 + R3) / 4. The incoming pixel
// is compared with pred, the single boundary point of a 1-bit quantizer that
// splits 0..2**PIX_W-1 into two intervals: code = 1 if pixel >= pred, else 0.
// The step size adapts to the code sequence: when the code (the quantization
// interval) is the same as for the previous pixel, the step of the previous
// pixel is doubled (saturating at STEP_MAX); when the code changes, or for the
// first pixel after clear, the step goes back to STEP_INIT. The reconstruction
// is recon = pred + step for code 1 and pred - step for code 0, clamped to the
// pixel range; it is shifted into R1..R3.
//
// What follows the source: the three history registers of reconstructed pixels,
// backward (decoder-reproducible) prediction, the 1-bit quantizer, and the
// two step rules (grow by a factor above 1 while the interval repeats, return
// to the initial value when it changes). This design's own choices: the
// predictor weights, the factor 2, STEP_INIT, STEP_MAX, and the reset value
// of the history (mid-grey).
//
// Timing: code, step and recon are combinational in pixel and the state. The
// state advances at the clock edge when valid is high. clear (synchronous)
// restarts the history, so each pass over the image starts from the same
// state; a receiver running the same recursion on the codes gets recon back.
module adpcm_quantizer #(
  parameter int unsigned PIX_W     = qtd_pkg::PIX_W,
  parameter int unsigned STEP_INIT = 4,
  parameter int unsigned STEP_MAX  = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             valid,
  input  logic [PIX_W-1:0] pixel,
  output logic             code,
  output logic [PIX_W-1:0] pred,
  output logic [PIX_W-1:0] step,
  output logic [PIX_W-1:0] recon
);

  localparam logic [PIX_W-1:0] MID = PIX_W'(1) << (PIX_W - 1);
  localparam logic [PIX_W:0]   TOP = {1'b0, {PIX_W{1'b1}}};

  logic [PIX_W-1:0] r1, r2, r3;
  logic [PIX_W-1:0] step_q;
  logic             code_q, have_prev;

  logic [PIX_W+1:0] pred_sum;
  logic [PIX_W:0]   step_dbl, up_sum;

  always_comb begin
    pred_sum = {1'b0, r1, 1'b0} + {2'b00, r2} + {2'b00, r3};
    pred     = pred_sum[PIX_W+1:2];
    code     = (pixel >= pred);
    step_dbl = {step_q, 1'b0};
    if (have_prev && code == code_q)
      step = (step_dbl > (PIX_W+1)'(STEP_MAX)) ? PIX_W'(STEP_MAX) : step_dbl[PIX_W-1:0];
    else
      step = PIX_W'(STEP_INIT);
    up_sum = {1'b0, pred} + {1'b0, step};
    if (code) recon = (up_sum > TOP) ? TOP[PIX_W-1:0] : up_sum[PIX_W-1:0];
    else      recon = (pred > step) ? pred - step : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= MID; r2 <= MID; r3 <= MID;
      step_q <= PIX_W'(STEP_INIT);
      code_q <= 1'b0;
      have_prev <= 1'b0;
    end else if (clear) begin
      r1 <= MID; r2 <= MID; r3 <= MID;
      step_q <= PIX_W'(STEP_INIT);
      code_q <= 1'b0;
      have_prev <= 1'b0;
    end else if (valid) begin
      r3 <= r2;
      r2 <= r1;
      r1 <= recon;
      step_q <= step;
      code_q <= code;
      have_prev <= 1'b1;
    end
  end

endmodule
