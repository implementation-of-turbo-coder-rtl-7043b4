// turbo_coder: complete turbo coding chain for one 8-bit frame at a time:
// turbo encoder -> channel with deliberate errors -> iterative turbo
// decoder.
//
// Information bits enter serially on x (x_valid / x_ready).  The rate-1/3
// turbo_encoder turns each N-bit frame into a 3N-bit codeword (24 bits for
// N = 8), shown on code while code_valid is high.  In that same cycle the
// soft_mapper converts the codeword to soft values, flipping the code bits
// marked in err_mask, and the turbo_decoder starts on them.  When it
// finishes, dec_valid is high for one cycle with the decoded bits dec_bits
// (bit k = k-th bit of the frame as it entered on x) and their
// log-likelihood ratios dec_llr; both hold until the next dec_valid.
//
// Flow control: x_ready is low while the encoder runs its second encoder
// and while the decoder is busy, so one frame is decoded at a time and no
// codeword is lost.  err_mask is sampled in the code_valid cycle.
// clk and rst (synchronous, active high) correspond to the document's
// clock and reset inputs.  The chain itself follows the document; the
// handshake and the error-mask port are this design's.
module turbo_coder
  import turbo_pkg::*;
#(
  parameter int unsigned N    = FRAME_LEN,
  parameter int unsigned ROWS = IL_ROWS,
  parameter int unsigned COLS = IL_COLS,
  parameter int unsigned LW   = LLR_W,
  parameter int unsigned AMP  = CH_AMP,
  parameter int unsigned ITER = NUM_ITER
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 x,
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic [3*N-1:0]       err_mask,
  output logic [3*N-1:0]       code,
  output logic                 code_valid,
  output logic                 dec_busy,
  output logic                 dec_valid,
  output logic [N-1:0]         dec_bits,
  output logic signed [LW-1:0] dec_llr [N]
);

  logic enc_ready;
  logic signed [LW-1:0] ys [N], yp1 [N], yp2 [N];

  assign x_ready = enc_ready && !dec_busy;

  turbo_encoder #(.N(N), .ROWS(ROWS), .COLS(COLS)) u_enc (
    .clk, .rst, .x, .x_valid(x_valid && !dec_busy), .x_ready(enc_ready),
    .code, .code_valid
  );

  soft_mapper #(.N(N), .LW(LW), .AMP(AMP)) u_chan (
    .code, .err_mask, .ys, .yp1, .yp2
  );

  turbo_decoder #(.N(N), .ROWS(ROWS), .COLS(COLS), .LW(LW), .ITER(ITER)) u_dec (
    .clk, .rst, .start(code_valid), .ys, .yp1, .yp2,
    .busy(dec_busy), .done(dec_valid), .bits(dec_bits), .llr(dec_llr)
  );

  // The decoder is always idle when a codeword appears: x_ready is held low
  // while it is busy, so no frame can complete in the meantime.
  property p_dec_free;
    @(posedge clk) disable iff (rst) code_valid |-> !dec_busy;
  endproperty
  a_dec_free: assert property (p_dec_free);

endmodule
