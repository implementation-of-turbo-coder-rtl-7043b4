// soft_mapper: the channel between turbo encoder and turbo decoder.
//
// Each code bit is sent as a soft value of fixed magnitude AMP: +AMP for a
// 1 and -AMP for a 0 (positive means "1 is more likely", the convention of
// the whole decoder).  err_mask marks code bits to be received wrongly: a
// set mask bit flips the sign of that bit's soft value, which is how
// deliberate transmission errors are introduced to show that the decoder
// removes them.  The 3N-bit codeword is split into the three streams the
// decoder needs: systematic c1, parity c2 of the first encoder and parity
// c3 of the second encoder (still in interleaved order).
//
// Interface: combinational.  Codeword layout (from turbo_encoder):
// code[3k] = c1_k, code[3k+1] = c2_k, code[3k+2] = c3_k.
// The document states only that errors are introduced on purpose; the
// antipodal mapping, AMP and the mask are this design's choices.
module soft_mapper
  import turbo_pkg::*;
#(
  parameter int unsigned N   = FRAME_LEN,
  parameter int unsigned LW  = LLR_W,
  parameter int unsigned AMP = CH_AMP
) (
  input  logic [3*N-1:0]       code,
  input  logic [3*N-1:0]       err_mask,
  output logic signed [LW-1:0] ys  [N],
  output logic signed [LW-1:0] yp1 [N],
  output logic signed [LW-1:0] yp2 [N]
);

  localparam logic signed [LW-1:0] POS = LW'(AMP);
  localparam logic signed [LW-1:0] NEG = -LW'(AMP);

  logic [3*N-1:0] rx;
  assign rx = code ^ err_mask;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      ys[k]  = rx[3*k]   ? POS : NEG;
      yp1[k] = rx[3*k+1] ? POS : NEG;
      yp2[k] = rx[3*k+2] ? POS : NEG;
    end
  end

endmodule
