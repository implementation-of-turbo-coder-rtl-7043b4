// turbo_encoder: rate-1/3 parallel concatenated (turbo) encoder.
//
// Two identical RSC encoders (rsc_encoder) work on the same N-bit frame.
// The first sees the bits in their original order and supplies the
// systematic stream c1 and its parity c2; the second sees the frame after
// the block interleaver and supplies only its parity c3 (its systematic
// output would repeat c1 and is dropped).  For N = 8 the result is the
// 24-bit codeword.
//
// Operation, one frame at a time:
//   LOAD  x is taken serially (x_valid && x_ready); RSC1 encodes each bit as
//         it arrives and the bit and its parity are stored.  N accepted bits.
//   ENC2  RSC2 encodes the stored frame in interleaved order, one bit per
//         cycle, N cycles; x_ready is low.
//   OUT   code holds the codeword and code_valid is high for one cycle.
//         Both encoders return to state 0 for the next frame.
// Latency: code_valid rises at the N-th clock edge after the edge that
// accepts the last bit; with x_valid held high a frame takes 2N + 1 cycles.  code is valid only
// while code_valid is high.
// Codeword layout: code[3k] = c1_k, code[3k+1] = c2_k, code[3k+2] = c3_k,
// where c3_k is RSC2's parity for interleaved bit k.
// The structure (two RSC encoders, interleaver, systematic output of the
// first only) follows the document; the serial handshake, the bit order in
// the codeword and the absence of trellis termination are this design's.
module turbo_encoder
  import turbo_pkg::*;
#(
  parameter int unsigned N    = FRAME_LEN,
  parameter int unsigned ROWS = IL_ROWS,
  parameter int unsigned COLS = IL_COLS
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           x,
  input  logic           x_valid,
  output logic           x_ready,
  output logic [3*N-1:0] code,
  output logic           code_valid
);

  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [1:0] {S_LOAD, S_ENC2, S_OUT} state_t;
  state_t st;

  logic [CW-1:0] cnt;
  logic [0:0]    frame    [N];   // c1, original order
  logic [0:0]    frame_il [N];   // interleaved frame
  logic [N-1:0]  par1, par2;

  logic sys1, p1, p2, sys2_unused;
  rsc_state_t st1_unused, st2_unused;
  logic accept, last;

  assign x_ready = (st == S_LOAD);
  assign accept  = x_valid && x_ready;
  assign last    = (cnt == CW'(N-1));

  block_interleaver #(.ROWS(ROWS), .COLS(COLS)) u_il (
    .din(frame), .dout(frame_il)
  );

  rsc_encoder u_rsc1 (
    .clk, .rst, .clr(st == S_OUT), .en(accept), .u(x),
    .sys(sys1), .par(p1), .state(st1_unused)
  );

  rsc_encoder u_rsc2 (
    .clk, .rst, .clr(st != S_ENC2), .en(st == S_ENC2), .u(frame_il[cnt][0]),
    .sys(sys2_unused), .par(p2), .state(st2_unused)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st  <= S_LOAD;
      cnt <= '0;
      for (int k = 0; k < N; k++) frame[k] <= '0;
      par1 <= '0;
      par2 <= '0;
    end else begin
      unique case (st)
        S_LOAD: if (accept) begin
          frame[cnt] <= sys1;
          par1[cnt]  <= p1;
          cnt        <= last ? '0 : cnt + 1'b1;
          if (last) st <= S_ENC2;
        end
        S_ENC2: begin
          par2[cnt] <= p2;
          cnt       <= last ? '0 : cnt + 1'b1;
          if (last) st <= S_OUT;
        end
        S_OUT:   st <= S_LOAD;
        default: st <= S_LOAD;
      endcase
    end
  end

  always_comb begin
    for (int k = 0; k < N; k++) begin
      code[3*k]   = frame[k][0];
      code[3*k+1] = par1[k];
      code[3*k+2] = par2[k];
    end
  end

  assign code_valid = (st == S_OUT);

endmodule
