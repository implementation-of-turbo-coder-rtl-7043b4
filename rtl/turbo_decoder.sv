// turbo_decoder: iterative decoder for the rate-1/3 turbo code.
//
// Two SOVA component decoders (sova_decoder) refine each other's estimate
// of the information bits.  Decoder 1 works on the frame in original order
// with the systematic values ys and the first parity stream yp1; decoder 2
// works in interleaved order with the interleaved ys and the second parity
// stream yp2.  Each passes on only its extrinsic information (its output
// minus what it was given), which becomes the other's a-priori input after
// interleaving (1 -> 2) or de-interleaving (2 -> 1).  One iteration is a
// pass of decoder 1 followed by a pass of decoder 2.  After ITER iterations
// the de-interleaved output of decoder 2 is the result: llr, and bits as its
// hard decisions.
//
// Sequence: start (accepted when busy is low) registers ys, yp1 and yp2 and
// clears decoder 1's a-priori input; then D1 -> D2 is repeated ITER times;
// done is high for one cycle with bits and llr, which hold until the next
// done.  One frame takes about 2 * ITER SOVA runs (about 450 cycles for the
// defaults).
// The two-decoder loop with interleaver and de-interleaver follows the
// document.  The iteration count, running the two decoders one after the
// other and passing the extrinsic values without scaling are this design's
// choices.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned N    = FRAME_LEN,
  parameter int unsigned ROWS = IL_ROWS,
  parameter int unsigned COLS = IL_COLS,
  parameter int unsigned LW   = LLR_W,
  parameter int unsigned ITER = NUM_ITER
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic signed [LW-1:0] ys   [N],
  input  logic signed [LW-1:0] yp1  [N],
  input  logic signed [LW-1:0] yp2  [N],
  output logic                 busy,
  output logic                 done,
  output logic [N-1:0]         bits,
  output logic signed [LW-1:0] llr  [N]
);

  localparam int unsigned IW = (ITER > 1) ? $clog2(ITER) : 1;

  typedef enum logic [2:0] {S_IDLE, S_D1_GO, S_D1_WAIT, S_D2_GO, S_D2_WAIT, S_DONE} state_t;
  state_t st;
  logic [IW-1:0] iter;

  logic signed [LW-1:0] ys_q  [N];
  logic signed [LW-1:0] yp1_q [N];
  logic signed [LW-1:0] yp2_q [N];
  logic signed [LW-1:0] la1_q [N];   // a-priori for decoder 1 (original order)
  logic signed [LW-1:0] le1_q [N];   // extrinsic of decoder 1 (original order)

  logic signed [LW-1:0] ys_il  [N];
  logic signed [LW-1:0] la2    [N];
  logic signed [LW-1:0] llr1 [N], ext1 [N], llr2 [N], ext2 [N];
  logic signed [LW-1:0] ext2_de [N], llr2_de [N];
  logic [N-1:0]         hard1, hard2;
  logic [0:0]           hard2_arr [N], hard2_de [N];
  logic                 busy1, busy2, done1, done2;

  // ---------------- interleaving around decoder 2 ----------------
  block_interleaver   #(.T(logic signed [LW-1:0]), .ROWS(ROWS), .COLS(COLS)) u_il_ys  (.din(ys_q),  .dout(ys_il));
  block_interleaver   #(.T(logic signed [LW-1:0]), .ROWS(ROWS), .COLS(COLS)) u_il_le1 (.din(le1_q), .dout(la2));
  block_deinterleaver #(.T(logic signed [LW-1:0]), .ROWS(ROWS), .COLS(COLS)) u_de_le2 (.din(ext2),  .dout(ext2_de));
  block_deinterleaver #(.T(logic signed [LW-1:0]), .ROWS(ROWS), .COLS(COLS)) u_de_l2  (.din(llr2),  .dout(llr2_de));
  block_deinterleaver #(.T(logic [0:0]), .ROWS(ROWS), .COLS(COLS)) u_de_h2  (.din(hard2_arr), .dout(hard2_de));

  always_comb for (int k = 0; k < N; k++) hard2_arr[k] = hard2[k];

  // ---------------- component decoders ----------------
  sova_decoder #(.N(N), .LW(LW)) u_dec1 (
    .clk, .rst, .start(st == S_D1_GO),
    .ls(ys_q), .lp(yp1_q), .la(la1_q),
    .busy(busy1), .done(done1), .llr(llr1), .ext(ext1), .hard(hard1)
  );

  sova_decoder #(.N(N), .LW(LW)) u_dec2 (
    .clk, .rst, .start(st == S_D2_GO),
    .ls(ys_il), .lp(yp2_q), .la(la2),
    .busy(busy2), .done(done2), .llr(llr2), .ext(ext2), .hard(hard2)
  );

  // ---------------- iteration control ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= S_IDLE;
      iter <= '0;
      bits <= '0;
      for (int k = 0; k < N; k++) begin
        ys_q[k]  <= '0;
        yp1_q[k] <= '0;
        yp2_q[k] <= '0;
        la1_q[k] <= '0;
        le1_q[k] <= '0;
        llr[k]   <= '0;
      end
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          for (int k = 0; k < N; k++) begin
            ys_q[k]  <= ys[k];
            yp1_q[k] <= yp1[k];
            yp2_q[k] <= yp2[k];
            la1_q[k] <= '0;
          end
          iter <= '0;
          st   <= S_D1_GO;
        end
        S_D1_GO:   st <= S_D1_WAIT;
        S_D1_WAIT: if (done1) begin
          for (int k = 0; k < N; k++) le1_q[k] <= ext1[k];
          st <= S_D2_GO;
        end
        S_D2_GO:   st <= S_D2_WAIT;
        S_D2_WAIT: if (done2) begin
          for (int k = 0; k < N; k++) la1_q[k] <= ext2_de[k];
          if (iter == IW'(ITER-1)) begin
            for (int k = 0; k < N; k++) begin
              llr[k]  <= llr2_de[k];
              bits[k] <= hard2_de[k][0];
            end
            st <= S_DONE;
          end else begin
            iter <= iter + 1'b1;
            st   <= S_D1_GO;
          end
        end
        S_DONE:  st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
  assign done = (st == S_DONE);

  // A component decoder is only started when it is idle.  Decoder 1's own
  // soft output and hard decisions are not needed: only its extrinsic
  // values travel on, and the result is taken from decoder 2.
  a_dec1_idle: assert property (@(posedge clk) disable iff (rst) (st == S_D1_GO) |-> !busy1);
  a_dec2_idle: assert property (@(posedge clk) disable iff (rst) (st == S_D2_GO) |-> !busy2);

endmodule
