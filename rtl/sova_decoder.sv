// sova_decoder: soft-input soft-output Viterbi decoder (SOVA) for the
// 4-state RSC code of turbo_pkg, one N-bit frame at a time.
//
// Inputs per bit k are log-likelihood ratios (positive favours 1):
// ls[k] for the systematic bit, lp[k] for the parity bit and la[k], the
// a-priori value from the other decoder.  A branch with input u and parity
// p adds u*(ls+la) + p*lp to the path metric, so the difference of two path
// metrics is directly a log-likelihood ratio.  The decoder works in four
// phases:
//   FWD   N cycles.  Add-compare-select for all four states in parallel.
//         Per step and state it stores the survivor decision (one bit: the
//         oldest bit of the winning predecessor) and the metric difference
//         between survivor and loser, saturated to the largest soft value.
//         Only state 0 is a valid start state.
//   BEST  1 cycle.  The state with the largest final metric ends the
//         maximum-likelihood (ML) path (the frame is not terminated).
//   TB    N cycles.  Trace back the ML path: decoded bit and ML state per step.
//   END   Because the frame is not terminated, the survivors ending in the
//         three other final states are competitors too: each is traced back
//         until it merges with the ML path, and every bit where it differs
//         from the ML path has its reliability lowered to the final metric
//         difference.  Up to 3N + 5 cycles.
//   REL   Reliability update (Hagenauer's rule).  Every bit starts at the
//         largest reliability.  For each step k the losing path into the ML
//         state is traced back, one step per cycle, until it merges with the
//         ML path; at every earlier step where its bit differs from the ML
//         bit, that bit's reliability is lowered to the metric difference
//         of step k.  At step k itself the two bits always differ.
//         Between N and N(N+1)/2 cycles.
//   DONE  1 cycle, done = 1.
// Outputs: llr[k] = +/-reliability with the sign of the decoded bit,
// hard[k] the decoded bit and ext[k] = llr[k] - la[k] - ls[k] (extrinsic
// information for the other decoder), saturated to +/-(2^(LW-1) - 1).
// They are combinational from internal registers and from ls and la, so
// they hold from done until the next start as long as ls and la are held.
//
// Timing: start is accepted in IDLE (busy low); done follows after at most
// 5N + 8 + N(N+1)/2 cycles (84 for N = 8).  ls, lp and la must stay stable
// from start to done.
// The document gives the SOVA's purpose (a reliability value per decoded
// bit from a Viterbi decoder); the phase structure, full-frame traceback,
// the final-state competitors, metric scaling and saturation are this
// design's choices.
module sova_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned N  = FRAME_LEN,
  parameter int unsigned LW = LLR_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic signed [LW-1:0] ls   [N],
  input  logic signed [LW-1:0] lp   [N],
  input  logic signed [LW-1:0] la   [N],
  output logic                 busy,
  output logic                 done,
  output logic signed [LW-1:0] llr  [N],
  output logic signed [LW-1:0] ext  [N],
  output logic [N-1:0]         hard
);

  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned MW = LW + KW + 4;          // path metric width
  localparam int unsigned RW = LW - 1;               // reliability magnitude width
  localparam logic [RW-1:0] RMAX = '1;
  localparam logic signed [MW-1:0] PM_INVALID = -(MW'(1) <<< (MW-2));

  typedef enum logic [2:0] {S_IDLE, S_FWD, S_BEST, S_TB, S_REL_END, S_REL_K, S_REL_J, S_DONE} phase_t;
  phase_t ph;

  logic signed [MW-1:0] pm        [4];
  logic [3:0]           dec_mem   [N];      // survivor decision per state
  logic [RW-1:0]        delta_mem [N][4];   // survivor/loser metric difference
  rsc_state_t           ml_state  [N];      // ML state after step k
  logic [RW-1:0]        rel       [N];

  logic [KW-1:0] k, j;
  rsc_state_t    tb_st, cmp_st;
  logic [RW-1:0] cmp_delta;
  logic [2:0]    fs;          // final state being examined in S_REL_END
  logic          end_mode;    // S_REL_J is tracing a final-state competitor

  // ---------------- add-compare-select for step k ----------------
  logic signed [MW-1:0] pm_new    [4];
  logic [3:0]           dec_new;
  logic [RW-1:0]        delta_new [4];

  always_comb begin
    logic signed [MW-1:0] cand [2];
    logic signed [MW-1:0] diff;
    rsc_state_t ps;
    logic u, p;
    for (int ns = 0; ns < 4; ns++) begin
      for (int d = 0; d < 2; d++) begin
        ps = rsc_prev(rsc_state_t'(ns), 1'(d));
        u  = rsc_branch_input(rsc_state_t'(ns), 1'(d));
        p  = rsc_parity(ps, u);
        cand[d] = pm[ps]
                + (u ? MW'(ls[k]) + MW'(la[k]) : '0)
                + (p ? MW'(lp[k]) : '0);
      end
      dec_new[ns] = (cand[1] > cand[0]);
      pm_new[ns]  = dec_new[ns] ? cand[1] : cand[0];
      diff        = dec_new[ns] ? cand[1] - cand[0] : cand[0] - cand[1];
      delta_new[ns] = (diff > MW'(RMAX)) ? RMAX : diff[RW-1:0];
    end
  end

  // ---------------- best final state ----------------
  rsc_state_t best;
  always_comb begin
    best = '0;
    for (int s = 1; s < 4; s++)
      if (pm[s] > pm[best]) best = rsc_state_t'(s);
  end

  // saturated final metric difference between best state and state fs
  logic signed [MW-1:0] fin_diff;
  logic [RW-1:0]        fin_delta;
  always_comb begin
    fin_diff  = pm[best] - pm[fs[1:0]];
    fin_delta = (fin_diff > MW'(RMAX)) ? RMAX : fin_diff[RW-1:0];
  end

  // ---------------- traceback / competitor step helpers ----------------
  logic       tb_d, cmp_d, cmp_u;
  rsc_state_t ml_k;
  logic       ml_d;
  assign tb_d  = dec_mem[k][tb_st];
  assign ml_k  = ml_state[k];
  assign ml_d  = dec_mem[k][ml_k];
  assign cmp_d = dec_mem[j][cmp_st];
  assign cmp_u = rsc_branch_input(cmp_st, cmp_d);

  always_ff @(posedge clk) begin
    if (rst) begin
      ph <= S_IDLE;
      k  <= '0;
      j  <= '0;
      for (int s = 0; s < 4; s++) pm[s] <= '0;
      for (int i = 0; i < N; i++) begin
        rel[i]      <= '0;
        ml_state[i] <= '0;
        dec_mem[i]  <= '0;
        for (int s = 0; s < 4; s++) delta_mem[i][s] <= '0;
      end
      hard      <= '0;
      tb_st     <= '0;
      cmp_st    <= '0;
      cmp_delta <= '0;
      fs        <= '0;
      end_mode  <= 1'b0;
    end else begin
      unique case (ph)
        S_IDLE: if (start) begin
          for (int s = 0; s < 4; s++) pm[s] <= (s == 0) ? '0 : PM_INVALID;
          k  <= '0;
          ph <= S_FWD;
        end
        S_FWD: begin
          for (int s = 0; s < 4; s++) begin
            pm[s]           <= pm_new[s];
            delta_mem[k][s] <= delta_new[s];
          end
          dec_mem[k] <= dec_new;
          if (k == KW'(N-1)) ph <= S_BEST;
          else               k  <= k + 1'b1;
        end
        S_BEST: begin
          tb_st <= best;
          k     <= KW'(N-1);
          for (int i = 0; i < N; i++) rel[i] <= RMAX;
          ph    <= S_TB;
        end
        S_TB: begin
          ml_state[k] <= tb_st;
          hard[k]     <= rsc_branch_input(tb_st, tb_d);
          tb_st       <= rsc_prev(tb_st, tb_d);
          if (k == '0) begin
            fs <= '0;
            ph <= S_REL_END;
          end else begin
            k <= k - 1'b1;
          end
        end
        S_REL_END: begin
          if (fs == 3'd4) begin
            k        <= '0;
            end_mode <= 1'b0;
            ph       <= S_REL_K;
          end else begin
            fs <= fs + 1'b1;
            if (fs[1:0] != best) begin
              cmp_st    <= fs[1:0];
              cmp_delta <= fin_delta;
              j         <= KW'(N-1);
              end_mode  <= 1'b1;
              ph        <= S_REL_J;
            end
          end
        end
        S_REL_K: begin
          // losing branch into the ML state after step k
          if (delta_mem[k][ml_k] < rel[k]) rel[k] <= delta_mem[k][ml_k];
          cmp_delta <= delta_mem[k][ml_k];
          cmp_st    <= rsc_prev(ml_k, ~ml_d);
          j         <= k - 1'b1;
          if (k == '0) begin
            k  <= k + 1'b1;
            ph <= (N == 1) ? S_DONE : S_REL_K;
          end else begin
            ph <= S_REL_J;
          end
        end
        S_REL_J: begin
          // the competitor ends when it merges with the ML path (nothing
          // earlier differs) or when it reaches the start of the frame
          if (cmp_st != ml_state[j]) begin
            if (cmp_u != hard[j] && cmp_delta < rel[j]) rel[j] <= cmp_delta;
            cmp_st <= rsc_prev(cmp_st, cmp_d);
            j      <= j - 1'b1;
          end
          if (cmp_st == ml_state[j] || j == '0) begin
            if (end_mode)           ph <= S_REL_END;
            else if (k == KW'(N-1)) ph <= S_DONE;
            else begin
              k  <= k + 1'b1;
              ph <= S_REL_K;
            end
          end
        end
        S_DONE:  ph <= S_IDLE;
        default: ph <= S_IDLE;
      endcase
    end
  end

  assign busy = (ph != S_IDLE);
  assign done = (ph == S_DONE);

  // ---------------- soft outputs ----------------
  localparam logic signed [LW+1:0] SMAX = (LW+2)'(RMAX);
  always_comb begin
    logic signed [LW+1:0] e;
    for (int i = 0; i < N; i++) begin
      llr[i] = hard[i] ? LW'({1'b0, rel[i]}) : -LW'({1'b0, rel[i]});
      e = (LW+2)'(llr[i]) - (LW+2)'(la[i]) - (LW+2)'(ls[i]);
      if (e > SMAX)       ext[i] = LW'(SMAX);
      else if (e < -SMAX) ext[i] = -LW'(SMAX);
      else                ext[i] = LW'(e);
    end
  end

endmodule
