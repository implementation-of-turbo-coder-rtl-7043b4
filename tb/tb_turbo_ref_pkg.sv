// tb_turbo_ref_pkg: behavioural reference models used by the testbenches.
//
// They are written independently of the RTL: the RSC code is modelled as
// polynomial division on a bit stream, the interleaver as an explicit
// matrix, and the SOVA with register exchange (every state carries its
// whole survivor path, and every step keeps the losing path into every
// state) instead of the RTL's stored decisions and traceback.  The
// reliability of bit j is the smallest metric difference of any step k >= j
// whose losing path into the ML state has a different bit j (Hagenauer's
// rule over the whole frame), and of any survivor ending in another final
// state that has a different bit j (its final metric difference).  Conventions shared with the RTL: positive
// soft values favour 1, a branch adds u*(ls+la) + p*lp, state 0 is the only
// start state, on equal metrics the predecessor whose oldest register bit
// is 0 wins, the final state is the lowest-numbered one with the largest
// metric, and soft values saturate at +/-(2^(LW-1) - 1).
package tb_turbo_ref_pkg;
  import turbo_pkg::*;

  localparam int N    = FRAME_LEN;
  localparam int LW   = LLR_W;
  localparam int RMAX = (1 << (LW-1)) - 1;

  typedef int soft_t [N];

  // parity of the RSC code (1 + D^2) / (1 + D + D^2), starting from zero
  function automatic logic [N-1:0] ref_rsc_parity(logic [N-1:0] u);
    logic w1 = 0, w2 = 0, w;
    logic [N-1:0] p;
    for (int n = 0; n < N; n++) begin
      w    = u[n] ^ w1 ^ w2;
      p[n] = w ^ w2;
      w2   = w1;
      w1   = w;
    end
    return p;
  endfunction

  // write by columns, read by rows
  function automatic logic [N-1:0] ref_interleave(logic [N-1:0] u);
    logic m [IL_ROWS][IL_COLS];
    logic [N-1:0] o;
    int idx = 0;
    for (int c = 0; c < IL_COLS; c++) for (int r = 0; r < IL_ROWS; r++) m[r][c] = u[idx++];
    idx = 0;
    for (int r = 0; r < IL_ROWS; r++) for (int c = 0; c < IL_COLS; c++) o[idx++] = m[r][c];
    return o;
  endfunction

  function automatic soft_t ref_interleave_soft(soft_t v);
    int m [IL_ROWS][IL_COLS];
    soft_t o;
    int idx = 0;
    for (int c = 0; c < IL_COLS; c++) for (int r = 0; r < IL_ROWS; r++) m[r][c] = v[idx++];
    idx = 0;
    for (int r = 0; r < IL_ROWS; r++) for (int c = 0; c < IL_COLS; c++) o[idx++] = m[r][c];
    return o;
  endfunction

  function automatic soft_t ref_deinterleave_soft(soft_t v);
    int m [IL_ROWS][IL_COLS];
    soft_t o;
    int idx = 0;
    for (int r = 0; r < IL_ROWS; r++) for (int c = 0; c < IL_COLS; c++) m[r][c] = v[idx++];
    idx = 0;
    for (int c = 0; c < IL_COLS; c++) for (int r = 0; r < IL_ROWS; r++) o[idx++] = m[r][c];
    return o;
  endfunction

  // 24-bit codeword, layout code[3k] = c1, code[3k+1] = c2, code[3k+2] = c3
  function automatic logic [3*N-1:0] ref_turbo_encode(logic [N-1:0] u);
    logic [N-1:0] p1, p2;
    logic [3*N-1:0] c;
    p1 = ref_rsc_parity(u);
    p2 = ref_rsc_parity(ref_interleave(u));
    for (int k = 0; k < N; k++) begin
      c[3*k]   = u[k];
      c[3*k+1] = p1[k];
      c[3*k+2] = p2[k];
    end
    return c;
  endfunction

  function automatic int sat(int v);
    return (v > RMAX) ? RMAX : (v < -RMAX) ? -RMAX : v;
  endfunction

  // path metric of a whole input sequence
  function automatic int ref_path_metric(logic [N-1:0] u, soft_t ls, soft_t lp, soft_t la);
    logic [N-1:0] p = ref_rsc_parity(u);
    int m = 0;
    for (int k = 0; k < N; k++) m += (u[k] ? ls[k] + la[k] : 0) + (p[k] ? lp[k] : 0);
    return m;
  endfunction

  task automatic ref_sova(input soft_t ls, input soft_t lp, input soft_t la,
                          output soft_t llr, output soft_t ext, output logic [N-1:0] hard);
    int pm [4], pm_n [4];
    logic [N-1:0] surv [4], surv_n [4];
    logic [N-1:0] lose [N][4];
    int delta [N][4];
    int ml_st [N];
    int rel [N];
    int best, s, a;
    for (int i = 0; i < 4; i++) begin pm[i] = (i == 0) ? 0 : -(1 << 20); surv[i] = '0; end
    for (int k = 0; k < N; k++) begin
      bit seen [4] = '{default: 0};
      int  c_m [4];
      logic [N-1:0] c_p [4];
      bit  c_old [4];
      for (int st = 0; st < 4; st++) begin
        for (int u = 0; u < 2; u++) begin
          int s1 = st >> 1, s2 = st & 1;
          int ns, p, m;
          logic [N-1:0] path;
          a  = u ^ s1 ^ s2;
          p  = a ^ s2;
          ns = (a << 1) | s1;
          m  = pm[st] + (u ? ls[k] + la[k] : 0) + (p ? lp[k] : 0);
          path = surv[st];
          path[k] = 1'(u);
          if (!seen[ns]) begin
            seen[ns] = 1; c_m[ns] = m; c_p[ns] = path; c_old[ns] = 1'(s2);
          end else begin
            // second candidate: decide; old-bit-0 predecessor wins ties
            int m0, m1;
            logic [N-1:0] p0, p1;
            if (c_old[ns] == 0) begin m0 = c_m[ns]; p0 = c_p[ns]; m1 = m; p1 = path; end
            else                begin m1 = c_m[ns]; p1 = c_p[ns]; m0 = m; p0 = path; end
            if (m1 > m0) begin pm_n[ns] = m1; surv_n[ns] = p1; lose[k][ns] = p0; delta[k][ns] = m1 - m0; end
            else         begin pm_n[ns] = m0; surv_n[ns] = p0; lose[k][ns] = p1; delta[k][ns] = m0 - m1; end
            if (delta[k][ns] > RMAX) delta[k][ns] = RMAX;
          end
        end
      end
      pm = pm_n;
      surv = surv_n;
    end
    best = 0;
    for (int i = 1; i < 4; i++) if (pm[i] > pm[best]) best = i;
    hard = surv[best];
    // ML state after every step
    s = 0;
    for (int k = 0; k < N; k++) begin
      a = int'(hard[k]) ^ (s >> 1) ^ (s & 1);
      s = (a << 1) | (s >> 1);
      ml_st[k] = s;
    end
    for (int j = 0; j < N; j++) rel[j] = RMAX;
    // survivors ending in the other final states (unterminated frame)
    for (int f = 0; f < 4; f++) begin
      int d = pm[best] - pm[f];
      if (d > RMAX) d = RMAX;
      if (f != best)
        for (int j = 0; j < N; j++)
          if (surv[f][j] != hard[j] && d < rel[j]) rel[j] = d;
    end
    for (int k = 0; k < N; k++)
      for (int j = 0; j <= k; j++)
        if (lose[k][ml_st[k]][j] != hard[j] && delta[k][ml_st[k]] < rel[j])
          rel[j] = delta[k][ml_st[k]];
    for (int j = 0; j < N; j++) begin
      llr[j] = hard[j] ? rel[j] : -rel[j];
      ext[j] = sat(llr[j] - la[j] - ls[j]);
    end
  endtask

  // The whole iterative decoder: decoder 1 in natural order, decoder 2 in
  // interleaved order, extrinsic values exchanged, iters iterations.
  task automatic ref_turbo_decode(input soft_t ys, input soft_t yp1, input soft_t yp2,
                                  input int iters, output soft_t llr, output logic [N-1:0] bits);
    soft_t la1, llr1, ext1, ys_i, la2, llr2, ext2;
    logic [N-1:0] h1, h2;
    logic [N-1:0] h2_de;
    for (int k = 0; k < N; k++) la1[k] = 0;
    ys_i = ref_interleave_soft(ys);
    for (int it = 0; it < iters; it++) begin
      ref_sova(ys, yp1, la1, llr1, ext1, h1);
      la2 = ref_interleave_soft(ext1);
      ref_sova(ys_i, yp2, la2, llr2, ext2, h2);
      la1 = ref_deinterleave_soft(ext2);
    end
    llr = ref_deinterleave_soft(llr2);
    begin
      soft_t hv, hd;
      for (int k = 0; k < N; k++) hv[k] = int'(h2[k]);
      hd = ref_deinterleave_soft(hv);
      for (int k = 0; k < N; k++) h2_de[k] = hd[k][0];
    end
    bits = h2_de;
  endtask

endpackage
