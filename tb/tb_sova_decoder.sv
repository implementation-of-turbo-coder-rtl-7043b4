// tb_sova_decoder: runs the SOVA decoder on random soft inputs and on noisy
// codewords and compares every output with the register-exchange reference
// of tb_turbo_ref_pkg: decoded bits, soft outputs and extrinsic values.
// Independently of that model it checks that the decoded sequence has the
// largest path metric of all 2^N input sequences (exhaustive search), and
// that done comes within 5N + 8 + N(N+1)/2 cycles of start.
module tb_sova_decoder;
  import turbo_pkg::*;
  import tb_turbo_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic signed [LW-1:0] ls [N], lp [N], la [N];
  logic signed [LW-1:0] llr [N], ext [N];
  logic [N-1:0] hard;
  logic busy, done;
  int checks = 0, failures = 0;
  int sat_seen = 0, rel_lowered = 0;

  sova_decoder dut (.clk, .rst, .start, .ls, .lp, .la, .busy, .done, .llr, .ext, .hard);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  initial begin
    soft_t s_ls, s_lp, s_la, r_llr, r_ext;
    logic [N-1:0] r_hard, u;
    logic [3*N-1:0] c;
    int best_m, m, lat, bound;
    bound = 5*N + 8 + N*(N+1)/2;
    for (int k = 0; k < N; k++) begin ls[k] = 0; lp[k] = 0; la[k] = 0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int t = 0; t < 600; t++) begin
      case (t % 3)
        0: for (int k = 0; k < N; k++) begin     // small random values
             s_ls[k] = rnd(-20, 20); s_lp[k] = rnd(-20, 20); s_la[k] = rnd(-10, 10);
           end
        1: for (int k = 0; k < N; k++) begin     // full range
             s_ls[k] = rnd(-127, 127); s_lp[k] = rnd(-127, 127); s_la[k] = rnd(-127, 127);
           end
        default: begin                           // noisy codeword
          u = N'($urandom);
          c = ref_turbo_encode(u);
          for (int k = 0; k < N; k++) begin
            s_ls[k] = (c[3*k]   ? 16 : -16) + rnd(-14, 14);
            s_lp[k] = (c[3*k+1] ? 16 : -16) + rnd(-14, 14);
            s_la[k] = rnd(-4, 4);
          end
        end
      endcase
      for (int k = 0; k < N; k++) begin
        ls[k] <= LW'(s_ls[k]); lp[k] <= LW'(s_lp[k]); la[k] <= LW'(s_la[k]);
      end
      start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!done && lat < 1000);
      #1;
      checks++;
      if (lat > bound) begin failures++; $display("t=%0d latency %0d > %0d", t, lat, bound); end
      ref_sova(s_ls, s_lp, s_la, r_llr, r_ext, r_hard);
      checks++;
      if (hard !== r_hard) begin failures++; $display("t=%0d hard %b exp %b", t, hard, r_hard); end
      for (int k = 0; k < N; k++) begin
        checks += 2;
        if (int'(llr[k]) != r_llr[k]) begin failures++; $display("t=%0d llr[%0d]=%0d exp %0d", t, k, llr[k], r_llr[k]); end
        if (int'(ext[k]) != r_ext[k]) begin failures++; $display("t=%0d ext[%0d]=%0d exp %0d", t, k, ext[k], r_ext[k]); end
        if (r_llr[k] == RMAX || r_llr[k] == -RMAX) sat_seen++;
        else rel_lowered++;
      end
      // exhaustive maximum-likelihood check
      best_m = -(1 << 30);
      for (int v = 0; v < (1 << N); v++) begin
        m = ref_path_metric(N'(v), s_ls, s_lp, s_la);
        if (m > best_m) best_m = m;
      end
      checks++;
      if (ref_path_metric(hard, s_ls, s_lp, s_la) != best_m) begin
        failures++; $display("t=%0d decoded path is not maximum likelihood", t);
      end
      @(posedge clk);
    end
    checks++;
    if (sat_seen == 0 || rel_lowered == 0) begin failures++; $display("reliability cases not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
