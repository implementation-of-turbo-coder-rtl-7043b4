// tb_turbo_decoder: compares the iterative decoder with the reference
// iteration of tb_turbo_ref_pkg (two reference SOVA decoders exchanging
// extrinsic values through the reference interleaver) on noisy frames, and
// checks that clean codewords and codewords with one flipped code bit
// decode to the transmitted data.  Also checks the decoding time against
// ITER runs of both SOVA decoders.
module tb_turbo_decoder;
  import turbo_pkg::*;
  import tb_turbo_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic signed [LW-1:0] ys [N], yp1 [N], yp2 [N];
  logic signed [LW-1:0] llr [N];
  logic [N-1:0] bits;
  logic busy, done;
  int checks = 0, failures = 0;

  turbo_decoder dut (.clk, .rst, .start, .ys, .yp1, .yp2, .busy, .done, .bits, .llr);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  initial begin
    soft_t s_ys, s_yp1, s_yp2, r_llr;
    logic [N-1:0] r_bits, u;
    logic [3*N-1:0] c;
    int lat, bound, noise, flip;
    bound = NUM_ITER * 2 * (5*N + 8 + N*(N+1)/2 + 3) + 4;
    for (int k = 0; k < N; k++) begin ys[k] = 0; yp1[k] = 0; yp2[k] = 0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      u = N'($urandom);
      c = ref_turbo_encode(u);
      // t % 3: 0 clean, 1 one flipped code bit, 2 random noise
      noise = (t % 3 == 2) ? 24 : 0;
      flip  = (t % 3 == 1) ? rnd(0, 3*N-1) : -1;
      for (int k = 0; k < N; k++) begin
        s_ys[k]  = ((c[3*k]   ^ (flip == 3*k))   ? CH_AMP : -CH_AMP) + rnd(-noise, noise);
        s_yp1[k] = ((c[3*k+1] ^ (flip == 3*k+1)) ? CH_AMP : -CH_AMP) + rnd(-noise, noise);
        s_yp2[k] = ((c[3*k+2] ^ (flip == 3*k+2)) ? CH_AMP : -CH_AMP) + rnd(-noise, noise);
      end
      for (int k = 0; k < N; k++) begin
        ys[k] <= LW'(s_ys[k]); yp1[k] <= LW'(s_yp1[k]); yp2[k] <= LW'(s_yp2[k]);
      end
      start <= 1;
      @(posedge clk);
      start <= 0;
      // inputs are registered at start: disturb them to prove it
      for (int k = 0; k < N; k++) begin ys[k] <= '0; yp1[k] <= '0; yp2[k] <= '0; end
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!done && lat < 100000);
      #1;
      checks++;
      if (lat > bound) begin failures++; $display("t=%0d latency %0d > %0d", t, lat, bound); end
      ref_turbo_decode(s_ys, s_yp1, s_yp2, NUM_ITER, r_llr, r_bits);
      checks++;
      if (bits !== r_bits) begin failures++; $display("t=%0d bits %b exp %b", t, bits, r_bits); end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(llr[k]) != r_llr[k]) begin failures++; $display("t=%0d llr[%0d]=%0d exp %0d", t, k, llr[k], r_llr[k]); end
      end
      if (noise == 0) begin
        checks++;
        if (bits !== u) begin failures++; $display("t=%0d flip=%0d decoded %b sent %b", t, flip, bits, u); end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
