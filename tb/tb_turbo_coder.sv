// tb_turbo_coder: end-to-end test of the whole chain at its default
// parameters.  Random 8-bit frames enter serially with random gaps; every
// codeword is compared with the reference encoder; each frame is sent with
// no error, one or two deliberate code-bit errors (err_mask).  Decoded
// bits and soft outputs are compared with the reference iterative decoder,
// and frames with no or one error must come back exactly as sent.
// Counted and required at least once: input stalls caused by the second
// encoder and by the busy decoder, frames with injected errors that were
// corrected, decoder iterations (ITER per frame for each component decoder),
// and interleaving that actually reorders a frame.
module tb_turbo_coder;
  import turbo_pkg::*;
  import tb_turbo_ref_pkg::*;

  localparam int FRAMES = 400;

  logic clk = 0, rst = 1;
  logic x = 0, x_valid = 0, x_ready;
  logic [3*N-1:0] err_mask = '0, code;
  logic code_valid, dec_busy, dec_valid;
  logic [N-1:0] dec_bits;
  logic signed [LW-1:0] dec_llr [N];

  int checks = 0, failures = 0;
  int stall_enc = 0, stall_dec = 0, corrected = 0, iterations = 0, reordered = 0;

  turbo_coder dut (.clk, .rst, .x, .x_valid, .x_ready, .err_mask, .code, .code_valid,
                   .dec_busy, .dec_valid, .dec_bits, .dec_llr);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stalls, seen at the clock edge
  always @(posedge clk) begin
    if (!rst && x_valid && !x_ready) begin
      if (dec_busy) stall_dec++;
      else          stall_enc++;
    end
    if (!rst && dut.u_dec.u_dec1.done) iterations++;
  end

  logic [N-1:0]   frames [$];
  logic [3*N-1:0] masks  [$];

  // driver
  initial begin
    logic [N-1:0] f;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < FRAMES; t++) begin
      f = N'($urandom);
      frames.push_back(f);
      for (int k = 0; k < N; k++) begin
        while ($urandom_range(0, 4) == 0) begin
          x_valid <= 0;
          @(posedge clk);
        end
        x_valid <= 1;
        x       <= f[k];
        @(negedge clk);
        while (!x_ready) @(negedge clk);
        @(posedge clk);
      end
    end
    x_valid <= 0;
  end

  // error masks: applied in the code_valid cycle
  initial begin
    logic [3*N-1:0] m;
    int a, b;
    forever begin
      @(negedge clk);
      if (code_valid) begin
        m = '0;
        case ($urandom_range(0, 2))
          0: ;
          1: m[$urandom_range(0, 3*N-1)] = 1'b1;
          default: begin
            a = $urandom_range(0, 3*N-1);
            do b = $urandom_range(0, 3*N-1); while (b == a);
            m[a] = 1'b1;
            m[b] = 1'b1;
          end
        endcase
        err_mask = m;
        masks.push_back(m);
        checks++;
        begin
          logic [N-1:0] f;
          f = frames[0];
          if (code !== ref_turbo_encode(f)) begin
            failures++; $display("codeword mismatch: data %b code %h exp %h", f, code, ref_turbo_encode(f));
          end
          if (ref_interleave(f) != f) reordered++;
        end
      end
    end
  end

  // decoded frames
  initial begin
    logic [N-1:0] f, r_bits;
    logic [3*N-1:0] m, rx;
    soft_t ys, yp1, yp2, r_llr;
    int nerr;
    for (int t = 0; t < FRAMES; t++) begin
      do @(posedge clk); while (!dec_valid);
      #1;
      f = frames.pop_front();
      m = masks.pop_front();
      rx = ref_turbo_encode(f) ^ m;
      for (int k = 0; k < N; k++) begin
        ys[k]  = rx[3*k]   ? CH_AMP : -CH_AMP;
        yp1[k] = rx[3*k+1] ? CH_AMP : -CH_AMP;
        yp2[k] = rx[3*k+2] ? CH_AMP : -CH_AMP;
      end
      ref_turbo_decode(ys, yp1, yp2, NUM_ITER, r_llr, r_bits);
      nerr = $countones(m);
      checks++;
      if (dec_bits !== r_bits) begin failures++; $display("frame %0d: decoded %b exp %b", t, dec_bits, r_bits); end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(dec_llr[k]) != r_llr[k]) begin failures++; $display("frame %0d: llr[%0d] %0d exp %0d", t, k, dec_llr[k], r_llr[k]); end
      end
      if (nerr <= 1) begin
        checks++;
        if (dec_bits !== f) begin failures++; $display("frame %0d: %0d error(s) not corrected", t, nerr); end
      end
      if (nerr > 0 && dec_bits === f) corrected++;
    end
    $display("stalls by encoder %0d, by decoder %0d, corrected frames %0d, component runs %0d, reordered frames %0d",
             stall_enc, stall_dec, corrected, iterations, reordered);
    checks += 5;
    if (stall_enc == 0)  begin failures++; $display("no encoder stall"); end
    if (stall_dec == 0)  begin failures++; $display("no decoder stall"); end
    if (corrected == 0)  begin failures++; $display("no corrected frame"); end
    if (iterations != FRAMES * NUM_ITER) begin failures++; $display("iterations %0d", iterations); end
    if (reordered == 0)  begin failures++; $display("interleaver never reordered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
