// tb_error_correction: exhaustive error-correction run of the whole chain.
// Every one of the 256 possible 8-bit frames is sent 25 times: once clean
// and once with each of the 24 code bits flipped in the channel.  Every
// decoded frame must equal the frame sent.  A further 256 frames carry two
// random errors; for these the number of corrected frames is reported but
// not required, since two errors can exceed what an 8-bit frame's code
// guarantees to correct.
module tb_error_correction;
  import turbo_pkg::*;
  localparam int N = FRAME_LEN, LW = LLR_W;

  logic clk = 0, rst = 1;
  logic x = 0, x_valid = 0, x_ready;
  logic [3*N-1:0] err_mask = '0, code;
  logic code_valid, dec_busy, dec_valid;
  logic [N-1:0] dec_bits;
  logic signed [LW-1:0] dec_llr [N];

  int checks = 0, failures = 0;
  int double_ok = 0;

  turbo_coder dut (.clk, .rst, .x, .x_valid, .x_ready, .err_mask, .code, .code_valid,
                   .dec_busy, .dec_valid, .dec_bits, .dec_llr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one frame through encoder, channel and decoder
  task automatic run_frame(input logic [N-1:0] f, input logic [3*N-1:0] m,
                           output logic [N-1:0] got);
    for (int k = 0; k < N; k++) begin
      x_valid <= 1;
      x       <= f[k];
      @(negedge clk);
      while (!x_ready) @(negedge clk);
      @(posedge clk);
    end
    x_valid <= 0;
    while (!code_valid) @(negedge clk);
    err_mask = m;
    while (!dec_valid) @(negedge clk);
    got = dec_bits;
  endtask

  initial begin
    logic [N-1:0] got;
    logic [3*N-1:0] m;
    int a, b;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int v = 0; v < (1 << N); v++) begin
      for (int e = -1; e < 3*N; e++) begin
        m = '0;
        if (e >= 0) m[e] = 1'b1;
        run_frame(N'(v), m, got);
        checks++;
        if (got !== N'(v)) begin
          failures++;
          $display("frame %b error at %0d decoded as %b", N'(v), e, got);
        end
      end
    end
    for (int v = 0; v < (1 << N); v++) begin
      a = $urandom_range(0, 3*N-1);
      do b = $urandom_range(0, 3*N-1); while (b == a);
      m = '0;
      m[a] = 1'b1;
      m[b] = 1'b1;
      run_frame(N'(v), m, got);
      if (got === N'(v)) double_ok++;
    end
    $display("single errors: %0d frames checked; double errors corrected in %0d of %0d frames",
             checks, double_ok, 1 << N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
