// tb_turbo_encoder: sends random frames serially, with random gaps in
// x_valid, and compares every codeword with a reference built from
// polynomial division and an explicit interleaver matrix.  Also checks
// that x_ready is low while the second encoder runs and that code_valid
// rises at the N-th clock edge after the edge that accepts the last bit.
module tb_turbo_encoder;
  import turbo_pkg::*;
  import tb_turbo_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic x = 0, x_valid = 0, x_ready;
  logic [3*N-1:0] code;
  logic code_valid;
  int checks = 0, failures = 0;
  int cycle = 0, last_accept = 0;
  int backpressure = 0;

  turbo_encoder dut (.clk, .rst, .x, .x_valid, .x_ready, .code, .code_valid);

  always #5 clk = ~clk;
  // sampled at the clock edge: values before the edge's updates
  always @(posedge clk) begin
    cycle++;
    if (x_valid && x_ready) last_accept = cycle;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] frames [$];

  // driver
  initial begin
    logic [N-1:0] f;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 300; t++) begin
      f = (t == 0) ? '0 : (t == 1) ? N'(1) : N'($urandom);
      frames.push_back(f);
      for (int k = 0; k < N; k++) begin
        // random idle cycles
        while ($urandom_range(0, 3) == 0) begin
          x_valid <= 0;
          @(posedge clk);
        end
        x_valid <= 1;
        x       <= f[k];
        @(negedge clk);
        while (!x_ready) begin
          backpressure++;
          @(negedge clk);
        end
        @(posedge clk);
      end
    end
    x_valid <= 0;
  end

  // monitor
  initial begin
    logic [N-1:0] f;
    logic [3*N-1:0] exp_code;
    int nframes = 0;
    while (nframes < 300) begin
      @(posedge clk);
      #1;
      if (code_valid) begin
        f = frames.pop_front();
        exp_code = ref_turbo_encode(f);
        checks++;
        if (code !== exp_code) begin
          failures++;
          $display("frame %0d: data=%b code=%h exp=%h", nframes, f, code, exp_code);
        end
        checks++;
        if (cycle - last_accept != N) begin
          failures++;
          $display("frame %0d: latency %0d, expected %0d", nframes, cycle - last_accept, N);
        end
        nframes++;
      end
    end
    checks++;
    if (backpressure == 0) begin failures++; $display("x_ready never went low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
