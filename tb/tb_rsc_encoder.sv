// tb_rsc_encoder: checks rsc_encoder against a reference written as the
// polynomial division it implements.  The reference keeps the register
// contents w[n] = u[n] ^ w[n-1] ^ w[n-2] (feedback 1 + D + D^2) and forms
// the parity w[n] ^ w[n-2] (feed-forward 1 + D^2).  Random bit streams with
// random gaps (en = 0) and periodic clears are applied; every cycle with
// en = 1 compares sys and par, and every cycle compares the state.
module tb_rsc_encoder;
  import turbo_pkg::*;

  logic clk = 0, rst = 1, clr = 0, en = 0, u = 0;
  logic sys, par;
  rsc_state_t state;
  int checks = 0, failures = 0;
  logic w1, w2, wn;   // reference register contents w[n-1], w[n-2]

  rsc_encoder dut (.clk, .rst, .clr, .en, .u, .sys, .par, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w1 = 0; w2 = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 99) == 0);
      en  = ($urandom_range(0, 3) != 0);
      u   = 1'($urandom);
      #1;
      if (en && !clr) begin
        wn = u ^ w1 ^ w2;
        checks++;
        if (sys !== u || par !== (wn ^ w2)) begin
          failures++;
          $display("mismatch n=%0d u=%b sys=%b par=%b exp_par=%b", n, u, sys, par, wn ^ w2);
        end
      end
      @(posedge clk); #1;
      if (clr) begin w1 = 0; w2 = 0; end
      else if (en) begin w2 = w1; w1 = wn; end
      checks++;
      if (state !== {w1, w2}) begin
        failures++;
        $display("state mismatch n=%0d got=%b exp=%b%b", n, state, w1, w2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
