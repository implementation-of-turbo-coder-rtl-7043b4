// tb_soft_mapper: random codewords and error masks; each soft value must be
// +AMP for a received 1 and -AMP for a received 0, where the received bit
// is the code bit XOR its mask bit, and the three streams must come from
// code positions 3k, 3k+1 and 3k+2.
module tb_soft_mapper;
  import turbo_pkg::*;
  localparam int N = FRAME_LEN, LW = LLR_W, AMP = CH_AMP;

  int checks = 0, failures = 0;
  logic [3*N-1:0] code, err_mask;
  logic signed [LW-1:0] ys [N], yp1 [N], yp2 [N];

  soft_mapper dut (.code, .err_mask, .ys, .yp1, .yp2);

  function automatic int expv(logic b);
    return b ? AMP : -AMP;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      code     = (3*N)'({$urandom, $urandom});
      err_mask = (t % 2 == 0) ? '0 : (3*N)'({$urandom, $urandom});
      #1;
      for (int k = 0; k < N; k++) begin
        checks += 3;
        if (int'(ys[k])  != expv(code[3*k]   ^ err_mask[3*k]))   begin failures++; $display("ys k=%0d", k); end
        if (int'(yp1[k]) != expv(code[3*k+1] ^ err_mask[3*k+1])) begin failures++; $display("yp1 k=%0d", k); end
        if (int'(yp2[k]) != expv(code[3*k+2] ^ err_mask[3*k+2])) begin failures++; $display("yp2 k=%0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
