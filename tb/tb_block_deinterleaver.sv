// tb_block_deinterleaver: writes a matrix row by row and reads it column by
// column as the reference for the de-interleaver, for the default 2 x 4
// shape and a 3 x 5 shape, and checks that de-interleaving the
// interleaver's output returns the original frame.
module tb_block_deinterleaver;
  import turbo_pkg::*;
  typedef logic [7:0] byte_t;

  int checks = 0, failures = 0;

  byte_t a_in [8], a_il [8], a_back [8], a_de [8];
  byte_t b_in [15], b_out [15];

  block_deinterleaver #(.T(byte_t)) dut_a (.din(a_in), .dout(a_de));
  block_deinterleaver #(.T(byte_t), .ROWS(3), .COLS(5)) dut_b (.din(b_in), .dout(b_out));
  block_interleaver   #(.T(byte_t)) il_a (.din(a_in), .dout(a_il));
  block_deinterleaver #(.T(byte_t)) dut_rt (.din(a_il), .dout(a_back));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t m [3][5];
    byte_t m2 [2][4];
    int idx;
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 8; i++)  a_in[i] = byte_t'($urandom);
      for (int i = 0; i < 15; i++) b_in[i] = byte_t'($urandom);
      #1;
      idx = 0;
      for (int r = 0; r < 2; r++) for (int c = 0; c < 4; c++) m2[r][c] = a_in[idx++];
      idx = 0;
      for (int c = 0; c < 4; c++) for (int r = 0; r < 2; r++) begin
        checks++;
        if (a_de[idx] !== m2[r][c]) begin failures++; $display("2x4 k=%0d", idx); end
        idx++;
      end
      idx = 0;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 5; c++) m[r][c] = b_in[idx++];
      idx = 0;
      for (int c = 0; c < 5; c++) for (int r = 0; r < 3; r++) begin
        checks++;
        if (b_out[idx] !== m[r][c]) begin failures++; $display("3x5 k=%0d", idx); end
        idx++;
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (a_back[i] !== a_in[i]) begin failures++; $display("round trip i=%0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
