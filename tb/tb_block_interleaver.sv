// tb_block_interleaver: fills a ROWS x COLS matrix column by column, reads
// it row by row, and compares with the interleaver output, for the default
// 2 x 4 shape and for a 3 x 5 shape.  Also checks the fixed default order
// 0 2 4 6 1 3 5 7.
module tb_block_interleaver;
  import turbo_pkg::*;
  typedef logic [7:0] byte_t;

  int checks = 0, failures = 0;

  byte_t a_in [8], a_out [8];
  byte_t b_in [15], b_out [15];

  block_interleaver #(.T(byte_t)) dut_a (.din(a_in), .dout(a_out));
  block_interleaver #(.T(byte_t), .ROWS(3), .COLS(5)) dut_b (.din(b_in), .dout(b_out));


  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t m [3][5];
    int idx;
    int exp8 [8] = '{0, 2, 4, 6, 1, 3, 5, 7};
    for (int i = 0; i < 8; i++) a_in[i] = byte_t'(i);
    #1;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (a_out[k] !== byte_t'(exp8[k])) begin
        failures++;
        $display("default order k=%0d got=%0d exp=%0d", k, a_out[k], exp8[k]);
      end
    end
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 8; i++)  a_in[i] = byte_t'($urandom);
      for (int i = 0; i < 15; i++) b_in[i] = byte_t'($urandom);
      #1;
      // 2 x 4 : write columns, read rows
      begin
        byte_t m2 [2][4];
        idx = 0;
        for (int c = 0; c < 4; c++) for (int r = 0; r < 2; r++) m2[r][c] = a_in[idx++];
        idx = 0;
        for (int r = 0; r < 2; r++) for (int c = 0; c < 4; c++) begin
          checks++;
          if (a_out[idx] !== m2[r][c]) begin failures++; $display("2x4 k=%0d", idx); end
          idx++;
        end
      end
      idx = 0;
      for (int c = 0; c < 5; c++) for (int r = 0; r < 3; r++) m[r][c] = b_in[idx++];
      idx = 0;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 5; c++) begin
        checks++;
        if (b_out[idx] !== m[r][c]) begin failures++; $display("3x5 k=%0d", idx); end
        idx++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
