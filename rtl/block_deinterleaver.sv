// block_deinterleaver: inverse of block_interleaver.
//
// Writes the frame row by row into a ROWS x COLS array and reads it column
// by column, undoing the interleaver: input element k goes back to output
// position (k % COLS) * ROWS + k / COLS.  Used in the turbo decoder to bring
// the second decoder's outputs, which are in interleaved order, back to the
// order of the transmitted bits.
//
// Interface: din and dout are whole frames, element 0 first; combinational.
// The document names a de-interleaver without giving its insides; the
// inverse of the interleaver is the only permutation that works here.
module block_deinterleaver
  import turbo_pkg::*;
#(
  parameter type         T    = logic [0:0],
  parameter int unsigned ROWS = IL_ROWS,
  parameter int unsigned COLS = IL_COLS
) (
  input  T din  [ROWS*COLS],
  output T dout [ROWS*COLS]
);

  for (genvar k = 0; k < ROWS*COLS; k++) begin : g_perm
    assign dout[il_source(k, ROWS, COLS)] = din[k];
  end

endmodule
