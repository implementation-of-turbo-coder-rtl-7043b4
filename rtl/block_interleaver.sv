// block_interleaver: ROWS x COLS block interleaver on one frame.
//
// The frame is written into a ROWS x COLS array column by column (top to
// bottom, left to right) and read out row by row (left to right, top to
// bottom), so output element k is input element (k % COLS) * ROWS + k / COLS.
// With the default 2 x 4 shape an 8-element frame 0..7 comes out as
// 0 2 4 6 1 3 5 7.  The array is never stored: the frame is held in
// registers by the user and the write/read order collapses into a fixed
// permutation of wires, which costs no logic and no latency.  The same
// module reorders bits in the encoder and soft values in the decoder; the
// element type T is a parameter.
//
// Interface: din and dout are whole frames, element 0 first; combinational.
// The column-write / row-read order follows the document; the 2 x 4 shape is
// this design's choice for an 8-bit frame.
module block_interleaver
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
    assign dout[k] = din[il_source(k, ROWS, COLS)];
  end

endmodule
