// dbf_shift_buffer: the 4x4 shift buffer, four 32-bit words deep.
//
// It holds the block on the left of the vertical edge being filtered, one
// row per word, oldest row at the head. With shift_i high the head word is
// presented on data_o (combinationally, in the same cycle) and the word on
// data_i enters at the tail on the clock edge. Over the four cycles of an
// edge the buffer therefore hands out rows 0..3 of the stored block while it
// fills with rows 0..3 of the next block (the filtered right-hand block, or
// a block loaded from the input port).
//
// Contents are cleared by reset; with shift_i low nothing moves.
// The 4x4 shift buffer and its role follow the reference architecture; the
// reset and the enable are this design's choices.
module dbf_shift_buffer
  import dbf_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  shift_i,
  input  word_t data_i,
  output word_t data_o
);

  word_t q [DEPTH];

  assign data_o = q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (shift_i) begin
      for (int i = 0; i < DEPTH - 1; i++) q[i] <= q[i+1];
      q[DEPTH-1] <= data_i;
    end
  end

endmodule
