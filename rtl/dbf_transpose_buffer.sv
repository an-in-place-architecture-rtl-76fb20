// dbf_transpose_buffer: the 4x4 transpose register array.
//
// Sixteen 8-bit registers M[row][col]. The array is accessed by slot: in row
// direction (dir_i = 0) slot s is M[s][0..3], in column direction (dir_i = 1)
// slot s is M[0..3][s]; element i of a slot is word bits [8*i +: 8].
// In one cycle the slot selected by slot_i is read combinationally on
// rd_data_o and, if wr_i is high, overwritten with wr_data_i on the clock
// edge. Because read and write use the same slot, a block can be streamed
// out while the next one streams in, with no double buffer: four words
// written in one direction and read back in the other direction come out
// transposed (rows become columns and the other way round); read back in the
// same direction they come out unchanged, one block later.
//
// Reset clears the array. No latency beyond the register itself.
// The 4x4 register array for transposition follows the reference
// architecture; accessing it by slots with a direction bit, reading and
// writing the same slot in one cycle, is this design's way of doing it.
module dbf_transpose_buffer
  import dbf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dir_i,     // 0: row slots, 1: column slots
  input  logic [1:0] slot_i,
  input  logic       wr_i,
  input  word_t      wr_data_i,
  output word_t      rd_data_o
);

  pix_t m [4][4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (dir_i) rd_data_o[PIX_W*i +: PIX_W] = m[i][slot_i];
      else       rd_data_o[PIX_W*i +: PIX_W] = m[slot_i][i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) m[r][c] <= '0;
    end else if (wr_i) begin
      for (int i = 0; i < 4; i++) begin
        if (dir_i) m[i][slot_i] <= wr_data_i[PIX_W*i +: PIX_W];
        else       m[slot_i][i] <= wr_data_i[PIX_W*i +: PIX_W];
      end
    end
  end

endmodule
