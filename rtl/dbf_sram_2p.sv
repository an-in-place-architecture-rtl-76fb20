// dbf_sram_2p: the on-chip two-port buffer, 16 words of 32 bits.
//
// One synchronous read port and one write port, as an ordinary two-port
// SRAM: a read address sampled at a clock edge gives its word on rd_data_o
// after that edge (one cycle latency); a write takes effect at the edge.
// The core keeps four 4x4 blocks here in column-major order, block slot k at
// addresses 4k..4k+3. The schedule never reads and writes the same address
// in one cycle; if it did, the read would return the old word.
//
// Written as a register array so that it simulates and synthesises as is;
// in silicon it would be replaced by an SRAM macro with the same ports.
module dbf_sram_2p
  import dbf_pkg::*;
#(
  parameter int unsigned DEPTH = SRAM_DEPTH,
  parameter int unsigned AW    = SRAM_AW
) (
  input  logic          clk,
  input  logic          rd_en_i,
  input  logic [AW-1:0] rd_addr_i,
  output word_t         rd_data_o,
  input  logic          wr_en_i,
  input  logic [AW-1:0] wr_addr_i,
  input  word_t         wr_data_i
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en_i) rd_data_o <= mem[rd_addr_i];
    if (wr_en_i) mem[wr_addr_i] <= wr_data_i;
  end

endmodule
