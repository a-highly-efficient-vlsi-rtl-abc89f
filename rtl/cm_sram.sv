// cm_sram: dual-port SRAM half of the hybrid context-model memory.
//
// Holds the CMs of which at most one is ever needed by a two-bin decoding step
// (mb_type SI prefix, mb_skip_flag, mb_field_decoding_flag, coded_block_flag,
// last_significant_coeff_flag, the first bin of coeff_abs_level_minus1 and
// transform_size_8x8_flag): 205 words of 7 bits (6-bit state, MPS).
// One read port and one write port work in the same cycle, so the context
// load of the next step and the update of the current step never collide.
//
// Timing: the read address is captured at the rising clock edge (like the
// address latch of a synchronous SRAM, and here also the pipeline register
// between the context-selection and decoding stages); the word appears during
// the following cycle. A write at the same edge is visible to that read
// (write-first), which removes the read-after-write hazard between a CM update
// and the load of the same CM one cycle later. The memory has no reset; every
// word is written by the initialisation sequence at the start of a slice.
//
// Depth, contents and the one-read/one-write ports follow the architecture.
// The read timing and write-first behaviour are this design's own choices.
module cm_sram
  import cabac_pkg::*;
#(
  parameter int unsigned DEPTH = SRAM_DEPTH,
  parameter int unsigned AW    = SRAM_AW
) (
  input  logic          clk,
  input  logic          rd_en_i,     // capture a new read address
  input  logic [AW-1:0] rd_addr_i,
  output cm_t           rd_data_o,
  input  logic          wr_en_i,
  input  logic [AW-1:0] wr_addr_i,
  input  cm_t           wr_data_i
);

  cm_t           mem [DEPTH];
  logic [AW-1:0] rd_addr_q;

  always_ff @(posedge clk) begin
    if (rd_en_i) rd_addr_q <= rd_addr_i;
    if (wr_en_i && (int'(wr_addr_i) < int'(DEPTH))) mem[wr_addr_i] <= wr_data_i;
  end

  assign rd_data_o = (int'(rd_addr_q) < int'(DEPTH)) ? mem[rd_addr_q] : '0;

endmodule
