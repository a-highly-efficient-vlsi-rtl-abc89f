// cm_regfile: register half of the hybrid context-model memory.
//
// Holds every CM set of which two members may be used by one two-bin decoding
// step (mb_type, sub_mb_type, mvd, ref_idx, mb_qp_delta, intra prediction,
// coded_block_pattern, significant_coeff_flag and the later bins of
// coeff_abs_level_minus1): 254 words of 7 bits. Two read ports and two write
// ports serve, for example, SIG[i] and SIG[i+1] of a significance map while
// two updated CMs are written back in the same cycle.
//
// Timing: like cm_sram, read addresses are captured at the clock edge and the
// words appear in the next cycle, including any write made at that edge.
// If both write ports address the same word, port 2 wins (the second bin's
// update is the later one). No reset; the initialisation sequence writes all
// words at the start of a slice.
//
// Depth, contents and the two read and two write ports follow the architecture.
// The read timing and the collision rule are this design's own choices.
module cm_regfile
  import cabac_pkg::*;
#(
  parameter int unsigned DEPTH = REG_DEPTH,
  parameter int unsigned AW    = REG_AW
) (
  input  logic          clk,
  input  logic          rd_en_i,
  input  logic [AW-1:0] rd_addr1_i,
  input  logic [AW-1:0] rd_addr2_i,
  output cm_t           rd_data1_o,
  output cm_t           rd_data2_o,
  input  logic          wr_en1_i,
  input  logic [AW-1:0] wr_addr1_i,
  input  cm_t           wr_data1_i,
  input  logic          wr_en2_i,
  input  logic [AW-1:0] wr_addr2_i,
  input  cm_t           wr_data2_i
);

  cm_t           regs [DEPTH];
  logic [AW-1:0] rd_addr1_q, rd_addr2_q;

  always_ff @(posedge clk) begin
    if (rd_en_i) begin
      rd_addr1_q <= rd_addr1_i;
      rd_addr2_q <= rd_addr2_i;
    end
    for (int unsigned i = 0; i < DEPTH; i++) begin
      if (wr_en2_i && int'(wr_addr2_i) == int'(i))      regs[i] <= wr_data2_i;
      else if (wr_en1_i && int'(wr_addr1_i) == int'(i)) regs[i] <= wr_data1_i;
    end
  end

  assign rd_data1_o = (int'(rd_addr1_q) < int'(DEPTH)) ? regs[rd_addr1_q] : '0;
  assign rd_data2_o = (int'(rd_addr2_q) < int'(DEPTH)) ? regs[rd_addr2_q] : '0;

endmodule
