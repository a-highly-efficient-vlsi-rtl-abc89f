// se_predictor: predicts the type of the SE that follows the one in progress.
//
// Where the parsing flow's next SE does not depend on the value being decoded
// (significance map -> coeff_abs_level_minus1 -> coeff_sign_flag, and the level
// loop, whose length is known from the significance map) the prediction is
// exact. Where it does depend on the value (after coded_block_flag, and after
// end_of_slice_flag) the value of the same SE in the neighbouring, previously
// decoded block, as held in the SE register, is assumed to repeat: a neighbour
// with coded_block_flag = 1 predicts a significance map, otherwise the next
// block's coded_block_flag (or end_of_slice_flag after the last block of a
// macroblock); after end_of_slice_flag the slice is predicted to continue with
// the next macroblock's mb_skip_flag. After mb_skip_flag the left macroblock's
// mb_skip_flag is assumed to repeat: skipped predicts end_of_slice_flag, not
// skipped predicts mb_qp_delta, which is always followed by the first block's
// coded_block_flag.
// Combinational.
//
// Predicting from neighbouring SE values follows the architecture. The
// per-SE rules written here are this design's own.
module se_predictor
  import cabac_pkg::*;
(
  input  se_e        cur_se_i,
  input  logic       left_cbf_i,     // neighbour's coded_block_flag (SE register)
  input  logic       left_skip_i,    // left macroblock's mb_skip_flag (SE register)
  input  logic       blk_last_i,     // the current block ends its macroblock
  input  logic [4:0] levels_left_i,  // levels of the block not yet complete
  output se_e        pred_se_o
);

  se_e after_block;

  always_comb begin
    after_block = blk_last_i ? SE_EOS : SE_CBF;
    unique case (cur_se_i)
      SE_CBF:    pred_se_o = left_cbf_i ? SE_SIGMAP : after_block;
      SE_SIGMAP: pred_se_o = SE_ABS;
      SE_ABS:    pred_se_o = SE_SIGN;
      SE_SIGN:   pred_se_o = (levels_left_i > 5'd1) ? SE_ABS : after_block;
      SE_EOS:    pred_se_o = SE_SKIP;
      SE_SKIP:   pred_se_o = left_skip_i ? SE_EOS : SE_QPD;
      SE_QPD:    pred_se_o = SE_CBF;
      default:   pred_se_o = SE_CBF;
    endcase
  end

endmodule
