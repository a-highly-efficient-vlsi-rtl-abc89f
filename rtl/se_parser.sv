// se_parser: syntax-element parsing flow of the residual data of a slice.
//
// Walks the residual branch of the parsing flow block by block. Each
// macroblock starts with mb_skip_flag; a skipped macroblock is followed
// directly by end_of_slice_flag, any other by mb_qp_delta (the SEs between the
// two are outside this design); then, per block: coded_block_flag; if set, the merged significance map; then, for each
// significant coefficient in reverse scan order, coeff_abs_level_minus1 and
// coeff_sign_flag; after the last block of a macroblock, end_of_slice_flag,
// whose value 1 ends the slice, while 0 starts the next macroblock. Block descriptors (ctxBlockCat, the
// neighbour-derived ctxIdxInc of coded_block_flag, last-block-of-macroblock
// flag) arrive on blk_*_i; the parser latches one and pulses blk_take_o when
// it moves on to that block's coded_block_flag. Likewise the neighbour-derived
// ctxIdxInc of the next macroblock's mb_skip_flag arrives on mb_skip_inc_i and
// is latched with a pulse of mb_take_o. It also keeps the per-block
// counts of decoded levels equal to 1 and greater than 1 that select the
// contexts of coeff_abs_level_minus1, and whether the previous macroblock's
// mb_qp_delta was non-zero (qpd_nz_o), which selects the context of its first
// bin.
//
// Timing: se_done_i marks the cycle in which the decoder completes an SE
// (value on se_value_i, significant-coefficient count on num_sig_i);
// next_se_o is the actual next SE, combinational in that cycle, and the state
// moves to it at the clock edge. start_i (one cycle) begins a slice.
//
// The residual SE order is the standard's. Taking block descriptors from a port
// in place of the macroblock layer is this design's own choice.
module se_parser
  import cabac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic        se_done_i,
  input  logic [15:0] se_value_i,
  input  logic [4:0]  num_sig_i,
  input  logic [2:0]  blk_cat_i,
  input  logic [1:0]  blk_cbf_inc_i,
  input  logic        blk_last_i,
  output logic        blk_take_o,
  input  logic [1:0]  mb_skip_inc_i,  // next macroblock's mb_skip_flag ctxIdxInc
  output logic        mb_take_o,      // ... taken
  output logic [1:0]  cur_skip_inc_o,
  output se_e         cur_se_o,
  output logic [2:0]  cur_cat_o,
  output logic [1:0]  cur_cbf_inc_o,
  output logic        cur_last_o,
  output logic [4:0]  levels_left_o,
  output logic [3:0]  num_gt1_o,
  output logic [3:0]  num_eq1_o,
  output logic        qpd_nz_o,
  output se_e         next_se_o,
  output logic        slice_end_o     // end_of_slice_flag = 1 decoded this cycle
);

  se_e        cur_q;
  logic [2:0] cat_q;
  logic [1:0] inc_q;
  logic       last_q;
  logic [4:0] left_q;
  logic [3:0] gt1_q, eq1_q;
  logic       qpd_nz_q;
  logic [1:0] skip_inc_q;

  se_e after_block;
  always_comb begin
    after_block = last_q ? SE_EOS : SE_CBF;
    unique case (cur_q)
      SE_CBF:    next_se_o = se_value_i[0] ? SE_SIGMAP : after_block;
      SE_SIGMAP: next_se_o = SE_ABS;
      SE_ABS:    next_se_o = SE_SIGN;
      SE_SIGN:   next_se_o = (left_q > 5'd1) ? SE_ABS : after_block;
      SE_EOS:    next_se_o = se_value_i[0] ? SE_NONE : SE_SKIP;
      SE_SKIP:   next_se_o = se_value_i[0] ? SE_EOS : SE_QPD;
      SE_QPD:    next_se_o = SE_CBF;
      default:   next_se_o = SE_NONE;
    endcase
  end

  assign slice_end_o = se_done_i && (cur_q == SE_EOS) && se_value_i[0];
  assign blk_take_o  = se_done_i && next_se_o == SE_CBF;
  assign mb_take_o   = start_i || (se_done_i && next_se_o == SE_SKIP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q <= SE_NONE; cat_q <= '0; inc_q <= '0; last_q <= 1'b0;
      left_q <= '0; gt1_q <= '0; eq1_q <= '0; qpd_nz_q <= 1'b0;
      skip_inc_q <= '0;
    end else begin
      if (mb_take_o) skip_inc_q <= mb_skip_inc_i;
      if (blk_take_o) begin
        cat_q  <= blk_cat_i;
        inc_q  <= blk_cbf_inc_i;
        last_q <= blk_last_i;
        gt1_q  <= '0;
        eq1_q  <= '0;
      end
      if (start_i) begin
        cur_q    <= SE_SKIP;
        qpd_nz_q <= 1'b0;
      end else if (se_done_i) begin
        cur_q <= next_se_o;
        unique case (cur_q)
          SE_SIGMAP: left_q <= num_sig_i;
          SE_ABS: begin
            if (se_value_i == 16'd0) begin
              if (eq1_q != 4'd15) eq1_q <= eq1_q + 4'd1;
            end else if (gt1_q != 4'd15) gt1_q <= gt1_q + 4'd1;
          end
          SE_SIGN: left_q <= left_q - 5'd1;
          SE_QPD:  qpd_nz_q <= (se_value_i != 16'd0);
          SE_SKIP: if (se_value_i[0]) qpd_nz_q <= 1'b0;   // skipped: no delta
          default: ;
        endcase
      end
    end
  end

  assign cur_se_o      = cur_q;
  assign cur_cat_o     = cat_q;
  assign cur_cbf_inc_o = inc_q;
  assign cur_last_o    = last_q;
  assign levels_left_o = left_q;
  assign num_gt1_o     = gt1_q;
  assign num_eq1_o     = eq1_q;
  assign qpd_nz_o      = qpd_nz_q;
  assign cur_skip_inc_o = skip_inc_q;

endmodule
