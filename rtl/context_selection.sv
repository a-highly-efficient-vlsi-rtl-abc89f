// context_selection: context selection (CS) for three consecutive bin indices.
//
// For a syntax element and a base bin index b it returns, for bins b, b+1 and
// b+2, the kind of bin (regular, bypass or terminate), its ctxIdx and the
// location of that CM in the hybrid memory (SRAM or register file, with
// address). The decoder instantiates it twice: once for the SE in progress,
// with b = the next bin index, and once for the predicted next SE, with b = 0
// (so bins 0, 1 and 2), which lets the first step of the next SE be prepared
// while the current SE is still being decoded.
//
// ctxIdx derivation follows H.264/AVC for frame-coded residual blocks of
// ctxBlockCat 0..4: coded_block_flag uses the neighbour-derived ctxIdxInc
// supplied by the caller; significant/last_significant_coeff_flag use the scan
// position (Min(i, 2) for chroma DC); coeff_abs_level_minus1 uses the counts
// of earlier levels equal to 1 and greater than 1 of the block, its bins from
// 14 on are bypass; coeff_sign_flag is bypass and end_of_slice_flag terminate.
// mb_qp_delta (unary) uses ctxIdx 60 + (previous macroblock's mb_qp_delta != 0)
// for bin 0, 62 for bin 1 and 63 for the rest. mb_skip_flag (P slices) uses
// ctxIdx 11 plus the neighbour-derived ctxIdxInc supplied by the caller.
// Purely combinational.
//
// Using three bin positions per unit, and the two-unit arrangement, follow the
// architecture. The ctxIdx rules themselves are those of the standard.
module context_selection
  import cabac_pkg::*;
(
  input  se_e         se_i,
  input  logic [2:0]  cat_i,          // ctxBlockCat
  input  logic [5:0]  bin_idx_i,      // base bin index b
  input  logic [1:0]  cbf_inc_i,      // ctxIdxInc of coded_block_flag
  input  logic [3:0]  num_gt1_i,      // numDecodAbsLevelGt1 of the block
  input  logic [3:0]  num_eq1_i,      // numDecodAbsLevelEq1 of the block
  input  logic        qpd_nz_i,       // previous macroblock's mb_qp_delta != 0
  input  logic [1:0]  skip_inc_i,     // ctxIdxInc of mb_skip_flag (neighbours)
  output bin_kind_e   kind_o [3],     // bins b, b+1, b+2
  output logic [8:0]  ctx_o  [3],
  output cm_loc_t     loc_o  [3]
);

  function automatic logic [2:0] min3(input logic [3:0] a, input logic [3:0] lim);
    return (a < lim) ? 3'(a) : 3'(lim);
  endfunction

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      logic [5:0] b;
      logic [4:0] i;
      logic [4:0] pos_inc;
      b = bin_idx_i + 6'(k);
      i = b[5:1];
      pos_inc = (cat_i == 3'd3) ? ((i > 5'd2) ? 5'd2 : i) : i;
      kind_o[k] = BIN_REG;
      ctx_o[k]  = 9'd276;
      unique case (se_i)
        SE_CBF:    ctx_o[k] = 9'(CBF_OFS) + 9'(cbf_cat_ofs(cat_i)) + 9'(cbf_inc_i);
        SE_SIGMAP: ctx_o[k] = (b[0] ? 9'(LAST_OFS) : 9'(SIG_OFS)) + 9'(sig_cat_ofs(cat_i)) + 9'(pos_inc);
        SE_ABS: begin
          if (b >= 6'd14) kind_o[k] = BIN_BYP;
          else if (b == 6'd0)
            ctx_o[k] = 9'(ABS_OFS) + 9'(abs_cat_ofs(cat_i)) +
                       ((num_gt1_i != 4'd0) ? 9'd0 : 9'(min3(num_eq1_i + 4'd1, 4'd4)));
          else
            ctx_o[k] = 9'(ABS_OFS) + 9'(abs_cat_ofs(cat_i)) + 9'd5 +
                       9'(min3(num_gt1_i, (cat_i == 3'd3) ? 4'd3 : 4'd4));
        end
        SE_SKIP:   ctx_o[k] = 9'(SKIP_OFS) + 9'(skip_inc_i);
        SE_QPD:    ctx_o[k] = 9'(QPD_OFS) + ((b == 6'd0) ? 9'(qpd_nz_i) : (b == 6'd1) ? 9'd2 : 9'd3);
        SE_SIGN:   kind_o[k] = BIN_BYP;
        SE_EOS:    kind_o[k] = BIN_TERM;
        default:   kind_o[k] = BIN_NONE;
      endcase
      loc_o[k] = cm_loc(ctx_o[k]);
    end
  end

endmodule
