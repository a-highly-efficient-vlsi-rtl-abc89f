// cabac_pkg: types, constants and table functions shared by the CABAC decoder.
//
// A context model (CM) is a 6-bit probability state plus the value of the most
// probable symbol, 7 bits in all. The 459 CMs of H.264/AVC are split into a
// 205-entry dual-port SRAM and a 254-entry register file; cm_loc() gives the
// memory and address of every ctxIdx following that split. The R_LPS table and
// the state transition tables are the fixed tables of the H.264/AVC arithmetic
// coder; they are written here as case functions so that a synthesizer maps
// them to logic. The syntax-element (SE) set covers the residual-block part of
// the parsing flow: mb_skip_flag, mb_qp_delta, coded_block_flag, the merged significance
// map, coeff_abs_level_minus1, coeff_sign_flag and end_of_slice_flag.
//
// The memory split and its address map follow the architecture's tables. The
// R_LPS, transition and ctxIdx-offset values come from H.264/AVC.
package cabac_pkg;

  localparam int unsigned NUM_CM      = 459;  // context models held in memory
  localparam int unsigned SRAM_DEPTH  = 205;  // CMs in the dual-port SRAM
  localparam int unsigned REG_DEPTH   = 254;  // CMs in the register file
  localparam int unsigned SRAM_AW     = 8;
  localparam int unsigned REG_AW      = 8;
  localparam int unsigned WIN_BITS    = 16;   // look-ahead bits given to the engine
  localparam int unsigned MAX_SHIFT   = 14;   // most bits two bins can consume

  typedef struct packed {
    logic [5:0] state;
    logic       mps;
  } cm_t;

  typedef enum logic [1:0] {
    BIN_NONE = 2'd0,
    BIN_REG  = 2'd1,
    BIN_BYP  = 2'd2,
    BIN_TERM = 2'd3
  } bin_kind_e;

  typedef enum logic [2:0] {
    SE_NONE   = 3'd0,
    SE_CBF    = 3'd1,  // coded_block_flag
    SE_SIGMAP = 3'd2,  // significant_coeff_flag + last_significant_coeff_flag, merged
    SE_ABS    = 3'd3,  // coeff_abs_level_minus1
    SE_SIGN   = 3'd4,  // coeff_sign_flag
    SE_EOS    = 3'd5,  // end_of_slice_flag
    SE_QPD    = 3'd6,  // mb_qp_delta
    SE_SKIP   = 3'd7   // mb_skip_flag (P slices)
  } se_e;

  // Where the first bin's CM comes from, and the two candidates of the second
  // bin (one for each value of the first bin).
  typedef enum logic [1:0] {
    SRC_S  = 2'd0,  // SRAM read port
    SRC_R1 = 2'd1,  // register read port 1
    SRC_R2 = 2'd2,  // register read port 2
    SRC_U1 = 2'd3   // the first bin's own CM after its update
  } cm_src_e;

  // Location of a CM in the hybrid memory.
  typedef struct packed {
    logic       in_reg;
    logic [7:0] addr;
  } cm_loc_t;

  // ctxIdxOffset of the residual SEs (frame coded, ctxBlockCat 0..4).
  localparam int unsigned SKIP_OFS = 11;   // mb_skip_flag, P/SP slices
  localparam int unsigned QPD_OFS  = 60;   // mb_qp_delta
  localparam int unsigned CBF_OFS  = 85;
  localparam int unsigned SIG_OFS  = 105;
  localparam int unsigned LAST_OFS = 166;
  localparam int unsigned ABS_OFS  = 227;

  function automatic logic [4:0] cbf_cat_ofs(input logic [2:0] cat);
    return 5'(4 * cat);
  endfunction

  function automatic logic [5:0] sig_cat_ofs(input logic [2:0] cat);
    case (cat)
      3'd0:    return 6'd0;
      3'd1:    return 6'd15;
      3'd2:    return 6'd29;
      3'd3:    return 6'd44;
      default: return 6'd47;
    endcase
  endfunction

  function automatic logic [5:0] abs_cat_ofs(input logic [2:0] cat);
    case (cat)
      3'd0:    return 6'd0;
      3'd1:    return 6'd10;
      3'd2:    return 6'd20;
      3'd3:    return 6'd30;
      default: return 6'd39;
    endcase
  endfunction

  // maxNumCoeff of each ctxBlockCat (4:2:0 chroma DC has 4 coefficients).
  function automatic logic [4:0] max_num_coeff(input logic [2:0] cat);
    case (cat)
      3'd0:    return 5'd16;
      3'd1:    return 5'd15;
      3'd2:    return 5'd16;
      3'd3:    return 5'd4;
      default: return 5'd15;
    endcase
  endfunction

  // ctxIdx -> memory and address, following the reorganised CM map.
  function automatic cm_loc_t cm_loc(input logic [8:0] c);
    int unsigned i;
    i = int'(c);
    // dual-port SRAM
    if (i <= 2)                  return '{1'b0, 8'(i)};
    if (i >= 11  && i <= 13)     return '{1'b0, 8'(i - 11 + 3)};
    if (i >= 24  && i <= 26)     return '{1'b0, 8'(i - 24 + 6)};
    if (i >= 70  && i <= 72)     return '{1'b0, 8'(i - 70 + 9)};
    if (i >= 85  && i <= 104)    return '{1'b0, 8'(i - 85 + 12)};
    if (i >= 166 && i <= 226)    return '{1'b0, 8'(i - 166 + 32)};
    if (i >= 338 && i <= 398)    return '{1'b0, 8'(i - 338 + 93)};
    if (i >= 417 && i <= 425)    return '{1'b0, 8'(i - 417 + 154)};
    if (i >= 451 && i <= 459)    return '{1'b0, 8'(i - 451 + 163)};
    if (i >= 227 && i <= 231)    return '{1'b0, 8'(i - 227 + 172)};
    if (i >= 237 && i <= 241)    return '{1'b0, 8'(i - 237 + 177)};
    if (i >= 247 && i <= 251)    return '{1'b0, 8'(i - 247 + 182)};
    if (i >= 257 && i <= 261)    return '{1'b0, 8'(i - 257 + 187)};
    if (i >= 266 && i <= 270)    return '{1'b0, 8'(i - 266 + 192)};
    if (i >= 426 && i <= 430)    return '{1'b0, 8'(i - 426 + 197)};
    if (i >= 399 && i <= 401)    return '{1'b0, 8'(i - 399 + 202)};
    // register file
    if (i >= 3   && i <= 10)     return '{1'b1, 8'(i - 3)};
    if (i >= 14  && i <= 23)     return '{1'b1, 8'(i - 14 + 8)};
    if (i >= 27  && i <= 69)     return '{1'b1, 8'(i - 27 + 18)};
    if (i >= 73  && i <= 84)     return '{1'b1, 8'(i - 73 + 61)};
    if (i >= 105 && i <= 165)    return '{1'b1, 8'(i - 105 + 73)};
    if (i >= 277 && i <= 337)    return '{1'b1, 8'(i - 277 + 134)};
    if (i >= 402 && i <= 416)    return '{1'b1, 8'(i - 402 + 195)};
    if (i >= 436 && i <= 450)    return '{1'b1, 8'(i - 436 + 210)};
    if (i >= 232 && i <= 236)    return '{1'b1, 8'(i - 232 + 225)};
    if (i >= 242 && i <= 246)    return '{1'b1, 8'(i - 242 + 230)};
    if (i >= 252 && i <= 256)    return '{1'b1, 8'(i - 252 + 235)};
    if (i >= 262 && i <= 265)    return '{1'b1, 8'(i - 262 + 240)};
    if (i >= 271 && i <= 275)    return '{1'b1, 8'(i - 271 + 244)};
    if (i >= 431 && i <= 435)    return '{1'b1, 8'(i - 431 + 249)};
    return '{1'b1, 8'd255};      // ctxIdx 276 (end_of_slice_flag) has no CM
  endfunction

  // rangeTabLPS[state][qIdx] of H.264/AVC, four 8-bit values per state.
  function automatic logic [31:0] rlps_row(input logic [5:0] s);
    case (s)
      6'd0:  return {8'd240, 8'd208, 8'd176, 8'd128};
      6'd1:  return {8'd227, 8'd197, 8'd167, 8'd128};
      6'd2:  return {8'd216, 8'd187, 8'd158, 8'd128};
      6'd3:  return {8'd205, 8'd178, 8'd150, 8'd123};
      6'd4:  return {8'd195, 8'd169, 8'd142, 8'd116};
      6'd5:  return {8'd185, 8'd160, 8'd135, 8'd111};
      6'd6:  return {8'd175, 8'd152, 8'd128, 8'd105};
      6'd7:  return {8'd166, 8'd144, 8'd122, 8'd100};
      6'd8:  return {8'd158, 8'd137, 8'd116, 8'd95};
      6'd9:  return {8'd150, 8'd130, 8'd110, 8'd90};
      6'd10: return {8'd142, 8'd123, 8'd104, 8'd85};
      6'd11: return {8'd135, 8'd117, 8'd99,  8'd81};
      6'd12: return {8'd128, 8'd111, 8'd94,  8'd77};
      6'd13: return {8'd122, 8'd105, 8'd89,  8'd73};
      6'd14: return {8'd116, 8'd100, 8'd85,  8'd69};
      6'd15: return {8'd110, 8'd95,  8'd80,  8'd66};
      6'd16: return {8'd104, 8'd90,  8'd76,  8'd62};
      6'd17: return {8'd99,  8'd86,  8'd72,  8'd59};
      6'd18: return {8'd94,  8'd81,  8'd69,  8'd56};
      6'd19: return {8'd89,  8'd77,  8'd65,  8'd53};
      6'd20: return {8'd85,  8'd73,  8'd62,  8'd51};
      6'd21: return {8'd80,  8'd69,  8'd59,  8'd48};
      6'd22: return {8'd76,  8'd66,  8'd56,  8'd46};
      6'd23: return {8'd72,  8'd63,  8'd53,  8'd43};
      6'd24: return {8'd69,  8'd59,  8'd50,  8'd41};
      6'd25: return {8'd65,  8'd56,  8'd48,  8'd39};
      6'd26: return {8'd62,  8'd54,  8'd45,  8'd37};
      6'd27: return {8'd59,  8'd51,  8'd43,  8'd35};
      6'd28: return {8'd56,  8'd48,  8'd41,  8'd33};
      6'd29: return {8'd53,  8'd46,  8'd39,  8'd32};
      6'd30: return {8'd50,  8'd43,  8'd37,  8'd30};
      6'd31: return {8'd48,  8'd41,  8'd35,  8'd29};
      6'd32: return {8'd45,  8'd39,  8'd33,  8'd27};
      6'd33: return {8'd43,  8'd37,  8'd31,  8'd26};
      6'd34: return {8'd41,  8'd35,  8'd30,  8'd24};
      6'd35: return {8'd39,  8'd33,  8'd28,  8'd23};
      6'd36: return {8'd37,  8'd32,  8'd27,  8'd22};
      6'd37: return {8'd35,  8'd30,  8'd26,  8'd21};
      6'd38: return {8'd33,  8'd29,  8'd24,  8'd20};
      6'd39: return {8'd31,  8'd27,  8'd23,  8'd19};
      6'd40: return {8'd30,  8'd26,  8'd22,  8'd18};
      6'd41: return {8'd28,  8'd25,  8'd21,  8'd17};
      6'd42: return {8'd27,  8'd23,  8'd20,  8'd16};
      6'd43: return {8'd25,  8'd22,  8'd19,  8'd15};
      6'd44: return {8'd24,  8'd21,  8'd18,  8'd14};
      6'd45: return {8'd23,  8'd20,  8'd17,  8'd14};
      6'd46: return {8'd22,  8'd19,  8'd16,  8'd13};
      6'd47: return {8'd21,  8'd18,  8'd15,  8'd12};
      6'd48: return {8'd20,  8'd17,  8'd14,  8'd12};
      6'd49: return {8'd19,  8'd16,  8'd14,  8'd11};
      6'd50: return {8'd18,  8'd15,  8'd13,  8'd11};
      6'd51: return {8'd17,  8'd15,  8'd12,  8'd10};
      6'd52: return {8'd16,  8'd14,  8'd12,  8'd10};
      6'd53: return {8'd15,  8'd13,  8'd11,  8'd9};
      6'd54: return {8'd14,  8'd12,  8'd11,  8'd9};
      6'd55: return {8'd14,  8'd12,  8'd10,  8'd8};
      6'd56: return {8'd13,  8'd11,  8'd9,   8'd8};
      6'd57: return {8'd12,  8'd11,  8'd9,   8'd7};
      6'd58: return {8'd12,  8'd10,  8'd9,   8'd7};
      6'd59: return {8'd11,  8'd10,  8'd8,   8'd7};
      6'd60: return {8'd11,  8'd9,   8'd8,   8'd6};
      6'd61: return {8'd10,  8'd9,   8'd7,   8'd6};
      6'd62: return {8'd9,   8'd8,   8'd7,   8'd6};
      default: return {8'd2, 8'd2,   8'd2,   8'd2};
    endcase
  endfunction

  function automatic logic [7:0] rlps(input logic [5:0] s, input logic [1:0] q);
    logic [31:0] row;
    row = rlps_row(s);
    return row[8*q +: 8];
  endfunction

  // transIdxLPS of H.264/AVC.
  function automatic logic [5:0] trans_lps(input logic [5:0] s);
    case (s)
      6'd0, 6'd1:                         return 6'd0;
      6'd2:                               return 6'd1;
      6'd3, 6'd4:                         return 6'd2;
      6'd5, 6'd6:                         return 6'd4;
      6'd7:                               return 6'd5;
      6'd8:                               return 6'd6;
      6'd9:                               return 6'd7;
      6'd10:                              return 6'd8;
      6'd11, 6'd12:                       return 6'd9;
      6'd13, 6'd14:                       return 6'd11;
      6'd15:                              return 6'd12;
      6'd16, 6'd17:                       return 6'd13;
      6'd18, 6'd19:                       return 6'd15;
      6'd20, 6'd21:                       return 6'd16;
      6'd22, 6'd23:                       return 6'd18;
      6'd24, 6'd25:                       return 6'd19;
      6'd26, 6'd27:                       return 6'd21;
      6'd28, 6'd29:                       return 6'd22;
      6'd30:                              return 6'd23;
      6'd31, 6'd32:                       return 6'd24;
      6'd33:                              return 6'd25;
      6'd34, 6'd35:                       return 6'd26;
      6'd36, 6'd37:                       return 6'd27;
      6'd38:                              return 6'd28;
      6'd39, 6'd40:                       return 6'd29;
      6'd41, 6'd42, 6'd43:                return 6'd30;
      6'd44:                              return 6'd31;
      6'd45, 6'd46:                       return 6'd32;
      6'd47, 6'd48, 6'd49:                return 6'd33;
      6'd50, 6'd51:                       return 6'd34;
      6'd52, 6'd53, 6'd54:                return 6'd35;
      6'd55, 6'd56, 6'd57:                return 6'd36;
      6'd58, 6'd59, 6'd60:                return 6'd37;
      6'd61, 6'd62:                       return 6'd38;
      default:                            return 6'd63;
    endcase
  endfunction

  function automatic logic [5:0] trans_mps(input logic [5:0] s);
    return (s >= 6'd62) ? s : s + 6'd1;
  endfunction

  // Updated CM after decoding bin value b with model m (the CM trans table).
  function automatic cm_t cm_next(input cm_t m, input logic b);
    cm_t r;
    if (b == m.mps) begin
      r.state = trans_mps(m.state);
      r.mps   = m.mps;
    end else begin
      r.state = trans_lps(m.state);
      r.mps   = (m.state == 6'd0) ? ~m.mps : m.mps;
    end
    return r;
  endfunction

  // Renormalisation shift of an LPS interval: leading zeros of the 9-bit value
  // (the ShiftNum table, expressed through its R_LPS entry).
  function automatic logic [2:0] lps_shift(input logic [7:0] r);
    if (r[7]) return 3'd1;
    if (r[6]) return 3'd2;
    if (r[5]) return 3'd3;
    if (r[4]) return 3'd4;
    if (r[3]) return 3'd5;
    if (r[2]) return 3'd6;
    return 3'd7;
  endfunction

  // ---------------- binarization matching ----------------
  // Decoding state of the SE in progress. For the merged significance map,
  // bin 2i is significant_coeff_flag[i] and bin 2i+1 is
  // last_significant_coeff_flag[i]. For coeff_abs_level_minus1 (UEG0, prefix
  // cut-off 14) eg_phase is 0 in the truncated-unary prefix, 1 in the unary
  // part of the 0th-order Exp-Golomb suffix and 2 in its fixed-length part.
  typedef struct packed {
    logic [5:0]  bin_idx;
    logic        done;
    logic [15:0] sig_map;    // significant coefficients, bit i = scan position i
    logic [4:0]  num_sig;
    logic [1:0]  eg_phase;
    logic [3:0]  eg_k;
    logic [3:0]  eg_left;
    logic [15:0] value;      // SE value being built
  } bm_state_t;

  // State after one more bin b of SE se (maxn = maxNumCoeff of the block).
  function automatic bm_state_t bm_advance(input se_e se, input logic [4:0] maxn,
                                           input bm_state_t st, input logic b);
    bm_state_t n;
    logic [4:0] i;
    n = st;
    i = 5'(st.bin_idx[5:1]);
    n.bin_idx = (st.bin_idx == 6'd63) ? 6'd63 : st.bin_idx + 6'd1;
    unique case (se)
      SE_SIGMAP: begin
        if (!st.bin_idx[0]) begin                      // SIG[i]
          if (b) begin
            n.sig_map[i[3:0]] = 1'b1;
            n.num_sig = st.num_sig + 5'd1;             // next: LAST[i], binIdx + 1
          end else begin
            n.bin_idx = st.bin_idx + 6'd2;             // next: SIG[i+1], binIdx + 2
            if (i == maxn - 5'd2) begin                // last position inferred
              n.done = 1'b1;
              n.sig_map[4'(maxn - 5'd1)] = 1'b1;
              n.num_sig = st.num_sig + 5'd1;
            end
          end
        end else begin                                 // LAST[i]
          if (b) n.done = 1'b1;
          else if (i == maxn - 5'd2) begin
            n.done = 1'b1;
            n.sig_map[4'(maxn - 5'd1)] = 1'b1;
            n.num_sig = st.num_sig + 5'd1;
          end
        end
      end
      SE_ABS: begin
        unique case (st.eg_phase)
          2'd0: begin
            if (!b) n.done = 1'b1;
            else begin
              n.value = st.value + 16'd1;
              if (st.value == 16'd13) begin
                n.eg_phase = 2'd1;
                n.eg_k     = 4'd0;
              end
            end
          end
          2'd1: begin
            if (b) begin
              n.value = st.value + (16'd1 << st.eg_k);
              n.eg_k  = st.eg_k + 4'd1;
            end else if (st.eg_k == 4'd0) n.done = 1'b1;
            else begin
              n.eg_phase = 2'd2;
              n.eg_left  = st.eg_k;
            end
          end
          default: begin
            n.value   = st.value + (16'(b) << (st.eg_left - 4'd1));
            n.eg_left = st.eg_left - 4'd1;
            if (st.eg_left == 4'd1) n.done = 1'b1;
          end
        endcase
      end
      SE_QPD: begin                                    // unary
        if (!b) n.done = 1'b1;
        else    n.value = st.value + 16'd1;
      end
      default: begin                                   // one-bin SEs
        n.value = 16'(b);
        n.done  = 1'b1;
      end
    endcase
    return n;
  endfunction

  localparam bm_state_t BM_FRESH = '0;

  // Bin-index step to the second bin of a decoding step, for a first bin of
  // value b: 0 when the SE is complete after the first bin, else 1 or 2.
  function automatic logic [1:0] bm_step2(input se_e se, input logic [4:0] maxn,
                                          input bm_state_t st, input logic b);
    bm_state_t n;
    n = bm_advance(se, maxn, st, b);
    if (n.done) return 2'd0;
    return 2'(n.bin_idx - st.bin_idx);
  endfunction

endpackage
