// cabac_decoder: prediction-based two-stage pipelined CABAC decoder (top).
//
// The decoder turns the CABAC-coded residual data of a slice into syntax
// element (SE) values, decoding up to two bins per cycle. Every cycle, two
// pipeline stages work side by side:
//
//  MCS (modified context selection): decides which one or two bins the next
//  cycle decodes and loads their context models (CMs). Two context-selection
//  units run in parallel: one for the SE in progress, at the next bin index and
//  the two indices after it, and one for the SE the predictor expects next,
//  at bin indices 0, 1 and 2. The result of binarization matching in the
//  TSBAD stage picks between them: if the SE goes on, the current-SE unit is
//  used; if it ended and the actual next SE equals the prediction, the
//  next-SE unit is used and no cycle is lost; on a misprediction one bubble
//  cycle is inserted, in which the current-SE unit prepares the actual next
//  SE. For the second bin two candidates are prepared, one per value of the
//  first bin (binIdx+1 or binIdx+2 in the merged significance map). Their
//  addresses go to the hybrid CM memory: one SRAM read port (Addr_SRAM) and
//  two register read ports (Addr1_REG, Addr2_REG), with a source selection
//  (CM_sel) telling the next stage which port feeds which bin.
//
//  TSBAD (two-symbol binary arithmetic decoding): selects CM_bin1 and the
//  second-bin candidates from the memory ports, decodes the bins with
//  tsbad_engine, writes the updated CMs back (SRAM write port, two register
//  write ports), updates range and offset, and runs binarization matching.
//
// The CM memory and the registered step descriptor form the pipeline
// register between the stages. The slice starts with slice_start_i: all 459
// CMs are initialised from the external (m, n) table at slice_qp_i, the
// bitstream buffer is filled, range is set to 510 and offset to the first 9
// bits. The slice ends when end_of_slice_flag = 1 is decoded (slice_done_o).
//
// Ports:
//  bs_*      32-bit words of slice data, valid/ready.
//  init_*    (m, n) initialisation-table look-up, combinational.
//  mb_*      ctxIdxInc of the next macroblock's mb_skip_flag (from the
//            neighbours); mb_take_o pulses when it has been taken.
//  blk_*     descriptor of the next residual block (ctxBlockCat, ctxIdxInc of
//            coded_block_flag from the neighbours, last block of its
//            macroblock); blk_take_o pulses when it has been taken.
//  se_*      one decoded SE per pulse of se_valid_o; for the significance map
//            se_value_o is the bitmap of significant scan positions.
//  bins_o, pred_miss_o, fetch_stall_o: per-cycle activity, for performance
//            counting.
//
// The SE coverage is the residual part of the parsing flow (coded_block_flag,
// significance map, coeff_abs_level_minus1, coeff_sign_flag), preceded in
// every macroblock by mb_skip_flag (P slices) and, if not skipped, by
// mb_qp_delta (reported as its unary code number), and followed by
// end_of_slice_flag, for frame-coded 4x4-class blocks
// (ctxBlockCat 0..4).
//
// The two stages, the two context-selection units (bins b..b+2 of the current
// SE, bins 0..2 of the predicted SE), the one-cycle miss penalty and the
// hybrid memory follow the architecture. The step descriptor, the port
// allocation in build(), which lets the second bin take its CM from any read
// port, and forwarding through write-first memories are this design's own.
module cabac_decoder
  import cabac_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slice_start_i,
  input  logic [5:0]        slice_qp_i,
  output logic [8:0]        init_ctx_o,
  input  logic signed [7:0] init_m_i,
  input  logic signed [7:0] init_n_i,
  input  logic              bs_valid_i,
  input  logic [31:0]       bs_data_i,
  output logic              bs_ready_o,
  input  logic [1:0]        mb_skip_inc_i,
  output logic              mb_take_o,
  input  logic [2:0]        blk_cat_i,
  input  logic [1:0]        blk_cbf_inc_i,
  input  logic              blk_last_i,
  output logic              blk_take_o,
  output logic              se_valid_o,
  output se_e               se_type_o,
  output logic [15:0]       se_value_o,
  output logic              slice_done_o,
  output logic              busy_o,
  output logic [1:0]        bins_o,
  output logic              pred_miss_o,
  output logic              fetch_stall_o
);

  // ------------------------------------------------------------------
  // Pipeline step descriptor (MCS -> TSBAD)
  // ------------------------------------------------------------------
  typedef struct packed {
    logic       valid;
    logic       start;      // first step of a new SE
    se_e        se;
    logic [4:0] maxn;
    bin_kind_e  kind1;
    cm_loc_t    loc1;
    bin_kind_e  kind2_0;
    cm_loc_t    loc2_0;
    cm_src_e    src2_0;
    bin_kind_e  kind2_1;
    cm_loc_t    loc2_1;
    cm_src_e    src2_1;
  } step_t;

  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_LOAD, S_RUN, S_DONE
  } phase_e;

  phase_e  phase_q;
  step_t   step_q, step_d;
  logic [8:0] range_q, offset_q;

  // ------------------------------------------------------------------
  // Bitstream
  // ------------------------------------------------------------------
  logic [15:0] win;
  logic        avail;
  logic        consume_en;
  logic [3:0]  consume;

  bitstream_fetcher u_fetch (
    .clk(clk), .rst_n(rst_n), .flush_i(slice_start_i),
    .word_valid_i(bs_valid_i), .word_i(bs_data_i), .word_ready_o(bs_ready_o),
    .win_o(win), .avail_o(avail), .consume_en_i(consume_en), .consume_i(consume)
  );

  // ------------------------------------------------------------------
  // CM initialisation
  // ------------------------------------------------------------------
  logic    init_busy, init_wr_sram, init_wr_reg;
  logic [7:0] init_addr;
  cm_t     init_data;

  cm_init u_init (
    .clk(clk), .rst_n(rst_n), .start_i(slice_start_i), .qp_i(slice_qp_i),
    .init_ctx_o(init_ctx_o), .init_m_i(init_m_i), .init_n_i(init_n_i),
    .busy_o(init_busy), .wr_sram_o(init_wr_sram), .wr_reg_o(init_wr_reg),
    .wr_addr_o(init_addr), .wr_data_o(init_data)
  );

  // ------------------------------------------------------------------
  // Hybrid CM memory
  // ------------------------------------------------------------------
  logic       mem_rd_en;
  logic [7:0] addr_sram, addr1_reg, addr2_reg;
  cm_t        cm_s, cm_r1, cm_r2;
  logic       sram_we, reg_we1, reg_we2;
  logic [7:0] sram_wa, reg_wa1, reg_wa2;
  cm_t        sram_wd, reg_wd1, reg_wd2;

  cm_sram u_sram (
    .clk(clk), .rd_en_i(mem_rd_en), .rd_addr_i(addr_sram), .rd_data_o(cm_s),
    .wr_en_i(sram_we), .wr_addr_i(sram_wa), .wr_data_i(sram_wd)
  );

  cm_regfile u_reg (
    .clk(clk), .rd_en_i(mem_rd_en), .rd_addr1_i(addr1_reg), .rd_addr2_i(addr2_reg),
    .rd_data1_o(cm_r1), .rd_data2_o(cm_r2),
    .wr_en1_i(reg_we1), .wr_addr1_i(reg_wa1), .wr_data1_i(reg_wd1),
    .wr_en2_i(reg_we2), .wr_addr2_i(reg_wa2), .wr_data2_i(reg_wd2)
  );

  // ------------------------------------------------------------------
  // TSBAD stage
  // ------------------------------------------------------------------
  logic adv;          // the pipeline moves this cycle
  logic tsbad_go;     // a valid step is decoded this cycle

  assign adv      = (phase_q == S_RUN) && !(step_q.valid && !avail);
  assign tsbad_go = adv && step_q.valid;

  function automatic cm_t pick_cm(input cm_src_e s, input cm_t s_v, input cm_t r1_v,
                                  input cm_t r2_v);
    unique case (s)
      SRC_S:   return s_v;
      SRC_R1:  return r1_v;
      SRC_R2:  return r2_v;
      default: return '0;
    endcase
  endfunction

  cm_t        cm_bin1, cm2_0, cm2_1;
  logic       bin1, bin2, dec2;
  logic [8:0] r1_n, o1_n, r2_n, o2_n;
  logic [3:0] sh1, sh2;
  cm_t        upd1, upd2;

  assign cm_bin1 = step_q.loc1.in_reg ? cm_r1 : cm_s;
  assign cm2_0   = pick_cm(step_q.src2_0, cm_s, cm_r1, cm_r2);
  assign cm2_1   = pick_cm(step_q.src2_1, cm_s, cm_r1, cm_r2);

  tsbad_engine u_tsbad (
    .range_i(range_q), .offset_i(offset_q), .win_i(win),
    .kind1_i(step_q.valid ? step_q.kind1 : BIN_NONE), .cm1_i(cm_bin1),
    .kind2_0_i(step_q.kind2_0), .cm2_0_i(cm2_0), .same2_0_i(step_q.src2_0 == SRC_U1),
    .kind2_1_i(step_q.kind2_1), .cm2_1_i(cm2_1), .same2_1_i(step_q.src2_1 == SRC_U1),
    .bin1_o(bin1), .bin2_o(bin2), .dec2_o(dec2),
    .range1_o(r1_n), .offset1_o(o1_n), .shift1_o(sh1),
    .range2_o(r2_n), .offset2_o(o2_n), .shift2_o(sh2),
    .cm_upd1_o(upd1), .cm_upd2_o(upd2)
  );

  // binarization matching
  logic        match_raw, match;
  logic [15:0] bm_value, bm_map;
  logic [4:0]  bm_nsig;
  logic [5:0]  next_bin_idx;
  logic [1:0]  step2_0, step2_1;

  binarization_matching u_bm (
    .clk(clk), .rst_n(rst_n), .se_i(step_q.se), .maxn_i(step_q.maxn),
    .start_i(step_q.start), .step_i(tsbad_go), .bin1_i(bin1), .dec2_i(dec2), .bin2_i(bin2),
    .match_o(match_raw), .value_o(bm_value), .sig_map_o(bm_map), .num_sig_o(bm_nsig),
    .next_bin_idx_o(next_bin_idx), .step2_0_o(step2_0), .step2_1_o(step2_1)
  );

  assign match = tsbad_go && match_raw;

  // CM write-back: the second bin's CM is written with the later port, so a
  // second bin that reused the first bin's CM leaves the final value.
  cm_loc_t   loc2_sel;
  bin_kind_e kind2_sel;
  logic      same_sel;
  logic      wb1, wb2;

  always_comb begin
    loc2_sel  = bin1 ? step_q.loc2_1 : step_q.loc2_0;
    kind2_sel = bin1 ? step_q.kind2_1 : step_q.kind2_0;
    same_sel  = bin1 ? (step_q.src2_1 == SRC_U1) : (step_q.src2_0 == SRC_U1);
    wb1       = tsbad_go && (step_q.kind1 == BIN_REG);
    wb2       = tsbad_go && dec2 && (kind2_sel == BIN_REG);

    sram_we = 1'b0; sram_wa = '0; sram_wd = '0;
    reg_we1 = 1'b0; reg_wa1 = '0; reg_wd1 = '0;
    reg_we2 = 1'b0; reg_wa2 = '0; reg_wd2 = '0;
    if (init_busy) begin
      sram_we = init_wr_sram; sram_wa = init_addr; sram_wd = init_data;
      reg_we1 = init_wr_reg;  reg_wa1 = init_addr; reg_wd1 = init_data;
    end else begin
      if (wb1) begin
        if (step_q.loc1.in_reg) begin
          reg_we1 = 1'b1; reg_wa1 = step_q.loc1.addr; reg_wd1 = upd1;
        end else begin
          sram_we = 1'b1; sram_wa = step_q.loc1.addr;
          sram_wd = (wb2 && same_sel) ? upd2 : upd1;
        end
      end
      if (wb2) begin
        if (loc2_sel.in_reg || same_sel) begin
          if (!(same_sel && !step_q.loc1.in_reg)) begin
            reg_we2 = 1'b1; reg_wa2 = loc2_sel.addr; reg_wd2 = upd2;
          end
        end else begin
          sram_we = 1'b1; sram_wa = loc2_sel.addr; sram_wd = upd2;
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // SE parser, SE register, SE predictor
  // ------------------------------------------------------------------
  se_e        cur_se, next_se, pred_se;
  logic [2:0] cur_cat;
  logic [1:0] cur_inc;
  logic       cur_last, slice_end;
  logic [4:0] levels_left;
  logic [3:0] num_gt1, num_eq1;
  logic       qpd_nz;
  logic [1:0] cur_skip_inc, next_skip_inc;
  logic [15:0] left_skip;
  logic [15:0] se_val, left_cbf;

  assign se_val = (step_q.se == SE_SIGMAP) ? bm_map : bm_value;

  se_parser u_parser (
    .clk(clk), .rst_n(rst_n), .start_i(phase_q == S_LOAD && avail),
    .se_done_i(match), .se_value_i(se_val), .num_sig_i(bm_nsig),
    .blk_cat_i(blk_cat_i), .blk_cbf_inc_i(blk_cbf_inc_i), .blk_last_i(blk_last_i),
    .blk_take_o(blk_take_o),
    .mb_skip_inc_i(mb_skip_inc_i), .mb_take_o(mb_take_o), .cur_skip_inc_o(cur_skip_inc),
    .cur_se_o(cur_se), .cur_cat_o(cur_cat),
    .cur_cbf_inc_o(cur_inc), .cur_last_o(cur_last), .levels_left_o(levels_left),
    .num_gt1_o(num_gt1), .num_eq1_o(num_eq1), .qpd_nz_o(qpd_nz), .next_se_o(next_se), .slice_end_o(slice_end)
  );

  se_register u_sereg (
    .clk(clk), .rst_n(rst_n), .clear_i(slice_start_i),
    .wr_en_i(match), .wr_se_i(step_q.se), .wr_value_i(se_val),
    .rd_se_i(SE_CBF), .rd_value_o(left_cbf),
    .rd2_se_i(SE_SKIP), .rd2_value_o(left_skip)
  );

  se_predictor u_pred (
    .cur_se_i(cur_se), .left_cbf_i(left_cbf[0]), .left_skip_i(left_skip[0]), .blk_last_i(cur_last),
    .levels_left_i(levels_left), .pred_se_o(pred_se)
  );

  // ------------------------------------------------------------------
  // MCS stage
  // ------------------------------------------------------------------
  // current-SE context selection: continuing SE, or (after a bubble) the
  // first step of the SE the parser now holds
  logic       cont;
  se_e        cs_cur_se;
  logic [5:0] cs_cur_base;
  bin_kind_e  kc [3], kn [3];
  logic [8:0] cc [3], cn [3];
  cm_loc_t    lc [3], ln [3];
  logic [2:0] next_cat;
  logic [1:0] next_inc;

  assign cont        = step_q.valid && !match_raw;
  assign cs_cur_se   = cont ? step_q.se : cur_se;
  assign cs_cur_base = cont ? next_bin_idx : 6'd0;
  assign next_cat    = (pred_se == SE_CBF) ? blk_cat_i : cur_cat;
  assign next_inc    = (pred_se == SE_CBF) ? blk_cbf_inc_i : cur_inc;
  assign next_skip_inc = (pred_se == SE_SKIP) ? mb_skip_inc_i : cur_skip_inc;

  context_selection u_cs_cur (
    .se_i(cs_cur_se), .cat_i(cur_cat), .bin_idx_i(cs_cur_base), .cbf_inc_i(cur_inc),
    .num_gt1_i(num_gt1), .num_eq1_i(num_eq1), .qpd_nz_i(qpd_nz), .skip_inc_i(cur_skip_inc), .kind_o(kc), .ctx_o(cc), .loc_o(lc)
  );

  context_selection u_cs_next (
    .se_i(pred_se), .cat_i(next_cat), .bin_idx_i(6'd0), .cbf_inc_i(next_inc),
    .num_gt1_i(num_gt1), .num_eq1_i(num_eq1), .qpd_nz_i(qpd_nz), .skip_inc_i(next_skip_inc), .kind_o(kn), .ctx_o(cn), .loc_o(ln)
  );

  // Build a step from a context-selection result and the second-bin plan,
  // and allocate the memory read ports.
  typedef struct packed {
    step_t      st;
    logic [7:0] a_s;
    logic [7:0] a_r1;
    logic [7:0] a_r2;
  } mcs_t;

  function automatic mcs_t build(input se_e se, input logic [4:0] maxn, input logic start,
                                 input bin_kind_e k [3], input logic [8:0] c [3],
                                 input cm_loc_t l [3], input logic [1:0] p0,
                                 input logic [1:0] p1);
    mcs_t       m;
    logic       s_used, r1_used, r2_used;
    logic [1:0] p;
    bin_kind_e  k2;
    cm_src_e    src;
    m = '0;
    m.st.valid = 1'b1;
    m.st.start = start;
    m.st.se    = se;
    m.st.maxn  = maxn;
    m.st.kind1 = k[0];
    m.st.loc1  = l[0];
    s_used  = (k[0] == BIN_REG) && !l[0].in_reg;
    r1_used = (k[0] == BIN_REG) && l[0].in_reg;
    r2_used = 1'b0;
    if (s_used)  m.a_s  = l[0].addr;
    if (r1_used) m.a_r1 = l[0].addr;
    for (int v = 0; v < 2; v++) begin
      p   = (v == 0) ? p0 : p1;
      k2  = (p == 2'd0) ? BIN_NONE : k[p];
      src = SRC_S;
      // pairs the engine decodes: reg+{reg,byp,term}, byp+byp
      if (k[0] == BIN_BYP && k2 != BIN_BYP) k2 = BIN_NONE;
      if (k[0] != BIN_REG && k[0] != BIN_BYP) k2 = BIN_NONE;
      if (k2 == BIN_REG) begin
        if (c[p] == c[0]) src = SRC_U1;
        else if (!l[p].in_reg) begin
          if (!s_used || m.a_s == l[p].addr) begin
            src = SRC_S; s_used = 1'b1; m.a_s = l[p].addr;
          end else k2 = BIN_NONE;
        end else if (!r1_used || m.a_r1 == l[p].addr) begin
          src = SRC_R1; r1_used = 1'b1; m.a_r1 = l[p].addr;
        end else if (!r2_used || m.a_r2 == l[p].addr) begin
          src = SRC_R2; r2_used = 1'b1; m.a_r2 = l[p].addr;
        end else k2 = BIN_NONE;
      end
      if (v == 0) begin
        m.st.kind2_0 = k2; m.st.loc2_0 = l[p]; m.st.src2_0 = src;
      end else begin
        m.st.kind2_1 = k2; m.st.loc2_1 = l[p]; m.st.src2_1 = src;
      end
    end
    return m;
  endfunction

  mcs_t       m_cur, m_next, m_sel;
  logic       hit, miss;

  always_comb begin
    m_cur  = build(cs_cur_se, max_num_coeff(cur_cat), !cont, kc, cc, lc,
                   cont ? step2_0 : bm_step2(cs_cur_se, max_num_coeff(cur_cat), BM_FRESH, 1'b0),
                   cont ? step2_1 : bm_step2(cs_cur_se, max_num_coeff(cur_cat), BM_FRESH, 1'b1));
    m_next = build(pred_se, max_num_coeff(next_cat), 1'b1, kn, cn, ln,
                   bm_step2(pred_se, max_num_coeff(next_cat), BM_FRESH, 1'b0),
                   bm_step2(pred_se, max_num_coeff(next_cat), BM_FRESH, 1'b1));
    hit  = match && (next_se == pred_se) && !slice_end;
    miss = match && (next_se != pred_se) && !slice_end;
    if (step_q.valid && match_raw) m_sel = hit ? m_next : '0;   // bubble on a miss
    else                           m_sel = m_cur;
    if (slice_end || cs_cur_se == SE_NONE) m_sel = '0;
    step_d    = m_sel.st;
    addr_sram = m_sel.a_s;
    addr1_reg = m_sel.a_r1;
    addr2_reg = m_sel.a_r2;
  end

  assign mem_rd_en  = adv;
  assign consume_en = tsbad_go || (phase_q == S_LOAD && avail);
  assign consume    = (phase_q == S_LOAD) ? 4'd9 : sh2;

  // ------------------------------------------------------------------
  // Registers and slice phases
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q  <= S_IDLE;
      step_q   <= '0;
      range_q  <= 9'd510;
      offset_q <= '0;
    end else if (slice_start_i) begin
      phase_q <= S_INIT;
      step_q  <= '0;
    end else begin
      unique case (phase_q)
        S_INIT: if (!init_busy) phase_q <= S_LOAD;
        S_LOAD: if (avail) begin
          range_q  <= 9'd510;
          offset_q <= win[15:7];
          phase_q  <= S_RUN;
          step_q   <= '0;
        end
        S_RUN: begin
          if (adv) step_q <= step_d;
          if (tsbad_go) begin
            range_q  <= r2_n;
            offset_q <= o2_n;
          end
          if (slice_end) phase_q <= S_DONE;
        end
        default: ;
      endcase
    end
  end

  assign se_valid_o    = match;
  assign se_type_o     = step_q.se;
  assign se_value_o    = se_val;
  assign slice_done_o  = (phase_q == S_DONE);
  assign busy_o        = (phase_q != S_IDLE) && (phase_q != S_DONE);
  assign bins_o        = tsbad_go ? (dec2 ? 2'd2 : 2'd1) : 2'd0;
  assign pred_miss_o   = miss;
  assign fetch_stall_o = (phase_q == S_RUN) && step_q.valid && !avail;

endmodule
