// tb_cabac_decoder: end-to-end test of the CABAC decoder at its default
// configuration.
//
// For each slice the testbench draws random residual data (blocks of
// ctxBlockCat 0..4, coded_block_flag values correlated with the previous
// block, significance maps, levels including ones that need the Exp-Golomb
// suffix, signs; per macroblock an mb_skip_flag, for coded macroblocks an
// mb_qp_delta, and an end_of_slice_flag closing each; runs of skipped
// macroblocks), derives every
// ctxIdx with the H.264/AVC rules written out here, initialises its own context
// models from the same (m, n) table, and encodes the bins with the reference
// encoder. The decoder then decodes the slice from 32-bit words delivered
// with random gaps, and every SE it reports is compared, in order, with the
// generated one.
//
// Besides values, it checks timing: every cycle of the decoding phase must be
// a decoding step, a fetch stall, the single start bubble or a one-cycle
// misprediction bubble, so cycles = steps + stalls + misses + 1 per slice.
// It counts each mechanism (reg+reg and byp+byp two-bin steps, SIG+SIG, SIG+LAST
// and LAST+SIG pairs, reuse of the first bin's updated CM, prediction hits and
// misses, fetch stalls, Exp-Golomb suffixes, slice re-initialisation) and
// fails if one never happened. It also prints bins per cycle. (A regular bin
// paired with a bypass bin cannot occur with these SEs, since the 14-bin
// prefix of coeff_abs_level_minus1 is always consumed in pairs; the engine's
// own testbench covers that pairing.)
`timescale 1ns/1ps
module tb_cabac_decoder;
  import cabac_pkg::*;
  import cabac_ref_pkg::*;

  localparam int NSLICES = 3;
  localparam int NBLK    = 300;    // residual blocks per slice

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              slice_start;
  logic [5:0]        slice_qp;
  logic [8:0]        init_ctx;
  logic signed [7:0] init_m, init_n;
  logic              bs_valid, bs_ready;
  logic [31:0]       bs_data;
  logic [2:0]        blk_cat;
  logic [1:0]        blk_inc;
  logic              blk_last, blk_take;
  logic [1:0]        mb_inc;
  logic              mb_take;
  logic              se_valid;
  se_e               se_type;
  logic [15:0]       se_value;
  logic              slice_done, busy, pred_miss, fetch_stall;
  logic [1:0]        nbins;

  cabac_decoder dut (
    .clk(clk), .rst_n(rst_n), .slice_start_i(slice_start), .slice_qp_i(slice_qp),
    .init_ctx_o(init_ctx), .init_m_i(init_m), .init_n_i(init_n),
    .bs_valid_i(bs_valid), .bs_data_i(bs_data), .bs_ready_o(bs_ready),
    .mb_skip_inc_i(mb_inc), .mb_take_o(mb_take),
    .blk_cat_i(blk_cat), .blk_cbf_inc_i(blk_inc), .blk_last_i(blk_last), .blk_take_o(blk_take),
    .se_valid_o(se_valid), .se_type_o(se_type), .se_value_o(se_value),
    .slice_done_o(slice_done), .busy_o(busy), .bins_o(nbins),
    .pred_miss_o(pred_miss), .fetch_stall_o(fetch_stall)
  );

  // ---------------- initialisation table model ----------------
  function automatic int m_of(int c); return ((c * 37) % 61) - 30; endfunction
  function automatic int n_of(int c); return ((c * 53) % 128) - 10; endfunction
  assign init_m = 8'(m_of(int'(init_ctx)));
  assign init_n = 8'(n_of(int'(init_ctx)));

  function automatic cm_t init_cm(int c, int qp);
    int pre;
    cm_t m;
    pre = ((m_of(c) * qp) >>> 4) + n_of(c);
    if (pre < 1) pre = 1;
    if (pre > 126) pre = 126;
    if (pre <= 63) begin m.state = 6'(63 - pre); m.mps = 0; end
    else begin m.state = 6'(pre - 64); m.mps = 1; end
    return m;
  endfunction

  // ---------------- stimulus state ----------------
  typedef struct { se_e t; logic [15:0] v; } exp_t;
  typedef struct { logic [2:0] cat; logic [1:0] inc; bit last; } desc_t;

  cabac_enc enc;
  cm_t      ctx [460];
  exp_t     expq [$];
  desc_t    descs [$];
  int       blk_i;
  localparam int MAXMB = 2048;
  logic [1:0] mtab [MAXMB];        // mb_skip_flag ctxIdxInc per macroblock
  int       nmb, mb_i;
  int       checks = 0, failures = 0;
  int       n_eg = 0;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL %s", m); end
  endtask

  function automatic int maxn_of(int cat);
    case (cat) 0: return 16; 1: return 15; 2: return 16; 3: return 4; default: return 15; endcase
  endfunction
  function automatic int sig_ofs(int cat);
    case (cat) 0: return 0; 1: return 15; 2: return 29; 3: return 44; default: return 47; endcase
  endfunction
  function automatic int abs_ofs(int cat);
    case (cat) 0: return 0; 1: return 10; 2: return 20; 3: return 30; default: return 39; endcase
  endfunction

  task automatic enc_reg(int c, bit b);
    enc.encode_decision(ctx[c], b);
  endtask

  int n_qpd = 0, n_qpd_ctx1 = 0, n_skip = 0;

  // mb_skip_flag of a new macroblock, with the neighbour ctxIdxInc drawn here
  task automatic enc_skip(bit s);
    mtab[nmb] = 2'($urandom_range(2));
    enc_reg(11 + int'(mtab[nmb]), s);
    nmb++;
    expq.push_back('{SE_SKIP, 16'(s)});
  endtask

  task automatic gen_slice(int qp);
    bit prev_cbf, mb_start, prev_qnz, prev_skip;
    int dens;
    // coefficient density in percent: low QP gives dense blocks (a high bit
    // rate), high QP sparse blocks and more skipped macroblocks
    dens = (qp <= 12) ? 80 : (qp <= 20) ? 50 : 25;
    enc = new();
    for (int c = 0; c < 460; c++) ctx[c] = init_cm(c, qp);
    expq.delete();
    descs.delete();
    prev_cbf = 0;
    mb_start = 1;
    prev_qnz = 0;
    prev_skip = 0;
    nmb = 0;
    for (int b = 0; b < NBLK; b++) begin
      desc_t d;
      bit cbf;
      int r;
      if (mb_start) begin
        int q;
        // a run of skipped macroblocks (correlated with the previous one)
        while ((prev_skip ? ($urandom_range(9) < 7) : ($urandom_range(99) < (100 - dens) / 4))
               && nmb < MAXMB - NBLK) begin
          enc_skip(1);
          enc.encode_terminate(0);
          expq.push_back('{SE_EOS, 16'd0});
          n_skip++;
          prev_skip = 1;
          prev_qnz = 0;
        end
        enc_skip(0);
        prev_skip = 0;
        // mb_qp_delta, unary code number
        q = ($urandom_range(9) < 6) ? 0 : $urandom_range(1, 52);
        for (int j = 0; j <= q; j++)
          enc_reg(60 + ((j == 0) ? int'(prev_qnz) : (j == 1) ? 2 : 3), j < q);
        expq.push_back('{SE_QPD, 16'(q)});
        n_qpd++;
        if (prev_qnz) n_qpd_ctx1++;
        prev_qnz = (q != 0);
      end
      r = $urandom_range(9);
      d.cat  = (r < 5) ? 3'd2 : (r < 7) ? 3'd4 : (r < 8) ? 3'd3 : 3'($urandom_range(1));
      d.inc  = 2'($urandom_range(3));
      d.last = (b == NBLK - 1) || ($urandom_range(5) == 0);
      mb_start = d.last;
      descs.push_back(d);
      cbf = ($urandom_range(9) < 8) ? prev_cbf : ($urandom_range(99) < dens);
      prev_cbf = cbf;
      enc_reg(85 + 4 * int'(d.cat) + int'(d.inc), cbf);
      expq.push_back('{SE_CBF, 16'(cbf)});
      if (cbf) begin
        int maxn, last, nsig, gt1, eq1;
        int sigpos[$];
        logic [15:0] map;
        maxn = maxn_of(d.cat);
        map = 0;
        last = $urandom_range(maxn - 1);
        if (dens >= 80) begin
          int l2;
          l2 = $urandom_range(maxn - 1);
          if (l2 > last) last = l2;
        end
        for (int i = 0; i <= last; i++)
          if (i == last || $urandom_range(99) < dens) map[i] = 1;
        for (int i = 0; i <= maxn - 2 && i <= last; i++) begin
          int p;
          p = (d.cat == 3) ? ((i > 2) ? 2 : i) : i;
          enc_reg(105 + sig_ofs(d.cat) + p, map[i]);
          if (map[i]) enc_reg(166 + sig_ofs(d.cat) + p, i == last);
        end
        expq.push_back('{SE_SIGMAP, map});
        gt1 = 0; eq1 = 0;
        for (int i = maxn - 1; i >= 0; i--) if (map[i]) begin
          int lv, c0, c1, k, suf;
          bit sgn;
          r = $urandom_range(99);
          lv = (r < 45) ? 0 : (r < 85) ? $urandom_range(1, 13) : (r < 95) ? $urandom_range(14, 40)
                                                                         : $urandom_range(41, 5000);
          c0 = 227 + abs_ofs(d.cat) + ((gt1 != 0) ? 0 : ((1 + eq1 < 4) ? 1 + eq1 : 4));
          c1 = 227 + abs_ofs(d.cat) + 5 + ((gt1 < ((d.cat == 3) ? 3 : 4)) ? gt1 : ((d.cat == 3) ? 3 : 4));
          for (int j = 0; j < 14 && j <= lv; j++)
            enc_reg((j == 0) ? c0 : c1, j < lv);
          if (lv >= 14) begin
            n_eg++;
            suf = lv - 14; k = 0;
            while (suf >= (1 << k)) begin enc.encode_bypass(1); suf -= (1 << k); k++; end
            enc.encode_bypass(0);
            while (k > 0) begin k--; enc.encode_bypass(1'((suf >> k) & 1)); end
          end
          expq.push_back('{SE_ABS, 16'(lv)});
          sgn = $urandom_range(1);
          enc.encode_bypass(sgn);
          expq.push_back('{SE_SIGN, 16'(sgn)});
          if (lv == 0) eq1++; else gt1++;
        end
      end
      if (d.last) begin
        bit eos;
        eos = (b == NBLK - 1);
        enc.encode_terminate(eos);
        expq.push_back('{SE_EOS, 16'(eos)});
      end
    end
  endtask

  // ---------------- bitstream words ----------------
  localparam int MAXW = 16384;
  int          word_i;
  logic [31:0] words [MAXW];
  logic [5:0]  dtab [NBLK];        // {cat, inc, last} per block

  function automatic void pack_words();
    for (int w = 0; w < MAXW; w++) words[w] = '0;
    for (int b = 0; b < enc.bits.size() && b < 32 * MAXW; b++)
      words[b / 32][31 - (b % 32)] = enc.bits[b];
    for (int b = 0; b < NBLK; b++)
      dtab[b] = {descs[b].cat, descs[b].inc, descs[b].last};
  endfunction

  assign bs_data = (word_i < MAXW) ? words[word_i] : '0;
  assign {blk_cat, blk_inc, blk_last} = (blk_i < NBLK) ? dtab[blk_i] : 6'b000001;
  assign mb_inc = (mb_i < MAXMB) ? mtab[mb_i] : 2'd0;

  // ---------------- monitors ----------------
  int n_steps = 0, n_two = 0, n_rr = 0, n_rb = 0, n_bb = 0, n_same = 0;
  int n_sigsig = 0, n_siglast = 0, n_lastsig = 0;
  int n_hit = 0, n_miss = 0, n_stall = 0, n_run = 0, n_bins = 0, n_se = 0, n_init = 0;

  always @(posedge clk) if (rst_n) begin
    if (bs_valid && bs_ready) word_i <= word_i + 1;
    if (blk_take) blk_i <= blk_i + 1;
    if (mb_take) mb_i <= mb_i + 1;
    if (dut.phase_q == dut.S_INIT) n_init++;
    if (dut.phase_q == dut.S_RUN) n_run++;
    if (fetch_stall) n_stall++;
    if (pred_miss) n_miss++;
    if (se_valid && !pred_miss && se_type != SE_EOS) n_hit++;
    if (nbins != 0) begin
      n_steps++;
      n_bins += int'(nbins);
      if (nbins == 2) begin
        bin_kind_e k2;
        logic same;
        k2   = dut.bin1 ? dut.step_q.kind2_1 : dut.step_q.kind2_0;
        same = dut.same_sel;
        n_two++;
        if (dut.step_q.kind1 == BIN_REG && k2 == BIN_REG) n_rr++;
        if (dut.step_q.kind1 == BIN_REG && k2 == BIN_BYP) n_rb++;
        if (dut.step_q.kind1 == BIN_BYP && k2 == BIN_BYP) n_bb++;
        if (same) n_same++;
        if (dut.step_q.se == SE_SIGMAP) begin
          if (!dut.u_bm.st_cur.bin_idx[0] && !dut.bin1) n_sigsig++;
          if (!dut.u_bm.st_cur.bin_idx[0] &&  dut.bin1) n_siglast++;
          if ( dut.u_bm.st_cur.bin_idx[0])              n_lastsig++;
        end
      end
    end
    if (se_valid) begin
      n_se++;
      if (expq.size() == 0) chk(0, "unexpected SE");
      else begin
        exp_t e;
        e = expq.pop_front();
        chk(se_type == e.t && se_value == e.v,
            $sformatf("SE %0d: got type %0d value %h, expected type %0d value %h",
                      n_se, se_type, se_value, e.t, e.v));
      end
    end
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run0, steps0, stall0, miss0;
    slice_start = 0; slice_qp = 0; bs_valid = 0; word_i = 0; blk_i = 0; mb_i = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSLICES; s++) begin
      int qp;
      qp = (s == 0) ? 12 : (s == 1) ? 28 : 20;
      gen_slice(qp);
      pack_words();
      @(negedge clk);
      word_i = 0; blk_i = 0; mb_i = 0;
      slice_qp = 6'(qp);
      slice_start = 1;
      @(negedge clk);
      slice_start = 0;
      run0 = n_run; steps0 = n_steps; stall0 = n_stall; miss0 = n_miss;
      fork
        forever begin
          @(negedge clk);
          bs_valid = ($urandom_range(4) != 0);
          if ($urandom_range(299) == 0) begin   // long supply gap
            bs_valid = 0;
            repeat (40) @(negedge clk);
          end
        end
        wait (slice_done);
      join_any
      disable fork;
      @(negedge clk);
      chk(expq.size() == 0, $sformatf("%0d SEs not decoded", expq.size()));
      chk((n_run - run0) == (n_steps - steps0) + (n_stall - stall0) + (n_miss - miss0) + 1,
          $sformatf("cycle count %0d != steps %0d + stalls %0d + misses %0d + 1", n_run - run0,
                    n_steps - steps0, n_stall - stall0, n_miss - miss0));
      $display("slice %0d qp %0d: %0d bits, %0d bins in %0d cycles (%0.3f bins/cycle), %0d misses",
               s, qp, enc.bits.size(), n_bins, n_run - run0, real'(n_bins) / real'(n_run - run0),
               n_miss - miss0);
      n_bins = 0;
    end
    $display("steps=%0d two-bin=%0d reg+reg=%0d reg+byp=%0d byp+byp=%0d same-CM=%0d",
             n_steps, n_two, n_rr, n_rb, n_bb, n_same);
    $display("mb_qp_delta=%0d (after a non-zero one: %0d) skipped-MBs=%0d", n_qpd, n_qpd_ctx1, n_skip);
    $display("SIG+SIG=%0d SIG+LAST=%0d LAST+SIG=%0d hits=%0d misses=%0d fetch-stalls=%0d EG-suffix=%0d init-cycles=%0d",
             n_sigsig, n_siglast, n_lastsig, n_hit, n_miss, n_stall, n_eg, n_init);
    chk(n_rr > 0, "reg+reg never happened");
    chk(n_bb > 0, "byp+byp never happened");
    chk(n_same > 0, "same-CM reuse never happened");
    chk(n_sigsig > 0 && n_siglast > 0 && n_lastsig > 0, "significance-map pairs");
    chk(n_hit > 0, "no prediction hit");
    chk(n_miss > 0, "no prediction miss");
    chk(n_stall > 0, "no fetch stall");
    chk(n_eg > 0, "no Exp-Golomb suffix");
    chk(n_qpd > 0 && n_qpd_ctx1 > 0, "mb_qp_delta contexts");
    chk(n_skip > 0, "no skipped macroblock");
    chk(n_init >= NSLICES * 459, "CM initialisation too short");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
