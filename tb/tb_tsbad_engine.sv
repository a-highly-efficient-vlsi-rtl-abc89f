// tb_tsbad_engine: self-checking test of the two-symbol decoding engine.
//
// Random decoding steps are built first: each step has a first bin (regular,
// bypass or terminate) and, for each possible value of the first bin, an
// optional second bin (regular, bypass or terminate, or none), whose CM is
// either another model or the first bin's own model. The bins are encoded with
// the reference encoder, then the engine decodes the stream step by step from
// a 16-bit window. Every bin value, every updated CM and the final bit
// position are compared with the encoder's side. All step pairings the engine
// supports occur, and the test counts them.
`timescale 1ns/1ps
module tb_tsbad_engine;
  import cabac_pkg::*;
  import cabac_ref_pkg::*;

  localparam int NSTEPS = 4000;
  localparam int NCTX   = 6;

  typedef struct {
    bin_kind_e k1; int c1; bit v1;
    bin_kind_e k2[2]; int c2[2]; bit same[2]; bit v2;
  } step_t;

  step_t       steps[NSTEPS];
  cm_t         enc_ctx[NCTX];
  cm_t         dec_ctx[NCTX];
  cm_t         init_ctx[NCTX];
  cabac_enc    enc;
  int          checks = 0, failures = 0;
  int          n_pair[4][4];

  logic [8:0]  range_q, offset_q;
  logic [15:0] win;
  bin_kind_e   kind1, kind2_0, kind2_1;
  cm_t         cm1, cm2_0, cm2_1;
  logic        same2_0, same2_1;
  logic        bin1, bin2, dec2;
  logic [8:0]  range1, offset1, range2, offset2;
  logic [3:0]  shift1, shift2;
  cm_t         upd1, upd2;

  tsbad_engine dut (
    .range_i(range_q), .offset_i(offset_q), .win_i(win),
    .kind1_i(kind1), .cm1_i(cm1),
    .kind2_0_i(kind2_0), .cm2_0_i(cm2_0), .same2_0_i(same2_0),
    .kind2_1_i(kind2_1), .cm2_1_i(cm2_1), .same2_1_i(same2_1),
    .bin1_o(bin1), .bin2_o(bin2), .dec2_o(dec2),
    .range1_o(range1), .offset1_o(offset1), .shift1_o(shift1),
    .range2_o(range2), .offset2_o(offset2), .shift2_o(shift2),
    .cm_upd1_o(upd1), .cm_upd2_o(upd2)
  );

  function automatic bit pick(cm_t m, bin_kind_e k);
    if (k == BIN_TERM) return 1'b0;
    if (k == BIN_BYP)  return 1'($urandom_range(1));
    return ($urandom_range(99) < 75) ? m.mps : !m.mps;
  endfunction

  function automatic bin_kind_e rand_k2(bin_kind_e k1);
    int r;
    r = $urandom_range(99);
    if (k1 == BIN_REG) begin
      if (r < 20) return BIN_NONE;
      if (r < 75) return BIN_REG;
      if (r < 90) return BIN_BYP;
      return BIN_TERM;
    end
    if (k1 == BIN_BYP) return (r < 30) ? BIN_NONE : BIN_BYP;
    return BIN_NONE;
  endfunction

  task automatic check(bit cond, string what, int i);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL step %0d: %s", i, what);
    end
  endtask

  function automatic logic [15:0] window(int pos);
    logic [15:0] w;
    for (int b = 0; b < 16; b++)
      w[15-b] = (pos + b < enc.bits.size()) ? enc.bits[pos+b] : 1'b0;
    return w;
  endfunction

  initial begin : watchdog
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos;
    int r;
    enc = new();
    for (int c = 0; c < NCTX; c++) begin
      init_ctx[c].state = 6'($urandom_range(62));
      init_ctx[c].mps   = 1'($urandom_range(1));
      enc_ctx[c] = init_ctx[c];
      dec_ctx[c] = init_ctx[c];
    end
    // ---- build and encode the steps ----
    for (int i = 0; i < NSTEPS; i++) begin
      step_t s;
      bin_kind_e k2;
      int c2;
      r = $urandom_range(99);
      s.k1 = (r < 70) ? BIN_REG : (r < 92) ? BIN_BYP : BIN_TERM;
      s.c1 = $urandom_range(NCTX-1);
      for (int v = 0; v < 2; v++) begin
        s.k2[v]   = rand_k2(s.k1);
        s.same[v] = (s.k2[v] == BIN_REG) && ($urandom_range(2) == 0);
        s.c2[v]   = s.same[v] ? s.c1 : $urandom_range(NCTX-1);
        if (s.k2[v] == BIN_REG && !s.same[v] && s.c2[v] == s.c1)
          s.c2[v] = (s.c1 + 1) % NCTX;
      end
      s.v1 = pick(enc_ctx[s.c1], s.k1);
      case (s.k1)
        BIN_REG:  enc.encode_decision(enc_ctx[s.c1], s.v1);
        BIN_BYP:  enc.encode_bypass(s.v1);
        default:  enc.encode_terminate(s.v1);
      endcase
      k2 = s.k2[s.v1];
      c2 = s.c2[s.v1];
      s.v2 = pick(enc_ctx[c2], k2);
      case (k2)
        BIN_REG:  enc.encode_decision(enc_ctx[c2], s.v2);
        BIN_BYP:  enc.encode_bypass(s.v2);
        BIN_TERM: enc.encode_terminate(s.v2);
        default: ;
      endcase
      steps[i] = s;
    end
    enc.encode_terminate(1'b1);   // end of stream
    // ---- decode ----
    range_q = 9'd510;
    for (int b = 0; b < 9; b++) offset_q[8-b] = enc.bits[b];
    pos = 9;
    for (int i = 0; i <= NSTEPS; i++) begin
      step_t s;
      if (i < NSTEPS) s = steps[i];
      else begin
        s.k1 = BIN_TERM; s.c1 = 0; s.v1 = 1'b1; s.v2 = 1'b0;
        s.k2[0] = BIN_NONE; s.k2[1] = BIN_NONE; s.c2[0] = 0; s.c2[1] = 0;
        s.same[0] = 0; s.same[1] = 0;
      end
      win     = window(pos);
      kind1   = s.k1;
      cm1     = dec_ctx[s.c1];
      kind2_0 = s.k2[0];
      kind2_1 = s.k2[1];
      same2_0 = s.same[0];
      same2_1 = s.same[1];
      // a "same" candidate's CM input must be ignored: drive garbage
      cm2_0   = s.same[0] ? cm_t'($urandom) : dec_ctx[s.c2[0]];
      cm2_1   = s.same[1] ? cm_t'($urandom) : dec_ctx[s.c2[1]];
      #1;
      check(bin1 == s.v1, $sformatf("bin1 %0d exp %0d", bin1, s.v1), i);
      if (s.k1 == BIN_REG) begin
        cm_t e;
        e = cm_next(dec_ctx[s.c1], s.v1);
        check(upd1 == e, "cm_upd1", i);
        dec_ctx[s.c1] = e;
      end
      check(dec2 == (s.k2[s.v1] != BIN_NONE), "dec2", i);
      if (s.k2[s.v1] != BIN_NONE) begin
        check(bin2 == s.v2, $sformatf("bin2 %0d exp %0d", bin2, s.v2), i);
        if (s.k2[s.v1] == BIN_REG) begin
          cm_t e;
          e = cm_next(dec_ctx[s.c2[s.v1]], s.v2);
          check(upd2 == e, "cm_upd2", i);
          dec_ctx[s.c2[s.v1]] = e;
        end
      end
      n_pair[s.k1][s.k2[s.v1]]++;
      range_q  = range2;
      offset_q = offset2;
      pos     += int'(shift2);
    end
    for (int c = 0; c < NCTX; c++) check(dec_ctx[c] == enc_ctx[c], "final ctx", c);
    check(pos <= enc.bits.size(), "bit position", pos);
    // every pairing the engine supports happened
    check(n_pair[BIN_REG][BIN_REG]   > 0, "reg+reg",   0);
    check(n_pair[BIN_REG][BIN_BYP]   > 0, "reg+byp",   0);
    check(n_pair[BIN_REG][BIN_TERM]  > 0, "reg+term",  0);
    check(n_pair[BIN_BYP][BIN_BYP]   > 0, "byp+byp",   0);
    $display("pairs: reg+reg=%0d reg+byp=%0d reg+term=%0d byp+byp=%0d single=%0d",
             n_pair[1][1], n_pair[1][2], n_pair[1][3], n_pair[2][2],
             n_pair[1][0] + n_pair[2][0] + n_pair[3][0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
