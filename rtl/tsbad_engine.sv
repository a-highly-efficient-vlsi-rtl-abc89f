// tsbad_engine: two-symbol binary arithmetic decoding engine (combinational).
//
// Decodes up to two bins of one syntax element in a single cycle: regular +
// regular, regular + bypass, regular + terminate, or bypass + bypass; a single
// bin of any kind is decoded when the second slot is BIN_NONE.
//
// First bin. The LPS test is reordered as O_LPS = (O - R) + R_LPS, so that the
// subtraction O - R runs in parallel with the R_LPS table look-up; the bin is
// the MPS when O_LPS is negative. R_MPS = R - R_LPS, and the renormalised MPS
// and LPS candidates (shift 0/1, resp. 1..7 bits) are formed side by side.
//
// Second bin. Because the first bin's outcome is not yet known, both cases are
// evaluated in parallel from values the first bin already computed:
//   previous bin MPS:  O'_LPS = renorm(O_LPS)   + R'_LPS
//   previous bin LPS:  O'_LPS = renorm(O - R)   + R'_LPS
// where renorm() shifts left by that case's renormalisation amount and shifts in
// bitstream bits, and R'_LPS is picked by a 4-to-1 multiplexer, indexed by the
// renormalised range of that case, from the R_LPS row of that case's CM. The
// CM of the second bin depends on the first bin's value: the caller offers one
// candidate per value (cm2_0_i / cm2_1_i), and a candidate flagged "same" stands
// for the first bin's own CM, taken after its update. The sign bit of the
// first bin's O_LPS finally selects between the two cases.
// Bypass and terminate bins are decoded in the usual way from the range and
// offset left by the preceding bin.
//
// Interface: range_i/offset_i are the 9-bit arithmetic decoder registers;
// win_i holds the next 16 bitstream bits, first bit in win_i[15]. shift1_o and
// shift2_o give how many of them are consumed after one resp. both bins.
// One bin consumes at most 7 bits, so shift1_o[3] is always 0; it keeps the
// width of shift2_o.
// Everything here is combinational; the caller registers range and offset.
//
// The reordering, the parallel second-bin decision and the pairs of bin kinds
// follow the architecture this design implements. The range/offset widths and
// the tables are those of H.264/AVC. The ShiftNum table is realised as a
// leading-zero count of the R_LPS entry, which gives the same numbers.
module tsbad_engine
  import cabac_pkg::*;
(
  input  logic [8:0]  range_i,
  input  logic [8:0]  offset_i,
  input  logic [15:0] win_i,
  input  bin_kind_e   kind1_i,
  input  cm_t         cm1_i,
  input  bin_kind_e   kind2_0_i,   // second bin if the first bin is 0
  input  cm_t         cm2_0_i,
  input  logic        same2_0_i,   // ...and it reuses the first bin's CM
  input  bin_kind_e   kind2_1_i,   // second bin if the first bin is 1
  input  cm_t         cm2_1_i,
  input  logic        same2_1_i,
  output logic        bin1_o,
  output logic        bin2_o,
  output logic        dec2_o,      // a second bin was decoded
  output logic [8:0]  range1_o,
  output logic [8:0]  offset1_o,
  output logic [3:0]  shift1_o,
  output logic [8:0]  range2_o,    // registers after the last decoded bin
  output logic [8:0]  offset2_o,
  output logic [3:0]  shift2_o,
  output cm_t         cm_upd1_o,
  output cm_t         cm_upd2_o
);

  // (x << s) with the next s bitstream bits shifted in, modulo 2^11.
  function automatic logic [10:0] shl_in(input logic [10:0] x, input logic [2:0] s,
                                         input logic [15:0] w);
    logic [26:0] t;
    t = {x, w} << s;
    return t[26:16];
  endfunction

  // ---------------- first bin, regular ----------------
  logic [7:0]  rl1;
  logic [8:0]  rm1;
  logic [10:0] o_m_r;      // O - R
  logic [10:0] olps1;      // (O - R) + R_LPS
  logic        is_lps1;
  logic        s_m;        // MPS renormalisation shift (0 or 1)
  logic [2:0]  s_l;        // LPS renormalisation shift (1..7)
  logic [8:0]  rm1_renorm, rl1_renorm;
  logic [10:0] om1_renorm, ol1_renorm;   // offsets after MPS / LPS
  logic [10:0] dm_renorm, dl_renorm;     // O - R after MPS / LPS (renormalised)

  always_comb begin
    rl1        = rlps(cm1_i.state, range_i[7:6]);
    rm1        = range_i - 9'(rl1);
    o_m_r      = {2'b00, offset_i} - {2'b00, range_i};
    olps1      = o_m_r + 11'(rl1);
    is_lps1    = ~olps1[10];
    s_m        = ~rm1[8];
    s_l        = lps_shift(rl1);
    rm1_renorm = rm1 << s_m;
    rl1_renorm = 9'(rl1) << s_l;
    om1_renorm = shl_in({2'b00, offset_i}, {2'b00, s_m}, win_i);
    ol1_renorm = shl_in(olps1, s_l, win_i);
    dm_renorm  = shl_in(olps1, {2'b00, s_m}, win_i);   // O_MPS_renorm - R_MPS_renorm
    dl_renorm  = shl_in(o_m_r, s_l, win_i);            // O_LPS_renorm - R_LPS_renorm
  end

  // ---------------- first bin, all kinds ----------------
  logic        b1;
  logic [8:0]  r1, o1;
  logic [3:0]  sh1;
  logic [9:0]  byp1_o;
  logic [8:0]  trm1_r;

  always_comb begin
    b1     = 1'b0;
    r1     = range_i;
    o1     = offset_i;
    sh1    = 4'd0;
    byp1_o = {offset_i, win_i[15]};
    trm1_r = range_i - 9'd2;
    unique case (kind1_i)
      BIN_REG: begin
        b1  = is_lps1 ? ~cm1_i.mps : cm1_i.mps;
        r1  = is_lps1 ? rl1_renorm : rm1_renorm;
        o1  = is_lps1 ? ol1_renorm[8:0] : om1_renorm[8:0];
        sh1 = is_lps1 ? {1'b0, s_l} : {3'b000, s_m};
      end
      BIN_BYP: begin
        b1  = (byp1_o >= {1'b0, range_i});
        o1  = b1 ? 9'(byp1_o - {1'b0, range_i}) : byp1_o[8:0];
        sh1 = 4'd1;
      end
      BIN_TERM: begin
        b1 = (offset_i >= trm1_r);
        if (b1) begin
          r1 = trm1_r;
        end else begin
          r1  = trm1_r << ~trm1_r[8];
          o1  = 9'(shl_in({2'b00, offset_i}, {2'b00, ~trm1_r[8]}, win_i));
          sh1 = {3'b000, ~trm1_r[8]};
        end
      end
      default: ;
    endcase
  end

  // ---------------- second bin: which CM and kind, per first-bin value ------
  cm_t        cm2_val0, cm2_val1;
  always_comb begin
    cm2_val0 = same2_0_i ? cm_next(cm1_i, 1'b0) : cm2_0_i;
    cm2_val1 = same2_1_i ? cm_next(cm1_i, 1'b1) : cm2_1_i;
  end

  // ---------------- second bin, regular, both cases in parallel -------------
  // case M: first bin was its MPS; case L: first bin was its LPS.
  cm_t         cm2_m, cm2_l;
  logic [31:0] row_m, row_l;
  logic [7:0]  rl2_m, rl2_l;
  logic [10:0] olps2_m, olps2_l;
  logic [15:0] win_m, win_l;

  always_comb begin
    cm2_m   = cm1_i.mps ? cm2_val1 : cm2_val0;
    cm2_l   = cm1_i.mps ? cm2_val0 : cm2_val1;
    row_m   = rlps_row(cm2_m.state);                // four pre-fetched R_LPS
    row_l   = rlps_row(cm2_l.state);
    rl2_m   = row_m[8*rm1_renorm[7:6] +: 8];         // 4-to-1 selection
    rl2_l   = row_l[8*rl1_renorm[7:6] +: 8];
    olps2_m = dm_renorm + 11'(rl2_m);
    olps2_l = dl_renorm + 11'(rl2_l);
    win_m   = win_i << s_m;
    win_l   = win_i << s_l;
  end

  // Range/offset update of a regular second bin.
  function automatic logic [21:0] upd2(input logic [8:0] r_in, input logic [8:0] o_in,
                                       input logic [7:0] rl, input logic [10:0] olps,
                                       input logic [15:0] w);
    logic [8:0] rm, rn, on;
    logic [2:0] s;
    rm = r_in - 9'(rl);
    if (olps[10]) begin
      s  = {2'b00, ~rm[8]};
      rn = rm << s;
      on = 9'(shl_in({2'b00, o_in}, s, w));
    end else begin
      s  = lps_shift(rl);
      rn = 9'(rl) << s;
      on = 9'(shl_in(olps, s, w));
    end
    return {rn, on, 1'b0, s};
  endfunction

  // ---------------- second bin, all kinds ----------------
  bin_kind_e   k2;
  logic        b2;
  logic [8:0]  r2, o2;
  logic [3:0]  sh2;
  logic [15:0] win2;
  logic [9:0]  byp2_o;
  logic [8:0]  trm2_r;
  logic [21:0] u;
  cm_t         cm2_sel;

  always_comb begin
    k2      = b1 ? kind2_1_i : kind2_0_i;
    cm2_sel = b1 ? cm2_val1 : cm2_val0;
    win2    = win_i << sh1;
    byp2_o  = {o1, win2[15]};
    trm2_r  = r1 - 9'd2;
    b2      = 1'b0;
    r2      = r1;
    o2      = o1;
    sh2     = sh1;
    u       = '0;
    if (kind1_i == BIN_NONE) k2 = BIN_NONE;
    unique case (k2)
      BIN_REG: begin
        if (is_lps1) begin
          b2 = olps2_l[10] ? cm2_l.mps : ~cm2_l.mps;
          u  = upd2(r1, o1, rl2_l, olps2_l, win_l);
        end else begin
          b2 = olps2_m[10] ? cm2_m.mps : ~cm2_m.mps;
          u  = upd2(r1, o1, rl2_m, olps2_m, win_m);
        end
        r2  = u[21:13];
        o2  = u[12:4];
        sh2 = sh1 + u[3:0];
      end
      BIN_BYP: begin
        b2  = (byp2_o >= {1'b0, r1});
        o2  = b2 ? 9'(byp2_o - {1'b0, r1}) : byp2_o[8:0];
        sh2 = sh1 + 4'd1;
      end
      BIN_TERM: begin
        b2 = (o1 >= trm2_r);
        if (b2) begin
          r2 = trm2_r;
        end else begin
          r2  = trm2_r << ~trm2_r[8];
          o2  = 9'(shl_in({2'b00, o1}, {2'b00, ~trm2_r[8]}, win2));
          sh2 = sh1 + {3'b000, ~trm2_r[8]};
        end
      end
      default: ;
    endcase
  end

  assign bin1_o    = b1;
  assign bin2_o    = b2;
  assign dec2_o    = (k2 != BIN_NONE);
  assign range1_o  = r1;
  assign offset1_o = o1;
  assign shift1_o  = sh1;
  assign range2_o  = r2;
  assign offset2_o = o2;
  assign shift2_o  = sh2;
  assign cm_upd1_o = cm_next(cm1_i, b1);
  assign cm_upd2_o = cm_next(cm2_sel, b2);

endmodule
