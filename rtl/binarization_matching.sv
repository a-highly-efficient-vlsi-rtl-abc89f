// binarization_matching: binarization matching (BM) of the syntax element in
// progress.
//
// Takes the one or two bins decoded in a step, extends the bin string of the
// current SE and tells whether it now matches a complete codeword (match_o).
// The bin-string state (bin index, significance bitmap, value being built,
// Exp-Golomb phase) is kept in a register and restarts when a step is flagged
// as the first of a new SE. The significance map is handled as one merged SE
// in which bin 2i is significant_coeff_flag[i] and bin 2i+1 is
// last_significant_coeff_flag[i]: SIG[i]=0 steps the bin index by 2, SIG[i]=1
// and LAST[i]=0 by 1, and LAST[i]=1 (or reaching the last coded scan position)
// ends the map. coeff_abs_level_minus1 is a truncated-unary prefix of up to 14
// bins followed by a 0th-order Exp-Golomb suffix.
//
// It also plans the next step: the bin index the next step starts at
// (nextBinIdx) and, for each value of that step's first bin, whether a second
// bin follows at +1 or +2 or the SE ends (binIdxPlus2 information). The
// context selection uses these to load the CMs of the next step in the same
// cycle. State is updated at the clock edge when step_i is high.
//
// The merged significance map and its bin-index rule (SIG=0 -> +2, SIG=1 -> +1,
// LAST=0 -> +1, LAST=1 -> end) follow the architecture. The end at scan position
// maxNumCoeff-1 and the UEG0 binarization of levels are the standard's; the
// encoding of the state and the planning outputs are this design's own.
module binarization_matching
  import cabac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  se_e         se_i,
  input  logic [4:0]  maxn_i,       // maxNumCoeff of the current block
  input  logic        start_i,      // this step is the first of a new SE
  input  logic        step_i,       // a step was decoded this cycle
  input  logic        bin1_i,
  input  logic        dec2_i,
  input  logic        bin2_i,
  output logic        match_o,      // SE complete after this step
  output logic [15:0] value_o,      // SE value (flag or level)
  output logic [15:0] sig_map_o,    // significance map of a merged SIGMAP SE
  output logic [4:0]  num_sig_o,
  output logic [5:0]  next_bin_idx_o,
  output logic [1:0]  step2_0_o,    // second-bin step if the next first bin is 0
  output logic [1:0]  step2_1_o     // ... if it is 1 (0: SE ends)
);

  bm_state_t st_q, st_cur, st1, st2;

  always_comb begin
    st_cur = start_i ? BM_FRESH : st_q;
    st1    = bm_advance(se_i, maxn_i, st_cur, bin1_i);
    st2    = dec2_i ? bm_advance(se_i, maxn_i, st1, bin2_i) : st1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      st_q <= BM_FRESH;
    else if (step_i) st_q <= st2;
  end

  assign match_o        = st2.done;
  assign value_o        = st2.value;
  assign sig_map_o      = st2.sig_map;
  assign num_sig_o      = st2.num_sig;
  assign next_bin_idx_o = st2.bin_idx;
  assign step2_0_o      = bm_step2(se_i, maxn_i, st2, 1'b0);
  assign step2_1_o      = bm_step2(se_i, maxn_i, st2, 1'b1);

  // A second bin is never decoded past the end of an SE.
  always_ff @(posedge clk) begin
    if (rst_n && step_i && dec2_i) assert (!st1.done)
      else $error("second bin decoded after the SE was complete");
  end

endmodule
