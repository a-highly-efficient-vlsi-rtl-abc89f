// tb_binarization_matching: random SE values are binarised in the testbench
// (H.264/AVC rules: TU+EG0 for coeff_abs_level_minus1 with cut-off 14, unary
// for mb_qp_delta, the
// significance map as SIG/LAST pairs, one bin for the flags) and fed to the
// BM one or two bq per step, following its own plan of the next step. The
// match must come exactly with the last bin and the value, significance map
// and coefficient count must equal the generated ones. Steps with two bq,
// +2 steps (SIG=0) and maps ending on the inferred last position are counted.
`timescale 1ns/1ps
module tb_binarization_matching;
  import cabac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  se_e se; logic [4:0] maxn; logic start, step, b1, d2, b2;
  logic match; logic [15:0] value, smap; logic [4:0] nsig; logic [5:0] nbi;
  logic [1:0] s20, s21;
  int checks = 0, failures = 0, n_two = 0, n_plus2 = 0, n_inferred = 0;

  binarization_matching dut (.clk(clk), .rst_n(rst_n), .se_i(se), .maxn_i(maxn), .start_i(start),
    .step_i(step), .bin1_i(b1), .dec2_i(d2), .bin2_i(b2), .match_o(match), .value_o(value),
    .sig_map_o(smap), .num_sig_o(nsig), .next_bin_idx_o(nbi), .step2_0_o(s20), .step2_1_o(s21));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit bq[$];
    int ev; logic [15:0] emap; int ensig;
    se = SE_CBF; maxn = 16; start = 0; step = 0; b1 = 0; d2 = 0; b2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int t, p, first;
      bq.delete();
      t = $urandom_range(3);
      emap = 0; ensig = 0; ev = 0;
      if (t == 0) begin                           // flag
        se = SE_CBF; ev = $urandom_range(1); bq.push_back(1'(ev));
      end else if (t == 1) begin                  // significance map
        int last;
        se = SE_SIGMAP;
        maxn = ($urandom_range(3) == 0) ? 5'd4 : 5'd16;
        last = $urandom_range(int'(maxn) - 1);
        for (int i = 0; i <= last; i++)
          if (i == last || $urandom_range(2) == 0) begin emap[i] = 1; ensig++; end
        for (int i = 0; i < int'(maxn) - 1 && i <= last; i++) begin
          bq.push_back(emap[i]);
          if (emap[i]) bq.push_back(i == last);
        end
        if (last == int'(maxn) - 1) n_inferred++;
      end else if (t == 3) begin                  // mb_qp_delta, unary
        se = SE_QPD;
        ev = $urandom_range(52);
        for (int i = 0; i < ev; i++) bq.push_back(1);
        bq.push_back(0);
      end else begin                              // coeff_abs_level_minus1
        int suf, k;
        se = SE_ABS;
        ev = ($urandom_range(3) == 0) ? $urandom_range(3000) : $urandom_range(20);
        for (int i = 0; i < ((ev < 14) ? ev : 14); i++) bq.push_back(1);
        if (ev < 14) bq.push_back(0);
        else begin
          suf = ev - 14; k = 0;
          while (suf >= (1 << k)) begin bq.push_back(1); suf -= (1 << k); k++; end
          bq.push_back(0);
          while (k > 0) begin k--; bq.push_back(1'((suf >> k) & 1)); end
        end
      end
      // feed
      p = 0; first = 1;
      begin
        logic [1:0] plan0, plan1;
        plan0 = bm_step2(se, maxn, BM_FRESH, 1'b0);
        plan1 = bm_step2(se, maxn, BM_FRESH, 1'b1);
        while (p < bq.size()) begin
          logic [1:0] pl;
          @(negedge clk);
          start = first; step = 1; b1 = bq[p];
          pl = b1 ? plan1 : plan0;
          d2 = (pl != 0) && ($urandom_range(3) != 0) && (p + 1 < bq.size());
          b2 = d2 ? bq[p+1] : 1'b0;
          if (d2) n_two++;
          if (pl == 2) n_plus2++;
          p += d2 ? 2 : 1;
          #1;
          chk(match == (p == bq.size()), $sformatf("match at bin %0d of %0d se %0d", p, bq.size(), se));
          plan0 = s20; plan1 = s21;
          @(posedge clk);
          first = 0;
        end
      end
      if (se == SE_SIGMAP) begin
        chk(smap == emap, $sformatf("map %h exp %h", smap, emap));
        chk(nsig == 5'(ensig), "num_sig");
      end else chk(value == 16'(ev), $sformatf("value %0d exp %0d", value, ev));
      @(negedge clk); step = 0;
    end
    chk(n_two > 0 && n_plus2 > 0 && n_inferred > 0, "coverage");
    $display("two-bin steps=%0d +2 steps=%0d inferred-last maps=%0d", n_two, n_plus2, n_inferred);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
