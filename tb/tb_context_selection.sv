// tb_context_selection: compares the context selection with ctxIdx values
// written out from the H.264/AVC derivation rules, and the CM locations with
// address ranges of the reorganised memory map (SRAM: coded_block_flag at
// 12..31, last_significant_coeff_flag at 32..171, first bin of
// coeff_abs_level_minus1 at 172..201; registers: significant_coeff_flag at
// 73..224, later bins of coeff_abs_level_minus1 at 225..253, mb_qp_delta at
// 51..54; SRAM: mb_skip_flag of P slices at 3..5).
`timescale 1ns/1ps
module tb_context_selection;
  import cabac_pkg::*;
  se_e se; logic [2:0] cat; logic [5:0] b; logic [1:0] inc; logic [3:0] gt1, eq1; logic qnz; logic [1:0] sinc;
  bin_kind_e kind [3]; logic [8:0] ctx [3]; cm_loc_t loc [3];
  int checks = 0, failures = 0;
  context_selection dut (.se_i(se), .cat_i(cat), .bin_idx_i(b), .cbf_inc_i(inc),
                         .num_gt1_i(gt1), .num_eq1_i(eq1), .qpd_nz_i(qnz), .skip_inc_i(sinc), .kind_o(kind), .ctx_o(ctx), .loc_o(loc));

  task automatic expect_ctx(int k, bin_kind_e ek, int ec, bit in_reg, int lo, int hi, int off);
    checks++;
    if (kind[k] != ek || (ek == BIN_REG && (int'(ctx[k]) != ec || loc[k].in_reg != in_reg ||
        int'(loc[k].addr) != off || off < lo || off > hi))) begin
      failures++;
      if (failures < 10)
        $display("FAIL se=%0d cat=%0d b=%0d k=%0d: kind %0d ctx %0d loc %0d/%0d exp ctx %0d addr %0d",
                 se, cat, b, k, kind[k], ctx[k], loc[k].in_reg, loc[k].addr, ec, off);
    end
  endtask

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sig_base[5] = '{105, 120, 134, 149, 152};
    int last_base[5] = '{166, 181, 195, 210, 213};
    int abs_base[5] = '{227, 237, 247, 257, 266};
    int sig_reg_addr[5] = '{73, 88, 102, 117, 120};
    int last_sram_addr[5] = '{32, 47, 61, 76, 79};
    int abs_sram_addr[5] = '{172, 177, 182, 187, 192};
    int abs_reg_addr[5] = '{225, 230, 235, 240, 244};
    gt1 = 0; eq1 = 0; inc = 0; qnz = 0; sinc = 0;
    for (int c = 0; c < 5; c++) begin
      cat = 3'(c);
      // coded_block_flag
      se = SE_CBF; b = 0;
      for (int n = 0; n < 4; n++) begin
        inc = 2'(n); #1;
        expect_ctx(0, BIN_REG, 85 + 4*c + n, 0, 12, 31, 12 + 4*c + n);
      end
      // significance map
      se = SE_SIGMAP;
      for (int bi = 0; bi < 2*(c == 3 ? 3 : 14); bi++) begin
        b = 6'(bi); #1;
        for (int k = 0; k < 3; k++) begin
          int bb, i, p;
          bb = bi + k; i = bb / 2;
          p = (c == 3) ? (i > 2 ? 2 : i) : i;
          if (i > ((c == 3) ? 2 : (c == 1 || c == 4) ? 13 : 14)) continue;
          if (bb % 2 == 0) expect_ctx(k, BIN_REG, sig_base[c] + p, 1, 73, 224, sig_reg_addr[c] + p);
          else             expect_ctx(k, BIN_REG, last_base[c] + p, 0, 32, 171, last_sram_addr[c] + p);
        end
      end
      // coeff_abs_level_minus1
      se = SE_ABS;
      for (int g = 0; g < 6; g++) for (int e = 0; e < 6; e++) begin
        int i0, i1;
        gt1 = 4'(g); eq1 = 4'(e); b = 0; #1;
        i0 = (g != 0) ? 0 : ((e + 1 < 4) ? e + 1 : 4);
        i1 = (g < ((c == 3) ? 3 : 4)) ? g : ((c == 3) ? 3 : 4);
        expect_ctx(0, BIN_REG, abs_base[c] + i0, 0, 172, 201, abs_sram_addr[c] + i0);
        expect_ctx(1, BIN_REG, abs_base[c] + 5 + i1, 1, 225, 253, abs_reg_addr[c] + i1);
        expect_ctx(2, BIN_REG, abs_base[c] + 5 + i1, 1, 225, 253, abs_reg_addr[c] + i1);
      end
      b = 12; #1;
      expect_ctx(2, BIN_BYP, 0, 0, 0, 0, 0);
      b = 20; #1;
      expect_ctx(0, BIN_BYP, 0, 0, 0, 0, 0);
    end
    // mb_qp_delta: ctxIdx 60..63 at register addresses 51..54
    se = SE_QPD;
    for (int q = 0; q < 2; q++) for (int bi = 0; bi < 12; bi++) begin
      qnz = q[0]; b = 6'(bi); #1;
      for (int k = 0; k < 3; k++) begin
        int inc_q;
        inc_q = (bi + k == 0) ? q : (bi + k == 1) ? 2 : 3;
        expect_ctx(k, BIN_REG, 60 + inc_q, 1, 51, 54, 51 + inc_q);
      end
    end
    // mb_skip_flag (P slices): ctxIdx 11..13 at SRAM addresses 3..5
    se = SE_SKIP; b = 0;
    for (int n = 0; n < 3; n++) begin
      sinc = 2'(n); #1;
      expect_ctx(0, BIN_REG, 11 + n, 0, 3, 5, 3 + n);
    end
    se = SE_SIGN; b = 0; #1; expect_ctx(0, BIN_BYP, 0, 0, 0, 0, 0);
    se = SE_EOS;  b = 0; #1; expect_ctx(0, BIN_TERM, 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
