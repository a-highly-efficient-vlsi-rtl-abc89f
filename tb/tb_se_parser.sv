// tb_se_parser: drives the parser with SE completions of random residual
// blocks and checks, for every completion, the next SE it chooses, the block
// descriptor it latched, the level counters (levels left, numDecodAbsLevelEq1
// and Gt1), the mb_skip_flag that opens each macroblock (with runs of skipped
// macroblocks and the latched ctxIdxInc of the flag), the mb_qp_delta of each
// coded macroblock together with the "previous mb_qp_delta non-zero" flag, and the end of the slice, against a walk of the parsing flow
// written in the testbench.
`timescale 1ns/1ps
module tb_se_parser;
  import cabac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done; logic [15:0] val; logic [4:0] nsig;
  logic [2:0] bcat; logic [1:0] binc; logic blast, take;
  se_e cur, nxt; logic [2:0] ccat; logic [1:0] cinc; logic clast, send;
  logic [4:0] left; logic [3:0] gt1, eq1; logic qnz;
  logic [1:0] sinc, csinc; logic mtake; int mb = 0;
  int checks = 0, failures = 0, blk = 0;

  se_parser dut (.clk(clk), .rst_n(rst_n), .start_i(start), .se_done_i(done), .se_value_i(val),
    .num_sig_i(nsig), .blk_cat_i(bcat), .blk_cbf_inc_i(binc), .blk_last_i(blast), .blk_take_o(take),
    .mb_skip_inc_i(sinc), .mb_take_o(mtake), .cur_skip_inc_o(csinc),
    .cur_se_o(cur), .cur_cat_o(ccat), .cur_cbf_inc_o(cinc), .cur_last_o(clast),
    .levels_left_o(left), .num_gt1_o(gt1), .num_eq1_o(eq1), .qpd_nz_o(qnz), .next_se_o(nxt), .slice_end_o(send));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  // descriptor of block b
  function automatic logic [5:0] desc(int b);
    return {3'(b % 5), 2'(b % 4), 1'((b % 3) == 2)};
  endfunction
  assign {bcat, binc, blast} = desc(blk);
  always @(posedge clk) if (take) blk <= blk + 1;
  assign sinc = 2'(mb % 3);
  always @(posedge clk) if (mtake) mb <= mb + 1;

  task automatic complete(se_e t, logic [15:0] v, int ns, se_e expect_next);
    @(negedge clk);
    chk(cur == t, $sformatf("cur %0d exp %0d", cur, t));
    done = 1; val = v; nsig = 5'(ns);
    #1;
    chk(nxt == expect_next, $sformatf("next after %0d: %0d exp %0d", t, nxt, expect_next));
    @(negedge clk); done = 0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; done = 0; val = 0; nsig = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int b = 0, prev_q = 0; b < 60; b++) begin
      bit cbf, last_blk, eos;
      int ns, g, e;
      se_e after;
      last_blk = ((b % 3) == 2);
      eos = (b == 59);
      after = last_blk ? SE_EOS : SE_CBF;
      if (b % 3 == 0) begin                      // macroblock starts
        int q;
        // some skipped macroblocks first: mb_skip_flag = 1, end_of_slice_flag = 0
        while ($urandom_range(3) == 0) begin
          chk(csinc == 2'((mb - 1) % 3), "mb_skip_flag ctxIdxInc latched");
          complete(SE_SKIP, 16'd1, 0, SE_EOS);
          prev_q = 0;
          @(negedge clk);
          done = 1; val = 0; #1;
          chk(nxt == SE_SKIP && !send, "end_of_slice_flag after a skipped macroblock");
          @(negedge clk); done = 0;
        end
        chk(csinc == 2'((mb - 1) % 3), "mb_skip_flag ctxIdxInc latched");
        complete(SE_SKIP, 16'd0, 0, SE_QPD);
        q = ($urandom_range(2) == 0) ? 0 : $urandom_range(1, 52);
        chk(qnz == (prev_q != 0), "previous mb_qp_delta flag");
        complete(SE_QPD, 16'(q), 0, SE_CBF);
        prev_q = q;
      end
      chk({ccat, cinc, clast} == desc(b), $sformatf("descriptor of block %0d", b));
      cbf = (b % 4 != 1);
      complete(SE_CBF, 16'(cbf), 0, cbf ? SE_SIGMAP : after);
      if (cbf) begin
        ns = $urandom_range(1, 16);
        complete(SE_SIGMAP, 16'hffff, ns, SE_ABS);
        g = 0; e = 0;
        for (int l = 0; l < ns; l++) begin
          int lv;
          lv = $urandom_range(2);
          chk(left == 5'(ns - l) && gt1 == 4'(g) && eq1 == 4'(e), "level counters");
          complete(SE_ABS, 16'(lv), 0, SE_SIGN);
          if (lv == 0) e++; else g++;
          complete(SE_SIGN, 16'($urandom_range(1)), 0, (l < ns - 1) ? SE_ABS : after);
        end
      end
      if (last_blk) begin
        @(negedge clk);
        done = 1; val = 16'(eos); #1;
        chk(nxt == (eos ? SE_NONE : SE_SKIP) && send == eos, "end_of_slice");
        @(negedge clk); done = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
