// tb_se_predictor: exhaustive check of the next-SE prediction against the
// residual parsing flow: exact predictions where the flow does not depend on
// the value being decoded, and the neighbour's coded_block_flag where it does.
// A macroblock is predicted to follow end_of_slice_flag, so mb_skip_flag comes
// next; after mb_skip_flag the left macroblock's flag is assumed to repeat;
// coded_block_flag always follows mb_qp_delta.
`timescale 1ns/1ps
module tb_se_predictor;
  import cabac_pkg::*;
  se_e cur, pred; logic left, lskip, last; logic [4:0] left_lv;
  int checks = 0, failures = 0;
  se_predictor dut (.cur_se_i(cur), .left_cbf_i(left), .left_skip_i(lskip), .blk_last_i(last),
                    .levels_left_i(left_lv), .pred_se_o(pred));
  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int c = 1; c <= 7; c++) for (int l = 0; l < 4; l++) for (int k = 0; k < 2; k++)
      for (int n = 0; n <= 16; n++) begin
        se_e e;
        cur = se_e'(c); left = l[0]; lskip = l[1]; last = k[0]; left_lv = 5'(n);
        #1;
        case (c)
          1: e = l[0] ? SE_SIGMAP : (k ? SE_EOS : SE_CBF);
          2: e = SE_ABS;
          3: e = SE_SIGN;
          4: e = (n >= 2) ? SE_ABS : (k ? SE_EOS : SE_CBF);
          5: e = SE_SKIP;
          7: e = l[1] ? SE_EOS : SE_QPD;
          default: e = SE_CBF;
        endcase
        checks++;
        if (pred != e) begin
          failures++;
          $display("FAIL cur %0d left %0d last %0d n %0d: %0d exp %0d", c, l, k, n, pred, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
