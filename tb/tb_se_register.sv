// tb_se_register: random writes of SE values by type; each read port value is
// compared with a shadow copy, and a slice-start clear must empty all entries.
`timescale 1ns/1ps
module tb_se_register;
  import cabac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, we; se_e wse, rse, rse2; logic [15:0] wv, rv, rv2;
  logic [15:0] shadow [8];
  int checks = 0, failures = 0;
  se_register dut (.clk(clk), .rst_n(rst_n), .clear_i(clear), .wr_en_i(we), .wr_se_i(wse),
                   .wr_value_i(wv), .rd_se_i(rse), .rd_value_o(rv),
                   .rd2_se_i(rse2), .rd2_value_o(rv2));
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    clear = 0; we = 0; wse = SE_CBF; rse = SE_CBF; rse2 = SE_CBF; wv = 0;
    for (int i = 0; i < 8; i++) shadow[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      clear = ($urandom_range(199) == 0);
      we  = $urandom_range(1);
      wse = se_e'($urandom_range(1, 7));
      wv  = 16'($urandom);
      @(posedge clk);
      if (clear) for (int i = 0; i < 8; i++) shadow[i] = 0;
      else if (we) shadow[wse] = wv;
      #1;
      for (int t = 1; t <= 7; t++) begin
        int t2;
        t2 = $urandom_range(1, 7);
        rse = se_e'(t); rse2 = se_e'(t2); #1;
        checks++;
        if (rv2 !== shadow[t2]) begin
          failures++;
          if (failures < 10) $display("FAIL port 2 type %0d got %h exp %h", t2, rv2, shadow[t2]);
        end
        checks++;
        if (rv !== shadow[t]) begin
          failures++;
          if (failures < 10) $display("FAIL type %0d got %h exp %h", t, rv, shadow[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
