// tb_cm_init: runs the initialisation with a pseudo-random (m, n) table at
// several QPs (including one above 51, which must be clipped) and checks that
// every ctxIdx except 276 is written exactly once, to the memory and address of
// the reorganised map, with the state and MPS of the H.264/AVC formula, and
// that it takes 460 cycles.
`timescale 1ns/1ps
module tb_cm_init;
  import cabac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start; logic [5:0] qp; logic [8:0] cidx; logic signed [7:0] m, n;
  logic busy, wsram, wreg; logic [7:0] wa; cm_t wd;
  int checks = 0, failures = 0;
  cm_init dut (.clk(clk), .rst_n(rst_n), .start_i(start), .qp_i(qp), .init_ctx_o(cidx),
               .init_m_i(m), .init_n_i(n), .busy_o(busy), .wr_sram_o(wsram), .wr_reg_o(wreg),
               .wr_addr_o(wa), .wr_data_o(wd));
  function automatic int m_of(int c); return ((c * 29) % 91) - 45; endfunction
  function automatic int n_of(int c); return ((c * 71) % 136) - 8; endfunction
  assign m = 8'(m_of(int'(cidx)));
  assign n = 8'(n_of(int'(cidx)));
  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int qps[4] = '{0, 26, 51, 60};
    start = 0; qp = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (qps[q]) begin
      int seen_s [256], seen_r [256], cycles, c, qc;
      foreach (seen_s[i]) begin seen_s[i] = 0; seen_r[i] = 0; end
      @(negedge clk); start = 1; qp = 6'(qps[q]);
      @(negedge clk); start = 0;
      qc = (qps[q] > 51) ? 51 : qps[q];
      cycles = 0;
      while (busy) begin
        int pre; cm_t e; int a;
        c = int'(cidx);
        pre = ((m_of(c) * qc) >>> 4) + n_of(c);
        pre = (pre < 1) ? 1 : (pre > 126) ? 126 : pre;
        e = (pre <= 63) ? cm_t'{6'(63 - pre), 1'b0} : cm_t'{6'(pre - 64), 1'b1};
        chk(c != 276, "ctxIdx 276 initialised");
        chk(wd == e, $sformatf("ctx %0d qp %0d: %h exp %h", c, qc, wd, e));
        chk(wsram ^ wreg, "exactly one memory written");
        // reorganised map: coded_block_flag 85..104 -> SRAM 12..31,
        // significant_coeff_flag 105..165 -> registers 73..133
        if (c >= 85 && c <= 104)  chk(wsram && int'(wa) == c - 73, "cbf address");
        if (c >= 105 && c <= 165) chk(wreg && int'(wa) == c - 32, "sig address");
        a = int'(wa);
        if (wsram) seen_s[a]++; else seen_r[a]++;
        cycles++;
        @(negedge clk);
      end
      chk(cycles == 459, $sformatf("%0d writes", cycles));
      for (int i = 0; i < 205; i++) chk(seen_s[i] == 1, $sformatf("SRAM word %0d written %0d times", i, seen_s[i]));
      for (int i = 0; i < 254; i++) chk(seen_r[i] == 1, $sformatf("register %0d written %0d times", i, seen_r[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
