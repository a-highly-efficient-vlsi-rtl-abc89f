// tb_cm_regfile: checks the two-read/two-write CM register file against a
// shadow array. After all 254 words are written, random cycles issue two reads
// and up to two writes, often to the words being read and sometimes both
// writes to one word (port 2 must win). Both read ports are compared in the
// cycle after their addresses were captured.
`timescale 1ns/1ps
module tb_cm_regfile;
  import cabac_pkg::*;
  localparam int D = 254;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en, we1, we2;
  logic [7:0] ra1, ra2, wa1, wa2, h1, h2;
  cm_t rd1, rd2, wd1, wd2;
  cm_t shadow [D];
  int checks = 0, failures = 0, same_wr = 0;

  cm_regfile dut (.clk(clk), .rd_en_i(rd_en), .rd_addr1_i(ra1), .rd_addr2_i(ra2),
                  .rd_data1_o(rd1), .rd_data2_o(rd2),
                  .wr_en1_i(we1), .wr_addr1_i(wa1), .wr_data1_i(wd1),
                  .wr_en2_i(we2), .wr_addr2_i(wa2), .wr_data2_i(wd2));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(cm_t got, cm_t exp, int a);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d got %h exp %h", a, got, exp);
    end
  endtask

  initial begin
    rd_en = 0; we1 = 0; we2 = 0; ra1 = 0; ra2 = 0; wa1 = 0; wa2 = 0; wd1 = '0; wd2 = '0;
    for (int i = 0; i < D; i += 2) begin
      @(negedge clk);
      we1 = 1; wa1 = 8'(i); wd1 = cm_t'($urandom); shadow[i] = wd1;
      we2 = 1; wa2 = 8'(i+1); wd2 = cm_t'($urandom); shadow[i+1] = wd2;
    end
    @(negedge clk); we1 = 0; we2 = 0;
    h1 = 0; h2 = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      rd_en = ($urandom_range(9) != 0);
      ra1 = 8'($urandom_range(D-1));
      ra2 = 8'($urandom_range(D-1));
      we1 = $urandom_range(1);
      we2 = $urandom_range(1);
      wa1 = ($urandom_range(2) == 0) ? ra1 : 8'($urandom_range(D-1));
      wa2 = ($urandom_range(4) == 0) ? wa1 : ($urandom_range(2) == 0) ? ra2 : 8'($urandom_range(D-1));
      wd1 = cm_t'($urandom);
      wd2 = cm_t'($urandom);
      @(posedge clk);
      if (we1) shadow[wa1] = wd1;
      if (we2) shadow[wa2] = wd2;
      if (we1 && we2 && wa1 == wa2) same_wr++;
      if (rd_en) begin h1 = ra1; h2 = ra2; end
      #1;
      chk(rd1, shadow[h1], h1);
      chk(rd2, shadow[h2], h2);
    end
    checks++;
    if (same_wr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
