// tb_cm_sram: checks the dual-port CM SRAM against a shadow array.
// All 205 words are written first; then random cycles read and write at once,
// including reads of the word written at the same edge (write-first), and
// cycles where the read address is held. Each read is compared, one cycle
// after its address was captured, with the shadow array.
`timescale 1ns/1ps
module tb_cm_sram;
  import cabac_pkg::*;
  localparam int D = 205;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en, wr_en;
  logic [7:0] rd_addr, wr_addr, rd_addr_hold;
  cm_t rd_data, wr_data;
  cm_t shadow [D];
  int checks = 0, failures = 0;

  cm_sram dut (.clk(clk), .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data),
               .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = '0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 8'(i); wr_data = cm_t'($urandom); shadow[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    rd_addr_hold = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      rd_en   = ($urandom_range(9) != 0);
      rd_addr = 8'($urandom_range(D-1));
      wr_en   = $urandom_range(1);
      wr_addr = ($urandom_range(3) == 0) ? rd_addr : 8'($urandom_range(D-1));
      wr_data = cm_t'($urandom);
      @(posedge clk);
      if (wr_en) shadow[wr_addr] = wr_data;
      if (rd_en) rd_addr_hold = rd_addr;
      #1;
      checks++;
      if (rd_data !== shadow[rd_addr_hold]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", rd_addr_hold, rd_data, shadow[rd_addr_hold]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
