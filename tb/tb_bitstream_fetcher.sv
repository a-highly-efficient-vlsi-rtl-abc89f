// tb_bitstream_fetcher: feeds a random bit sequence as 32-bit words with random
// gaps while consuming a random 0..14 bits per cycle whenever the window is
// valid; the 16-bit window must always show the next 16 bits of the sequence.
// Also checks that words are refused when fewer than 32 positions are free.
`timescale 1ns/1ps
module tb_bitstream_fetcher;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, wv, wr, avail, cen; logic [31:0] w; logic [15:0] win; logic [3:0] cons;
  bit stream [65536];
  int pos = 0, wi = 0, checks = 0, failures = 0, refused = 0;
  bitstream_fetcher dut (.clk(clk), .rst_n(rst_n), .flush_i(flush), .word_valid_i(wv), .word_i(w),
    .word_ready_o(wr), .win_o(win), .avail_o(avail), .consume_en_i(cen), .consume_i(cons));
  function automatic logic [31:0] word_at(int k);
    logic [31:0] r;
    for (int b = 0; b < 32; b++) r[31-b] = stream[(32*k + b) % 65536];
    return r;
  endfunction
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    foreach (stream[i]) stream[i] = 1'($urandom);
    flush = 0; wv = 0; w = 0; cen = 0; cons = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      wv = ($urandom_range(2) != 0);
      w  = word_at(wi);
      cen = avail && ($urandom_range(3) != 0);
      cons = cen ? 4'($urandom_range(14)) : 4'd0;
      if (avail) begin
        logic [15:0] e;
        for (int b = 0; b < 16; b++) e[15-b] = stream[(pos + b) % 65536];
        checks++;
        if (win !== e) begin
          failures++;
          if (failures < 10) $display("FAIL at bit %0d: %h exp %h", pos, win, e);
        end
      end
      if (wv && !wr) refused++;
      @(posedge clk);
      if (cen) pos += int'(cons);
      if (wv && wr) wi++;
    end
    checks++;
    if (refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
