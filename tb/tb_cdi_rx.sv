// tb_cdi_rx: the testbench serializes random CDI words itself (start marker,
// 24 bits MSB first, BIT_TICKS ticks per bit) and checks the received word,
// the valid/ack behaviour and the overrun flag for an unread word.
module tb_cdi_rx;
  import idpu_pkg::*;
  localparam int BT = 8;
  logic clk = 0, rst_n = 0, cdi_tick = 0, sdi = 0, ack = 0, word_valid, overrun;
  cdi_word_t word;
  int checks = 0, failures = 0, overruns = 0;
  cdi_rx #(.BIT_TICKS(BT)) dut (.*);
  always #5 clk = ~clk;
  int div = 0;
  always @(posedge clk) begin div <= (div == 2) ? 0 : div + 1; cdi_tick <= (div == 2); end
  always @(posedge clk) if (overrun) overruns++;
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic send(input logic [23:0] w);
    logic [24:0] f = {1'b1, w};
    for (int b = 24; b >= 0; b--) begin
      @(posedge clk iff cdi_tick); sdi <= f[b];
      repeat (BT - 1) @(posedge clk iff cdi_tick);
    end
    @(posedge clk iff cdi_tick); sdi <= 0;
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [23:0] w;
    repeat (4) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      w = 24'($urandom);
      send(w);
      repeat (BT*3) @(posedge clk); #1;
      check(word_valid && word == w, $sformatf("word %h got %h v%0d", w, word, word_valid));
      @(negedge clk); ack = 1; @(negedge clk); ack = 0; #1;
      check(!word_valid, "valid cleared by ack");
      repeat ($urandom_range(0, 20)) @(posedge clk);
    end
    check(overruns == 0, "no overrun while read");
    send(24'h123456); send(24'hABCDEF);
    repeat (BT*3) @(posedge clk); #1;
    check(overruns == 1, $sformatf("one overrun, saw %0d", overruns));
    check(word == 24'hABCDEF, "newest word kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
