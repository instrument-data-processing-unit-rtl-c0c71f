// tb_cdi_tx: sends random CDI words and decodes the serial line in the
// testbench: start marker, 24 bits MSB first, each bit BIT_TICKS ticks long.
// Also checks that ready stays low for exactly 25 bit times (1 Mbps rate).
module tb_cdi_tx;
  import idpu_pkg::*;
  localparam int BT = 8;
  logic clk = 0, rst_n = 0, cdi_tick = 0, word_valid = 0, ready, sdo;
  cdi_word_t word;
  int checks = 0, failures = 0;
  cdi_tx #(.BIT_TICKS(BT)) dut (.*);
  always #5 clk = ~clk;
  // tick every 3rd clock, like 2^23 Hz against a faster system clock
  int div = 0;
  always @(posedge clk) begin div <= (div == 2) ? 0 : div + 1; cdi_tick <= (div == 2); end
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cdi_word_t w; logic [24:0] got; int busy_ticks;
    repeat (4) @(posedge clk); rst_n = 1;
    check(sdo == 0 && ready, "idle low and ready");
    for (int k = 0; k < 20; k++) begin
      w = cdi_word_t'($urandom);
      @(negedge clk); word = w; word_valid = 1; @(negedge clk); word_valid = 0; word = '0;
      got = '0; busy_ticks = 0;
      for (int b = 0; b < 25; b++) begin
        for (int t = 0; t < BT; t++) begin
          @(posedge clk iff cdi_tick); #1;
          if (t == BT/2) got = {got[23:0], sdo};
          if (!ready) busy_ticks++;
        end
      end
      check(got == {1'b1, w}, $sformatf("word %h got %h", w, got[23:0]));
      check(busy_ticks >= 25*BT - 1 && busy_ticks <= 25*BT, $sformatf("busy %0d ticks", busy_ticks));
      repeat (3) @(posedge clk iff cdi_tick); #1;
      check(ready && sdo == 0, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
