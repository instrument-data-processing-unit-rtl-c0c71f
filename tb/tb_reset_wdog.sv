// tb_reset_wdog: checks power-on reset release, that regular clears keep the
// watchdog quiet, that it fires exactly LIMIT cycles after the last clear,
// that the reset pulse has the right length, and that the jumper disables it.
module tb_reset_wdog;
  localparam int unsigned CLK_HZ = 100, SECS = 3, PULSE = 4;
  localparam int unsigned LIMIT = CLK_HZ * SECS;
  logic clk = 0, por_n = 0, wd_clear = 0, wd_disable = 0;
  logic wd_fired, sys_rst_n;
  int checks = 0, failures = 0;
  reset_wdog #(.CLK_HZ(CLK_HZ), .WDOG_SECONDS(SECS), .PULSE_CYCLES(PULSE)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int n, low;
  initial begin
    repeat (3) @(posedge clk);
    check(sys_rst_n == 0, "reset held during POR");
    @(negedge clk); por_n = 1;
    repeat (3) @(posedge clk); #1;
    check(sys_rst_n == 1, "reset released after POR");
    // clear every LIMIT/2 cycles for a long time: no fire
    repeat (6) begin
      repeat (LIMIT/2) begin @(posedge clk); #1; check(!wd_fired && sys_rst_n, "no fire while cleared"); end
      @(negedge clk); wd_clear = 1; @(negedge clk); wd_clear = 0;
    end
    // now stop clearing and count cycles to the fire
    n = 0;
    while (!wd_fired && n < 2*LIMIT) begin @(posedge clk); #1; n++; end
    check(wd_fired, "watchdog fired");
    check(n == LIMIT, $sformatf("fire after %0d cycles, expected %0d", n, LIMIT));
    low = 0;
    repeat (PULSE + 6) begin @(posedge clk); #1; if (!sys_rst_n) low++; end
    check(low == PULSE + 1, $sformatf("reset low %0d cycles, expected %0d", low, PULSE + 1));
    // jumper: disabled watchdog never fires
    wd_disable = 1;
    repeat (3*LIMIT) begin @(posedge clk); #1; check(!wd_fired, "disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
