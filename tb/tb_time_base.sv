// tb_time_base: with a scaled sub-second counter (2^8 ticks per second and an
// interrupt every 2^5 ticks) checks internal mode (1 Hz every 2^8 ticks, 8
// interrupts per second, seconds count), the load of a new seconds value at
// the next 1 Hz pulse, and external mode following the probe sync.
module tb_time_base;
  localparam int SW = 8, IS = 5;
  logic clk = 0, rst_n = 0, cdi_tick = 0, sync_rise = 0, ext_mode = 0, time_load = 0;
  logic [31:0] time_value, seconds;
  logic [SW-1:0] subsec;
  logic pps, tick256;
  int checks = 0, failures = 0, npps = 0, nint = 0, ticks = 0;
  time_base #(.SUBSEC_W(SW), .INT_SHIFT(IS)) dut (.*);
  always #5 clk = ~clk;
  int div = 0;
  always @(posedge clk) begin div <= (div == 1) ? 0 : div + 1; cdi_tick <= (div == 1); end
  always @(posedge clk) begin if (pps) npps++; if (tick256) nint++; if (cdi_tick) ticks++; end
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t0;
    repeat (3) @(posedge clk); rst_n = 1;
    // internal mode: measure ticks between pps
    @(posedge clk iff pps); t0 = ticks; npps = 0; nint = 0;
    repeat (3) @(posedge clk iff pps);
    check(ticks - t0 == 3 * (1 << SW), $sformatf("ticks per 3 s %0d", ticks - t0));
    check(nint == 3 * (1 << (SW - IS)), $sformatf("interrupts %0d", nint));
    check(seconds == 4, $sformatf("seconds %0d", seconds));
    // load
    @(negedge clk); time_value = 32'hDEAD0000; time_load = 1; @(negedge clk); time_load = 0;
    #1 check(seconds == 4, "load waits for pps");
    @(posedge clk iff pps); #1;
    check(seconds == 32'hDEAD0000 && subsec == 0, "loaded at pps");
    @(posedge clk iff pps); #1;
    check(seconds == 32'hDEAD0001, "counts after load");
    // external mode: sync every 100 ticks
    ext_mode = 1; npps = 0;
    repeat (5) begin
      repeat (100) @(posedge clk iff cdi_tick);
      @(negedge clk); sync_rise = 1; @(negedge clk); sync_rise = 0; #1;
      check(subsec == 0, "fraction zero at sync");
      check(pps == 1 || npps > 0, "pps follows sync");
    end
    repeat (2) @(posedge clk); #1;
    check(npps == 5, $sformatf("5 external pps, saw %0d", npps));
    check(seconds == 32'hDEAD0006, $sformatf("seconds %h", seconds));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
