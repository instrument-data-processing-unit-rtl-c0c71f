// tb_spin_sector: with period 2 (pulse every 3 ticks) checks the count of
// SpinSector pulses (32 per spin) and SpinSynch pulses (1 per spin), the tick
// count of one spin, and the phase/time capture at a sun pulse.
module tb_spin_sector;
  localparam int CW = 14;
  logic clk = 0, rst_n = 0, base_tick = 0, sun_rise = 0;
  logic [15:0] period = 16'd2, subsec16 = 16'h1234;
  logic sector_pulse, synch_pulse, sun_flag;
  logic [7:0] phase8;
  logic [CW-1:0] sun_phase;
  logic [15:0] sun_time;
  int checks = 0, failures = 0, nsec = 0, nsyn = 0, ticks = 0;
  spin_sector dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) base_tick <= ~base_tick;
  always @(posedge clk) begin if (sector_pulse) nsec++; if (synch_pulse) nsyn++; if (base_tick) ticks++; end
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(posedge clk iff synch_pulse); t0 = ticks; nsec = 0; nsyn = 0;
    @(posedge clk iff synch_pulse);
    check(ticks - t0 == 3 * (1 << CW), $sformatf("ticks per spin %0d", ticks - t0));
    check(nsec == 32, $sformatf("sectors per spin %0d", nsec));
    check(nsyn == 1, "one synch per spin");
    // sun pulse at a known point: 1000 pulses after the synch
    repeat (3 * 1000) @(posedge clk iff base_tick);
    @(negedge clk); subsec16 = 16'hBEEF; sun_rise = 1; @(negedge clk); sun_rise = 0; #1;
    check(sun_flag, "capture flag");
    check(sun_time == 16'hBEEF, "sun time captured");
    check(sun_phase >= 999 && sun_phase <= 1001, $sformatf("sun phase %0d", sun_phase));
    check(phase8 == 8'(sun_phase >> 6), "phase8 = top 8 bits");
    // reprogram period: spin length follows
    period = 16'd0;
    @(posedge clk iff synch_pulse); t0 = ticks;
    @(posedge clk iff synch_pulse);
    check(ticks - t0 == (1 << CW), $sformatf("ticks per spin at period 0: %0d", ticks - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
