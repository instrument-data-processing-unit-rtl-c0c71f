// reset_wdog: IDPU system reset generator.
// The reset is the OR of two sources, as in the DCB: the power-on reset
// (an RC network and Schmitt gate outside the FPGA, here the por_n input) and a
// watchdog.  The watchdog counts system clocks and fires when the CPU has not
// written the Watchdog Reset Clear register (wd_clear pulse) for WDOG_SECONDS;
// a jumper input (wd_disable) turns it off for test and debug.
// The watchdog pulse lasts PULSE_CYCLES clocks (this design's choice) and
// restarts the count.  por_n is synchronised; sys_rst_n is asserted
// asynchronously and released synchronously, two clocks after both sources end.
module reset_wdog #(
  parameter int unsigned CLK_HZ       = 20_000_000,
  parameter int unsigned WDOG_SECONDS = 3,
  parameter int unsigned PULSE_CYCLES = 16
) (
  input  logic clk,
  input  logic por_n,       // power-on reset from the RC network, active low
  input  logic wd_clear,    // one-cycle pulse: CPU wrote the clear register
  input  logic wd_disable,  // jumper: watchdog off
  output logic wd_fired,    // one-cycle pulse when the watchdog expires
  output logic sys_rst_n    // IDPU reset, active low
);
  localparam longint unsigned LIMIT = longint'(CLK_HZ) * WDOG_SECONDS;
  localparam int unsigned CW = $clog2(LIMIT + 1);
  localparam int unsigned PW = $clog2(PULSE_CYCLES + 1);

  logic [CW-1:0] wd_cnt;
  logic [PW-1:0] pulse_cnt;
  logic          wd_rst;
  logic [1:0]    rst_sync;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      wd_cnt    <= '0;
      pulse_cnt <= '0;
      wd_fired  <= 1'b0;
    end else begin
      wd_fired <= 1'b0;
      if (pulse_cnt != 0) begin
        pulse_cnt <= pulse_cnt - 1'b1;
        wd_cnt    <= '0;
      end else if (wd_disable || wd_clear) begin
        wd_cnt <= '0;
      end else if (wd_cnt == CW'(LIMIT - 1)) begin
        wd_cnt    <= '0;
        wd_fired  <= 1'b1;
        pulse_cnt <= PW'(PULSE_CYCLES);
      end else begin
        wd_cnt <= wd_cnt + 1'b1;
      end
    end
  end

  assign wd_rst = (pulse_cnt != 0);

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n)      rst_sync <= 2'b00;
    else if (wd_rst) rst_sync <= 2'b00;
    else             rst_sync <= {rst_sync[0], 1'b1};
  end
  assign sys_rst_n = rst_sync[1];

endmodule
