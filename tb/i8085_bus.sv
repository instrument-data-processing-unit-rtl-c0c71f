// i8085_bus: behavioural model of the 8085 bus cycles seen by the DCB FPGA,
// for testbenches.  A machine cycle is T1 (ALE high with the address, io_m
// set), T2 (RD or WR low; write data on AD), wait states while READY is low,
// and T3 (read data taken at its end, strobe released).  One T-state lasts
// T_CLKS system clocks (10 at 2 MHz against 20 MHz).  The AD bus value the
// CPU sees is ad_out of the FPGA when it drives, else ext_data (ROM/EEPROM).
module i8085_bus #(
  parameter int T_CLKS = 10
) (
  input  logic       clk,
  output logic [7:0] a_hi,
  output logic [7:0] ad,          // CPU drive
  output logic       ale,
  output logic       rd_n,
  output logic       wr_n,
  output logic       io_m,
  input  logic       ready,
  input  logic [7:0] fpga_ad,
  input  logic       fpga_oe,
  input  logic [7:0] ext_data
);
  initial begin a_hi = 0; ad = 0; ale = 0; rd_n = 1; wr_n = 1; io_m = 0; end
  int waits = 0;
  task automatic cycle(input logic is_io, input logic w, input logic [15:0] a,
                       input logic [7:0] d, output logic [7:0] q);
    @(negedge clk);
    a_hi = a[15:8]; ad = a[7:0]; io_m = is_io; ale = 1;
    repeat (T_CLKS / 2) @(negedge clk);
    ale = 0;
    repeat (T_CLKS - T_CLKS / 2) @(negedge clk);
    if (w) begin ad = d; wr_n = 0; end else begin ad = 8'hZZ; rd_n = 0; end
    repeat (T_CLKS) @(negedge clk);
    while (!ready) begin waits++; repeat (T_CLKS) @(negedge clk); end
    repeat (T_CLKS) @(negedge clk);
    q = fpga_oe ? fpga_ad : ext_data;
    rd_n = 1; wr_n = 1;
    repeat (T_CLKS) @(negedge clk);
  endtask
endmodule
