// adc_model: behavioural model of a 12-bit serial housekeeping ADC with an
// 8-input analog mux in front.  On the falling edge of cs_n it samples the
// value of the selected channel (value = chan_base + 16*sel, a pattern the
// testbench can predict) and then shifts out 4 zeros and 12 bits MSB first,
// the first bit valid after the first falling sclk edge and the next after each further falling edge.  A conversion in nap mode
// returns all zeros.
module adc_model #(
  parameter logic [11:0] CHAN_BASE = 12'h155
) (
  input  logic [2:0] sel,
  input  logic       nap,
  input  logic       cs_n,
  input  logic       sclk,
  output logic       sdo
);
  logic [16:0] sh = '0;
  always @(negedge cs_n) sh = nap ? 17'h0 : {5'h0, CHAN_BASE + 12'(sel) * 12'd16};
  always @(negedge sclk) if (!cs_n) sh = {sh[15:0], 1'b0};
  assign sdo = sh[16];
endmodule
