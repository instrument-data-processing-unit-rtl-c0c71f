// hk_adc_ctrl: housekeeping ADC control.
// The DCB ADC samples one of 8 analog mux inputs.  The CPU selects the mux
// channel through the ADC control register, waits for the switch and filter to
// settle and then starts a conversion; the ADC stays in nap (shutdown) mode,
// which is the reset default, until the CPU wakes it.  That sequence follows
// the IDPU description.  The ADC part is not named, so the converter interface
// is this design's assumption: a 12-bit serial ADC read by a 16-clock frame
// (cs_n low, data changes after each falling sclk edge, 4 leading zeros then
// 12 bits MSB first, sampled here on rising sclk edges), and an active-high
// nap pin.  One sclk period is 2*SCLK_DIV system clocks; a conversion takes
// 16*2*SCLK_DIV + 2 clocks from start to done.
module hk_adc_ctrl #(
  parameter int unsigned SCLK_DIV = 10    // 1 MHz sclk from 20 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  // control register
  input  logic        ctrl_we,
  input  logic [2:0]  ctrl_ch,
  input  logic        ctrl_nap,
  input  logic        ctrl_start,
  output logic [2:0]  mux_sel,
  output logic        busy,
  output logic        done,         // one-cycle strobe
  output logic [11:0] result,
  // ADC pins
  output logic        adc_nap,
  output logic        adc_cs_n,
  output logic        adc_sclk,
  input  logic        adc_sdo
);
  localparam int unsigned DW = $clog2(SCLK_DIV + 1);
  logic [DW-1:0] dcnt;
  logic [4:0]    edges;       // rising sclk edges seen
  logic [15:0]   sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mux_sel <= '0; adc_nap <= 1'b1; busy <= 1'b0; done <= 1'b0; result <= '0;
      adc_cs_n <= 1'b1; adc_sclk <= 1'b1; dcnt <= '0; edges <= '0; sh <= '0;
    end else begin
      done <= 1'b0;
      if (ctrl_we && !busy) begin
        mux_sel <= ctrl_ch;
        adc_nap <= ctrl_nap;
        if (ctrl_start && !ctrl_nap) begin
          busy     <= 1'b1;
          adc_cs_n <= 1'b0;
          dcnt     <= '0;
          edges    <= '0;
        end
      end else if (busy) begin
        if (dcnt == DW'(SCLK_DIV - 1)) begin
          dcnt     <= '0;
          adc_sclk <= ~adc_sclk;
          if (!adc_sclk) begin                   // rising edge now
            sh    <= {sh[14:0], adc_sdo};
            edges <= edges + 1'b1;
            if (edges == 5'd15) begin
              busy     <= 1'b0;
              done     <= 1'b1;
              adc_cs_n <= 1'b1;
              result   <= {sh[10:0], adc_sdo};
            end
          end
        end else begin
          dcnt <= dcnt + 1'b1;
        end
      end
    end
  end
endmodule
