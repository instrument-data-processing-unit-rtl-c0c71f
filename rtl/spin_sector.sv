// spin_sector: DCB spin sectoring circuit.
// A programmable pulse generator divides the 2^23 Hz probe clock (base_tick
// strobes) by period+1; its pulses clock a CNT_W-bit spin counter.  The upper
// SECTOR_BITS bits of the counter give the SpinSector pulse (2^5 per spin) and
// the full count the SpinSynch pulse (one per spin).  At each sun pulse the
// circuit captures the counter (spin phase) and a 16-bit sub-second time for
// the flight software, which closes the phase-locked loop by reprogramming
// period; phase8 gives the current phase to 8 bits.  The 14-bit counter,
// 5-bit sectors, 16-bit timing registers and 8-bit phase follow the IDPU
// description; the divider form and capture registers are this design's own.
// The description also mentions 2^16 pulses per spin for the software view;
// this block follows the 14-bit counter of the hardware section.
module spin_sector #(
  parameter int unsigned CNT_W       = 14,
  parameter int unsigned SECTOR_BITS = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             base_tick,
  input  logic [15:0]      period,       // pulse generator period - 1, in base ticks
  input  logic             sun_rise,     // sun pulse strobe
  input  logic [15:0]      subsec16,     // current sub-second time
  output logic             sector_pulse,
  output logic             synch_pulse,
  output logic [7:0]       phase8,
  output logic [CNT_W-1:0] sun_phase,
  output logic [15:0]      sun_time,
  output logic             sun_flag      // one-cycle strobe: capture done
);
  localparam int unsigned LOW_W = CNT_W - SECTOR_BITS;
  logic [15:0]      div;
  logic [CNT_W-1:0] cnt;
  logic             pg;

  assign pg     = base_tick && (div == period);
  assign phase8 = cnt[CNT_W-1 -: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; cnt <= '0; sector_pulse <= 1'b0; synch_pulse <= 1'b0;
      sun_phase <= '0; sun_time <= '0; sun_flag <= 1'b0;
    end else begin
      sector_pulse <= 1'b0;
      synch_pulse  <= 1'b0;
      sun_flag     <= 1'b0;
      if (base_tick) div <= pg ? '0 : div + 1'b1;
      if (pg) begin
        cnt <= cnt + 1'b1;
        if (cnt[LOW_W-1:0] == '1) sector_pulse <= 1'b1;
        if (cnt == '1)            synch_pulse  <= 1'b1;
      end
      if (sun_rise) begin
        sun_phase <= cnt;
        sun_time  <= subsec16;
        sun_flag  <= 1'b1;
      end
    end
  end
endmodule
