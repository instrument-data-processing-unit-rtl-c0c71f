// time_base: IDPU time keeping.
// The probe delivers a 2^23 Hz clock (cdi_tick, one strobe per rising edge), a
// 1 Hz sync pulse and, by command, the 32-bit UTC seconds value.  A sub-second
// counter counts 2^23 Hz ticks.  In external clock mode the 1 Hz clock follows
// the probe sync and clears the fraction; in internal mode it comes from the
// sub-second counter wrapping.  Both modes, 32-bit integer seconds with a zero
// fraction at the 1 Hz pulse, and the 256 Hz interrupt (one per 2^15 ticks,
// so time is kept to 1/256 s) follow the IDPU description.  A seconds value
// written with time_load is taken at the next 1 Hz pulse (this design's
// choice of how the "periodic synchronizing command" is applied).
// Outputs: pps (1 Hz clock pulse), tick256 (256 Hz interrupt), seconds,
// subsec (full fraction in 2^-SUBSEC_W s), all updated one clock after the
// causing strobe.
module time_base #(
  parameter int unsigned SUBSEC_W = 23,   // ticks per second = 2^SUBSEC_W
  parameter int unsigned INT_SHIFT = 15   // 2^(SUBSEC_W-INT_SHIFT) = 256 Hz
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cdi_tick,
  input  logic                sync_rise,   // probe 1 Hz sync, rising edge strobe
  input  logic                ext_mode,    // 1: external clock mode
  input  logic                time_load,   // strobe: new seconds value
  input  logic [31:0]         time_value,
  output logic [31:0]         seconds,
  output logic [SUBSEC_W-1:0] subsec,
  output logic                pps,
  output logic                tick256
);
  logic        load_pend;
  logic [31:0] load_val;
  logic        wrap, second;

  assign wrap   = cdi_tick && (subsec == '1);
  assign second = ext_mode ? sync_rise : wrap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seconds <= '0; subsec <= '0; pps <= 1'b0; tick256 <= 1'b0;
      load_pend <= 1'b0; load_val <= '0;
    end else begin
      pps     <= second;
      tick256 <= 1'b0;
      if (time_load) begin
        load_pend <= 1'b1;
        load_val  <= time_value;
      end
      if (second) begin
        subsec <= '0;
        tick256 <= 1'b1;
        if (load_pend && !time_load) begin
          seconds   <= load_val;
          load_pend <= 1'b0;
        end else begin
          seconds <= seconds + 1'b1;
        end
      end else if (cdi_tick) begin
        // in external mode the fraction stops at its top value if a sync is late
        if (!(ext_mode && subsec == '1)) subsec <= subsec + 1'b1;
        if (subsec[INT_SHIFT-1:0] == '1 && subsec != '1) tick256 <= 1'b1;
      end
    end
  end
endmodule
