// pcb_ctrl: logic of the Power Controller Board FPGA.
// The PCB receives commands from the DCB over its own CDI link and drives 28
// switch control signals: 9 instrument services, 5 operational heater
// services and 14 actuator services (SST attenuators 2, ESA cover 1, EFI doors
// 4, SCM/FGM booms and back-ups 4, EFI axial boom and back-ups 3).  Current
// limiters latch: an over-current on a service turns it off until the DCB
// clears the trip.  Actuator services also need the separate enabling plug
// (lock-out for ground safety).  Analog housekeeping is multiplexed at an
// address set by command.  Those functions follow the IDPU description.
// The CDI register map is this design's own (16-bit data words):
//   0x00 switch enables [15:0]      0x01 switch enables [27:16]
//   0x02 clear trips [15:0]         0x03 clear trips [27:16]
//   0x04 housekeeping mux address [7:0]
// Commands take effect the clock after the CDI word is complete.  Reset
// (power-on) leaves every service off, as for Safe Mode.
module pcb_ctrl
  import idpu_pkg::*;
#(
  parameter int unsigned N_SW      = 28,
  parameter int unsigned ACT_FIRST = 14,   // services ACT_FIRST..N_SW-1 are actuators
  parameter int unsigned BIT_TICKS = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cdi_tick,
  input  logic            cdi_sdi,
  input  logic [N_SW-1:0] oc,           // over-current comparators
  input  logic            act_plug,     // actuator enabling plug present
  output logic [N_SW-1:0] sw_on,        // switch gate drives
  output logic [N_SW-1:0] trip,         // latched limiter trips
  output logic [7:0]      hk_mux
);
  logic      wv;
  cdi_word_t w;
  logic [N_SW-1:0] en, act_mask;

  cdi_rx #(.BIT_TICKS(BIT_TICKS)) u_rx (
    .clk, .rst_n, .cdi_tick, .sdi(cdi_sdi), .ack(wv), .word_valid(wv), .word(w), .overrun());

  always_comb begin
    act_mask = '0;
    for (int unsigned i = ACT_FIRST; i < N_SW; i++) act_mask[i] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en <= '0; trip <= '0; hk_mux <= '0;
    end else begin
      trip <= trip | (oc & sw_on);
      if (wv) begin
        case (w.addr)
          8'h00: en[15:0] <= w.data;
          8'h01: en[N_SW-1:16] <= w.data[N_SW-17:0];
          8'h02: trip[15:0] <= trip[15:0] & ~w.data;
          8'h03: trip[N_SW-1:16] <= trip[N_SW-1:16] & ~w.data[N_SW-17:0];
          8'h04: hk_mux <= w.data[7:0];
          default: ;
        endcase
      end
    end
  end

  assign sw_on = en & ~trip & ~(act_mask & {N_SW{!act_plug}});
endmodule
