// idpu_top: the digital logic of the IDPU: the Data Controller Board (DCB)
// FPGA and the Power Controller Board (PCB) FPGA, joined by the PCB's CDI link.
// The DCB FPGA serves the 8085 bus (cpu_bus, dcb_regs), generates the system
// reset (reset_wdog), keeps time from the spacecraft clocks (time_base,
// spin_sector), sends commands to and receives telemetry from the instrument
// boards (cdi_tx, cdi_rx, tlm_merge), stores telemetry in the SDRAM solid
// state recorder with EDAC and scrubbing (ssr_ctrl, edac, sdram_ctrl), plays
// packets back into High Speed Telemetry frames (hst_framer), exchanges
// command and housekeeping blocks with the spacecraft over the UART through
// DMA (uart, dma_chan) and runs the housekeeping ADC (hk_adc_ctrl).
// CDI channels: 0 DFB/BEB (fields), 1 FGE, 2 ETC (particles), 3 PCB (inside).
// Telemetry returns from channels 0-2.  All logic runs on the 20 MHz clock;
// the 2^23 Hz spacecraft clock, the 1 Hz sync and the sun pulse are
// synchronised and used as strobes, and the 2^23 Hz clock is passed on to
// the instrument boards as their CDI clock.  The default parameters are the
// flight values; the testbench scales several of them.
// Some sub-block outputs are deliberately left unused here (the synchroniser
// levels, the ADC done strobe, the 14-bit sun-phase capture, the DMA stall and
// target outputs of cpu_bus, the playback end-of-packet flag, the RX DMA
// ready): software polls status bits instead, so lint lists them as unused.
module idpu_top
  import idpu_pkg::*;
#(
  parameter int unsigned CLK_HZ         = 20_000_000,
  parameter int unsigned WDOG_SECONDS   = 3,
  parameter int unsigned SUBSEC_W       = 23,
  parameter int unsigned INT_SHIFT      = 15,
  parameter int unsigned CDI_BIT_TICKS  = 8,
  parameter int unsigned UART_CPB       = 521,
  parameter int unsigned FRAME_BYTES    = 1024,
  parameter int unsigned HST_BIT_DIV    = 10,
  parameter int unsigned SD_ROW_W       = 13,
  parameter int unsigned SD_COL_W       = 11,
  parameter int unsigned SD_BANK_W      = 2,
  parameter int unsigned SD_INIT_CYCLES = 2000,
  parameter int unsigned SD_REF_CYCLES  = 156,
  parameter int unsigned SCRUB_INTERVAL = 64,
  parameter int unsigned ADC_SCLK_DIV   = 10,
  localparam int unsigned SSR_AW        = SD_ROW_W + SD_COL_W + SD_BANK_W,
  localparam int unsigned N_CDI         = 4,
  localparam int unsigned N_TLM         = 3,
  localparam int unsigned N_SW          = 28
) (
  input  logic                 clk,          // 20 MHz local oscillator
  input  logic                 por_n,        // power-on reset (RC network)
  input  logic                 wd_disable,   // watchdog jumper
  output logic                 sys_rst_n,
  // 8085 bus
  input  logic [7:0]           cpu_a_hi,
  input  logic [7:0]           cpu_ad_in,
  output logic [7:0]           cpu_ad_out,
  output logic                 cpu_ad_oe,
  input  logic                 cpu_ale,
  input  logic                 cpu_rd_n,
  input  logic                 cpu_wr_n,
  input  logic                 cpu_io_m,
  output logic                 cpu_ready,
  output logic                 cpu_int_256hz,
  output logic                 cpu_int_sun,
  // boot ROM, EEPROM, SRAM
  output logic                 rom_cs_n,
  output logic                 rom_pwr_en,
  output logic                 ee_cs_n,
  output logic                 ee_oe_n,
  output logic                 ee_we_n,
  output logic [2:0]           ee_a_hi,
  output logic [16:0]          sram_a,
  output logic [7:0]           sram_d_out,
  output logic                 sram_d_oe,
  input  logic [7:0]           sram_d_in,
  output logic                 sram_ce_n,
  output logic                 sram_oe_n,
  output logic                 sram_we_n,
  // SSR SDRAM
  output logic                 sd_cke,
  output logic                 sd_cs_n,
  output logic                 sd_ras_n,
  output logic                 sd_cas_n,
  output logic                 sd_we_n,
  output logic [SD_BANK_W-1:0] sd_ba,
  output logic [SD_ROW_W-1:0]  sd_a,
  output logic [31:0]          sd_dq_out,
  output logic                 sd_dq_oe,
  input  logic [31:0]          sd_dq_in,
  // spacecraft (BAU) interface
  input  logic                 sc_clk_8m,    // 2^23 Hz
  input  logic                 sc_sync_1hz,
  input  logic                 sc_sun_pulse,
  input  logic                 bau_cmd_rxd,  // UART from BAU
  output logic                 bau_lst_txd,  // UART to BAU
  input  logic                 bau_hst_ready,
  output logic                 hst_data,
  output logic                 hst_clk,
  output logic                 hst_active,
  // instrument boards (CDI channels 0..2)
  output logic [N_TLM-1:0]     cdi_clk,
  output logic [N_TLM-1:0]     cdi_cmd,
  input  logic [N_TLM-1:0]     cdi_tlm,
  output logic                 instr_1hz,    // DCB 1 Hz clock
  output logic                 spin_sector_pulse,
  output logic                 spin_synch_pulse,
  // housekeeping ADC
  output logic [2:0]           adc_mux_sel,
  output logic                 adc_nap,
  output logic                 adc_cs_n,
  output logic                 adc_sclk,
  input  logic                 adc_sdo,
  // PCB power switches
  input  logic [N_SW-1:0]      pcb_oc,
  input  logic                 pcb_act_plug,
  output logic [N_SW-1:0]      pcb_sw_on,
  output logic [N_SW-1:0]      pcb_trip,
  output logic [7:0]           pcb_hk_mux
);
  logic rst_n;
  assign rst_n = sys_rst_n;

  // ---------------- spacecraft timing inputs ----------------
  logic ck8_q, ck8_tick, sync_q, sync_rise, sun_q, sun_rise;
  edge_sync u_ck8  (.clk, .rst_n, .d(sc_clk_8m),    .q(ck8_q),  .rise(ck8_tick));
  edge_sync u_sync (.clk, .rst_n, .d(sc_sync_1hz),  .q(sync_q), .rise(sync_rise));
  edge_sync u_sun  (.clk, .rst_n, .d(sc_sun_pulse), .q(sun_q),  .rise(sun_rise));
  assign cdi_clk = {N_TLM{sc_clk_8m}};

  // ---------------- register file wires ----------------
  logic io_rd, io_wr; logic [7:0] io_addr, io_wdata, io_rdata;
  logic rom_off, eeprom_wp, clk_ext, hst_en, hst_flush, wd_clear;
  logic [15:0] page0, page1, spin_period, sun_time;
  cdi_word_t cdi_word; logic [N_CDI-1:0] cdi_send, cdi_ready, cdi_sdo;
  logic [2:0] tlm_ovr;
  logic adc_we, adc_ch_nap, adc_start, adc_busy, adc_done; logic [2:0] adc_ch; logic [11:0] adc_result;
  logic [31:0] seconds; logic [SUBSEC_W-1:0] subsec; logic time_load; logic [31:0] time_value;
  logic pps, tick256; logic [7:0] spin_phase; logic [13:0] sun_phase; logic sun_flag;
  logic [7:0] sbe_cnt, mbe_cnt, scrub_hi; logic clr_sbe, clr_mbe, scrub_en, wptr_load, rd_go, rd_busy;
  logic [SSR_AW-1:0] wptr_val, wptr, rd_ptr;
  logic mem_req, mem_we, mem_ack, sd_init_done; logic [15:0] rd_len; logic frame_done;
  logic [1:0] dma_start, dma_busy; logic [16:0] dma_addr [2]; logic [7:0] dma_len [2];
  logic uart_err;

  // ---------------- reset and watchdog ----------------
  reset_wdog #(.CLK_HZ(CLK_HZ), .WDOG_SECONDS(WDOG_SECONDS)) u_rst (
    .clk, .por_n, .wd_clear, .wd_disable, .wd_fired(), .sys_rst_n);

  // ---------------- CPU bus ----------------
  logic ssr_req, ssr_we, ssr_ack; logic [SSR_AW+1:0] ssr_addr; logic [7:0] ssr_wdata, ssr_rdata;
  logic dma_req, dma_we, dma_ack, dma_stall; logic [16:0] dma_maddr; logic [7:0] dma_wdata, dma_rdata;
  mem_tgt_e tgt;
  cpu_bus #(.SSR_AW(SSR_AW + 2)) u_bus (
    .clk, .rst_n, .cpu_a_hi, .cpu_ad_in, .cpu_ad_out, .cpu_ad_oe, .cpu_ale, .cpu_rd_n, .cpu_wr_n,
    .cpu_io_m, .cpu_ready, .rom_off, .eeprom_wp, .page0, .page1, .rom_cs_n, .rom_pwr_en,
    .ee_cs_n, .ee_oe_n, .ee_we_n, .ee_a_hi, .sram_a, .sram_d_out, .sram_d_oe, .sram_d_in,
    .sram_ce_n, .sram_oe_n, .sram_we_n, .ssr_req, .ssr_we, .ssr_addr, .ssr_wdata, .ssr_ack,
    .ssr_rdata, .io_rd, .io_wr, .io_addr, .io_wdata, .io_rdata, .dma_req, .dma_we,
    .dma_addr(dma_maddr), .dma_wdata, .dma_ack, .dma_rdata, .dma_stall, .tgt);

  dcb_regs #(.N_CDI(N_CDI), .SSR_AW(SSR_AW)) u_regs (
    .clk, .rst_n, .io_rd, .io_wr, .io_addr, .io_wdata, .io_rdata,
    .rom_off, .eeprom_wp, .clk_ext, .hst_en, .hst_flush, .wd_clear, .page0, .page1,
    .cdi_word, .cdi_send, .cdi_ready, .tlm_overrun(|tlm_ovr),
    .adc_we, .adc_ch, .adc_nap(adc_ch_nap), .adc_start, .adc_busy, .adc_result,
    .seconds, .time256(subsec[SUBSEC_W-1 -: 8]), .time_load, .time_value,
    .spin_period, .spin_phase, .sun_time,
    .sbe_cnt, .mbe_cnt, .scrub_hi, .clr_sbe, .clr_mbe, .scrub_en, .wptr_load, .wptr_val,
    .wptr, .ssr_ready(sd_init_done), .rd_go, .rd_ptr, .rd_len, .rd_busy, .frame_done,
    .dma_start, .dma_addr, .dma_len, .dma_busy, .uart_err);

  // ---------------- time and spin ----------------
  time_base #(.SUBSEC_W(SUBSEC_W), .INT_SHIFT(INT_SHIFT)) u_time (
    .clk, .rst_n, .cdi_tick(ck8_tick), .sync_rise, .ext_mode(clk_ext), .time_load, .time_value,
    .seconds, .subsec, .pps, .tick256);
  assign cpu_int_256hz = tick256;
  assign instr_1hz     = pps;

  spin_sector u_spin (
    .clk, .rst_n, .base_tick(ck8_tick), .period(spin_period), .sun_rise,
    .subsec16(16'(subsec >> (SUBSEC_W > 16 ? SUBSEC_W - 16 : 0))),
    .sector_pulse(spin_sector_pulse), .synch_pulse(spin_synch_pulse), .phase8(spin_phase),
    .sun_phase, .sun_time, .sun_flag);
  assign cpu_int_sun = sun_flag;

  // ---------------- CDI ----------------
  for (genvar c = 0; c < N_CDI; c++) begin : g_cdi_tx
    cdi_tx #(.BIT_TICKS(CDI_BIT_TICKS)) u_tx (
      .clk, .rst_n, .cdi_tick(ck8_tick), .word_valid(cdi_send[c]), .word(cdi_word),
      .ready(cdi_ready[c]), .sdo(cdi_sdo[c]));
  end
  assign cdi_cmd = cdi_sdo[N_TLM-1:0];

  logic [N_TLM-1:0] tlm_v, tlm_ack;
  cdi_word_t        tlm_w [N_TLM];
  for (genvar c = 0; c < N_TLM; c++) begin : g_cdi_rx
    cdi_rx #(.BIT_TICKS(CDI_BIT_TICKS)) u_rx (
      .clk, .rst_n, .cdi_tick(ck8_tick), .sdi(cdi_tlm[c]), .ack(tlm_ack[c]),
      .word_valid(tlm_v[c]), .word(tlm_w[c]), .overrun(tlm_ovr[c]));
  end

  logic tb_valid, tb_ready; logic [7:0] tb_data;
  tlm_merge #(.N(N_TLM)) u_merge (
    .clk, .rst_n, .w_valid(tlm_v), .w_word(tlm_w), .w_ack(tlm_ack),
    .b_valid(tb_valid), .b_data(tb_data), .b_ready(tb_ready));

  // ---------------- SSR ----------------
  logic [SSR_AW-1:0] mem_addr; logic [31:0] mem_wdata, mem_rdata;
  logic pb_valid, pb_sop, pb_eop, pb_ready; logic [7:0] pb_byte;
  ssr_ctrl #(.ADDR_W(SSR_AW), .SCRUB_INTERVAL(SCRUB_INTERVAL)) u_ssr (
    .clk, .rst_n, .tlm_valid(tb_valid), .tlm_byte(tb_data), .tlm_ready(tb_ready),
    .wptr_load, .wptr_val, .wptr, .rd_go, .rd_ptr, .rd_len, .rd_busy,
    .pb_valid, .pb_byte, .pb_sop, .pb_eop, .pb_ready,
    .cpu_req(ssr_req), .cpu_we(ssr_we), .cpu_addr(ssr_addr), .cpu_wdata(ssr_wdata),
    .cpu_ack(ssr_ack), .cpu_rdata(ssr_rdata),
    .scrub_en, .clr_sbe, .clr_mbe, .sbe_cnt, .mbe_cnt, .scrub_hi,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

  sdram_ctrl #(.DQ_W(32), .ROW_W(SD_ROW_W), .COL_W(SD_COL_W), .BANK_W(SD_BANK_W),
               .INIT_CYCLES(SD_INIT_CYCLES), .REF_CYCLES(SD_REF_CYCLES)) u_sdram (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .ack(mem_ack),
    .rdata(mem_rdata), .init_done(sd_init_done), .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n,
    .sd_ba, .sd_a, .sd_dq_out, .sd_dq_oe, .sd_dq_in);

  // ---------------- HST ----------------
  hst_framer #(.FRAME_BYTES(FRAME_BYTES), .BIT_DIV(HST_BIT_DIV)) u_hst (
    .clk, .rst_n, .enable(hst_en), .seconds, .in_valid(pb_valid), .in_byte(pb_byte),
    .in_sop(pb_sop), .in_ready(pb_ready), .flush(hst_flush), .bau_ready(bau_hst_ready),
    .hst_data, .hst_clk, .hst_active, .frame_done);

  // ---------------- UART and its DMA channels ----------------
  logic rx_valid, tx_valid, tx_ready, rx_s_ready; logic [7:0] rx_data, tx_data;
  uart #(.CLKS_PER_BIT(UART_CPB)) u_uart (
    .clk, .rst_n, .tx_valid, .tx_data, .tx_ready, .txd(bau_lst_txd),
    .rxd(bau_cmd_rxd), .rx_valid, .rx_data, .rx_err(uart_err));

  logic [1:0] dreq, dwe, dack; logic [16:0] dmaddr [2]; logic [7:0] dwdata [2];
  dma_chan #(.TO_MEM(1'b1)) u_dma_rx (
    .clk, .rst_n, .start(dma_start[0]), .start_addr(dma_addr[0]), .start_len(dma_len[0]),
    .busy(dma_busy[0]), .left(), .done(), .s_valid(rx_valid), .s_data(rx_data), .s_ready(rx_s_ready),
    .o_valid(), .o_data(), .o_ready(1'b0),
    .mem_req(dreq[0]), .mem_we(dwe[0]), .mem_addr(dmaddr[0]), .mem_wdata(dwdata[0]),
    .mem_ack(dack[0]), .mem_rdata(dma_rdata));
  dma_chan #(.TO_MEM(1'b0)) u_dma_tx (
    .clk, .rst_n, .start(dma_start[1]), .start_addr(dma_addr[1]), .start_len(dma_len[1]),
    .busy(dma_busy[1]), .left(), .done(), .s_valid(1'b0), .s_data(8'h00), .s_ready(),
    .o_valid(tx_valid), .o_data(tx_data), .o_ready(tx_ready),
    .mem_req(dreq[1]), .mem_we(dwe[1]), .mem_addr(dmaddr[1]), .mem_wdata(dwdata[1]),
    .mem_ack(dack[1]), .mem_rdata(dma_rdata));

  // the two channels share the SRAM DMA port; the command channel goes first
  logic dsel;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    dsel <= 1'b0;
    else if (!dma_req || dma_ack)  dsel <= !dreq[0] && dreq[1];
  end
  assign dma_req   = dreq[dsel] && !dma_ack;
  assign dma_we    = dwe[dsel];
  assign dma_maddr = dmaddr[dsel];
  assign dma_wdata = dwdata[dsel];
  assign dack      = {dma_ack && dsel, dma_ack && !dsel};

  // ---------------- housekeeping ADC ----------------
  hk_adc_ctrl #(.SCLK_DIV(ADC_SCLK_DIV)) u_adc (
    .clk, .rst_n, .ctrl_we(adc_we), .ctrl_ch(adc_ch), .ctrl_nap(adc_ch_nap), .ctrl_start(adc_start),
    .mux_sel(adc_mux_sel), .busy(adc_busy), .done(adc_done), .result(adc_result),
    .adc_nap, .adc_cs_n, .adc_sclk, .adc_sdo);

  // ---------------- PCB (CDI channel 3) ----------------
  pcb_ctrl #(.N_SW(N_SW), .BIT_TICKS(CDI_BIT_TICKS)) u_pcb (
    .clk, .rst_n, .cdi_tick(ck8_tick), .cdi_sdi(cdi_sdo[3]), .oc(pcb_oc), .act_plug(pcb_act_plug),
    .sw_on(pcb_sw_on), .trip(pcb_trip), .hk_mux(pcb_hk_mux));
endmodule
