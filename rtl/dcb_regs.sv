// dcb_regs: the DCB FPGA register file seen by the 8085 in its I/O space.
// The IDPU description says the CPU reaches the FPGA functions through
// registers (control register with the EEPROM write-protect bit, two page
// registers, watchdog clear, ADC control, timing, error counters and scrub
// address); the addresses, bit fields and the remaining registers are this
// design's and are listed in idpu_pkg.  Writes act on the io_wr strobe;
// reads are combinational from io_addr, with side effects on io_rd (reading
// the low seconds byte snapshots the time so all bytes belong together).
// Multi-byte values are written low byte first; the pointer and time values
// take effect on the write of their last byte or on their load strobe.
// Reset values: ROM mapped, EEPROM write-protected, internal clock mode,
// HST disabled, scrubber off, pages 0.
module dcb_regs
  import idpu_pkg::*;
#(
  parameter int unsigned N_CDI  = 4,
  parameter int unsigned SSR_AW = 26
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              io_rd,
  input  logic              io_wr,
  input  logic [7:0]        io_addr,
  input  logic [7:0]        io_wdata,
  output logic [7:0]        io_rdata,
  // control
  output logic              rom_off,
  output logic              eeprom_wp,
  output logic              clk_ext,
  output logic              hst_en,
  output logic              hst_flush,
  output logic              wd_clear,
  output logic [15:0]       page0,
  output logic [15:0]       page1,
  // CDI command channels
  output cdi_word_t         cdi_word,
  output logic [N_CDI-1:0]  cdi_send,
  input  logic [N_CDI-1:0]  cdi_ready,
  input  logic              tlm_overrun,   // strobe from any receiver
  // housekeeping ADC
  output logic              adc_we,
  output logic [2:0]        adc_ch,
  output logic              adc_nap,
  output logic              adc_start,
  input  logic              adc_busy,
  input  logic [11:0]       adc_result,
  // time
  input  logic [31:0]       seconds,
  input  logic [7:0]        time256,
  output logic              time_load,
  output logic [31:0]       time_value,
  // spin
  output logic [15:0]       spin_period,
  input  logic [7:0]        spin_phase,
  input  logic [15:0]       sun_time,
  // SSR
  input  logic [7:0]        sbe_cnt,
  input  logic [7:0]        mbe_cnt,
  input  logic [7:0]        scrub_hi,
  output logic              clr_sbe,
  output logic              clr_mbe,
  output logic              scrub_en,
  output logic              wptr_load,
  output logic [SSR_AW-1:0] wptr_val,
  input  logic [SSR_AW-1:0] wptr,          // live write pointer
  input  logic              ssr_ready,     // SDRAM initialised
  output logic              rd_go,
  output logic [SSR_AW-1:0] rd_ptr,
  output logic [15:0]       rd_len,
  input  logic              rd_busy,
  input  logic              frame_done,
  // UART DMA channels (0: commands in, 1: telemetry out)
  output logic [1:0]        dma_start,
  output logic [16:0]       dma_addr [2],
  output logic [7:0]        dma_len [2],
  input  logic [1:0]        dma_busy,
  input  logic              uart_err
);
  logic [31:0] wptr_b, rptr_b;
  logic [31:8] tsnap;
  logic [7:0]  tsub_snap;
  logic        ovr_sticky, fd_sticky, err_sticky;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rom_off <= 1'b0; eeprom_wp <= 1'b1; clk_ext <= 1'b0; hst_en <= 1'b0; hst_flush <= 1'b0;
      wd_clear <= 1'b0; page0 <= '0; page1 <= '0; cdi_word <= '0; cdi_send <= '0;
      adc_we <= 1'b0; adc_ch <= '0; adc_nap <= 1'b1; adc_start <= 1'b0;
      time_load <= 1'b0; time_value <= '0; spin_period <= 16'd1535;
      clr_sbe <= 1'b0; clr_mbe <= 1'b0; scrub_en <= 1'b0; wptr_load <= 1'b0; rd_go <= 1'b0;
      wptr_b <= '0; rptr_b <= '0; rd_len <= '0; dma_start <= '0;
      dma_addr[0] <= '0; dma_addr[1] <= '0; dma_len[0] <= '0; dma_len[1] <= '0;
      tsnap <= '0; tsub_snap <= '0; ovr_sticky <= 1'b0; fd_sticky <= 1'b0; err_sticky <= 1'b0;
    end else begin
      hst_flush <= 1'b0; wd_clear <= 1'b0; cdi_send <= '0; adc_we <= 1'b0; adc_start <= 1'b0;
      time_load <= 1'b0; clr_sbe <= 1'b0; clr_mbe <= 1'b0; wptr_load <= 1'b0; rd_go <= 1'b0;
      dma_start <= '0;
      if (tlm_overrun) ovr_sticky <= 1'b1;
      if (frame_done)  fd_sticky  <= 1'b1;
      if (uart_err)    err_sticky <= 1'b1;
      if (io_rd && io_addr == IO_TIME0) begin
        tsnap     <= seconds[31:8];
        tsub_snap <= time256;
      end
      if (io_wr) begin
        case (io_addr)
          IO_CTRL: begin
            rom_off <= io_wdata[0]; eeprom_wp <= io_wdata[1];
            clk_ext <= io_wdata[2]; hst_en    <= io_wdata[3];
            hst_flush <= io_wdata[7];
          end
          IO_WDCLR:    wd_clear <= 1'b1;
          IO_PAGE0_LO: page0[7:0]  <= io_wdata;
          IO_PAGE0_HI: page0[15:8] <= io_wdata;
          IO_PAGE1_LO: page1[7:0]  <= io_wdata;
          IO_PAGE1_HI: page1[15:8] <= io_wdata;
          IO_CDI_A:    cdi_word.addr       <= io_wdata;
          IO_CDI_DH:   cdi_word.data[15:8] <= io_wdata;
          IO_CDI_DL:   cdi_word.data[7:0]  <= io_wdata;
          IO_CDI_GO:   if (io_wdata < 8'(N_CDI)) cdi_send[io_wdata[$clog2(N_CDI)-1:0]] <= 1'b1;
          IO_CDI_STAT: ovr_sticky <= 1'b0;
          IO_ADC_CTRL: begin
            adc_we <= 1'b1; adc_ch <= io_wdata[2:0]; adc_nap <= io_wdata[3]; adc_start <= io_wdata[4];
          end
          8'h20, 8'h21, 8'h22, 8'h23: time_value[8*io_addr[1:0] +: 8] <= io_wdata;
          IO_TIME_LD:    time_load <= 1'b1;
          IO_SPIN_PER_L: spin_period[7:0]  <= io_wdata;
          IO_SPIN_PER_H: spin_period[15:8] <= io_wdata;
          IO_SSR_CLR: begin
            clr_sbe <= io_wdata[0]; clr_mbe <= io_wdata[1]; scrub_en <= io_wdata[2];
          end
          8'h34, 8'h35, 8'h36: wptr_b[8*(io_addr[1:0])   +: 8] <= io_wdata;
          8'h37: begin wptr_b[31:24] <= io_wdata; wptr_load <= 1'b1; end
          8'h38, 8'h39, 8'h3A, 8'h3B: rptr_b[8*io_addr[1:0] +: 8] <= io_wdata;
          8'h3C: rd_len[7:0]  <= io_wdata;
          8'h3D: rd_len[15:8] <= io_wdata;
          IO_SSR_RGO:  rd_go <= 1'b1;
          IO_SSR_STAT: fd_sticky <= 1'b0;
          8'h40, 8'h41, 8'h42, 8'h48, 8'h49, 8'h4A: begin
            if (io_addr[1:0] == 2'd2) dma_addr[io_addr[3]][16] <= io_wdata[0];
            else dma_addr[io_addr[3]][8*io_addr[0] +: 8] <= io_wdata;
          end
          8'h43, 8'h4B: dma_len[io_addr[3]] <= io_wdata;
          8'h44, 8'h4C: begin dma_start[io_addr[3]] <= 1'b1; err_sticky <= 1'b0; end
          default: ;
        endcase
      end
    end
  end

  assign wptr_val = wptr_b[SSR_AW-1:0];
  assign rd_ptr   = rptr_b[SSR_AW-1:0];

  always_comb begin
    io_rdata = 8'h00;
    case (io_addr)
      IO_CTRL:       io_rdata = {4'b0, hst_en, clk_ext, eeprom_wp, rom_off};
      IO_PAGE0_LO:   io_rdata = page0[7:0];
      IO_PAGE0_HI:   io_rdata = page0[15:8];
      IO_PAGE1_LO:   io_rdata = page1[7:0];
      IO_PAGE1_HI:   io_rdata = page1[15:8];
      IO_CDI_STAT:   io_rdata = {ovr_sticky, 7'(~cdi_ready)};
      IO_ADC_STAT:   io_rdata = {adc_result[11:8], 3'b0, adc_busy};
      IO_ADC_DATA:   io_rdata = adc_result[7:0];
      8'h20:         io_rdata = seconds[7:0];
      8'h21:         io_rdata = tsnap[15:8];
      8'h22:         io_rdata = tsnap[23:16];
      8'h23:         io_rdata = tsnap[31:24];
      IO_TIME_SUB:   io_rdata = tsub_snap;
      IO_SPIN_PER_L: io_rdata = spin_period[7:0];
      IO_SPIN_PER_H: io_rdata = spin_period[15:8];
      IO_SPIN_PHASE: io_rdata = spin_phase;
      IO_SUN_T_L:    io_rdata = sun_time[7:0];
      IO_SUN_T_H:    io_rdata = sun_time[15:8];
      IO_SSR_SBE:    io_rdata = sbe_cnt;
      IO_SSR_MBE:    io_rdata = mbe_cnt;
      IO_SSR_SCRUB:  io_rdata = scrub_hi;
      IO_SSR_CLR:    io_rdata = {5'b0, scrub_en, 2'b0};
      IO_SSR_STAT:   io_rdata = {5'b0, ssr_ready, fd_sticky, rd_busy};
      8'h34, 8'h35, 8'h36, 8'h37: io_rdata = 8'(32'(wptr) >> (8 * io_addr[1:0]));
      8'h44:         io_rdata = {5'b0, err_sticky, 1'b0, dma_busy[0]};
      8'h4C:         io_rdata = {7'b0, dma_busy[1]};
      default:       io_rdata = 8'h00;
    endcase
  end
endmodule
