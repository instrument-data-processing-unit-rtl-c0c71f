// idpu_pkg: types and constants shared by the IDPU digital logic.
// The numbers that come straight from the IDPU description are the 20 MHz
// FPGA clock, the 2^23 Hz spacecraft CDI clock, 1 Mbps CDI words of 24 bits
// (8-bit address, 16-bit data), the 38.4 kbaud UART and the 64 KB 8085
// address space split at 32 K.  The CPU I/O register map and memory target
// codes are this design's own choices.
package idpu_pkg;

  localparam int unsigned SYS_CLK_HZ  = 20_000_000;  // DCB local oscillator
  localparam int unsigned CDI_CLK_HZ  = 1 << 23;     // spacecraft 8.4 MHz
  localparam int unsigned CDI_ADDR_W  = 8;
  localparam int unsigned CDI_DATA_W  = 16;
  localparam int unsigned CDI_WORD_W  = CDI_ADDR_W + CDI_DATA_W;

  // One CDI word: destination address and data value.
  typedef struct packed {
    logic [CDI_ADDR_W-1:0] addr;
    logic [CDI_DATA_W-1:0] data;
  } cdi_word_t;

  // Target of a CPU memory access after decoding and paging.
  typedef enum logic [2:0] {
    TGT_NONE   = 3'd0,
    TGT_ROM    = 3'd1,
    TGT_SRAM   = 3'd2,
    TGT_EEPROM = 3'd3,
    TGT_SSR    = 3'd4
  } mem_tgt_e;

  // Page register encoding: [15:14] space, [13:0] 16 KB page number.
  typedef enum logic [1:0] {
    PG_SRAM   = 2'd0,
    PG_EEPROM = 2'd1,
    PG_SSR    = 2'd2,
    PG_NONE   = 2'd3
  } page_space_e;

  // 8085 I/O port map of the DCB FPGA registers (this design's choice).
  localparam logic [7:0] IO_CTRL      = 8'h00; // [0] rom_off [1] eeprom_wp [2] clk_ext [3] hst_en
                                               // [7] write 1: flush the HST frame being filled
  localparam logic [7:0] IO_WDCLR     = 8'h01; // any write clears the watchdog
  localparam logic [7:0] IO_PAGE0_LO  = 8'h02;
  localparam logic [7:0] IO_PAGE0_HI  = 8'h03;
  localparam logic [7:0] IO_PAGE1_LO  = 8'h04;
  localparam logic [7:0] IO_PAGE1_HI  = 8'h05;
  localparam logic [7:0] IO_CDI_A     = 8'h08; // command word address byte
  localparam logic [7:0] IO_CDI_DH    = 8'h09;
  localparam logic [7:0] IO_CDI_DL    = 8'h0A;
  localparam logic [7:0] IO_CDI_GO    = 8'h0B; // write channel number: send
  localparam logic [7:0] IO_CDI_STAT  = 8'h0C; // read: busy bit per channel, [7] telemetry overrun
  localparam logic [7:0] IO_ADC_CTRL  = 8'h18; // [2:0] ch [3] nap [4] start
  localparam logic [7:0] IO_ADC_STAT  = 8'h19; // [0] busy [7:4] result[11:8]
  localparam logic [7:0] IO_ADC_DATA  = 8'h1A; // result[7:0]
  localparam logic [7:0] IO_TIME0     = 8'h20; // seconds bytes 0x20 (LSB)..0x23; reading 0x20 snapshots
  localparam logic [7:0] IO_TIME_SUB  = 8'h24; // read: 1/256 s of the snapshot
  localparam logic [7:0] IO_TIME_LD   = 8'h25; // write: load the bytes written to 0x20..0x23
  localparam logic [7:0] IO_SPIN_PER_L= 8'h28;
  localparam logic [7:0] IO_SPIN_PER_H= 8'h29;
  localparam logic [7:0] IO_SPIN_PHASE= 8'h2A;
  localparam logic [7:0] IO_SUN_T_L   = 8'h2B;
  localparam logic [7:0] IO_SUN_T_H   = 8'h2C;
  localparam logic [7:0] IO_SSR_SBE   = 8'h30;
  localparam logic [7:0] IO_SSR_MBE   = 8'h31;
  localparam logic [7:0] IO_SSR_SCRUB = 8'h32; // upper 8 bits of the scrub address
  localparam logic [7:0] IO_SSR_CLR   = 8'h33; // [0] clear SBE [1] clear MBE (strobes) [2] scrub_en
  localparam logic [7:0] IO_SSR_WPTR0 = 8'h34; // write pointer 0x34 (LSB)..0x37; writing 0x37 loads, reads give the live pointer
  localparam logic [7:0] IO_SSR_RPTR0 = 8'h38; // playback pointer 0x38..0x3B
  localparam logic [7:0] IO_SSR_RLEN0 = 8'h3C; // playback length in bytes 0x3C..0x3D
  localparam logic [7:0] IO_SSR_RGO   = 8'h3E; // write: start playback DMA
  localparam logic [7:0] IO_SSR_STAT  = 8'h3F; // [0] playback busy [1] frame sent (sticky, write clears) [2] SDRAM ready
  localparam logic [7:0] IO_DMA_RX    = 8'h40; // command DMA: +0..+2 SRAM address, +3 length, +4 go/status
  localparam logic [7:0] IO_DMA_TX    = 8'h48; // telemetry DMA: same layout

endpackage
