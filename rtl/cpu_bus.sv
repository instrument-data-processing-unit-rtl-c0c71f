// cpu_bus: 8085 bus interface of the DCB FPGA.
// Demultiplexes the 8085 address/data bus (the low address byte is captured
// while ALE is high), decodes memory and I/O cycles and maps the 64 KB CPU
// address space, as the IDPU description lays out:
//   * after reset the boot ROM (8 K) sits at address 0; when the CPU sets
//     rom_off the lower 32 K is SRAM throughout and the ROM's power switch
//     opens (rom_pwr_en low);
//   * the upper 32 K is two 16 K windows, 0x8000 and 0xC000, each steered by
//     a page register ([15:14] space: SRAM, EEPROM or SSR; [13:0] 16 K page)
//     onto the rest of the 128 K SRAM, the 128 K EEPROM or the SSR;
//   * EEPROM writes are blocked while the eeprom_wp control bit is set;
//   * the SRAM sits on a private bus driven by the FPGA and is shared with the
//     DMA channels, the CPU always first.
// This design's choices: CPU control lines are synchronised to the 20 MHz
// clock (an 8085 T-state is 10 clocks at 2 MHz); with the ROM mapped, writes
// to 0-8 K go to the SRAM under it so the ROM can copy itself; SSR accesses
// hold the CPU with READY low until ssr_ctrl answers; a DMA access takes 2
// clocks plus one idle clock (dma_ack pulses at its end) and waits while a CPU SRAM cycle is in progress (dma_stall).  ROM and
// EEPROM data go straight to the CPU bus; the FPGA gives their selects and
// the EEPROM's upper address bits.  I/O cycles become io_rd / io_wr strobes.
module cpu_bus
  import idpu_pkg::*;
#(
  parameter int unsigned SSR_AW = 28     // SSR byte address width
) (
  input  logic              clk,
  input  logic              rst_n,
  // 8085 bus
  input  logic [7:0]        cpu_a_hi,
  input  logic [7:0]        cpu_ad_in,
  output logic [7:0]        cpu_ad_out,
  output logic              cpu_ad_oe,
  input  logic              cpu_ale,
  input  logic              cpu_rd_n,
  input  logic              cpu_wr_n,
  input  logic              cpu_io_m,
  output logic              cpu_ready,
  // configuration from the register file
  input  logic              rom_off,
  input  logic              eeprom_wp,
  input  logic [15:0]       page0,
  input  logic [15:0]       page1,
  // boot ROM and EEPROM (data on the CPU bus)
  output logic              rom_cs_n,
  output logic              rom_pwr_en,
  output logic              ee_cs_n,
  output logic              ee_oe_n,
  output logic              ee_we_n,
  output logic [2:0]        ee_a_hi,
  // SRAM private bus
  output logic [16:0]       sram_a,
  output logic [7:0]        sram_d_out,
  output logic              sram_d_oe,
  input  logic [7:0]        sram_d_in,
  output logic              sram_ce_n,
  output logic              sram_oe_n,
  output logic              sram_we_n,
  // SSR window
  output logic              ssr_req,
  output logic              ssr_we,
  output logic [SSR_AW-1:0] ssr_addr,
  output logic [7:0]        ssr_wdata,
  input  logic              ssr_ack,
  input  logic [7:0]        ssr_rdata,
  // I/O registers
  output logic              io_rd,
  output logic              io_wr,
  output logic [7:0]        io_addr,
  output logic [7:0]        io_wdata,
  input  logic [7:0]        io_rdata,
  // DMA access to SRAM
  input  logic              dma_req,
  input  logic              dma_we,
  input  logic [16:0]       dma_addr,
  input  logic [7:0]        dma_wdata,
  output logic              dma_ack,
  output logic [7:0]        dma_rdata,
  output logic              dma_stall,
  output mem_tgt_e          tgt           // decoded target of the current cycle
);
  typedef enum logic [2:0] { B_IDLE, B_SRAM, B_SSR, B_IO, B_HOLD, B_DMA, B_GAP } bstate_e;
  bstate_e st;

  logic [1:0]  ale_s, rd_s, wr_s;
  logic [15:0] addr;
  logic        io_cyc;
  logic        rd_act, wr_act;
  logic [1:0]  wcnt;
  logic        is_wr;
  logic [16:0] sram_off;
  logic [SSR_AW-1:0] ssr_off;
  logic [2:0]  ee_pg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ale_s <= '0; rd_s <= '1; wr_s <= '1; addr <= '0; io_cyc <= 1'b0;
    end else begin
      ale_s <= {ale_s[0], cpu_ale};
      rd_s  <= {rd_s[0], cpu_rd_n};
      wr_s  <= {wr_s[0], cpu_wr_n};
      if (ale_s[1]) begin                 // address is stable while ALE is high
        addr   <= {cpu_a_hi, cpu_ad_in};
        io_cyc <= cpu_io_m;
      end
    end
  end
  assign rd_act  = !rd_s[1];
  assign wr_act  = !wr_s[1];

  // ---------------- address decode ----------------
  logic [15:0] pg;
  always_comb begin
    pg       = addr[14] ? page1 : page0;
    tgt      = TGT_NONE;
    sram_off = {2'b00, addr[14:0]};
    ssr_off  = SSR_AW'({pg[13:0], addr[13:0]});
    ee_pg    = pg[2:0];
    if (io_cyc) begin
      tgt = TGT_NONE;
    end else if (!addr[15]) begin
      tgt = (!rom_off && addr[14:13] == 2'b00 && !wr_act) ? TGT_ROM : TGT_SRAM;
    end else begin
      case (page_space_e'(pg[15:14]))
        PG_SRAM:   begin tgt = TGT_SRAM; sram_off = {pg[2:0], addr[13:0]}; end
        PG_EEPROM: tgt = TGT_EEPROM;
        PG_SSR:    tgt = TGT_SSR;
        default:   tgt = TGT_NONE;
      endcase
    end
  end

  assign rom_pwr_en = !rom_off;
  assign rom_cs_n   = !(tgt == TGT_ROM && rd_act);
  assign ee_cs_n    = !(tgt == TGT_EEPROM && (rd_act || (wr_act && !eeprom_wp)));
  assign ee_oe_n    = !(tgt == TGT_EEPROM && rd_act);
  assign ee_we_n    = !(tgt == TGT_EEPROM && wr_act && !eeprom_wp);
  assign ee_a_hi    = ee_pg;

  // ---------------- cycle engine ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE; wcnt <= '0; is_wr <= 1'b0;
      cpu_ad_out <= '0; cpu_ad_oe <= 1'b0; cpu_ready <= 1'b1;
      sram_a <= '0; sram_d_out <= '0; sram_d_oe <= 1'b0;
      sram_ce_n <= 1'b1; sram_oe_n <= 1'b1; sram_we_n <= 1'b1;
      ssr_req <= 1'b0; ssr_we <= 1'b0; ssr_addr <= '0; ssr_wdata <= '0;
      io_rd <= 1'b0; io_wr <= 1'b0; io_addr <= '0; io_wdata <= '0;
      dma_ack <= 1'b0; dma_rdata <= '0; dma_stall <= 1'b0;
    end else begin
      io_rd <= 1'b0; io_wr <= 1'b0; dma_ack <= 1'b0; dma_stall <= 1'b0;
      if (!rd_act) cpu_ad_oe <= 1'b0;
      case (st)
        B_IDLE: begin
          if (rd_act || wr_act) begin        // a level: a cycle that began during DMA is not lost
            is_wr <= wr_act;
            wcnt  <= '0;
            if (io_cyc) begin
              io_addr  <= addr[7:0];
              io_wdata <= cpu_ad_in;
              io_rd    <= rd_act;
              io_wr    <= wr_act;
              st       <= B_IO;
            end else if (tgt == TGT_SRAM) begin
              sram_a     <= sram_off;
              sram_ce_n  <= 1'b0;
              sram_oe_n  <= !rd_act;
              sram_we_n  <= !wr_act;
              sram_d_out <= cpu_ad_in;
              sram_d_oe  <= wr_act;
              st         <= B_SRAM;
              if (dma_req) dma_stall <= 1'b1;
            end else if (tgt == TGT_SSR) begin
              ssr_req   <= 1'b1;
              ssr_we    <= wr_act;
              ssr_addr  <= ssr_off;
              ssr_wdata <= cpu_ad_in;
              cpu_ready <= 1'b0;
              st        <= B_SSR;
            end else begin
              st <= B_HOLD;              // ROM, EEPROM, unmapped
            end
          end else if (dma_req) begin
            sram_a     <= dma_addr;
            sram_ce_n  <= 1'b0;
            sram_oe_n  <= dma_we;
            sram_we_n  <= !dma_we;
            sram_d_out <= dma_wdata;
            sram_d_oe  <= dma_we;
            wcnt       <= '0;
            st         <= B_DMA;
          end
        end
        B_SRAM: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == 2'd1) begin
            if (!is_wr) begin
              cpu_ad_out <= sram_d_in;
              cpu_ad_oe  <= 1'b1;
            end
            sram_ce_n <= 1'b1; sram_oe_n <= 1'b1; sram_we_n <= 1'b1; sram_d_oe <= 1'b0;
            st <= B_HOLD;
          end else if (dma_req) dma_stall <= 1'b1;
        end
        B_DMA: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == 2'd1) begin
            dma_rdata <= sram_d_in;
            dma_ack   <= 1'b1;
            sram_ce_n <= 1'b1; sram_oe_n <= 1'b1; sram_we_n <= 1'b1; sram_d_oe <= 1'b0;
            st <= B_GAP;
          end
        end
        B_GAP: st <= B_IDLE;                 // the requester updates dma_req after dma_ack
        B_SSR: if (ssr_ack) begin
          ssr_req   <= 1'b0;
          cpu_ready <= 1'b1;
          if (!is_wr) begin
            cpu_ad_out <= ssr_rdata;
            cpu_ad_oe  <= 1'b1;
          end
          st <= B_HOLD;
        end
        B_IO: begin
          if (!is_wr) begin
            cpu_ad_out <= io_rdata;
            cpu_ad_oe  <= 1'b1;
          end
          st <= B_HOLD;
        end
        B_HOLD: if (!rd_act && !wr_act) st <= B_IDLE;
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
