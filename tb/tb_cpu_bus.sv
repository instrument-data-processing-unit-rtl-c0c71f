// tb_cpu_bus: drives cpu_bus with the 8085 bus model and checks the memory
// map: boot ROM at 0 after reset with writes going to the SRAM below it, the
// lower 32 K all SRAM once rom_off is set, paged SRAM, EEPROM selects and the
// write protect bit, the SSR window with READY wait states, I/O strobes, and
// DMA to the SRAM that waits (stall) behind CPU cycles.
module tb_cpu_bus;
  import idpu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] a_hi, ad, ad_out, rom_data, ext_data, sram_d_out, sram_d_in, io_rdata;
  logic ad_oe, ale, rd_n, wr_n, io_m, ready;
  logic rom_off = 0, eeprom_wp = 1; logic [15:0] page0 = 0, page1 = 0;
  logic rom_cs_n, rom_pwr_en, ee_cs_n, ee_oe_n, ee_we_n; logic [2:0] ee_a_hi;
  logic [16:0] sram_a; logic sram_d_oe, sram_ce_n, sram_oe_n, sram_we_n;
  logic ssr_req, ssr_we, ssr_ack = 0; logic [27:0] ssr_addr; logic [7:0] ssr_wdata, ssr_rdata;
  logic io_rd, io_wr; logic [7:0] io_addr, io_wdata;
  logic dma_req = 0, dma_we = 0, dma_ack, dma_stall; logic [16:0] dma_addr; logic [7:0] dma_wdata, dma_rdata;
  mem_tgt_e tgt;
  int checks = 0, failures = 0, stalls = 0, ee_writes = 0, rom_sel = 0;
  logic [7:0] sram [1 << 17];

  cpu_bus dut (.clk, .rst_n, .cpu_a_hi(a_hi), .cpu_ad_in(ad), .cpu_ad_out(ad_out), .cpu_ad_oe(ad_oe),
    .cpu_ale(ale), .cpu_rd_n(rd_n), .cpu_wr_n(wr_n), .cpu_io_m(io_m), .cpu_ready(ready),
    .rom_off, .eeprom_wp, .page0, .page1, .rom_cs_n, .rom_pwr_en, .ee_cs_n, .ee_oe_n, .ee_we_n, .ee_a_hi,
    .sram_a, .sram_d_out, .sram_d_oe, .sram_d_in, .sram_ce_n, .sram_oe_n, .sram_we_n,
    .ssr_req, .ssr_we, .ssr_addr, .ssr_wdata, .ssr_ack, .ssr_rdata,
    .io_rd, .io_wr, .io_addr, .io_wdata, .io_rdata,
    .dma_req, .dma_we, .dma_addr, .dma_wdata, .dma_ack, .dma_rdata, .dma_stall, .tgt);
  i8085_bus cpu (.clk, .a_hi, .ad, .ale, .rd_n, .wr_n, .io_m, .ready, .fpga_ad(ad_out), .fpga_oe(ad_oe), .ext_data);
  always #5 clk = ~clk;
  // external parts
  logic [7:0] lat_lo;
  always @(negedge ale) lat_lo = ad;
  assign rom_data  = 8'hC3 ^ {a_hi[4:0], 3'b0} ^ lat_lo;
  assign ext_data  = !rom_cs_n ? rom_data : (!ee_oe_n ? 8'hEE : 8'hFF);
  assign sram_d_in = sram[sram_a];
  always @(posedge clk) if (!sram_ce_n && !sram_we_n) sram[sram_a] <= sram_d_out;
  assign io_rdata = io_addr ^ 8'h5A;
  logic [7:0] io_last_a, io_last_d; int io_wrs = 0, io_rds = 0;
  always @(posedge clk) begin
    if (!rst_n) ;
    else if (io_wr) begin io_wrs++; io_last_a <= io_addr; io_last_d <= io_wdata; end
    if (rst_n && io_rd) io_rds++;
    if (dma_stall) stalls++;
    if (!ee_we_n) ee_writes++;
    if (!rom_cs_n) rom_sel++;
  end
  // SSR responder: 30 clocks per access
  assign ssr_rdata = ssr_addr[7:0] ^ ssr_addr[21:14];
  logic [27:0] ssr_wa; logic [7:0] ssr_wd;
  initial forever begin
    @(posedge clk iff ssr_req); repeat (30) @(posedge clk);
    if (ssr_we) begin ssr_wa = ssr_addr; ssr_wd = ssr_wdata; end
    ssr_ack <= 1; @(posedge clk); ssr_ack <= 0; @(posedge clk);
  end
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] q; int w0, r0;
    for (int i = 0; i < (1 << 17); i++) sram[i] = 8'(i * 7);
    repeat (3) @(posedge clk); rst_n = 1;
    // ROM at 0
    r0 = rom_sel;
    cpu.cycle(0, 0, 16'h0123, 0, q);
    check(q == (8'hC3 ^ 8'h08 ^ 8'h23) && rom_sel > r0, $sformatf("ROM read %h", q));
    check(rom_pwr_en, "ROM powered");
    cpu.cycle(0, 1, 16'h0123, 8'hA1, q);
    check(sram[17'h0123] == 8'hA1, "write under ROM goes to SRAM");
    cpu.cycle(0, 0, 16'h4567, 0, q);
    check(q == 8'(17'h4567 * 7), "SRAM above ROM");
    // ROM off
    rom_off = 1;
    cpu.cycle(0, 0, 16'h0123, 0, q);
    check(q == 8'hA1 && !rom_pwr_en, "SRAM at 0 after ROM off");
    // paged SRAM window 0
    page0 = {2'(PG_SRAM), 14'd5};
    cpu.cycle(0, 1, 16'h8123, 8'h3C, q);
    check(sram[{3'd5, 14'h0123}] == 8'h3C, "paged SRAM write");
    cpu.cycle(0, 0, 16'h8124, 0, q);
    check(q == 8'({3'd5, 14'h0124} * 7), "paged SRAM read");
    // EEPROM window 1
    page1 = {2'(PG_EEPROM), 14'd3};
    w0 = ee_writes;
    cpu.cycle(0, 1, 16'hC000, 8'h11, q);
    check(ee_writes == w0, "EEPROM write blocked by wp");
    eeprom_wp = 0;
    cpu.cycle(0, 1, 16'hC000, 8'h11, q);
    check(ee_writes > w0, "EEPROM write with wp clear");
    cpu.cycle(0, 0, 16'hC001, 0, q);
    check(q == 8'hEE && ee_a_hi == 3'd3, "EEPROM read, page bits");
    // SSR window 1
    page1 = {2'(PG_SSR), 14'h1234};
    w0 = cpu.waits;
    cpu.cycle(0, 0, 16'hC010, 0, q);
    check(q == (8'h10 ^ 8'h34), $sformatf("SSR read %h", q));
    check(cpu.waits > w0, "READY wait states on SSR access");
    cpu.cycle(0, 1, 16'hC3FF, 8'h77, q);
    check(ssr_wa == {14'h1234, 14'h03FF} && ssr_wd == 8'h77, "SSR write address/data");
    // I/O
    cpu.cycle(1, 1, 16'h4242, 8'h99, q);
    check(io_wrs == 1 && io_last_a == 8'h42 && io_last_d == 8'h99, "I/O write strobe");
    cpu.cycle(1, 0, 16'h3030, 0, q);
    check(io_rds == 1 && q == (8'h30 ^ 8'h5A), "I/O read");
    // DMA in parallel with CPU SRAM cycles
    fork
      begin
        for (int i = 0; i < 40; i++) begin
          @(negedge clk); dma_req = 1; dma_we = 1; dma_addr = 17'h1F000 + 17'(i); dma_wdata = 8'(i + 100);
          @(posedge clk iff dma_ack); @(negedge clk); dma_req = 0;
        end
      end
      for (int i = 0; i < 6; i++) cpu.cycle(0, 1, 16'h1000 + 16'(i), 8'(i), q);
    join
    for (int i = 0; i < 40; i++) check(sram[17'h1F000 + 17'(i)] == 8'(i + 100), "DMA write");
    for (int i = 0; i < 6; i++) check(sram[17'h1000 + 17'(i)] == 8'(i), "CPU write beside DMA");
    check(stalls > 0, "DMA stalled behind CPU");
    @(negedge clk); dma_req = 1; dma_we = 0; dma_addr = 17'h1F005; @(posedge clk iff dma_ack); #1;
    check(dma_rdata == 8'd105, "DMA read"); @(negedge clk); dma_req = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
