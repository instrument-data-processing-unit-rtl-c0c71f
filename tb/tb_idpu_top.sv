// tb_idpu_top: end-to-end test of the IDPU digital logic (DCB and PCB FPGAs).
// Around idpu_top it places an 8085 bus model, a boot ROM, an EEPROM and a
// 128 K SRAM as arrays, a sparse SDRAM model as the SSR, a serial ADC model,
// three instrument boards (a CDI command decoder and a telemetry sender per
// channel) and the spacecraft side (2^23 Hz clock, 1 Hz sync, sun pulse,
// UART, HST receiver).  The flight software's steps are played as 8085 I/O
// and memory cycles, in this order: SDRAM ready, boot ROM and ROM-off, paged
// SRAM, EEPROM write protect, SSR byte window with wait states, ADC
// conversion, CDI commands to instruments and to the PCB (switches, actuator
// plug, over-current trip and clear, housekeeping mux), telemetry into the
// SSR, playback into HST frames (full frame and a flushed one, 2 MHz bit
// clock), scrubbing of a single- and a double-bit error, UART command DMA in
// and telemetry DMA out (38.4 kbaud byte time scaled), time keeping (256 Hz
// interrupts, time load, external clock mode), spin sectoring and the sun
// pulse, and last the watchdog reset.  Each mechanism is counted and counts a
// failure if it never happened.  Parameters are scaled so that the run is
// short: 4096 clock ticks per second, 16 clocks per UART bit, 64-byte
// frames, a 4000 Hz watchdog clock.
module tb_idpu_top;
  import idpu_pkg::*;
  localparam int SW = 12, IS = 4, CPB = 16, FB = 64, BD = 10, WD_HZ = 4000, BT = 8;
  localparam int HB = 11, DB = FB - HB;
  localparam int N_SW = 28;

  logic clk = 0, por_n = 0, wd_disable = 1, sys_rst_n;
  always #25 clk = ~clk;                           // 20 MHz
  logic sc_clk_8m = 0;
  always #59.605 sc_clk_8m = ~sc_clk_8m;           // 2^23 Hz
  logic sc_sync_1hz = 0, sc_sun_pulse = 0, bau_cmd_rxd = 1, bau_hst_ready = 1;

  logic [7:0] a_hi, ad, cpu_ad_out; logic cpu_ad_oe, ale, rd_n, wr_n, io_m, cpu_ready;
  logic cpu_int_256hz, cpu_int_sun, instr_1hz;
  logic rom_cs_n, rom_pwr_en, ee_cs_n, ee_oe_n, ee_we_n; logic [2:0] ee_a_hi;
  logic [16:0] sram_a; logic [7:0] sram_d_out, sram_d_in, ext_data; logic sram_d_oe, sram_ce_n, sram_oe_n, sram_we_n;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe; logic [1:0] sd_ba; logic [12:0] sd_a;
  logic [31:0] sd_dq_out, sd_dq_in;
  logic bau_lst_txd, hst_data, hst_clk, hst_active;
  logic [2:0] cdi_clk, cdi_cmd, cdi_tlm;
  logic spin_sector_pulse, spin_synch_pulse;
  logic [2:0] adc_mux_sel; logic adc_nap, adc_cs_n, adc_sclk, adc_sdo;
  logic [N_SW-1:0] pcb_oc = '0, pcb_sw_on, pcb_trip; logic pcb_act_plug = 0; logic [7:0] pcb_hk_mux;

  idpu_top #(.CLK_HZ(WD_HZ), .SUBSEC_W(SW), .INT_SHIFT(IS), .UART_CPB(CPB), .FRAME_BYTES(FB),
             .HST_BIT_DIV(BD)) dut (
    .clk, .por_n, .wd_disable, .sys_rst_n,
    .cpu_a_hi(a_hi), .cpu_ad_in(ad), .cpu_ad_out, .cpu_ad_oe, .cpu_ale(ale), .cpu_rd_n(rd_n),
    .cpu_wr_n(wr_n), .cpu_io_m(io_m), .cpu_ready, .cpu_int_256hz, .cpu_int_sun,
    .rom_cs_n, .rom_pwr_en, .ee_cs_n, .ee_oe_n, .ee_we_n, .ee_a_hi,
    .sram_a, .sram_d_out, .sram_d_oe, .sram_d_in, .sram_ce_n, .sram_oe_n, .sram_we_n,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dq_out, .sd_dq_oe, .sd_dq_in,
    .sc_clk_8m, .sc_sync_1hz, .sc_sun_pulse, .bau_cmd_rxd, .bau_lst_txd, .bau_hst_ready,
    .hst_data, .hst_clk, .hst_active, .cdi_clk, .cdi_cmd, .cdi_tlm, .instr_1hz,
    .spin_sector_pulse, .spin_synch_pulse,
    .adc_mux_sel, .adc_nap, .adc_cs_n, .adc_sclk, .adc_sdo,
    .pcb_oc, .pcb_act_plug, .pcb_sw_on, .pcb_trip, .pcb_hk_mux);

  i8085_bus cpu (.clk, .a_hi, .ad, .ale, .rd_n, .wr_n, .io_m, .ready(cpu_ready),
                 .fpga_ad(cpu_ad_out), .fpga_oe(cpu_ad_oe), .ext_data);
  sdram_model mdl (.clk, .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
                   .ba(sd_ba), .a(sd_a), .dq_in(sd_dq_out), .dq_out(sd_dq_in));
  adc_model adc (.sel(adc_mux_sel), .nap(adc_nap), .cs_n(adc_cs_n), .sclk(adc_sclk), .sdo(adc_sdo));

  // ---------------- memories on the CPU bus ----------------
  logic [7:0] sram [1 << 17];
  logic [7:0] rom  [1 << 13];
  logic [7:0] eep  [1 << 17];
  logic [15:0] alat;
  always @(posedge clk) if (ale) alat <= {a_hi, ad};
  assign ext_data  = !rom_cs_n ? rom[alat[12:0]] : (!ee_oe_n ? eep[{ee_a_hi, alat[13:0]}] : 8'hFF);
  assign sram_d_in = sram[sram_a];
  always @(posedge clk) if (!sram_ce_n && !sram_we_n) sram[sram_a] <= sram_d_out;
  int ee_writes = 0;
  always @(posedge clk) if (sys_rst_n && !ee_we_n) begin eep[{ee_a_hi, alat[13:0]}] <= ad; ee_writes++; end

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  typedef enum int {M_SDRAM_INIT, M_ROM_BOOT, M_ROM_OFF, M_PAGE_SRAM, M_EE_WP, M_SSR_WAIT, M_ADC,
                    M_CDI_CMD, M_PCB_SWITCH, M_PCB_LOCKOUT, M_PCB_TRIP, M_TLM_SSR, M_PLAYBACK,
                    M_HST_FLUSH, M_SCRUB_SBE, M_MBE, M_UART_RX_DMA, M_UART_TX_DMA, M_INT256,
                    M_TIME_LOAD, M_EXT_CLOCK, M_SPIN, M_SUN, M_WATCHDOG, M_N} mech_e;
  int mech [M_N];
  initial for (int i = 0; i < M_N; i++) mech[i] = 0;

  // ---------------- CPU helpers ----------------
  logic [7:0] q;
  task automatic io_w(input logic [7:0] a, input logic [7:0] d);
    logic [7:0] x; cpu.cycle(1'b1, 1'b1, {a, a}, d, x);
  endtask
  task automatic io_r(input logic [7:0] a, output logic [7:0] d);
    cpu.cycle(1'b1, 1'b0, {a, a}, 8'h00, d);
  endtask
  task automatic mem_w(input logic [15:0] a, input logic [7:0] d);
    logic [7:0] x; cpu.cycle(1'b0, 1'b1, a, d, x);
  endtask
  task automatic mem_r(input logic [15:0] a, output logic [7:0] d);
    cpu.cycle(1'b0, 1'b0, a, 8'h00, d);
  endtask
  logic [7:0] ctrl = 8'h02;                       // reset value of the control register
  task automatic set_ctrl(input logic [7:0] v);
    ctrl = v; io_w(IO_CTRL, v);
  endtask
  task automatic cdi_cmd_send(input int ch, input logic [7:0] a, input logic [15:0] d);
    logic [7:0] s;
    do io_r(IO_CDI_STAT, s); while (s[ch]);
    io_w(IO_CDI_A, a); io_w(IO_CDI_DH, d[15:8]); io_w(IO_CDI_DL, d[7:0]); io_w(IO_CDI_GO, 8'(ch));
    do io_r(IO_CDI_STAT, s); while (s[ch]);
  endtask

  // ---------------- instrument boards ----------------
  logic [23:0] cmd_q [3][$];
  logic [2:0] tlm_line = '0;
  assign cdi_tlm = tlm_line;
  task automatic cdi_listen(input int c);
    logic [23:0] w;
    forever begin
      @(posedge sc_clk_8m iff cdi_cmd[c]);
      repeat (BT / 2) @(posedge sc_clk_8m);
      for (int i = 0; i < 24; i++) begin
        repeat (BT) @(posedge sc_clk_8m);
        w = {w[22:0], cdi_cmd[c]};
      end
      cmd_q[c].push_back(w);
      repeat (BT) @(posedge sc_clk_8m);
    end
  endtask
  task automatic tlm_send(input int c, input logic [23:0] w);
    @(posedge sc_clk_8m);
    tlm_line[c] = 1'b1;
    repeat (BT) @(posedge sc_clk_8m);
    for (int i = 23; i >= 0; i--) begin
      tlm_line[c] = w[i];
      repeat (BT) @(posedge sc_clk_8m);
    end
    tlm_line[c] = 1'b0;
    repeat (2 * BT) @(posedge sc_clk_8m);
  endtask

  // ---------------- spacecraft side ----------------
  logic [7:0] uart_rx_q [$]; longint uart_rx_t [$];
  task automatic uart_send(input logic [7:0] b);
    bau_cmd_rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin bau_cmd_rxd = b[i]; repeat (CPB) @(posedge clk); end
    bau_cmd_rxd = 1; repeat (CPB) @(posedge clk);
  endtask
  initial begin : uart_mon
    logic [7:0] b; longint t0;
    wait (sys_rst_n);
    forever begin
      @(negedge bau_lst_txd);
      t0 = cyc;
      repeat (CPB / 2) @(posedge clk);
      if (!bau_lst_txd) begin
        for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = bau_lst_txd; end
        repeat (CPB) @(posedge clk);
        uart_rx_q.push_back(b); uart_rx_t.push_back(t0);
      end
    end
  end

  logic [7:0] hst_q [$]; logic [7:0] hsh; int hbits = 0; longint hlast = 0; int hgap_bad = 0, hgap_ok = 0;
  always @(posedge hst_clk) if (sys_rst_n) begin
    hsh = {hsh[6:0], hst_data};
    if (hbits % (FB * 8) != 0) begin
      if (cyc - hlast == BD) hgap_ok++; else hgap_bad++;
    end
    hlast = cyc;
    hbits++;
    if (hbits % 8 == 0) hst_q.push_back(hsh);
  end

  int n256 = 0, npps = 0, nsync = 0, nsector = 0, nsynch = 0, nsun = 0;
  always @(posedge clk) if (sys_rst_n) begin
    if (cpu_int_256hz)     n256++;
    if (instr_1hz)         npps++;
    if (spin_sector_pulse) nsector++;
    if (spin_synch_pulse)  nsynch++;
    if (cpu_int_sun)       nsun++;
  end
  bit sync_on = 0; int sync_ticks = 3000;
  initial forever begin
    repeat (sync_ticks) @(posedge sc_clk_8m);
    if (sync_on) begin
      sc_sync_1hz = 1; nsync++;
      repeat (16) @(posedge sc_clk_8m);
      sc_sync_1hz = 0;
    end
  end

  // ---------------- watchdog on the test ----------------
  initial begin
    #40ms;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- the test ----------------
  logic [7:0] exp_tlm [$];
  initial begin : main
    logic [7:0] s, h;
    logic [23:0] w;
    logic [31:0] v, orig5, orig6;
    int n0, n1, t0, k;
    for (int i = 0; i < (1 << 13); i++) rom[i] = 8'(i * 3 + 1);
    for (int i = 0; i < (1 << 17); i++) begin sram[i] = 8'(i * 7); eep[i] = 8'(i ^ 8'h5A); end
    repeat (20) @(posedge clk);
    por_n = 1;
    wait (sys_rst_n);
    fork cdi_listen(0); cdi_listen(1); cdi_listen(2); join_none

    // SDRAM initialisation reported to the CPU
    k = 0;
    do begin io_r(IO_SSR_STAT, s); k++; end while (!s[2] && k < 200);
    check(s[2] && mdl.mode_ok && mdl.refreshes >= 2, "SDRAM initialised");
    if (s[2]) mech[M_SDRAM_INIT]++;

    // boot ROM at 0, writes fall through to the SRAM under it; then ROM off
    mem_r(16'h0010, q); check(q == rom[13'h0010] && rom_pwr_en, "boot ROM read");
    if (q == rom[13'h0010]) mech[M_ROM_BOOT]++;
    mem_w(16'h0010, 8'hC3); check(sram[17'h0010] == 8'hC3, "write under ROM reaches SRAM");
    set_ctrl(8'h03);
    mem_r(16'h0010, q); check(q == 8'hC3 && !rom_pwr_en, "ROM off: SRAM at 0, ROM unpowered");
    if (q == 8'hC3 && !rom_pwr_en) mech[M_ROM_OFF]++;

    // paged SRAM in the 0xC000 window
    io_w(IO_PAGE1_LO, 8'h05); io_w(IO_PAGE1_HI, 8'h00);
    mem_w(16'hC123, 8'h9E); check(sram[{3'd5, 14'h0123}] == 8'h9E, "paged SRAM write");
    mem_r(16'hC124, q); check(q == sram[{3'd5, 14'h0124}], "paged SRAM read");
    if (sram[{3'd5, 14'h0123}] == 8'h9E) mech[M_PAGE_SRAM]++;

    // EEPROM page in the 0x8000 window, write protect
    io_w(IO_PAGE0_LO, 8'h02); io_w(IO_PAGE0_HI, 8'h40);
    n0 = ee_writes;
    mem_w(16'h8020, 8'h11); check(ee_writes == n0 && eep[{3'd2, 14'h0020}] == 8'(17'h8020 ^ 8'h5A), "EEPROM write blocked");
    set_ctrl(8'h01);
    mem_w(16'h8020, 8'h11); check(ee_writes > n0, "EEPROM write enabled");
    mem_r(16'h8020, q); check(q == 8'h11, "EEPROM read back");
    set_ctrl(8'h03);
    if (q == 8'h11 && ee_writes > n0) mech[M_EE_WP]++;

    // ADC conversion on channel 5
    io_w(IO_ADC_CTRL, 8'h15);
    k = 0;
    do begin io_r(IO_ADC_STAT, s); k++; end while (s[0] && k < 100);
    io_r(IO_ADC_DATA, q);
    check({s[7:4], q} == 12'h155 + 12'd80 && adc_mux_sel == 3'd5, $sformatf("ADC result %h", {s[7:4], q}));
    if ({s[7:4], q} == 12'h1A5) mech[M_ADC]++;

    // CDI commands to the three instrument boards
    cdi_cmd_send(0, 8'h21, 16'hBEEF);
    cdi_cmd_send(1, 8'h42, 16'h1234);
    cdi_cmd_send(2, 8'h7E, 16'h0F0F);
    repeat (4 * BT) @(posedge sc_clk_8m);
    check(cmd_q[0].size() == 1 && cmd_q[0][0] == 24'h21BEEF, "CDI command to channel 0");
    check(cmd_q[1].size() == 1 && cmd_q[1][0] == 24'h421234, "CDI command to channel 1");
    check(cmd_q[2].size() == 1 && cmd_q[2][0] == 24'h7E0F0F, "CDI command to channel 2");
    for (int c = 0; c < 3; c++) if (cmd_q[c].size() == 1) mech[M_CDI_CMD]++;

    // PCB: switches, actuator lock-out plug, over-current trip
    cdi_cmd_send(3, 8'h00, 16'h00FF);
    repeat (20) @(posedge clk);
    check(pcb_sw_on == 28'h00000FF, "PCB instrument switches on");
    if (pcb_sw_on == 28'h00000FF) mech[M_PCB_SWITCH]++;
    cdi_cmd_send(3, 8'h01, 16'h0003);
    repeat (20) @(posedge clk);
    check(pcb_sw_on == 28'h00000FF, "actuators held off without the plug");
    pcb_act_plug = 1; repeat (3) @(posedge clk);
    check(pcb_sw_on == 28'h00300FF, "actuators on with the plug");
    if (pcb_sw_on == 28'h00300FF) mech[M_PCB_LOCKOUT]++;
    pcb_act_plug = 0;
    pcb_oc[3] = 1; repeat (3) @(posedge clk); pcb_oc[3] = 0; repeat (3) @(posedge clk);
    check(pcb_trip[3] && !pcb_sw_on[3], "over-current trips service 3");
    cdi_cmd_send(3, 8'h02, 16'h0008);
    repeat (20) @(posedge clk);
    check(!pcb_trip[3] && pcb_sw_on[3], "trip cleared by command");
    if (!pcb_trip[3] && pcb_sw_on[3]) mech[M_PCB_TRIP]++;
    cdi_cmd_send(3, 8'h04, 16'h002A);
    repeat (20) @(posedge clk);
    check(pcb_hk_mux == 8'h2A, "PCB housekeeping mux");

    // telemetry from the instruments into the SSR at word 0x100
    io_w(8'h34, 8'h00); io_w(8'h35, 8'h01); io_w(8'h36, 8'h00); io_w(8'h37, 8'h00);
    for (int i = 0; i < 30; i++) begin
      w = {8'(i), 8'(i * 13 + 1), 8'(i * 29 + 7)};
      tlm_send(i % 3, w);
      exp_tlm.push_back(w[15:8]); exp_tlm.push_back(w[7:0]);
    end
    repeat (200) @(posedge clk);
    io_r(8'h34, s); io_r(8'h35, q);
    check({q, s} == 16'h0100 + 16'd20, $sformatf("write pointer after telemetry %h", {q, s}));
    k = 0;
    for (int i = 0; i < 60; i++) begin
      v = mdl.peek(longint'(32'h100 + i / 3));
      if (v[8 * (i % 3) +: 8] == exp_tlm[i]) k++;
    end
    check(k == 60, $sformatf("telemetry bytes in the SSR: %0d of 60", k));
    if (k == 60) mech[M_TLM_SSR]++;

    // the SSR through the CPU byte window (page space 2), READY wait states
    io_w(IO_PAGE0_LO, 8'h00); io_w(IO_PAGE0_HI, 8'h80);
    n0 = cpu.waits;
    k = 0;
    for (int i = 0; i < 6; i++) begin
      mem_r(16'h8000 + 16'h400 + 16'((i / 3) * 4 + i % 3), q);
      if (q == exp_tlm[i]) k++;
    end
    check(k == 6, "SSR window reads");
    check(cpu.waits > n0, "SSR access holds READY");
    if (cpu.waits > n0) mech[M_SSR_WAIT]++;
    mem_w(16'h8000 + 16'h401, 8'h66);
    v = mdl.peek(longint'(32'h100));
    check(v[15:8] == 8'h66 && v[7:0] == exp_tlm[0], "SSR window write (read-modify-write)");
    exp_tlm[1] = 8'h66;

    // playback of the 60 bytes into HST frames
    set_ctrl(8'h0B);                               // HST on
    io_w(8'h38, 8'h00); io_w(8'h39, 8'h01); io_w(8'h3A, 8'h00); io_w(8'h3B, 8'h00);
    io_w(8'h3C, 8'd60); io_w(8'h3D, 8'h00);
    io_w(IO_SSR_RGO, 8'h01);
    k = 0;
    do begin io_r(IO_SSR_STAT, s); k++; end while (!s[1] && k < 500);
    repeat (20) @(posedge clk);
    check(hst_q.size() == FB, $sformatf("one HST frame sent (%0d bytes)", hst_q.size()));
    if (hst_q.size() == FB) begin
      check({hst_q[0], hst_q[1]} == 16'h0A50, "frame header SCID/VCID");
      check(hst_q[2] == 8'd0, "master frame count 0");
      check({hst_q[4][2:0], hst_q[5]} == 11'd0, "first header pointer 0");
      k = 0;
      for (int i = 0; i < DB; i++) if (hst_q[HB + i] == exp_tlm[i]) k++;
      check(k == DB, $sformatf("frame 0 data %0d of %0d", k, DB));
      if (k == DB) mech[M_PLAYBACK]++;
      check(hgap_bad == 0 && hgap_ok == FB * 8 - 1, $sformatf("HST bit every %0d clocks (%0d bad)", BD, hgap_bad));
    end
    io_w(IO_SSR_STAT, 8'h00);
    set_ctrl(8'h8B);                               // flush the partial frame
    k = 0;
    do begin io_r(IO_SSR_STAT, s); k++; end while (!s[1] && k < 500);
    repeat (20) @(posedge clk);
    check(hst_q.size() == 2 * FB, "flushed frame sent");
    if (hst_q.size() == 2 * FB) begin
      k = 0;
      for (int i = 0; i < 60 - DB; i++) if (hst_q[FB + HB + i] == exp_tlm[DB + i]) k++;
      for (int i = 60 - DB; i < DB; i++) if (hst_q[FB + HB + i] == 8'h55) k++;
      check(k == DB && hst_q[FB + 2] == 8'd1 && {hst_q[FB + 4][2:0], hst_q[FB + 5]} == 11'h7FF,
            "flushed frame: rest of the data, fill, count 1, no packet start");
      if (k == DB) mech[M_HST_FLUSH]++;
    end
    io_r(IO_SSR_SBE, s); io_r(IO_SSR_MBE, q);
    check(s == 0 && q == 0, "no EDAC errors on clean data");

    // scrubbing: one bit flipped in word 0x105, two in word 0x106
    orig5 = mdl.peek(longint'(32'h105)); orig6 = mdl.peek(longint'(32'h106));
    mdl.poke(longint'(32'h105), orig5 ^ 32'h0000_0400);
    mdl.poke(longint'(32'h106), orig6 ^ 32'h0001_0002);
    io_w(IO_SSR_CLR, 8'h04);
    repeat (300 * 64) @(posedge clk);
    io_w(IO_SSR_CLR, 8'h00);
    io_r(IO_SSR_SBE, s); io_r(IO_SSR_MBE, q);
    check(s >= 1 && mdl.peek(longint'(32'h105)) == orig5, "scrubber corrected the single-bit error");
    check(q >= 1 && mdl.peek(longint'(32'h106)) == (orig6 ^ 32'h0001_0002), "double-bit error counted, left alone");
    if (s >= 1 && mdl.peek(longint'(32'h105)) == orig5) mech[M_SCRUB_SBE]++;
    if (q >= 1) mech[M_MBE]++;
    io_r(IO_SSR_SCRUB, s); check(s == 8'h00, "scrub address status");
    io_w(IO_SSR_CLR, 8'h03);
    io_r(IO_SSR_SBE, s); io_r(IO_SSR_MBE, q); check(s == 0 && q == 0, "error counters cleared");

    // UART command block in by DMA to SRAM 0x1000
    io_w(8'h40, 8'h00); io_w(8'h41, 8'h10); io_w(8'h42, 8'h00); io_w(8'h43, 8'd8); io_w(8'h44, 8'h01);
    for (int i = 0; i < 8; i++) uart_send(8'(8'hA0 + i * 5));
    repeat (4 * CPB) @(posedge clk);
    io_r(8'h44, s);
    k = 0;
    for (int i = 0; i < 8; i++) if (sram[17'h1000 + 17'(i)] == 8'(8'hA0 + i * 5)) k++;
    check(k == 8 && !s[0], $sformatf("UART command DMA: %0d of 8 bytes", k));
    if (k == 8) mech[M_UART_RX_DMA]++;

    // telemetry block out by DMA from SRAM 0x1100
    for (int i = 0; i < 6; i++) sram[17'h1100 + 17'(i)] = 8'(8'h30 + i * 11);
    io_w(8'h48, 8'h00); io_w(8'h49, 8'h11); io_w(8'h4A, 8'h00); io_w(8'h4B, 8'd6); io_w(8'h4C, 8'h01);
    repeat (6 * 10 * CPB + 200) @(posedge clk);
    check(uart_rx_q.size() == 6, $sformatf("UART bytes out %0d", uart_rx_q.size()));
    if (uart_rx_q.size() == 6) begin
      k = 0;
      for (int i = 0; i < 6; i++) if (uart_rx_q[i] == 8'(8'h30 + i * 11)) k++;
      check(k == 6, "UART telemetry bytes");
      check(uart_rx_t[5] - uart_rx_t[0] >= 5 * 10 * CPB && uart_rx_t[5] - uart_rx_t[0] <= 5 * 10 * CPB + 5 * 20,
            $sformatf("UART byte spacing %0d clocks for 5 bytes", uart_rx_t[5] - uart_rx_t[0]));
      if (k == 6) mech[M_UART_TX_DMA]++;
    end

    // time keeping: 256 interrupts per internal second, time load
    @(posedge clk iff instr_1hz);
    n0 = n256;
    @(posedge clk iff instr_1hz);
    check(n256 - n0 == 256, $sformatf("%0d 256 Hz interrupts per second", n256 - n0));
    if (n256 - n0 == 256) mech[M_INT256]++;
    io_w(8'h20, 8'h78); io_w(8'h21, 8'h56); io_w(8'h22, 8'h34); io_w(8'h23, 8'h12); io_w(IO_TIME_LD, 8'h01);
    @(posedge clk iff instr_1hz);
    repeat (4) @(posedge clk);
    io_r(8'h20, s); v[7:0] = s; io_r(8'h21, s); v[15:8] = s; io_r(8'h22, s); v[23:16] = s; io_r(8'h23, s); v[31:24] = s;
    check(v == 32'h12345678, $sformatf("time loaded at the 1 Hz pulse: %h", v));
    if (v == 32'h12345678) mech[M_TIME_LOAD]++;

    // external clock mode: the 1 Hz clock follows the probe sync
    set_ctrl(8'h07);
    sync_on = 1;
    @(posedge sc_sync_1hz);
    n0 = npps; n1 = nsync - 1;             // this sync's 1 Hz pulse is still to come
    repeat (3) @(negedge sc_sync_1hz);
    repeat (10) @(posedge clk);
    check(npps - n0 == 3 && nsync - n1 == 3, $sformatf("ext mode: %0d pulses for %0d syncs", npps - n0, nsync - n1));
    if (npps - n0 == 3) mech[M_EXT_CLOCK]++;
    sync_on = 0;
    set_ctrl(8'h03);

    // spin sectoring: period 0 = one count per 2^23 Hz tick, 2^14 per spin
    io_w(IO_SPIN_PER_L, 8'h00); io_w(IO_SPIN_PER_H, 8'h00);
    @(posedge clk iff spin_synch_pulse);
    n0 = nsector; n1 = nsynch;
    t0 = int'(cyc);
    @(posedge clk iff spin_synch_pulse);
    check(nsector - n0 == 32, $sformatf("%0d sector pulses per spin", nsector - n0));
    k = int'(cyc) - t0;
    check(k > 16384 * 2 && k < 16384 * 3, $sformatf("spin of 2^14 ticks took %0d clocks", k));
    if (nsector - n0 == 32) mech[M_SPIN]++;
    io_r(IO_SPIN_PHASE, s);
    repeat (1 << 13) @(posedge sc_clk_8m);
    io_r(IO_SPIN_PHASE, q);
    check(s < 8'd4 && q - s >= 8'd127 && q - s <= 8'd130, $sformatf("spin phase %0d then %0d half a spin later", s, q));
    n0 = nsun;
    sc_sun_pulse = 1; repeat (40) @(posedge clk); sc_sun_pulse = 0;
    repeat (10) @(posedge clk);
    io_r(IO_SUN_T_L, s); io_r(IO_SUN_T_H, h);
    check(nsun - n0 == 1 && {h, s} < 16'(1 << SW), "sun pulse interrupt and time capture");
    if (nsun - n0 == 1) mech[M_SUN]++;

    // watchdog: cleared in time nothing happens, then let it expire
    wd_disable = 0;
    io_w(IO_WDCLR, 8'h00);
    for (int i = 0; i < 3; i++) begin
      repeat (3 * WD_HZ * 2 / 3) @(posedge clk);
      io_w(IO_WDCLR, 8'h00);
    end
    check(sys_rst_n, "no reset while the watchdog is cleared");
    t0 = int'(cyc);
    @(negedge sys_rst_n);
    k = int'(cyc) - t0;
    check(k > 3 * WD_HZ - 100 && k <= 3 * WD_HZ + 20, $sformatf("watchdog fired after %0d clocks", k));
    mech[M_WATCHDOG]++;
    wait (sys_rst_n);
    repeat (5) @(posedge clk);
    check(rom_pwr_en && pcb_sw_on == '0, "reset: ROM mapped, PCB services off");

    for (int i = 0; i < M_N; i++) begin
      check(mech[i] > 0, $sformatf("mechanism %s happened %0d times", mech_e'(i), mech[i]));
      $display("mechanism %-14s %0d", mech_e'(i), mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
