// tb_idpu_full: the IDPU digital logic at its flight parameters (no
// parameter is overridden): 20 MHz system clock, 2^23 Hz spacecraft clock,
// 1024-byte HST frames at 2 MHz, 38.4 kbaud UART, 3 s watchdog, 1536-tick
// spin pulse generator period.  One complete pass: SDRAM initialisation, boot
// ROM read, a CDI command to an instrument and one to the PCB, 507 telemetry
// words (1014 bytes) into the SSR, playback of 1013 bytes as one full HST
// frame (checked byte for byte, with the bit period), a UART command block in
// and a telemetry block out by DMA (bit period 521 clocks), all three
// telemetry links at once into the SSR with the scrubber running (checked
// against the 630 kbit/s recording rate), one internal
// second (2^23 ticks, 256 interrupts), the spin sector period, and the
// 3 s watchdog reset.  The environment models are those of tb_idpu_top.
module tb_idpu_full;
  import idpu_pkg::*;
  localparam int SW = 23, CPB = 521, FB = 1024, BD = 10, BT = 8;
  localparam longint CLK_HZ = 20_000_000;
  // the generated 2^23 Hz clock has a 119.210 ns period (1 ps resolution), so
  // a counted interval of n ticks lasts n * 119.210 / 50 system clocks
  function automatic longint ticks_to_clks(input longint n);
    return longint'(real'(n) * 119.210 / 50.0);
  endfunction
  localparam int HB = 11, DB = FB - HB;
  localparam int NRATE = 300;   // words per link in the input-rate test
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

  idpu_top dut (
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

  typedef enum int {M_SDRAM_INIT, M_ROM_BOOT, M_CDI_CMD, M_PCB_SWITCH, M_TLM_SSR, M_PLAYBACK,
                    M_HST_RATE, M_UART_RX_DMA, M_UART_TX_DMA, M_INT256, M_SECOND, M_SECTOR,
                    M_WATCHDOG, M_N} mech_e;
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
    #6s;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- the test ----------------
  logic [7:0] exp_tlm [$];
  initial begin : main
    logic [7:0] s;
    logic [23:0] w;
    logic [31:0] v;
    longint t0, t1;
    int n0, k;
    real rate;
    for (int i = 0; i < (1 << 13); i++) rom[i] = 8'(i * 3 + 1);
    for (int i = 0; i < (1 << 17); i++) begin sram[i] = 8'(i * 7); eep[i] = 8'(i ^ 8'h5A); end
    repeat (20) @(posedge clk);
    por_n = 1;
    wait (sys_rst_n);
    fork cdi_listen(0); cdi_listen(1); cdi_listen(2); join_none

    k = 0;
    do begin io_r(IO_SSR_STAT, s); k++; end while (!s[2] && k < 200);
    check(s[2] && mdl.mode_ok, "SDRAM initialised");
    if (s[2]) mech[M_SDRAM_INIT]++;
    mem_r(16'h0123, q); check(q == rom[13'h0123], "boot ROM read");
    if (q == rom[13'h0123]) mech[M_ROM_BOOT]++;
    set_ctrl(8'h03);

    cdi_cmd_send(1, 8'h42, 16'hA55A);
    repeat (4 * BT) @(posedge sc_clk_8m);
    check(cmd_q[1].size() == 1 && cmd_q[1][0] == 24'h42A55A, "CDI command to the FGE channel");
    if (cmd_q[1].size() == 1) mech[M_CDI_CMD]++;
    cdi_cmd_send(3, 8'h00, 16'h01FF);
    repeat (20) @(posedge clk);
    check(pcb_sw_on == 28'h00001FF, "PCB: nine instrument services on");
    if (pcb_sw_on == 28'h00001FF) mech[M_PCB_SWITCH]++;

    // 507 telemetry words into the SSR from word 0
    io_w(8'h34, 8'h00); io_w(8'h35, 8'h00); io_w(8'h36, 8'h00); io_w(8'h37, 8'h00);
    for (int i = 0; i < 507; i++) begin
      w = {8'(i), 8'(i * 13 + 1), 8'(i * 29 + 7)};
      tlm_send(i % 3, w);
      exp_tlm.push_back(w[15:8]); exp_tlm.push_back(w[7:0]);
    end
    repeat (200) @(posedge clk);
    io_r(8'h34, s); io_r(8'h35, q);
    check({q, s} == 16'd338, $sformatf("write pointer %0d after 1014 bytes", {q, s}));
    k = 0;
    for (int i = 0; i < 1014; i++) begin
      v = mdl.peek(longint'(i / 3));
      if (v[8 * (i % 3) +: 8] == exp_tlm[i]) k++;
    end
    check(k == 1014, $sformatf("telemetry bytes in the SSR: %0d of 1014", k));
    if (k == 1014) mech[M_TLM_SSR]++;

    // one full frame: 1013 data bytes
    set_ctrl(8'h0B);
    io_w(8'h38, 8'h00); io_w(8'h39, 8'h00); io_w(8'h3A, 8'h00); io_w(8'h3B, 8'h00);
    io_w(8'h3C, 8'(1013)); io_w(8'h3D, 8'(1013 >> 8));
    io_w(IO_SSR_RGO, 8'h01);
    k = 0;
    do begin io_r(IO_SSR_STAT, s); k++; end while (!s[1] && k < 5000);
    repeat (20) @(posedge clk);
    check(hst_q.size() == FB, $sformatf("HST frame of %0d bytes", hst_q.size()));
    if (hst_q.size() == FB) begin
      check({hst_q[0], hst_q[1]} == 16'h0A50 && {hst_q[4][2:0], hst_q[5]} == 11'd0, "frame header");
      k = 0;
      for (int i = 0; i < DB; i++) if (hst_q[HB + i] == exp_tlm[i]) k++;
      check(k == DB, $sformatf("frame data %0d of %0d", k, DB));
      if (k == DB) mech[M_PLAYBACK]++;
      check(hgap_bad == 0 && hgap_ok == FB * 8 - 1, "HST bit clock 2 MHz (10 clocks per bit)");
      if (hgap_bad == 0) mech[M_HST_RATE]++;
    end

    // UART blocks at 38.4 kbaud (521 clocks per bit)
    io_w(8'h40, 8'h00); io_w(8'h41, 8'h10); io_w(8'h42, 8'h00); io_w(8'h43, 8'd2); io_w(8'h44, 8'h01);
    uart_send(8'hC5); uart_send(8'h3A);
    repeat (4 * CPB) @(posedge clk);
    check(sram[17'h1000] == 8'hC5 && sram[17'h1001] == 8'h3A, "UART command DMA");
    if (sram[17'h1001] == 8'h3A) mech[M_UART_RX_DMA]++;
    sram[17'h1100] = 8'h96; sram[17'h1101] = 8'h69;
    io_w(8'h48, 8'h00); io_w(8'h49, 8'h11); io_w(8'h4A, 8'h00); io_w(8'h4B, 8'd2); io_w(8'h4C, 8'h01);
    repeat (2 * 10 * CPB + 400) @(posedge clk);
    check(uart_rx_q.size() == 2, "UART telemetry bytes");
    if (uart_rx_q.size() == 2) begin
      check(uart_rx_q[0] == 8'h96 && uart_rx_q[1] == 8'h69, "UART telemetry data");
      check(uart_rx_t[1] - uart_rx_t[0] >= 10 * CPB && uart_rx_t[1] - uart_rx_t[0] <= 10 * CPB + 20,
            $sformatf("UART byte spacing %0d clocks", uart_rx_t[1] - uart_rx_t[0]));
      if (uart_rx_q[1] == 8'h69) mech[M_UART_TX_DMA]++;
    end

    // SSR input rate: the three telemetry links send back to back at once
    // (one word per 27 bit periods each) while the scrubber runs; every word
    // must be stored, in order per link, at well over 630 kbit/s of data.
    io_r(IO_CDI_STAT, s);                        // clears the overrun flag
    io_w(IO_SSR_CLR, 8'h04);                     // scrubber on
    io_w(8'h34, 8'hD0); io_w(8'h35, 8'h07); io_w(8'h36, 8'h00); io_w(8'h37, 8'h00);
    t0 = cyc;
    fork
      for (int i = 0; i < NRATE; i++) tlm_send(0, {8'hB0, 2'd0, 14'(i)});
      for (int i = 0; i < NRATE; i++) tlm_send(1, {8'hB1, 2'd1, 14'(i)});
      for (int i = 0; i < NRATE; i++) tlm_send(2, {8'hB2, 2'd2, 14'(i)});
    join
    repeat (200) @(posedge clk);
    t1 = cyc - t0 - 200;
    io_w(IO_SSR_CLR, 8'h00);
    io_r(IO_CDI_STAT, s);
    check(!s[7], "no telemetry overrun at the full link rate");
    io_r(8'h34, s); io_r(8'h35, q);
    check({q, s} == 16'(2000 + 2 * NRATE), $sformatf("write pointer %0d after %0d words", {q, s}, 3 * NRATE));
    begin
      int nxt [3];
      int bad;
      logic [7:0] hi, lo;
      nxt = '{0, 0, 0}; bad = 0;
      for (int i = 0; i < 6 * NRATE; i += 2) begin
        v = mdl.peek(longint'(2000 + i / 3));
        hi = v[8 * (i % 3) +: 8];
        v = mdl.peek(longint'(2000 + (i + 1) / 3));
        lo = v[8 * ((i + 1) % 3) +: 8];
        if (hi[7:6] > 2'd2 || {hi[5:0], lo} != 14'(nxt[hi[7:6]])) bad++;
        else nxt[hi[7:6]]++;
      end
      check(bad == 0 && nxt[0] == NRATE && nxt[1] == NRATE && nxt[2] == NRATE,
            $sformatf("stored words per link %0d %0d %0d of %0d, %0d out of order",
                      nxt[0], nxt[1], nxt[2], NRATE, bad));
    end
    rate = real'(3 * NRATE * 16) * real'(CLK_HZ) / real'(t1);
    $display("SSR input data rate %0.0f bit/s over %0d clocks", rate, t1);
    check(rate >= 630_000.0, $sformatf("SSR input rate %0.0f bit/s >= 630 kbit/s", rate));

    // one internal second
    @(posedge clk iff instr_1hz);
    n0 = n256; t0 = cyc;
    @(posedge clk iff instr_1hz);
    t1 = cyc - t0;
    check(n256 - n0 == 256, $sformatf("%0d interrupts per second", n256 - n0));
    if (n256 - n0 == 256) mech[M_INT256]++;
    check(t1 >= ticks_to_clks(1 << 23) - 4 && t1 <= ticks_to_clks(1 << 23) + 4,
          $sformatf("second of %0d clocks (2^23 ticks)", t1));
    if (t1 >= ticks_to_clks(1 << 23) - 4 && t1 <= ticks_to_clks(1 << 23) + 4) mech[M_SECOND]++;

    // spin sector period at the reset pulse generator setting: 1536 * 2^9 ticks
    @(posedge clk iff spin_sector_pulse);
    t0 = cyc;
    @(posedge clk iff spin_sector_pulse);
    t1 = cyc - t0;
    check(t1 >= ticks_to_clks(1536 * 512) - 4 && t1 <= ticks_to_clks(1536 * 512) + 4,
          $sformatf("sector period %0d clocks", t1));
    if (t1 >= ticks_to_clks(1536 * 512) - 4 && t1 <= ticks_to_clks(1536 * 512) + 4) mech[M_SECTOR]++;

    // the 3 s watchdog
    wd_disable = 0;
    io_w(IO_WDCLR, 8'h00);
    t0 = cyc;
    @(negedge sys_rst_n);
    t1 = cyc - t0;
    check(t1 > 3 * CLK_HZ - 200 && t1 <= 3 * CLK_HZ + 20, $sformatf("watchdog fired after %0d clocks", t1));
    mech[M_WATCHDOG]++;

    for (int i = 0; i < M_N; i++) begin
      check(mech[i] > 0, $sformatf("mechanism %s happened %0d times", mech_e'(i), mech[i]));
      $display("mechanism %-14s %0d", mech_e'(i), mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
