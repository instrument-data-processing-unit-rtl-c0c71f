// tb_ssr_ctrl: ssr_ctrl on sdram_ctrl and the SDRAM model (small array).
// Checks the packing and code of telemetry words in the array against a
// reference encoder, the playback stream (bytes, sop, eop, random stalls),
// CPU byte reads and read-modify-write, error injection through the check
// lane, and the scrubber correcting injected single-bit errors in the array,
// counting single and double errors and clearing the counters.
module tb_ssr_ctrl;
  localparam int ROW_W = 11, COL_W = 3, BANK_W = 1, AW = ROW_W + COL_W + BANK_W;
  logic clk = 0, rst_n = 0;
  logic tlm_valid = 0, tlm_ready, wptr_load = 0, rd_go = 0, rd_busy;
  logic [7:0] tlm_byte, pb_byte, cpu_wdata, cpu_rdata, sbe_cnt, mbe_cnt, scrub_hi;
  logic [AW-1:0] wptr_val, wptr, rd_ptr, mem_addr;
  logic [15:0] rd_len;
  logic pb_valid, pb_sop, pb_eop, pb_ready = 0;
  logic cpu_req = 0, cpu_we = 0, cpu_ack, scrub_en = 0, clr_sbe = 0, clr_mbe = 0;
  logic [AW+1:0] cpu_addr;
  logic mem_req, mem_we, mem_ack, init_done;
  logic [31:0] mem_wdata, mem_rdata, dq_o, dq_i;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [BANK_W-1:0] sd_ba;
  logic [ROW_W-1:0] sd_a;
  int checks = 0, failures = 0;

  ssr_ctrl #(.ADDR_W(AW), .SCRUB_INTERVAL(4)) dut (.*);
  sdram_ctrl #(.ROW_W(ROW_W), .COL_W(COL_W), .BANK_W(BANK_W), .INIT_CYCLES(20), .REF_CYCLES(100))
    u_sd (.clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .ack(mem_ack),
          .rdata(mem_rdata), .init_done, .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba,
          .sd_a, .sd_dq_out(dq_o), .sd_dq_oe, .sd_dq_in(dq_i));
  sdram_model #(.ROW_W(ROW_W), .COL_W(COL_W), .BANK_W(BANK_W)) mdl (.clk, .cs_n(sd_cs_n),
    .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n), .ba(sd_ba), .a(sd_a), .dq_in(dq_o), .dq_out(dq_i));
  always #5 clk = ~clk;
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic logic [7:0] ref_enc(logic [23:0] d);
    logic [7:0] c = '0; int k = 0;
    for (int p = 1; p <= 29; p++)
      if ((p & (p - 1)) != 0) begin
        for (int i = 0; i < 5; i++) if (p[i] && d[k]) c[i] = ~c[i];
        k++;
      end
    c[5] = ^{d, c[4:0]};
    return c;
  endfunction
  task automatic cpu(input logic w, input logic [AW+1:0] a, input logic [7:0] d, output logic [7:0] q);
    @(negedge clk); cpu_req = 1; cpu_we = w; cpu_addr = a; cpu_wdata = d;
    @(posedge clk iff cpu_ack); #1 q = cpu_rdata; @(negedge clk); cpu_req = 0;
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // random playback stalls
  always @(negedge clk) pb_ready = ($urandom_range(0, 3) != 0);
  logic [9:0] pbq [$];     // {sop, eop, byte} of each accepted byte
  always @(posedge clk) if (pb_valid && pb_ready) pbq.push_back({pb_sop, pb_eop, pb_byte});
  initial begin
    logic [7:0] bytes [30]; logic [7:0] q; logic [31:0] w; int n; logic [23:0] d;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (init_done);
    // 1. telemetry bytes into words at 0x100
    @(negedge clk); wptr_val = 'h100; wptr_load = 1; @(negedge clk); wptr_load = 0;
    for (int i = 0; i < 30; i++) begin
      bytes[i] = 8'($urandom);
      @(negedge clk); tlm_valid = 1; tlm_byte = bytes[i];
      @(posedge clk iff tlm_ready); @(negedge clk); tlm_valid = 0;
    end
    repeat (40) @(posedge clk); #1;
    check(wptr == 'h100 + 10, $sformatf("wptr %h", wptr));
    for (int k = 0; k < 10; k++) begin
      d = {bytes[3*k+2], bytes[3*k+1], bytes[3*k]};
      w = mdl.peek(longint'('h100 + k));
      check(w == {ref_enc(d), d}, $sformatf("word %0d = %h expected %h", k, w, {ref_enc(d), d}));
    end
    // 2. playback of 29 bytes
    @(negedge clk); rd_ptr = 'h100; rd_len = 29; rd_go = 1; @(negedge clk); rd_go = 0;
    wait (!rd_busy);
    repeat (20) @(posedge clk); #1;
    check(pbq.size() == 29, $sformatf("playback bytes %0d", pbq.size()));
    for (n = 0; n < 29 && n < pbq.size(); n++) begin
      check(pbq[n][7:0] == bytes[n], $sformatf("pb byte %0d %h vs %h", n, pbq[n][7:0], bytes[n]));
      check(pbq[n][9] == (n == 0) && pbq[n][8] == (n == 28), $sformatf("sop/eop at %0d", n));
    end
    check(!rd_busy && !pb_valid, "playback finished");
    // 3. CPU window
    cpu(0, {AW'('h101), 2'd2}, 0, q); check(q == bytes[5], "cpu read lane 2");
    cpu(1, {AW'('h101), 2'd1}, 8'h5A, q);
    cpu(0, {AW'('h101), 2'd1}, 0, q); check(q == 8'h5A, "cpu write lane 1");
    d = {bytes[5], 8'h5A, bytes[3]};
    cpu(0, {AW'('h101), 2'd3}, 0, q); check(q == ref_enc(d), "check lane after rmw");
    cpu(1, {AW'('h101), 2'd3}, ref_enc(d) ^ 8'h04, q);             // flip one check bit
    cpu(0, {AW'('h101), 2'd0}, 0, q);
    check(q == bytes[3] && sbe_cnt == 1 && mbe_cnt == 0, $sformatf("corrected read, sbe %0d", sbe_cnt));
    // 4. scrubber: flip single bits in 0x102..0x104, two bits in 0x105
    for (int k = 2; k <= 4; k++) mdl.poke(longint'('h100 + k), mdl.peek(longint'('h100 + k)) ^ (32'h1 << (k * 5)));
    mdl.poke(longint'('h105), mdl.peek(longint'('h105)) ^ 32'h0000_0300);
    scrub_en = 1;
    wait (scrub_hi >= 8'd3);   // scrub address past 0x180
    scrub_en = 0;
    repeat (20) @(posedge clk); #1;
    for (int k = 1; k <= 4; k++) begin
      d = (k == 1) ? {bytes[5], 8'h5A, bytes[3]} : {bytes[3*k+2], bytes[3*k+1], bytes[3*k]};
      check(mdl.peek(longint'('h100 + k)) == {ref_enc(d), d}, $sformatf("scrubbed word %0d", k));
    end
    check(sbe_cnt == 5 && mbe_cnt == 1, $sformatf("counters sbe %0d mbe %0d", sbe_cnt, mbe_cnt));
    @(negedge clk); clr_sbe = 1; clr_mbe = 1; @(negedge clk); clr_sbe = 0; clr_mbe = 0; #1;
    check(sbe_cnt == 0 && mbe_cnt == 0, "counters cleared");
    check(mdl.errors == 0, "no SDRAM protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
