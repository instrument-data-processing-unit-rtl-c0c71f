// tb_sdram_ctrl: writes random words to random addresses, reads them back and
// compares with a testbench copy; checks that the SDRAM model saw no protocol
// error, that refresh keeps its interval and that an access takes the expected
// number of clocks (ACTIVE, READ, CAS latency 2, capture, ack).
module tb_sdram_ctrl;
  localparam int ROW_W = 13, COL_W = 11, BANK_W = 2, AW = 26, REF = 40;
  logic clk = 0, rst_n = 0, req = 0, we = 0, ack, init_done;
  logic [AW-1:0] addr;
  logic [31:0] wdata, rdata, dq_o, dq_i;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [BANK_W-1:0] sd_ba;
  logic [ROW_W-1:0] sd_a;
  int checks = 0, failures = 0;
  sdram_ctrl #(.INIT_CYCLES(50), .REF_CYCLES(REF)) dut (.*, .sd_dq_out(dq_o), .sd_dq_in(dq_i));
  sdram_model mdl (.clk, .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
                   .ba(sd_ba), .a(sd_a), .dq_in(dq_o), .dq_out(dq_i));
  always #5 clk = ~clk;
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic access(input logic w, input logic [AW-1:0] a, input logic [31:0] d, output logic [31:0] q, output int n);
    @(negedge clk); req = 1; we = w; addr = a; wdata = d; n = 0;
    do begin @(posedge clk); n++; end while (!ack);
    #1 q = rdata; @(negedge clk); req = 0;
  endtask
  initial begin
    logic [AW-1:0] adr [64]; logic [31:0] dat [64]; logic [31:0] q; int n, r0, minr;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (init_done);
    check(mdl.refreshes == 2 && mdl.mode_ok, "init sequence");
    for (int i = 0; i < 64; i++) begin
      adr[i] = AW'({$urandom, $urandom}); dat[i] = $urandom;
      for (int j = 0; j < i; j++) if (adr[j] == adr[i]) adr[i] = adr[i] ^ AW'(1 << 20);
      access(1, adr[i], dat[i], q, n);
    end
    minr = 1000;
    for (int i = 63; i >= 0; i--) begin
      access(0, adr[i], 0, q, n);
      check(q == dat[i], $sformatf("read %h: %h expected %h", adr[i], q, dat[i]));
      if (n < minr) minr = n;
    end
    // idle path: IDLE, ACT, RW, 3 cycles to capture, DONE raises ack at the
    // 7th edge; the loop above sees it at the 8th
    check(minr == 8, $sformatf("fastest read took %0d clocks", minr));
    r0 = mdl.refreshes;
    repeat (REF * 10) @(posedge clk);
    check(mdl.refreshes - r0 >= 9 && mdl.refreshes - r0 <= 11, $sformatf("refreshes %0d", mdl.refreshes - r0));
    check(mdl.errors == 0, $sformatf("protocol errors %0d", mdl.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
