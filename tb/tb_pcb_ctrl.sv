// tb_pcb_ctrl: sends CDI commands with cdi_tx and checks the switch outputs,
// the latching current limiter (trip holds the service off until cleared,
// even after the over-current goes away), the actuator plug lock-out and the
// housekeeping mux address.
module tb_pcb_ctrl;
  import idpu_pkg::*;
  logic clk = 0, rst_n = 0, cdi_tick = 0, sdo, ready, wv = 0, act_plug = 0;
  cdi_word_t word;
  logic [27:0] oc = '0, sw_on, trip;
  logic [7:0] hk_mux;
  int checks = 0, failures = 0;
  cdi_tx tx (.clk, .rst_n, .cdi_tick, .word_valid(wv), .word, .ready, .sdo);
  pcb_ctrl dut (.clk, .rst_n, .cdi_tick, .cdi_sdi(sdo), .oc, .act_plug, .sw_on, .trip, .hk_mux);
  always #5 clk = ~clk;
  int div = 0;
  always @(posedge clk) begin div <= (div == 1) ? 0 : div + 1; cdi_tick <= (div == 1); end
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic cmd(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); word = {a, d}; wv = 1; @(negedge clk); wv = 0;
    @(posedge clk iff ready); repeat (4) @(posedge clk); #1;
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1; #1;
    check(sw_on == 0, "all off after reset");
    cmd(8'h00, 16'hA5A5); cmd(8'h01, 16'h0FFF);
    // only services 0..13 are on
    check(sw_on == 28'h00025A5, $sformatf("no actuators without plug: %h", sw_on));
    act_plug = 1; #1;
    check(sw_on == 28'hFFF_A5A5, $sformatf("all enabled with plug: %h", sw_on));
    // over-current on service 5 (on) and 1 (off)
    @(negedge clk); oc[5] = 1; oc[1] = 1; @(negedge clk); oc = '0; #1;
    check(trip == 28'h20 && !sw_on[5], "service 5 tripped and off");
    repeat (10) @(posedge clk); #1;
    check(!sw_on[5], "trip latched");
    cmd(8'h02, 16'h0020); #1;
    check(trip == 0 && sw_on[5], "trip cleared by command");
    @(negedge clk); oc[20] = 1; @(negedge clk); oc = '0;
    cmd(8'h03, 16'h0010); #1;
    check(trip == 0 && sw_on[20], "upper trip cleared");
    cmd(8'h04, 16'h0037);
    check(hk_mux == 8'h37, "hk mux address");
    cmd(8'h00, 16'h0000); cmd(8'h01, 16'h0000);
    check(sw_on == 0, "all off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
