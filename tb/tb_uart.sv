// tb_uart: loops txd back to rxd and sends random bytes; also decodes txd in
// the testbench (start, 8 bits LSB first, stop at CLKS_PER_BIT clocks per bit)
// and checks the byte time, and sends a frame with a bad stop bit.
module tb_uart;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, tx_valid = 0, tx_ready, txd, rx_valid, rx_err;
  logic rxd;
  logic [7:0] tx_data, rx_data;
  logic force_rx = 0, rx_drv = 1;
  int checks = 0, failures = 0;
  logic rx_seen = 0;
  always @(posedge clk) if (rx_valid) rx_seen <= 1;
  assign rxd = force_rx ? rx_drv : txd;
  uart #(.CLKS_PER_BIT(CPB)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // line decoder
  logic [7:0] line_byte; int line_n = 0;
  initial begin
    forever begin
      @(negedge txd);
      repeat (CPB/2) @(posedge clk);
      for (int b = 0; b < 8; b++) begin repeat (CPB) @(posedge clk); line_byte[b] = txd; end
      repeat (CPB) @(posedge clk);
      if (txd) line_n++;
    end
  end
  initial begin
    logic [7:0] b; int t0, t1;
    repeat (4) @(posedge clk); rst_n = 1;
    repeat (4) @(posedge clk);
    for (int k = 0; k < 12; k++) begin
      b = 8'($urandom);
      @(negedge clk); tx_data = b; tx_valid = 1; t0 = $time; @(negedge clk); tx_valid = 0;
      @(posedge clk iff rx_valid); #1;
      check(rx_data == b && !rx_err, $sformatf("loop byte %h got %h", b, rx_data));
      check(line_byte == b && line_n == k + 1, "line decode");
      wait (tx_ready); t1 = $time;
      check((t1 - t0) / 10 >= 10*CPB && (t1 - t0) / 10 <= 10*CPB + 2, $sformatf("byte time %0d", (t1-t0)/10));
    end
    // bad stop bit
    force_rx = 1; rx_seen = 0;
    rx_drv = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx_drv = i[0]; repeat (CPB) @(posedge clk); end
    rx_drv = 0; repeat (CPB) @(posedge clk);
    repeat (4) @(posedge clk); #1;
    check(rx_seen && rx_err && rx_data == 8'hAA, "framing error flagged");
    rx_drv = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
