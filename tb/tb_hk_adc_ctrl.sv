// tb_hk_adc_ctrl: reads all 8 mux channels through the ADC model and checks
// the results, the nap default at reset, that a start in nap mode does nothing,
// and the conversion time (16 sclk periods).
module tb_hk_adc_ctrl;
  localparam int DIV = 3;
  logic clk = 0, rst_n = 0, ctrl_we = 0, ctrl_nap = 1, ctrl_start = 0;
  logic [2:0] ctrl_ch = 0, mux_sel;
  logic busy, done, adc_nap, adc_cs_n, adc_sclk, adc_sdo;
  logic [11:0] result;
  int checks = 0, failures = 0;
  hk_adc_ctrl #(.SCLK_DIV(DIV)) dut (.*);
  adc_model adc (.sel(mux_sel), .nap(adc_nap), .cs_n(adc_cs_n), .sclk(adc_sclk), .sdo(adc_sdo));
  always #5 clk = ~clk;
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wr(input logic [2:0] ch, input logic nap, input logic st);
    @(negedge clk); ctrl_ch = ch; ctrl_nap = nap; ctrl_start = st; ctrl_we = 1;
    @(negedge clk); ctrl_we = 0; ctrl_start = 0;
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    repeat (3) @(posedge clk); rst_n = 1; #1;
    check(adc_nap == 1 && !busy, "nap at reset");
    wr(3'd2, 1'b1, 1'b1); repeat (5) @(posedge clk); #1;
    check(!busy && adc_cs_n, "no conversion in nap");
    for (int c = 0; c < 8; c++) begin
      wr(3'(c), 1'b0, 1'b0); #1;
      check(mux_sel == 3'(c) && !adc_nap, "mux selected, awake");
      repeat (10) @(posedge clk);           // settle
      wr(3'(c), 1'b0, 1'b1);
      n = 1;
      while (!done) begin @(posedge clk); #1; n++; end
      check(result == 12'h155 + 12'(c) * 12'd16, $sformatf("ch %0d result %h", c, result));
      check(n >= 32*DIV - 1 && n <= 32*DIV + 2, $sformatf("conversion %0d clocks", n));
    end
    wr(3'd0, 1'b1, 1'b0); #1;
    check(adc_nap, "back to nap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
