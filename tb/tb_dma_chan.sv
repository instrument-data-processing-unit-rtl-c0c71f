// tb_dma_chan: a receive channel (stream to memory) and a transmit channel
// (memory to stream) against a testbench memory with a random response delay.
// Checks the bytes written and read, the byte count, busy/done and that a
// length of 0 moves 256 bytes.
module tb_dma_chan;
  logic clk = 0, rst_n = 0;
  logic [7:0] mem [1 << 17];
  // RX channel
  logic r_start = 0, r_busy, r_done, s_valid = 0, s_ready, r_req, r_we, r_ack = 0, r_ov, r_or;
  logic [16:0] r_sa, r_addr; logic [7:0] r_len, s_data, r_wd, r_od; logic [8:0] r_left;
  // TX channel
  logic t_start = 0, t_busy, t_done, t_sr, t_req, t_we, t_ack = 0, o_valid, o_ready = 0;
  logic [16:0] t_sa, t_addr; logic [7:0] t_len, o_data, t_wd, t_rdata; logic [8:0] t_left;
  int checks = 0, failures = 0, rdone = 0, tdone = 0;
  dma_chan #(.TO_MEM(1)) rx (.clk, .rst_n, .start(r_start), .start_addr(r_sa), .start_len(r_len),
    .busy(r_busy), .left(r_left), .done(r_done), .s_valid, .s_data, .s_ready, .o_valid(r_ov), .o_data(r_od),
    .o_ready(1'b0), .mem_req(r_req), .mem_we(r_we), .mem_addr(r_addr), .mem_wdata(r_wd), .mem_ack(r_ack),
    .mem_rdata(8'h00));
  dma_chan #(.TO_MEM(0)) tx (.clk, .rst_n, .start(t_start), .start_addr(t_sa), .start_len(t_len),
    .busy(t_busy), .left(t_left), .done(t_done), .s_valid(1'b0), .s_data(8'h00), .s_ready(t_sr), .o_valid, .o_data,
    .o_ready, .mem_req(t_req), .mem_we(t_we), .mem_addr(t_addr), .mem_wdata(t_wd), .mem_ack(t_ack),
    .mem_rdata(t_rdata));
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin if (r_done) rdone++; if (t_done) tdone++; end
  // memory responders: ack after 1..4 clocks, one idle clock after each ack
  initial forever begin
    @(posedge clk iff (rst_n && r_req)); repeat ($urandom_range(0, 3)) @(posedge clk);
    if (r_we) mem[r_addr] <= r_wd;
    r_ack <= 1; @(posedge clk); r_ack <= 0; @(posedge clk);
  end
  initial forever begin
    @(posedge clk iff (rst_n && t_req)); repeat ($urandom_range(0, 3)) @(posedge clk);
    t_rdata <= mem[t_addr]; t_ack <= 1; @(posedge clk); t_ack <= 0; @(posedge clk);
  end
  always @(negedge clk) o_ready = ($urandom_range(0, 2) != 0);
  logic [7:0] outq [$];
  always @(posedge clk) if (rst_n && o_valid && o_ready) outq.push_back(o_data);
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] src [40];
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); r_sa = 17'h00200; r_len = 8'd40; r_start = 1; @(negedge clk); r_start = 0;
    check(r_busy && r_left == 40, "rx busy");
    for (int i = 0; i < 40; i++) begin
      src[i] = 8'($urandom);
      @(negedge clk); s_valid = 1; s_data = src[i];
      @(posedge clk iff s_ready); @(negedge clk); s_valid = 0;
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    wait (!r_busy); repeat (3) @(posedge clk);
    for (int i = 0; i < 40; i++) check(mem[17'h200 + 17'(i)] == src[i], $sformatf("rx byte %0d", i));
    check(rdone == 1, "rx done once");
    // tx 256 bytes from 0x1FF00 (len 0)
    for (int i = 0; i < 256; i++) mem[17'h1FF00 + 17'(i)] = 8'(i * 3 + 1);
    @(negedge clk); t_sa = 17'h1FF00; t_len = 8'd0; t_start = 1; @(negedge clk); t_start = 0;
    wait (!t_busy); repeat (3) @(posedge clk);
    check(outq.size() == 256, $sformatf("tx bytes %0d", outq.size()));
    for (int i = 0; i < 256 && i < outq.size(); i++) check(outq[i] == 8'(i * 3 + 1), $sformatf("tx byte %0d", i));
    check(tdone == 1, "tx done once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
