// tb_hst_framer: feeds packets of random length (sop on the first byte) into a
// small framer (32-byte frames), plays the BAU: raises ready at random
// times and samples hst_data on each rising hst_clk.  Each received frame is
// checked for its header (SCID/VCID, frame counts, first header pointer
// computed here from the packet starts, seconds) and its data field against
// the bytes sent; a final flush must pad with FILL.  Also checks the frame
// duration (FRAME_BYTES * 8 * BIT_DIV clocks) and that the input stalled.
module tb_hst_framer;
  localparam int FB = 32, BD = 4, HB = 11, DB = FB - HB;
  logic clk = 0, rst_n = 0, enable = 1, in_valid = 0, in_sop = 0, flush = 0, bau_ready = 0;
  logic [31:0] seconds = 32'h0102_0304;
  logic [7:0] in_byte;
  logic in_ready, hst_data, hst_clk, hst_active, frame_done;
  int checks = 0, failures = 0, stalls = 0;
  hst_framer #(.FRAME_BYTES(FB), .BIT_DIV(BD), .SCID(10'h2C3), .VCID(3'd5)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // sent stream
  logic [7:0] sent [$]; bit starts [$];
  always @(posedge clk) begin
    if (in_valid && !in_ready) stalls++;
    if (in_valid && in_ready) begin sent.push_back(in_byte); starts.push_back(in_sop); end
  end
  // BAU receiver
  logic [7:0] rx [$]; int act_cycles = 0;
  logic [7:0] sh; int nb = 0;
  always @(posedge clk) if (rst_n && hst_active) act_cycles++;
  always @(posedge hst_clk) begin sh = {sh[6:0], hst_data}; nb++; if (nb % 8 == 0) rx.push_back(sh); end
  always @(negedge clk) bau_ready <= ($urandom_range(0, 30) == 0) ? ~bau_ready : bau_ready;

  int total = 0, nframes = 0, sent_pos = 0;
  initial begin
    int len;
    repeat (3) @(posedge clk); rst_n = 1;
    // about 6 frames of packets
    while (total < 6 * DB) begin
      len = $urandom_range(3, 30);
      for (int i = 0; i < len; i++) begin
        @(negedge clk); in_valid = 1; in_byte = 8'($urandom); in_sop = (i == 0);
        @(posedge clk iff in_ready);
      end
      total += len;
    end
    @(negedge clk); in_valid = 0; in_sop = 0;
    flush = 1; @(negedge clk); flush = 0;
  end
  // frame checker
  initial begin
    int f = 0, exp_fhp, padded; logic [10:0] fhp;
    wait (rst_n);
    forever begin
      @(posedge clk iff frame_done);
      repeat (2) @(posedge clk);
      check(rx.size() == FB, $sformatf("frame %0d size %0d", f, rx.size()));
      if (rx.size() == FB) begin
        check(rx[0] == {2'b00, 6'h2C} && rx[1] == {4'h3, 3'd5, 1'b0}, "SCID/VCID");
        check(rx[2] == 8'(f) && rx[3] == 8'(f), "frame counts");
        fhp = {rx[4][2:0], rx[5]};
        check(rx[4][7:3] == 5'b10011 && rx[6] == 8'h04, "flags");
        check({rx[7], rx[8], rx[9], rx[10]} == seconds, "seconds");
        exp_fhp = 11'h7FF; padded = 0;
        for (int i = 0; i < DB; i++) begin
          if (sent_pos + i < sent.size()) begin
            check(rx[HB + i] == sent[sent_pos + i], $sformatf("frame %0d byte %0d", f, i));
            if (starts[sent_pos + i] && exp_fhp == 11'h7FF) exp_fhp = i;
          end else begin
            check(rx[HB + i] == 8'h55, "fill byte"); padded++;
          end
        end
        check(fhp == 11'(exp_fhp), $sformatf("frame %0d fhp %0h expected %0h", f, fhp, exp_fhp));
        sent_pos += DB - padded;
        if (padded > 0) begin
          check(sent_pos == sent.size(), "all bytes framed");
          check(act_cycles == (f + 1) * FB * 8 * BD,
                $sformatf("active cycles %0d", act_cycles));
          check(stalls > 0, "input stalled while both buffers full");
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
        end
      end
      rx.delete(); f++;
    end
  end
endmodule
