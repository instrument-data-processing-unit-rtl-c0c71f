// tb_edac: encodes random words, then decodes them clean, with every single
// bit flip (data and check bits) and with random double flips.  The check bits
// are compared with a reference encoder written here from the code definition
// (check bit i = XOR of data bits whose Hamming position has bit i set).
module tb_edac;
  localparam int DW = 24, CW = 8, HW = 5;
  logic [DW-1:0] enc_data, dec_data, cor_data;
  logic [CW-1:0] enc_check, dec_check;
  logic sbe, mbe;
  int checks = 0, failures = 0;
  edac #(.DATA_W(DW), .CHK_W(CW)) dut (.*);
  task automatic check(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic logic [CW-1:0] ref_enc(logic [DW-1:0] d);
    logic [CW-1:0] c = '0; int k = 0;
    for (int p = 1; p <= DW + HW; p++) begin
      if ((p & (p - 1)) != 0) begin
        for (int i = 0; i < HW; i++) if (p[i] && d[k]) c[i] = ~c[i];
        k++;
      end
    end
    c[HW] = ^{d, c[HW-1:0]};
    return c;
  endfunction
  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [DW+CW-1:0] cw, bad; int i, j;
    for (int t = 0; t < 200; t++) begin
      enc_data = DW'($urandom); #1;
      check(enc_check == ref_enc(enc_data), $sformatf("encode %h: %h vs %h", enc_data, enc_check, ref_enc(enc_data)));
      cw = {enc_check, enc_data};
      {dec_check, dec_data} = cw; #1;
      check(!sbe && !mbe && cor_data == enc_data, "clean word");
      i = $urandom_range(0, DW + HW);
      bad = cw; bad[i < DW ? i : DW + (i - DW)] ^= 1'b1;
      {dec_check, dec_data} = bad; #1;
      check(sbe && !mbe && cor_data == enc_data, $sformatf("single flip bit %0d", i));
      j = (i + 1 + $urandom_range(0, DW + HW - 1)) % (DW + HW + 1);
      bad[j < DW ? j : DW + (j - DW)] ^= 1'b1;
      {dec_check, dec_data} = bad; #1;
      check(!sbe && mbe, $sformatf("double flip %0d %0d", i, j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
