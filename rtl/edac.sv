// edac: error detection and correction code for solid state recorder words.
// The SSR corrects single-bit errors and detects multiple-bit errors; the
// code is this design's choice: an extended Hamming (SEC-DED) code over a
// DATA_W-bit word.  Hamming check bit i covers every codeword position
// (1..DATA_W+HAM_W) whose index has bit i set, data bits filling the positions
// that are not powers of two in ascending order; one more bit is the parity
// of the whole codeword.  The check bits sit in a CHK_W-bit field (unused top
// bits zero).  With DATA_W = 24 and CHK_W = 8 the check byte is one quarter of
// each 32-bit SDRAM word, matching an SSR whose upper quarter holds check bits.
// Decoding: syndrome and overall parity give no error, a corrected single
// error (sbe, also when the error is in a check bit) or an uncorrectable
// double error (mbe).  Both paths are purely combinational.
module edac #(
  parameter int unsigned DATA_W = 24,
  parameter int unsigned CHK_W  = 8
) (
  input  logic [DATA_W-1:0] enc_data,
  output logic [CHK_W-1:0]  enc_check,
  input  logic [DATA_W-1:0] dec_data,
  input  logic [CHK_W-1:0]  dec_check,
  output logic [DATA_W-1:0] cor_data,
  output logic              sbe,
  output logic              mbe
);
  function automatic int unsigned ham_bits(int unsigned dw);
    int unsigned r = 1;
    while ((1 << r) < dw + r + 1) r++;
    return r;
  endfunction
  localparam int unsigned HAM_W = ham_bits(DATA_W);
  localparam int unsigned N     = DATA_W + HAM_W;   // positions 1..N

  // position of data bit d in the Hamming codeword
  function automatic int unsigned dpos(int unsigned d);
    int unsigned p = 0, k = 0;
    for (int unsigned q = 1; q <= N; q++) begin
      if ((q & (q - 1)) != 0) begin
        if (k == d) p = q;
        k++;
      end
    end
    return p;
  endfunction

  function automatic logic [HAM_W-1:0] hamming(logic [DATA_W-1:0] d);
    logic [HAM_W-1:0] h = '0;
    for (int unsigned i = 0; i < DATA_W; i++)
      if (d[i]) h ^= HAM_W'(dpos(i));
    return h;
  endfunction

  // ---------------- encoder ----------------
  logic [HAM_W-1:0] enc_h;
  always_comb begin
    enc_h     = hamming(enc_data);
    enc_check = '0;
    enc_check[HAM_W-1:0] = enc_h;
    enc_check[HAM_W]     = ^{enc_data, enc_h};
  end

  // ---------------- decoder ----------------
  logic [HAM_W-1:0] syn;
  logic             par_err;
  always_comb begin
    syn     = hamming(dec_data) ^ dec_check[HAM_W-1:0];
    par_err = ^{dec_data, dec_check[HAM_W:0]};
    sbe     = par_err;
    mbe     = !par_err && (syn != 0);
    cor_data = dec_data;
    if (par_err)
      for (int unsigned i = 0; i < DATA_W; i++)
        if (HAM_W'(dpos(i)) == syn) cor_data[i] = ~dec_data[i];
  end
endmodule
