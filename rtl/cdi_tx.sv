// cdi_tx: Command and Data Interface serializer.
// The DCB sends each instrument board 24-bit words (8-bit destination address,
// 16-bit data) at 1 Mbps, timed by the continuous 2^23 Hz CDI clock it also
// sends to the board; there is no handshake.  Those facts follow the IDPU
// description.  The line format is this design's own: the line idles low, a
// word is a one-bit '1' start marker followed by the 24 bits MSB first, and
// every bit lasts BIT_TICKS CDI clock periods (8 x 2^-23 s = 0.95 us, i.e.
// 2^20 bit/s).  cdi_tick is a one-cycle strobe per CDI clock rising edge.
// Interface: load a word with word_valid while ready is high; ready drops for
// the (1+24)*BIT_TICKS ticks of the transfer.
module cdi_tx
  import idpu_pkg::*;
#(
  parameter int unsigned BIT_TICKS = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cdi_tick,
  input  logic      word_valid,
  input  cdi_word_t word,
  output logic      ready,
  output logic      sdo
);
  localparam int unsigned NBITS = 1 + CDI_WORD_W;
  localparam int unsigned TW = $clog2(BIT_TICKS);

  logic [NBITS-1:0] sh;
  logic [$clog2(NBITS+1)-1:0] bits_left;
  logic [TW-1:0] tcnt;

  assign ready = (bits_left == 0);
  assign sdo   = sh[NBITS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; bits_left <= '0; tcnt <= '0;
    end else if (ready) begin
      if (word_valid) begin
        sh        <= {1'b1, word};
        bits_left <= NBITS[$bits(bits_left)-1:0];
        tcnt      <= '0;
      end
    end else if (cdi_tick) begin
      if (tcnt == TW'(BIT_TICKS - 1)) begin
        tcnt      <= '0;
        sh        <= {sh[NBITS-2:0], 1'b0};
        bits_left <= bits_left - 1'b1;
      end else begin
        tcnt <= tcnt + 1'b1;
      end
    end
  end
endmodule
