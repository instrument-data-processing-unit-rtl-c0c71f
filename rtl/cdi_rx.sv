// cdi_rx: Command and Data Interface deserializer.
// Receives 24-bit CDI words (8-bit address, 16-bit data) sent with the line
// format of cdi_tx: idle low, a '1' start marker, 24 bits MSB first, BIT_TICKS
// CDI clock ticks per bit.  The DCB uses it for instrument telemetry and the
// PCB for commands.  Bits are sampled in the middle of each bit period
// (tick BIT_TICKS/2).  A start is a low-to-high change seen on two ticks, so
// a last data bit of '1' still on the line after the word cannot start a
// false word.  A received word is held on word with word_valid high
// until ack; a word that completes while the previous one is still unread
// replaces it and overrun pulses for one clock, because the CDI has no
// handshake to hold the sender off (the sampling scheme and overrun rule are
// this design's own).
module cdi_rx
  import idpu_pkg::*;
#(
  parameter int unsigned BIT_TICKS = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cdi_tick,
  input  logic      sdi,
  input  logic      ack,
  output logic      word_valid,
  output cdi_word_t word,
  output logic      overrun
);
  localparam int unsigned TW = $clog2(BIT_TICKS);
  logic                   busy, prev;
  logic [TW-1:0]          tcnt;
  logic [4:0]             nbits;
  logic [CDI_WORD_W-1:0]  sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; prev <= 1'b0; tcnt <= '0; nbits <= '0; sh <= '0;
      word_valid <= 1'b0; word <= '0; overrun <= 1'b0;
    end else begin
      overrun <= 1'b0;
      if (ack) word_valid <= 1'b0;
      if (cdi_tick) begin
        prev <= sdi;
        if (!busy) begin
          if (sdi && !prev) begin           // first tick of the start marker
            busy  <= 1'b1;
            tcnt  <= 1;
            nbits <= '0;
          end
        end else begin
          tcnt <= (tcnt == TW'(BIT_TICKS - 1)) ? '0 : tcnt + 1'b1;
          if (tcnt == TW'(BIT_TICKS / 2) && nbits != 0) begin
            sh <= {sh[CDI_WORD_W-2:0], sdi};
          end
          if (tcnt == TW'(BIT_TICKS - 1)) begin
            if (nbits == 5'(CDI_WORD_W)) begin
              busy       <= 1'b0;
              word       <= sh;
              word_valid <= 1'b1;
              overrun    <= word_valid && !ack;
            end else begin
              nbits <= nbits + 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
