// tlm_merge: collects instrument telemetry words from the CDI receivers and
// turns them into the byte stream written to the SSR.  Receivers are served
// in fixed priority, lowest index first; each 16-bit data value becomes two
// bytes, high byte first (the 8-bit CDI address is not stored).  A word is
// acknowledged when its second byte is accepted.  At 1 Mbps a receiver gets a
// word at most every 25 us, far slower than the SSR takes two bytes, so the
// fixed priority cannot starve anyone in practice.  All of this is this
// design's choice; the IDPU description only says the DCB stores what the
// instruments send as fast as they send it.
module tlm_merge
  import idpu_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    w_valid,
  input  cdi_word_t       w_word [N],
  output logic [N-1:0]    w_ack,
  output logic            b_valid,
  output logic [7:0]      b_data,
  input  logic            b_ready
);
  logic                 active, second;
  logic [$clog2(N)-1:0] sel;
  logic [15:0]          data;

  assign b_valid = active;
  assign b_data  = second ? data[7:0] : data[15:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; second <= 1'b0; sel <= '0; data <= '0; w_ack <= '0;
    end else begin
      w_ack <= '0;
      if (!active) begin
        for (int i = N - 1; i >= 0; i--) begin
          if (w_valid[i] && !w_ack[i]) begin
            active <= 1'b1;
            second <= 1'b0;
            sel    <= $bits(sel)'(i);
            data   <= w_word[i].data;
          end
        end
      end else if (b_ready) begin
        if (second) begin
          active     <= 1'b0;
          w_ack[sel] <= 1'b1;
        end
        second <= ~second;
      end
    end
  end
endmodule
