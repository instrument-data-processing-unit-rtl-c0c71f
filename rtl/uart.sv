// uart: the bidirectional 8-bit UART of the spacecraft interface.
// Commands arrive from the BAU and low-speed telemetry leaves at 38.4 kbaud,
// as the IDPU description gives; the frame (1 start bit, 8 data bits LSB first,
// 1 stop bit, no parity) is this design's assumption of a "standard" UART.
// CLKS_PER_BIT = round(20 MHz / 38400) = 521 (0.03 % fast).  The receiver
// synchronises rxd, finds the start edge, samples each bit in its middle and
// flags a missing stop bit in rx_err.
// Interface: tx_valid/tx_data load a byte while tx_ready; rx_valid pulses one
// clock with rx_data.  A byte takes 10 * CLKS_PER_BIT clocks on the line.
module uart #(
  parameter int unsigned CLKS_PER_BIT = 521
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready,
  output logic       txd,
  input  logic       rxd,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       rx_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  // ---------------- transmitter ----------------
  logic [9:0]    tx_sh;
  logic [3:0]    tx_bits;
  logic [CW-1:0] tx_cnt;
  assign tx_ready = (tx_bits == 0);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh <= '1; tx_bits <= '0; tx_cnt <= '0; txd <= 1'b1;
    end else if (tx_ready) begin
      txd <= 1'b1;
      if (tx_valid) begin
        tx_sh   <= {1'b1, tx_data, 1'b0};
        tx_bits <= 4'd10;
        tx_cnt  <= '0;
        txd     <= 1'b0;
      end
    end else begin
      txd <= tx_sh[0];
      if (tx_cnt == CW'(CLKS_PER_BIT - 1)) begin
        tx_cnt  <= '0;
        tx_sh   <= {1'b1, tx_sh[9:1]};
        tx_bits <= tx_bits - 1'b1;
        txd     <= (tx_bits == 1) ? 1'b1 : tx_sh[1];
      end else begin
        tx_cnt <= tx_cnt + 1'b1;
      end
    end
  end

  // ---------------- receiver ----------------
  logic [1:0]    rx_s;
  logic          rx_busy;
  logic [3:0]    rx_bit;
  logic [CW-1:0] rx_cnt;
  logic [7:0]    rx_sh;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s <= 2'b11; rx_busy <= 1'b0; rx_bit <= '0; rx_cnt <= '0; rx_sh <= '0;
      rx_valid <= 1'b0; rx_data <= '0; rx_err <= 1'b0;
    end else begin
      rx_s     <= {rx_s[0], rxd};
      rx_valid <= 1'b0;
      if (!rx_busy) begin
        if (!rx_s[1]) begin
          rx_busy <= 1'b1;
          rx_bit  <= '0;
          rx_cnt  <= CW'(CLKS_PER_BIT / 2);
        end
      end else if (rx_cnt == CW'(CLKS_PER_BIT - 1)) begin
        rx_cnt <= '0;
        rx_bit <= rx_bit + 1'b1;
        if (rx_bit == 0) begin
          if (rx_s[1]) rx_busy <= 1'b0;         // glitch, not a start bit
        end else if (rx_bit <= 8) begin
          rx_sh <= {rx_s[1], rx_sh[7:1]};
        end else begin
          rx_busy  <= 1'b0;
          rx_valid <= 1'b1;
          rx_data  <= rx_sh;
          rx_err   <= !rx_s[1];
        end
      end else begin
        rx_cnt <= rx_cnt + 1'b1;
      end
    end
  end
endmodule
