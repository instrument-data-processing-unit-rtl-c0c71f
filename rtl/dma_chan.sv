// dma_chan: one DMA channel between a byte stream and the SRAM.
// The BAU command and low-speed telemetry blocks pass between the UART and
// processor memory by DMA, the CPU setting each transfer up, as in the IDPU
// description.  The channel is this design's: the CPU gives a start address
// and a byte count (1-256, 0 meaning 256) and a start strobe; with TO_MEM = 1
// each stream byte is written to the SRAM, with TO_MEM = 0 each SRAM byte is
// read and offered on the stream.  busy stays high until the last byte is
// done, then done pulses.  Memory accesses use the req/ack port of cpu_bus,
// holding req until ack.
module dma_chan #(
  parameter bit TO_MEM = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [16:0] start_addr,
  input  logic [7:0]  start_len,
  output logic        busy,
  output logic [8:0]  left,
  output logic        done,
  // stream side
  input  logic        s_valid,    // TO_MEM: byte in
  input  logic [7:0]  s_data,
  output logic        s_ready,
  output logic        o_valid,    // !TO_MEM: byte out
  output logic [7:0]  o_data,
  input  logic        o_ready,
  // SRAM side
  output logic        mem_req,
  output logic        mem_we,
  output logic [16:0] mem_addr,
  output logic [7:0]  mem_wdata,   // the one data register serves both
  input  logic        mem_ack,
  input  logic [7:0]  mem_rdata
);
  assign busy    = (left != 0);
  assign mem_we  = TO_MEM;
  assign s_ready = TO_MEM && busy && !mem_req;
  assign o_data  = mem_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0; done <= 1'b0; mem_req <= 1'b0; mem_addr <= '0; mem_wdata <= '0;
      o_valid <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        mem_addr <= start_addr;
        left     <= (start_len == 0) ? 9'd256 : {1'b0, start_len};
      end else if (TO_MEM) begin
        if (s_valid && s_ready) begin
          mem_wdata <= s_data;
          mem_req   <= 1'b1;
        end
        if (mem_req && mem_ack) begin
          mem_req  <= 1'b0;
          mem_addr <= mem_addr + 1'b1;
          left     <= left - 1'b1;
          done     <= (left == 9'd1);
        end
      end else begin
        if (busy && !mem_req && !o_valid) mem_req <= 1'b1;
        if (mem_req && mem_ack) begin
          mem_req  <= 1'b0;
          mem_wdata <= mem_rdata;
          o_valid  <= 1'b1;
          mem_addr <= mem_addr + 1'b1;
        end
        if (o_valid && o_ready) begin
          o_valid <= 1'b0;
          left    <= left - 1'b1;
          done    <= (left == 9'd1);
        end
      end
    end
  end
endmodule
