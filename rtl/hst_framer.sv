// hst_framer: High Speed Telemetry transfer-frame builder and serializer.
// The CPU plays packets back from the SSR one DMA transfer per packet; this
// block packs the variable-length CCSDS packet bytes (in_* stream, in_sop on a
// packet's first byte) into fixed-size transfer frames, adds the frame
// headers, and when the BAU raises bau_ready and the link is enabled clocks a
// whole frame out bit-serially, MSB first, with one hst_clk pulse per bit
// (data changes while hst_clk is low, the BAU samples on its rising edge).
// Frames carry no sync word or Reed-Solomon block; the BAU adds those.
// That much follows the IDPU description.  The header layout, the frame size
// and the flush are this design's choices, modelled on the CCSDS TM frame:
//   primary header, 6 bytes: {2'b00 version, SCID[9:0], VCID[2:0], 1'b0},
//     master-channel frame count, virtual-channel frame count,
//     {1'b1 secondary header, 1'b0, 1'b0, 2'b11, first header pointer[10:0]};
//   secondary header, 5 bytes: {2'b00, 6'd4 length}, 32-bit seconds at the
//     time the frame was closed.
// The first header pointer is the offset of the first packet start in the
// data field, 0x7FF when none starts in the frame.  flush pads the frame
// being filled with FILL bytes and closes it.  Two data-field buffers
// alternate: one fills while the other is sent; when both are full, in_ready
// drops (stall).  One bit takes BIT_DIV clocks (2 MHz from 20 MHz).
module hst_framer #(
  parameter int unsigned FRAME_BYTES = 1024,
  parameter int unsigned BIT_DIV     = 10,
  parameter logic [9:0]  SCID        = 10'h0A5,
  parameter logic [2:0]  VCID        = 3'd0,
  parameter logic [7:0]  FILL        = 8'h55,
  localparam int unsigned HDR_BYTES  = 11,
  localparam int unsigned DATA_BYTES = FRAME_BYTES - HDR_BYTES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,       // IDPU side of the transfer session enabled
  input  logic [31:0] seconds,
  // packet byte stream
  input  logic        in_valid,
  input  logic [7:0]  in_byte,
  input  logic        in_sop,
  output logic        in_ready,
  input  logic        flush,        // strobe: pad and close the current frame
  // BAU link
  input  logic        bau_ready,
  output logic        hst_data,
  output logic        hst_clk,
  output logic        hst_active,   // high while a frame is clocked out
  output logic        frame_done    // strobe at the end of a frame
);
  localparam int unsigned IW = $clog2(FRAME_BYTES + 1);
  localparam int unsigned DW = $clog2(DATA_BYTES);

  logic [7:0]    mem [2][DATA_BYTES];
  logic [1:0]    full;
  logic [10:0]   fhp  [2];
  logic [31:0]   tsec [2];
  logic          wsel, rsel;
  logic [IW-1:0] wptr;
  logic          padding;
  logic [7:0]    mc_cnt, vc_cnt;

  // ---------------- fill side ----------------
  assign in_ready = !full[wsel] && !padding;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel <= 1'b0; wptr <= '0; padding <= 1'b0;
      full <= '0; fhp[0] <= 11'h7FF; fhp[1] <= 11'h7FF; tsec[0] <= '0; tsec[1] <= '0;
    end else begin
      if (frame_done) begin             // rsel has already moved on
        full[~rsel] <= 1'b0;
        fhp[~rsel]  <= 11'h7FF;
      end
      if (!full[wsel]) begin
        if ((in_valid && in_ready) || padding) begin
          mem[wsel][DW'(wptr)] <= padding ? FILL : in_byte;
          if (!padding && in_sop && fhp[wsel] == 11'h7FF) fhp[wsel] <= 11'(wptr);
          if (wptr == IW'(DATA_BYTES - 1)) begin
            wptr       <= '0;
            full[wsel] <= 1'b1;
            tsec[wsel] <= seconds;
            wsel       <= ~wsel;
            padding    <= 1'b0;
          end else begin
            wptr <= wptr + 1'b1;
          end
        end
        if (flush && wptr != 0) padding <= 1'b1;
      end
    end
  end

  // ---------------- send side ----------------
  logic [IW-1:0] ridx;
  logic [2:0]    bitn;
  logic [$clog2(BIT_DIV)-1:0] bcnt;
  logic [7:0]    cur;

  always_comb begin
    case (ridx)
      IW'(0):  cur = {2'b00, SCID[9:4]};
      IW'(1):  cur = {SCID[3:0], VCID, 1'b0};
      IW'(2):  cur = mc_cnt;
      IW'(3):  cur = vc_cnt;
      IW'(4):  cur = {1'b1, 1'b0, 1'b0, 2'b11, fhp[rsel][10:8]};
      IW'(5):  cur = fhp[rsel][7:0];
      IW'(6):  cur = {2'b00, 6'd4};
      IW'(7):  cur = tsec[rsel][31:24];
      IW'(8):  cur = tsec[rsel][23:16];
      IW'(9):  cur = tsec[rsel][15:8];
      IW'(10): cur = tsec[rsel][7:0];
      default: cur = mem[rsel][DW'(ridx - IW'(HDR_BYTES))];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsel <= 1'b0; ridx <= '0; bitn <= 3'd7; bcnt <= '0; hst_active <= 1'b0;
      hst_data <= 1'b0; hst_clk <= 1'b0; frame_done <= 1'b0; mc_cnt <= '0; vc_cnt <= '0;
    end else begin
      frame_done <= 1'b0;
      if (!hst_active) begin
        hst_clk <= 1'b0;
        if (full[rsel] && enable && bau_ready && !frame_done) begin
          hst_active <= 1'b1; ridx <= '0; bitn <= 3'd7; bcnt <= '0;
        end
      end else begin
        bcnt <= (bcnt == $bits(bcnt)'(BIT_DIV - 1)) ? '0 : bcnt + 1'b1;
        if (bcnt == 0) begin
          hst_data <= cur[bitn];
          hst_clk  <= 1'b0;
        end else if (bcnt == $bits(bcnt)'(BIT_DIV / 2)) begin
          hst_clk <= 1'b1;
        end
        if (bcnt == $bits(bcnt)'(BIT_DIV - 1)) begin
          bitn <= bitn - 1'b1;
          if (bitn == 0) begin
            if (ridx == IW'(FRAME_BYTES - 1)) begin
              hst_active <= 1'b0;
              frame_done <= 1'b1;
              rsel       <= ~rsel;
              mc_cnt     <= mc_cnt + 1'b1;
              vc_cnt     <= vc_cnt + 1'b1;
            end else begin
              ridx <= ridx + 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
