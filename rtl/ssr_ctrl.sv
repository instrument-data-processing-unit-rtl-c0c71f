// ssr_ctrl: data management for the solid state recorder (SSR).
// The SSR is an SDRAM of 2^ADDR_W words, each DATA_W data bits plus a CHK_W
// check field (24 + 8 bits by default: 192 MiB, about 200 MB, of data, with
// the upper quarter of every word holding check bits).  Four users share it
// through one sdram_ctrl port, served one word at a time in fixed priority:
//  1. CPU byte window: byte address = word*4 + lane.  Lanes 0-2 read
//     corrected data bytes and write through read-modify-write with a new
//     code; lane 3 reads the raw check byte and writes it without re-encoding
//     (for diagnostics and error injection).
//  2. Telemetry write DMA: bytes from the instrument interfaces are packed
//     three to a word (first byte in lane 0) and written at wptr, which then
//     increments.  The CPU loads wptr.
//  3. Playback read DMA: the CPU starts it per packet with a word pointer and
//     a byte length; bytes leave on a valid/ready stream with sop and eop.
//  4. Scrubber: when enabled, every SCRUB_INTERVAL clocks it reads the next
//     word of the whole array, writes it back corrected after a single-bit
//     error, and wraps at the end.
// Every decoded read counts single-bit (corrected) and multiple-bit errors in
// two saturating 8-bit counters that the CPU clears; the upper 8 bits of the
// scrub address are status.  Automatic correction, counting, 8-bit counters,
// scrub address status and CPU/DMA access follow the IDPU description; the
// priorities, packing, pointer registers and scrub rate are this design's.
module ssr_ctrl #(
  parameter int unsigned ADDR_W         = 26,
  parameter int unsigned DATA_W         = 24,
  parameter int unsigned CHK_W          = 8,
  parameter int unsigned SCRUB_INTERVAL = 64,
  localparam int unsigned WORD_W        = DATA_W + CHK_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // telemetry write DMA
  input  logic              tlm_valid,
  input  logic [7:0]        tlm_byte,
  output logic              tlm_ready,
  input  logic              wptr_load,
  input  logic [ADDR_W-1:0] wptr_val,
  output logic [ADDR_W-1:0] wptr,
  // playback read DMA
  input  logic              rd_go,
  input  logic [ADDR_W-1:0] rd_ptr,
  input  logic [15:0]       rd_len,       // bytes, 1 or more
  output logic              rd_busy,
  output logic              pb_valid,
  output logic [7:0]        pb_byte,
  output logic              pb_sop,
  output logic              pb_eop,
  input  logic              pb_ready,
  // CPU byte window
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [ADDR_W+1:0] cpu_addr,
  input  logic [7:0]        cpu_wdata,
  output logic              cpu_ack,
  output logic [7:0]        cpu_rdata,
  // scrubber and error counters
  input  logic              scrub_en,
  input  logic              clr_sbe,
  input  logic              clr_mbe,
  output logic [7:0]        sbe_cnt,
  output logic [7:0]        mbe_cnt,
  output logic [7:0]        scrub_hi,
  // memory port (sdram_ctrl host side)
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [WORD_W-1:0] mem_wdata,
  input  logic              mem_ack,
  input  logic [WORD_W-1:0] mem_rdata
);
  localparam int unsigned NB = DATA_W / 8;       // data bytes per word

  typedef enum logic [2:0] { U_NONE, U_CPU, U_WDMA, U_RDMA, U_SCRUB } user_e;
  typedef enum logic [1:0] { M_IDLE, M_READ, M_WRITE } mstate_e;

  user_e   user;
  mstate_e ms;

  // ---------------- EDAC ----------------
  logic [DATA_W-1:0] enc_data, cor_data;
  logic [CHK_W-1:0]  enc_check;
  logic              sbe, mbe;
  edac #(.DATA_W(DATA_W), .CHK_W(CHK_W)) u_edac (
    .enc_data, .enc_check,
    .dec_data (mem_rdata[DATA_W-1:0]), .dec_check(mem_rdata[WORD_W-1:DATA_W]),
    .cor_data, .sbe, .mbe);

  // ---------------- write DMA packing ----------------
  logic [DATA_W-1:0]       wbuf;
  logic [$clog2(NB+1)-1:0] wcount;
  logic                    wfull;
  assign wfull     = (wcount == NB[$bits(wcount)-1:0]);
  assign tlm_ready = !wfull;

  // ---------------- read DMA unpacking ----------------
  logic [ADDR_W-1:0]       rptr;
  logic [15:0]             rleft;       // bytes not yet sent
  logic [DATA_W-1:0]       obuf;
  logic [$clog2(NB+1)-1:0] ocount;      // bytes in obuf
  logic                    first;
  assign rd_busy  = (rleft != 0);
  assign pb_valid = (ocount != 0);
  assign pb_byte  = obuf[7:0];
  assign pb_eop   = pb_valid && (rleft == 16'd1);

  // ---------------- scrubber ----------------
  logic [ADDR_W-1:0]                    saddr;
  logic [$clog2(SCRUB_INTERVAL+1)-1:0]  stimer;
  logic                                 sdue;
  assign scrub_hi = saddr[ADDR_W-1 -: 8];

  // ---------------- CPU byte lanes ----------------
  logic [1:0]  lane;
  logic [DATA_W-1:0] merged;
  assign lane = cpu_addr[1:0];
  always_comb begin
    merged = cor_data;
    for (int unsigned k = 0; k < NB; k++)
      if (lane == 2'(k)) merged[8*k +: 8] = cpu_wdata;
  end

  always_comb begin
    enc_data = '0;
    if (ms == M_IDLE) enc_data = wbuf;          // a write DMA starts from idle
    else case (user)
      U_SCRUB: enc_data = cor_data;
      U_CPU:   enc_data = merged;
      default: enc_data = wbuf;
    endcase
  end

  function automatic logic [7:0] sat_inc(logic [7:0] v);
    return (v == 8'hFF) ? v : v + 8'd1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      user <= U_NONE; ms <= M_IDLE;
      mem_req <= 1'b0; mem_we <= 1'b0; mem_addr <= '0; mem_wdata <= '0;
      wbuf <= '0; wcount <= '0; wptr <= '0;
      rptr <= '0; rleft <= '0; obuf <= '0; ocount <= '0; first <= 1'b0; pb_sop <= 1'b0;
      saddr <= '0; stimer <= '0; sdue <= 1'b0;
      sbe_cnt <= '0; mbe_cnt <= '0; cpu_ack <= 1'b0; cpu_rdata <= '0;
    end else begin
      cpu_ack <= 1'b0;

      // telemetry byte intake
      if (tlm_valid && tlm_ready) begin
        wbuf[8*wcount +: 8] <= tlm_byte;
        wcount <= wcount + 1'b1;
      end
      if (wptr_load) wptr <= wptr_val;

      // playback output
      if (pb_valid && pb_ready) begin
        obuf   <= obuf >> 8;
        ocount <= ocount - 1'b1;
        rleft  <= rleft - 1'b1;
        pb_sop <= 1'b0;
      end
      if (rd_go && !rd_busy) begin
        rptr <= rd_ptr; rleft <= rd_len; ocount <= '0; first <= 1'b1;
      end

      // scrub timer
      if (!scrub_en) begin
        stimer <= '0;
      end else if (!sdue) begin
        if (stimer == $bits(stimer)'(SCRUB_INTERVAL - 1)) begin
          stimer <= '0; sdue <= 1'b1;
        end else stimer <= stimer + 1'b1;
      end

      if (clr_sbe) sbe_cnt <= '0;
      if (clr_mbe) mbe_cnt <= '0;

      case (ms)
        M_IDLE: begin
          if (cpu_req && !cpu_ack) begin
            user <= U_CPU; mem_req <= 1'b1; mem_we <= 1'b0;
            mem_addr <= cpu_addr[ADDR_W+1:2]; ms <= M_READ;
          end else if (wfull) begin
            user <= U_WDMA; mem_req <= 1'b1; mem_we <= 1'b1; mem_addr <= wptr;
            mem_wdata <= {enc_check, wbuf}; ms <= M_WRITE;
          end else if (rd_busy && ocount == 0 && !(rd_go && !rd_busy)) begin
            user <= U_RDMA; mem_req <= 1'b1; mem_we <= 1'b0; mem_addr <= rptr; ms <= M_READ;
          end else if (sdue) begin
            user <= U_SCRUB; mem_req <= 1'b1; mem_we <= 1'b0; mem_addr <= saddr; ms <= M_READ;
          end
        end
        M_READ: if (mem_ack) begin
          mem_req <= 1'b0;
          if (user != U_CPU || lane != 2'd3) begin
            if (sbe) sbe_cnt <= sat_inc(sbe_cnt);
            if (mbe) mbe_cnt <= sat_inc(mbe_cnt);
          end
          ms <= M_IDLE;
          case (user)
            U_CPU: begin
              if (!cpu_we) begin
                cpu_rdata <= (lane == 2'd3) ? mem_rdata[WORD_W-1 -: 8] : merged_byte(cor_data, lane);
                cpu_ack   <= 1'b1;
              end else begin
                ms <= M_WRITE; mem_req <= 1'b1; mem_we <= 1'b1;
                mem_wdata <= (lane == 2'd3) ? {cpu_wdata, mem_rdata[DATA_W-1:0]}
                                            : {enc_check, merged};
              end
            end
            U_RDMA: begin
              obuf   <= cor_data;
              ocount <= (rleft < 16'(NB)) ? rleft[$bits(ocount)-1:0] : NB[$bits(ocount)-1:0];
              rptr   <= rptr + 1'b1;
              pb_sop <= first;
              first  <= 1'b0;
            end
            U_SCRUB: begin
              sdue  <= 1'b0;
              saddr <= saddr + 1'b1;
              if (sbe) begin
                ms <= M_WRITE; mem_req <= 1'b1; mem_we <= 1'b1;
                mem_wdata <= {enc_check, cor_data};
              end
            end
            default: ;
          endcase
        end
        M_WRITE: if (mem_ack) begin
          mem_req <= 1'b0; ms <= M_IDLE;
          if (user == U_WDMA) begin
            wptr   <= wptr + 1'b1;
            wcount <= '0;
          end
          if (user == U_CPU) cpu_ack <= 1'b1;
        end
        default: ms <= M_IDLE;
      endcase
    end
  end

  function automatic logic [7:0] merged_byte(logic [DATA_W-1:0] d, logic [1:0] l);
    logic [7:0] b = '0;
    for (int unsigned k = 0; k < NB; k++) if (l == 2'(k)) b = d[8*k +: 8];
    return b;
  endfunction
endmodule
