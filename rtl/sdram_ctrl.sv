// sdram_ctrl: SDRAM controller of the solid state recorder.
// The IDPU description names an SDRAM controller in the DCB FPGA but gives no
// details, so the whole protocol here is this design's own, for standard
// single-data-rate SDRAM at the 20 MHz system clock (50 ns covers tRCD, tRP,
// tRRD, tWR in one cycle; tRC and tRFC take RC_CYCLES).
//  * Initialisation: INIT_CYCLES of NOP (100 us), PRECHARGE ALL, two AUTO
//    REFRESH, LOAD MODE REGISTER (burst length 1, CAS latency 2).
//  * AUTO REFRESH every REF_CYCLES clocks (7.8 us for 8192 rows in 64 ms),
//    taking priority over a waiting request.
//  * One word per request: ACTIVE, then READ or WRITE with auto-precharge;
//    read data is captured CAS latency + 1 clocks after the READ command.
// Host interface: hold req (with we, addr, wdata) until a one-cycle ack;
// rdata is valid with ack for reads.  Address = {bank, row, column}.
module sdram_ctrl #(
  parameter int unsigned DQ_W        = 32,
  parameter int unsigned ROW_W       = 13,
  parameter int unsigned COL_W       = 11,
  parameter int unsigned BANK_W      = 2,
  parameter int unsigned INIT_CYCLES = 2000,
  parameter int unsigned REF_CYCLES  = 156,
  parameter int unsigned RC_CYCLES   = 2,
  localparam int unsigned ADDR_W     = BANK_W + ROW_W + COL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              req,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DQ_W-1:0]   wdata,
  output logic              ack,
  output logic [DQ_W-1:0]   rdata,
  output logic              init_done,
  // SDRAM pins
  output logic              sd_cke,
  output logic              sd_cs_n,
  output logic              sd_ras_n,
  output logic              sd_cas_n,
  output logic              sd_we_n,
  output logic [BANK_W-1:0] sd_ba,
  output logic [ROW_W-1:0]  sd_a,
  output logic [DQ_W-1:0]   sd_dq_out,
  output logic              sd_dq_oe,
  input  logic [DQ_W-1:0]   sd_dq_in
);
  localparam int unsigned CAS_LAT = 2;
  typedef enum logic [3:0] {
    S_INIT_WAIT, S_INIT_PRE, S_INIT_REF1, S_INIT_REF2, S_INIT_MRS,
    S_IDLE, S_REF, S_ACT, S_RW, S_RD_WAIT, S_DONE, S_WAIT
  } state_e;
  typedef enum logic [2:0] {      // {ras_n, cas_n, we_n}
    C_NOP = 3'b111, C_ACT = 3'b011, C_RD = 3'b101, C_WR = 3'b100,
    C_PRE = 3'b010, C_REF = 3'b001, C_MRS = 3'b000
  } cmd_e;

  state_e state, after;
  cmd_e   cmd;
  logic [$clog2(INIT_CYCLES+1)-1:0] wcnt;
  logic [$clog2(REF_CYCLES+1)-1:0]  rcnt;
  logic ref_due;

  assign {sd_ras_n, sd_cas_n, sd_we_n} = cmd;
  assign sd_cs_n = 1'b0;
  assign sd_cke  = 1'b1;

  // refresh interval timer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcnt <= '0; ref_due <= 1'b0;
    end else begin
      if (state == S_REF) ref_due <= 1'b0;
      if (!init_done) rcnt <= '0;
      else if (rcnt == $bits(rcnt)'(REF_CYCLES - 1)) begin
        rcnt <= '0; ref_due <= 1'b1;
      end else rcnt <= rcnt + 1'b1;
    end
  end

  logic [COL_W-1:0] col;
  assign col = addr[COL_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT_WAIT; after <= S_IDLE; cmd <= C_NOP; wcnt <= '0;
      sd_ba <= '0; sd_a <= '0; sd_dq_out <= '0; sd_dq_oe <= 1'b0;
      ack <= 1'b0; rdata <= '0; init_done <= 1'b0;
    end else begin
      cmd      <= C_NOP;
      ack      <= 1'b0;
      sd_dq_oe <= 1'b0;
      case (state)
        S_INIT_WAIT: if (wcnt == $bits(wcnt)'(INIT_CYCLES - 1)) begin
                       wcnt <= '0; state <= S_INIT_PRE;
                     end else wcnt <= wcnt + 1'b1;
        S_INIT_PRE:  begin
                       cmd <= C_PRE; sd_a <= '0; sd_a[10] <= 1'b1;   // all banks
                       state <= S_WAIT; after <= S_INIT_REF1; wcnt <= '0;
                     end
        S_INIT_REF1: begin cmd <= C_REF; state <= S_WAIT; after <= S_INIT_REF2; wcnt <= '0; end
        S_INIT_REF2: begin cmd <= C_REF; state <= S_WAIT; after <= S_INIT_MRS;  wcnt <= '0; end
        S_INIT_MRS:  begin
                       cmd <= C_MRS; sd_ba <= '0;
                       sd_a <= ROW_W'({3'(CAS_LAT), 4'b0000});  // CL, sequential, BL=1
                       state <= S_WAIT; after <= S_IDLE; wcnt <= '0;
                     end
        S_IDLE: begin
          init_done <= 1'b1;
          if (ref_due)  state <= S_REF;
          else if (req) state <= S_ACT;
        end
        S_REF: begin cmd <= C_REF; state <= S_WAIT; after <= S_IDLE; wcnt <= '0; end
        S_ACT: begin
          cmd   <= C_ACT;
          sd_ba <= addr[ADDR_W-1 -: BANK_W];
          sd_a  <= addr[COL_W +: ROW_W];
          state <= S_RW;
        end
        S_RW: begin
          sd_a     <= '0;
          sd_a[10] <= 1'b1;                          // auto-precharge
          sd_a[COL_W > 10 ? 9 : COL_W-1:0] <= col[COL_W > 10 ? 9 : COL_W-1:0];
          if (COL_W > 10) sd_a[11] <= col[COL_W-1];  // column bit 10 on A11
          if (we) begin
            cmd <= C_WR; sd_dq_out <= wdata; sd_dq_oe <= 1'b1;
            state <= S_DONE;
          end else begin
            cmd <= C_RD; wcnt <= '0; state <= S_RD_WAIT;
          end
        end
        S_RD_WAIT: if (wcnt == $bits(wcnt)'(CAS_LAT)) begin
                     rdata <= sd_dq_in; state <= S_DONE;
                   end else wcnt <= wcnt + 1'b1;
        S_DONE: begin
          ack <= 1'b1; state <= S_WAIT; after <= S_IDLE; wcnt <= '0;
        end
        S_WAIT: if (wcnt >= $bits(wcnt)'(RC_CYCLES - 1)) state <= after;
                else wcnt <= wcnt + 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
