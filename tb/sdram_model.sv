// sdram_model: behavioural model of a single-data-rate SDRAM array for the
// testbenches (sparse storage, CAS latency 2, burst length 1).  It decodes
// ACTIVE, READ, WRITE (with auto-precharge on A10), PRECHARGE, AUTO REFRESH
// and LOAD MODE, counts protocol errors (access to a closed bank, command
// before the mode register is loaded, refresh with a bank open, wrong mode)
// and refreshes, and can flip stored bits to inject errors.
module sdram_model #(
  parameter int unsigned DQ_W = 32, ROW_W = 13, COL_W = 11, BANK_W = 2
) (
  input  logic              clk,
  input  logic              cs_n, ras_n, cas_n, we_n,
  input  logic [BANK_W-1:0] ba,
  input  logic [ROW_W-1:0]  a,
  input  logic [DQ_W-1:0]   dq_in,    // from controller
  output logic [DQ_W-1:0]   dq_out    // to controller
);
  logic [DQ_W-1:0] mem [longint unsigned];
  logic [ROW_W-1:0] open_row [1 << BANK_W];
  logic             is_open  [1 << BANK_W];
  logic             mode_ok = 0;
  int errors = 0, refreshes = 0, reads = 0, writes = 0;
  logic [DQ_W-1:0] p0 = '0;
  initial for (int b = 0; b < (1 << BANK_W); b++) is_open[b] = 0;

  function automatic longint unsigned key(logic [BANK_W-1:0] b, logic [ROW_W-1:0] r, logic [ROW_W-1:0] aa);
    logic [COL_W-1:0] c;
    c = COL_W'(aa[9:0]);
    if (COL_W > 10) c[COL_W-1] = aa[11];
    return {b, r, c};
  endfunction
  function automatic logic [DQ_W-1:0] peek(longint unsigned k);
    return mem.exists(k) ? mem[k] : '0;
  endfunction
  task automatic poke(longint unsigned k, logic [DQ_W-1:0] v);
    mem[k] = v;
  endtask

  always @(posedge clk) begin
    dq_out <= p0;
    p0     <= '0;
    if (!cs_n) begin
      case ({ras_n, cas_n, we_n})
        3'b011: begin
          if (is_open[ba]) errors++;
          is_open[ba] = 1; open_row[ba] = a;
        end
        3'b101, 3'b100: begin
          if (!is_open[ba] || !mode_ok) errors++;
          if (we_n) begin p0 <= peek(key(ba, open_row[ba], a)); reads++; end
          else begin mem[key(ba, open_row[ba], a)] = dq_in; writes++; end
          if (a[10]) is_open[ba] = 0;
        end
        3'b010: begin
          if (a[10]) for (int b = 0; b < (1 << BANK_W); b++) is_open[b] = 0;
          else is_open[ba] = 0;
        end
        3'b001: begin
          for (int b = 0; b < (1 << BANK_W); b++) if (is_open[b]) errors++;
          refreshes++;
        end
        3'b000: begin
          if (a[6:4] != 3'd2 || a[2:0] != 3'd0) errors++;
          mode_ok = 1;
        end
        default: ;
      endcase
    end
  end
endmodule
