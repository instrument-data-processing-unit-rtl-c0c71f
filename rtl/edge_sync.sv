// edge_sync: brings an asynchronous input (such as the spacecraft 2^23 Hz CDI
// clock, the 1 Hz sync or the sun pulse) into the system clock domain with a
// two-flop synchroniser and gives a one-cycle strobe on each rising edge.
// Latency from input edge to strobe is two to three clocks.  The input must
// stay high and low for longer than one system clock each.
module edge_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic d,        // asynchronous input
  output logic q,        // synchronised level
  output logic rise      // one-cycle strobe on a rising edge
);
  logic [2:0] sh;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh <= '0;
    else        sh <= {sh[1:0], d};
  end
  assign q    = sh[1];
  assign rise = sh[1] & ~sh[2];
endmodule
