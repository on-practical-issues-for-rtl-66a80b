// AER input filter of a neural core.
//
// An input event carries a destination core address in its upper
// CORE_ADDR_W bits and a synapse address in its lower SYN_ADDR_W bits. The
// filter passes the synapse address on (aerin_v, aerin) only when the
// destination equals this core's core_addr and drops every other event. The output is
// registered: one cycle of latency, one event per cycle. The reference gives
// only the filter's purpose; the address split is this design's.
module aer_filter
  import stdp_pkg::*;
#(
  parameter int unsigned CW = CORE_ADDR_W,
  parameter int unsigned SW = SYN_ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] core_addr,
  input  logic          aer_in_v,
  input  logic [CW+SW-1:0] aer_in,
  output logic          aerin_v,
  output logic [SW-1:0] aerin
);

  logic [CW-1:0] dest;
  logic          hit;
  assign dest = aer_in[CW+SW-1:SW];
  assign hit  = (dest == core_addr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aerin_v <= 1'b0;
      aerin   <= '0;
    end else begin
      aerin_v <= aer_in_v && hit;
      aerin   <= aer_in[SW-1:0];
    end
  end

endmodule
