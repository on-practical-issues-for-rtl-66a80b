// Spike2AER unit: turns the neurons' one-cycle spike_out lines into AER
// output events (aer_out_v, aer_out = neuron index), one event per cycle.
//
// Spikes are collected in a pending register; every cycle the lowest-index
// pending neuron is emitted (registered output) and its bit cleared. With
// inhibition_active high the unit enforces winner-takes-all: when several
// neurons spike in the same cycle only the lowest index is kept and the
// others are discarded, matching the lateral inhibition that resets the
// losers. With inhibition off no spike is lost; simultaneous spikes come
// out on consecutive cycles. The reference gives the unit's role; the
// pending register and the fixed priority are this design's.
module spike2aer #(
  parameter int unsigned N  = 256,
  parameter int unsigned NW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inhibition_active,
  input  logic [N-1:0]  spike,
  output logic          aer_out_v,
  output logic [NW-1:0] aer_out,
  output logic [N-1:0]  pending
);

  logic [N-1:0]  cand;
  logic [NW-1:0] winner;

  assign cand = pending | spike;

  always_comb begin
    winner = '0;
    for (int i = N - 1; i >= 0; i--)
      if (cand[i]) winner = NW'(i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending   <= '0;
      aer_out_v <= 1'b0;
      aer_out   <= '0;
    end else begin
      aer_out_v <= |cand;
      if (|cand) aer_out <= winner;
      if (inhibition_active) pending <= '0;
      else begin
        pending <= cand;
        if (|cand) pending[winner] <= 1'b0;
      end
    end
  end

endmodule
