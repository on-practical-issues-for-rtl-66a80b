// STDP arbiter of a neural core.
//
// Each neuron raises its STDP_req line for one cycle when its learning
// state reaches its STDP threshold. The arbiter registers the lowest-index
// requester (fixed priority) and, one cycle later, presents it to the STDP
// unit as stdp_addr_v / stdp_req_addr. The same pulse is the core's
// stdp_event_out, which clears the learning state of every neuron in the
// core (and, through the multi-core wiring, of other cores). Requests that
// lose arbitration are dropped: the event clears them anyway. The
// reference gives the arbiter's role; fixed priority is this design's choice.
module stdp_arbiter
#(
  parameter int unsigned N  = 256,
  parameter int unsigned NW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  stdp_req,
  output logic          stdp_addr_v,
  output logic [NW-1:0] stdp_req_addr,
  output logic          stdp_event_out
);

  logic [NW-1:0] winner;

  always_comb begin
    winner = '0;
    for (int i = N - 1; i >= 0; i--)
      if (stdp_req[i]) winner = NW'(i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stdp_addr_v   <= 1'b0;
      stdp_req_addr <= '0;
    end else begin
      stdp_addr_v <= |stdp_req;
      if (|stdp_req) stdp_req_addr <= winner;
    end
  end

  assign stdp_event_out = stdp_addr_v;

endmodule
