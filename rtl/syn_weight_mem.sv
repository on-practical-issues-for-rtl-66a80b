// Synaptic weight memory of one neuron: DEPTH binary weights, two ports.
//
// Port A is the neuron's own read port: the address of an incoming spike
// goes in and its 1-bit weight comes out three clock cycles later. Port B
// belongs to the STDP bus: a read port with the same three-cycle latency and
// a write port. Both read ports are fully pipelined, one read per cycle.
// Pipeline of each read port: address register, array read register, output
// register (address in cycle t, data valid in cycle t+3).
//
// The weights are held in flip-flops (the reference FPGA build uses no block
// RAM) and all of them are set to INIT_WEIGHT (1, as the reference neuron
// schematic prints) by the synchronous active-low reset. A write and a read
// of the same address in one cycle return the old value. The 1024-bit depth
// and the three-cycle reads follow the reference; the port naming and reset
// are this design's.
module syn_weight_mem #(
  parameter int unsigned DEPTH       = 1024,
  parameter int unsigned AW          = $clog2(DEPTH),
  parameter bit          INIT_WEIGHT = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  // port A: neuron read
  input  logic [AW-1:0] a_addr,
  output logic          a_data,
  // port B: STDP read
  input  logic [AW-1:0] b_rd_addr,
  output logic          b_rd_data,
  // port B: STDP write
  input  logic          b_wr_en,
  input  logic [AW-1:0] b_wr_addr,
  input  logic          b_wr_data
);

  logic [DEPTH-1:0] mem;
  logic [AW-1:0]    a_addr_q, b_addr_q;
  logic             a_d1, b_d1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem      <= {DEPTH{INIT_WEIGHT}};
      a_addr_q <= '0;
      b_addr_q <= '0;
      a_d1     <= 1'b0;
      b_d1     <= 1'b0;
      a_data   <= 1'b0;
      b_rd_data <= 1'b0;
    end else begin
      a_addr_q  <= a_addr;
      b_addr_q  <= b_rd_addr;
      a_d1      <= mem[a_addr_q];
      b_d1      <= mem[b_addr_q];
      a_data    <= a_d1;
      b_rd_data <= b_d1;
      if (b_wr_en) mem[b_wr_addr] <= b_wr_data;
    end
  end

endmodule
