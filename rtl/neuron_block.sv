// One integrate-and-fire neuron with 1-bit synapses and an on-line STDP hook.
//
// Each input event (aerin_v, aerin = synapse address) looks up its binary
// weight in the neuron's own synaptic memory (three-cycle pipelined read,
// so one event per clock). If the weight is 1 and the neuron is active, two
// independent 12-bit states are incremented:
//   * the firing counter (inference state). When it reaches spike_threshold
//     the neuron raises spike_out for one cycle and the counter clears. The
//     counter also clears on inh_event (lateral inhibition).
//   * the learning counter (STDP state). When it reaches the neuron's own
//     STDP threshold the neuron raises stdp_req for one cycle, the counter
//     clears and the STDP threshold goes up by one (saturating at
//     stdp_threshold_max). The counter also clears on stdp_event (any STDP
//     event of the core) and is held at zero while stdp_activate is low.
// The STDP threshold counter is loaded with stdp_threshold_init at reset and
// moves down by one towards that value on every th_leak_event.
// Both states leak on leak_event by a shift-derived power-of-two step (see
// stdp_pkg::leak_step), approximating an exponential decay.
//
// STDP bus side: the neuron compares stdp_bus.active_addr with its own
// neuron_addr and registers the match ("selected"). While selected it drives
// stdp_rd_data with the weight read at stdp_bus.rd_addr three cycles earlier
// (zero otherwise, so the core can OR all neurons' lines into one bus), and
// writes stdp_bus.wr_data at the read address delayed by five cycles when
// stdp_bus.wr_en is high.
//
// Taken from the reference: the 1024-bit two-port memory initialised to 1,
// the three 12-bit counters, the 3-cycle read, the 5-cycle read-to-write
// address delay, threshold +1 per STDP event, the resets. This design's
// choices: comparisons are "greater or equal", a state of 0 never fires,
// the threshold decrement on th_leak_event, the saturation at
// stdp_threshold_max, and the shift-leak rule.
module neuron_block
  import stdp_pkg::*;
#(
  parameter int unsigned NUM_SYN    = 1024,
  parameter int unsigned AW         = $clog2(NUM_SYN),
  parameter int unsigned LEAK_SHIFT = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  neuron_addr_t neuron_addr,
  input  logic         neuron_active,
  // input events
  input  logic         aerin_v,
  input  logic [AW-1:0] aerin,
  // configuration
  input  cnt_t         spike_threshold,
  input  cnt_t         stdp_threshold_init,
  input  cnt_t         stdp_threshold_max,
  // timing and control events
  input  logic         leak_event,
  input  logic         th_leak_event,
  input  logic         inh_event,
  input  logic         stdp_event,
  input  logic         stdp_activate,
  // STDP bus
  input  neuron_addr_t stdp_active_addr,
  input  logic [AW-1:0] stdp_rd_addr,
  input  logic         stdp_wr_en,
  input  logic         stdp_wr_data,
  output logic         stdp_rd_data,
  // outputs
  output logic         spike_out,
  output logic         stdp_req,
  output cnt_t         firing_count,
  output cnt_t         learning_count,
  output cnt_t         stdp_threshold
);

  logic          selected;
  logic [AW-1:0] rd_addr_dly [5];
  logic [2:0]    v_dly;
  logic          syn_weight;
  logic          mem_rd;
  logic          count_up;

  syn_weight_mem #(.DEPTH(NUM_SYN), .AW(AW), .INIT_WEIGHT(1'b1)) u_mem (
    .clk       (clk),
    .rst_n     (rst_n),
    .a_addr    (aerin),
    .a_data    (syn_weight),
    .b_rd_addr (stdp_rd_addr),
    .b_rd_data (mem_rd),
    .b_wr_en   (stdp_wr_en && selected),
    .b_wr_addr (rd_addr_dly[4]),
    .b_wr_data (stdp_wr_data)
  );

  assign stdp_rd_data = mem_rd && selected;
  assign count_up     = v_dly[2] && syn_weight && neuron_active;

  // Event-valid delay matching the memory read, selection register and
  // read-to-write address delay line.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_dly    <= '0;
      selected <= 1'b0;
      for (int i = 0; i < 5; i++) rd_addr_dly[i] <= '0;
    end else begin
      v_dly    <= {v_dly[1:0], aerin_v};
      selected <= (stdp_active_addr == neuron_addr);
      rd_addr_dly[0] <= stdp_rd_addr;
      for (int i = 1; i < 5; i++) rd_addr_dly[i] <= rd_addr_dly[i-1];
    end
  end

  // Threshold comparators.
  assign spike_out = (firing_count != '0) && (firing_count >= spike_threshold);
  assign stdp_req  = stdp_activate && (learning_count != '0) &&
                     (learning_count >= stdp_threshold);

  function automatic cnt_t integrate(input cnt_t s, input logic lk, input logic up);
    cnt_t r;
    r = lk ? leak_apply(s, LEAK_SHIFT) : s;
    if (up && r != '1) r = r + 1'b1;
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      firing_count   <= '0;
      learning_count <= '0;
      stdp_threshold <= stdp_threshold_init;
    end else begin
      // firing (inference) state
      if (inh_event || spike_out) firing_count <= '0;
      else firing_count <= integrate(firing_count, leak_event, count_up);

      // learning (STDP) state
      if (stdp_event || !stdp_activate || stdp_req) learning_count <= '0;
      else learning_count <= integrate(learning_count, leak_event, count_up);

      // STDP threshold: +1 per STDP request, relaxes towards the initial value
      if (stdp_req) begin
        if (stdp_threshold < stdp_threshold_max) stdp_threshold <= stdp_threshold + 1'b1;
      end else if (th_leak_event && stdp_threshold > stdp_threshold_init) begin
        stdp_threshold <= stdp_threshold - 1'b1;
      end
    end
  end

endmodule
