// Multi-core arrangement: NUM_CORES neural cores forming one fully
// connected layer (every input reaches every neuron of every core), with
// one AER input, one merged AER output and two system-wide OR lines.
//
// How it works.
//  * Input: the 10-bit input event (synapse address) is broadcast to all
//    cores. Each core's AER filter is fed {own core address, event}, so in
//    this fully connected arrangement every core accepts every event.
//  * Per-core settings: each core has its own set of settings
//    (core_params_t) and its own neuron enable vector.
//  * General inhibition: the OR of all cores' AER_out_v lines is returned to
//    every core as general_inhibition. A spike in one core therefore resets
//    the neurons of every core whose inhibition is active, one cycle after
//    the spike leaves its core (the core's own inhibition acts in the cycle
//    of the spike itself).
//  * STDP events: the OR of all cores' stdp_event_out lines is returned to
//    every core as stdp_event_in, so a learning process started anywhere
//    clears the learning state of every neuron in the layer.
//  * Merger: the cores' 8-bit output events are merged into one 16-bit
//    stream {core index, neuron index}. Each core has a one-entry pending
//    register; every cycle the lowest-index core with an event is emitted
//    (registered output, one event per cycle), its pending event before a
//    new one, which then waits in the register. If a core produces a new
//    event while its pending one is still waiting and it is not served, the
//    older one is replaced; merger_drop pulses when that happens.
//
// Interface: per-core settings and enables are packed arrays indexed by
// core; stdp_busy/stdp_done give each core's STDP unit status.
//
// Timing: input event -> core pipeline as in neural_core; core output event
// -> aer_out_v one cycle later when no lower-index core is pending.
//
// Size: the reference arrangement allows 256 cores (65k neurons). The
// default here is 128 cores (32k neurons, 33.5 Mbit of synaptic flip-flops):
// elaborating the 256-core netlist for lint takes about 27 GB, which is
// more than a typical 32 GB build machine can spare next to other jobs.
// NUM_CORES may be raised to 256 where memory allows; nothing else changes.
//
// Follows the reference arrangement: up to 256 cores of 256 neurons, 10-bit
// broadcast input, 16-bit merged output, OR-combined General_Inhibition and
// STDP_event lines, separate settings per core. This design's choices: the
// merger's pending registers and fixed priority, the registered merger
// output, and the overwrite policy when a core outruns the merger.
module multi_core
  import stdp_pkg::*;
#(
  parameter int unsigned NUM_CORES   = 128,
  parameter int unsigned NUM_NEURONS = 256,
  parameter int unsigned LEAK_SHIFT  = 3,
  parameter int unsigned CW          = CORE_ADDR_W
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  aer_in_v,
  input  syn_addr_t                             aer_in,
  input  core_params_t [NUM_CORES-1:0]          params,
  input  logic [NUM_CORES-1:0][NUM_NEURONS-1:0] neuron_active,
  output logic                                  aer_out_v,
  output logic [CW+NEURON_ADDR_W-1:0]           aer_out,
  output logic                                  merger_drop,
  output logic [NUM_CORES-1:0]                  stdp_busy,
  output logic [NUM_CORES-1:0]                  stdp_done
);

  logic [NUM_CORES-1:0]                    core_v, core_stdp_ev;
  logic [NUM_CORES-1:0][NEURON_ADDR_W-1:0] core_a;
  logic                                    general_inhibition, stdp_event_all;

  assign general_inhibition = |core_v;
  assign stdp_event_all     = |core_stdp_ev;

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    neural_core #(
      .NUM_NEURONS (NUM_NEURONS),
      .NUM_SYN     (1 << SYN_ADDR_W),
      .CB_DEPTH    (1 << SYN_ADDR_W),
      .LEAK_SHIFT  (LEAK_SHIFT),
      .NW          (NEURON_ADDR_W)
    ) u_core (
      .clk                 (clk),
      .rst_n               (rst_n),
      .core_addr           (CORE_ADDR_W'(c)),
      .aer_in_v            (aer_in_v),
      .aer_in              ({CORE_ADDR_W'(c), aer_in}),
      .neuron_leak_rate    (params[c].neuron_leak_rate),
      .threshold_leak_rate (params[c].threshold_leak_rate),
      .spike_threshold     (params[c].spike_threshold),
      .stdp_threshold_init (params[c].stdp_threshold_init),
      .stdp_threshold_max  (params[c].stdp_threshold_max),
      .neuron_active       (neuron_active[c]),
      .inhibition_active   (params[c].inhibition_active),
      .general_inhibition  (general_inhibition),
      .stdp_activate       (params[c].stdp_activate),
      .ltp_probability     (params[c].ltp_probability),
      .num_active_weights  (params[c].num_active_weights),
      .num_potentiation    (params[c].num_potentiation),
      .stdp_event_in       (stdp_event_all),
      .aer_out_v           (core_v[c]),
      .aer_out             (core_a[c]),
      .stdp_event_out      (core_stdp_ev[c]),
      .stdp_busy           (stdp_busy[c]),
      .stdp_done           (stdp_done[c])
    );
  end

  // Merger
  logic [NUM_CORES-1:0]                    pend_v, cand;
  logic [NUM_CORES-1:0][NEURON_ADDR_W-1:0] pend_a;
  localparam int unsigned SW = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1;
  logic [SW-1:0]                           sel;

  assign cand = pend_v | core_v;

  always_comb begin
    sel = '0;
    for (int c = NUM_CORES - 1; c >= 0; c--)
      if (cand[c]) sel = SW'(c);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_v      <= '0;
      pend_a      <= '0;
      aer_out_v   <= 1'b0;
      aer_out     <= '0;
      merger_drop <= 1'b0;
    end else begin
      aer_out_v   <= |cand;
      merger_drop <= |(pend_v & core_v & ~(NUM_CORES'(1) << sel));
      if (|cand) aer_out <= {CW'(sel), pend_v[sel] ? pend_a[sel] : core_a[sel]};
      for (int c = 0; c < NUM_CORES; c++) begin
        if (core_v[c]) pend_a[c] <= core_a[c];
        if (SW'(c) == sel) pend_v[c] <= pend_v[c] && core_v[c];
        else               pend_v[c] <= cand[c];
      end
    end
  end

endmodule
