// Neural core: NUM_NEURONS binary-synapse neurons that share one STDP unit.
//
// Data flow. Input AER events {destination core, synapse address} pass the
// AER filter when they are addressed to this core and are broadcast to every
// neuron and to the STDP unit, which records them in its pre-list. Every
// neuron integrates the event if its weight for that synapse is 1 (one
// event per clock cycle per core). Neuron spikes go to the Spike2AER unit,
// which emits them as AER output events carrying the neuron index.
//
// Lateral inhibition. With inhibition_active high, a spike anywhere in the
// core, or the external general_inhibition line (the OR of the other
// cores' spikes in a multi-core system), clears the firing state of every
// neuron in the same cycle: winner takes all.
//
// Learning. When a neuron's learning state reaches its STDP threshold the
// STDP arbiter forwards its index to the STDP unit and emits an STDP event
// that clears every neuron's learning state (stdp_event_in does the same for
// events from other cores). The STDP unit, if idle, takes over the shared
// STDP bus: it potentiates, with probability ltp_probability/1024, the
// synapses of that neuron named in the newest num_potentiation pre-list
// entries, then depresses its 1-weights at random so that their number
// returns towards num_active_weights, and flushes the pre-list. A request
// that arrives while it is busy is ignored. The bus read data is the OR of
// the neurons' read lines; only the selected neuron drives a 1.
//
// Leak. A leak timer produces the leak ticks for the neuron states and for
// the STDP thresholds from the two programmable periods.
//
// Structure, block names, bus signals and sizes (256 neurons, 1024
// synapses, 12-bit counters, 10-bit probabilities) follow the reference
// core. This design's choices: the address split of the input event,
// the use of the same-cycle spike vector for inhibition, the fixed-priority
// arbitration, and all reset behaviour (synchronous, active low).
module neural_core
  import stdp_pkg::*;
#(
  parameter int unsigned NUM_NEURONS = 256,
  parameter int unsigned NUM_SYN     = 1024,
  parameter int unsigned CB_DEPTH    = 1024,
  parameter int unsigned LEAK_SHIFT  = 3,
  parameter int unsigned NW          = NEURON_ADDR_W,
  parameter int unsigned AW          = $clog2(NUM_SYN),
  parameter int unsigned CBW         = $clog2(CB_DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // AER input
  input  logic [CORE_ADDR_W-1:0] core_addr,
  input  logic                   aer_in_v,
  input  logic [CORE_ADDR_W+AW-1:0] aer_in,
  // neuron configuration
  input  logic [15:0]            neuron_leak_rate,
  input  logic [15:0]            threshold_leak_rate,
  input  cnt_t                   spike_threshold,
  input  cnt_t                   stdp_threshold_init,
  input  cnt_t                   stdp_threshold_max,
  input  logic [NUM_NEURONS-1:0] neuron_active,
  input  logic                   inhibition_active,
  input  logic                   general_inhibition,
  // learning configuration
  input  logic                   stdp_activate,
  input  prob_t                  ltp_probability,
  input  logic [AW-1:0]          num_active_weights,
  input  logic [CBW-1:0]         num_potentiation,
  input  logic                   stdp_event_in,
  // outputs
  output logic                   aer_out_v,
  output logic [NW-1:0]          aer_out,
  output logic                   stdp_event_out,
  output logic                   stdp_busy,
  output logic                   stdp_done
);

  logic                   aerin_v;
  logic [AW-1:0]          aerin;
  logic                   leak_event, th_leak_event;
  logic                   inh_event, stdp_event;
  logic [NUM_NEURONS-1:0] spike, stdp_req, rd_line;
  logic                   stdp_addr_v;
  logic [NW-1:0]          stdp_req_addr;
  stdp_bus_t              bus;
  logic                   bus_rd_data;
  logic [AW:0]            weight_sum;
  prob_t                  ltd_probability;
  logic [CBW:0]           prelist_count;
  logic [NUM_NEURONS-1:0] spike_pending;

  aer_filter #(.CW(CORE_ADDR_W), .SW(AW)) u_filter (
    .clk       (clk),
    .rst_n     (rst_n),
    .core_addr (core_addr),
    .aer_in_v  (aer_in_v),
    .aer_in    (aer_in),
    .aerin_v   (aerin_v),
    .aerin     (aerin)
  );

  leak_timer #(.RATE_W(16)) u_leak (
    .clk                 (clk),
    .rst_n               (rst_n),
    .neuron_leak_rate    (neuron_leak_rate),
    .threshold_leak_rate (threshold_leak_rate),
    .leak_event          (leak_event),
    .th_leak_event       (th_leak_event)
  );

  assign inh_event   = inhibition_active && ((|spike) || general_inhibition);
  assign stdp_event  = stdp_event_out || stdp_event_in;
  assign bus_rd_data = |rd_line;

  for (genvar i = 0; i < NUM_NEURONS; i++) begin : g_neuron
    cnt_t fc, lc, th;
    neuron_block #(.NUM_SYN(NUM_SYN), .AW(AW), .LEAK_SHIFT(LEAK_SHIFT)) u_neuron (
      .clk                 (clk),
      .rst_n               (rst_n),
      .neuron_addr         (neuron_addr_t'(i)),
      .neuron_active       (neuron_active[i]),
      .aerin_v             (aerin_v),
      .aerin               (aerin),
      .spike_threshold     (spike_threshold),
      .stdp_threshold_init (stdp_threshold_init),
      .stdp_threshold_max  (stdp_threshold_max),
      .leak_event          (leak_event),
      .th_leak_event       (th_leak_event),
      .inh_event           (inh_event),
      .stdp_event          (stdp_event),
      .stdp_activate       (stdp_activate),
      .stdp_active_addr    (bus.active_addr),
      .stdp_rd_addr        (bus.rd_addr),
      .stdp_wr_en          (bus.wr_en),
      .stdp_wr_data        (bus.wr_data),
      .stdp_rd_data        (rd_line[i]),
      .spike_out           (spike[i]),
      .stdp_req            (stdp_req[i]),
      .firing_count        (fc),
      .learning_count      (lc),
      .stdp_threshold      (th)
    );
  end

  spike2aer #(.N(NUM_NEURONS), .NW(NW)) u_spike2aer (
    .clk               (clk),
    .rst_n             (rst_n),
    .inhibition_active (inhibition_active),
    .spike             (spike),
    .aer_out_v         (aer_out_v),
    .aer_out           (aer_out),
    .pending           (spike_pending)
  );

  stdp_arbiter #(.N(NUM_NEURONS), .NW(NW)) u_arbiter (
    .clk            (clk),
    .rst_n          (rst_n),
    .stdp_req       (stdp_req),
    .stdp_addr_v    (stdp_addr_v),
    .stdp_req_addr  (stdp_req_addr),
    .stdp_event_out (stdp_event_out)
  );

  stdp_unit #(.NUM_SYN(NUM_SYN), .CB_DEPTH(CB_DEPTH)) u_stdp (
    .clk                (clk),
    .rst_n              (rst_n),
    .stdp_addr_v        (stdp_addr_v),
    .stdp_req_addr      (neuron_addr_t'(stdp_req_addr)),
    .aerin_v            (aerin_v),
    .aerin              (aerin),
    .ltp_probability    (ltp_probability),
    .num_active_weights (num_active_weights),
    .num_potentiation   (num_potentiation),
    .stdp_active_addr   (bus.active_addr),
    .stdp_rd_addr       (bus.rd_addr),
    .stdp_wr_en         (bus.wr_en),
    .stdp_wr_data       (bus.wr_data),
    .stdp_rd_data       (bus_rd_data),
    .busy               (stdp_busy),
    .done               (stdp_done),
    .weight_sum         (weight_sum),
    .ltd_probability    (ltd_probability),
    .prelist_count      (prelist_count)
  );

endmodule
