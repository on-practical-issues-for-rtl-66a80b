// Shared constants and types for the 1-bit-weight stochastic STDP neural core.
//
// The sizes are those of the reference core: 1024 binary synapses per neuron
// (10-bit synapse address), up to 256 neurons per core (8-bit neuron
// address), 12-bit neuron state/threshold counters and 10-bit probabilities
// (a probability p is stored as round(p*1024), compared against 10 random bits).
//
// stdp_bus_t is the shared STDP_BUS that the STDP unit drives towards every
// neuron of a core; the read data returns on a separate 1-bit line that the
// selected neuron alone drives.
//
// core_params_t bundles the settings that each core of a multi-core system
// receives separately.
//
// leak_step() gives the amount removed from a neuron state on one leak event.
// It is a power of two taken from the position of the state's leading one
// (state >> LEAK_SHIFT, rounded down to a power of two, at least 1), so the
// decay is linear inside each octave and halves its slope each time the
// state falls below a power of two: a piecewise-linear approximation of an
// exponential leak done with shifts only. The exact rule is this design's.
package stdp_pkg;

  localparam int unsigned SYN_ADDR_W    = 10;   // 1024 synapses per neuron
  localparam int unsigned NEURON_ADDR_W = 8;    // up to 256 neurons per core
  localparam int unsigned CORE_ADDR_W   = 8;    // up to 256 cores
  localparam int unsigned CNT_W         = 12;   // firing/learning/threshold counters
  localparam int unsigned PROB_W        = 10;   // probabilities in 1/1024 steps

  typedef logic [SYN_ADDR_W-1:0]    syn_addr_t;
  typedef logic [NEURON_ADDR_W-1:0] neuron_addr_t;
  typedef logic [CNT_W-1:0]         cnt_t;
  typedef logic [PROB_W-1:0]        prob_t;

  // STDP_BUS as driven by the STDP unit (Figure-4 naming).
  typedef struct packed {
    neuron_addr_t active_addr;  // STDP_active_addr: neuron being trained
    syn_addr_t    rd_addr;      // STDP_RD_addr: synapse read (write follows 5 cycles later)
    logic         wr_en;        // STDP_WR_en, aligned with the delayed read address
    logic         wr_data;      // STDP_WR_data
  } stdp_bus_t;

  // Per-core settings of a multi-core system (one set per core).
  typedef struct packed {
    logic [15:0]     neuron_leak_rate;     // cycles between neuron leak ticks, 0 = off
    logic [15:0]     threshold_leak_rate;  // cycles between STDP-threshold relax ticks, 0 = off
    cnt_t            spike_threshold;
    cnt_t            stdp_threshold_init;
    cnt_t            stdp_threshold_max;
    logic            inhibition_active;
    logic            stdp_activate;
    prob_t           ltp_probability;
    syn_addr_t       num_active_weights;
    syn_addr_t       num_potentiation;
  } core_params_t;

  // Piecewise-linear shift leak, see header.
  function automatic cnt_t leak_step(input cnt_t state, input int unsigned shift);
    int msb;
    int e;
    msb = -1;
    for (int i = 0; i < int'(CNT_W); i++)
      if (state[i]) msb = i;
    e = msb - int'(shift);
    if (e < 0) e = 0;
    return cnt_t'(1) << e;
  endfunction

  function automatic cnt_t leak_apply(input cnt_t state, input int unsigned shift);
    cnt_t step;
    step = leak_step(state, shift);
    return (state > step) ? state - step : '0;
  endfunction

endpackage
