// Stochastic 1-bit STDP unit shared by all neurons of a core.
//
// It keeps the pre-list (circular_buffer) of the last input spike addresses
// and, when a neuron's learning state reaches its STDP threshold, rewrites
// that neuron's synaptic memory over the STDP bus in three phases. The
// rule is "undiscriminating depressing", order-based STDP: synapses in
// the most recent part of the pre-list are potentiated, and then the
// synapses of the whole neuron are depressed at random, with the
// probability chosen to pull the count of 1-weights back to the target.
//
//  Main processor (IDLE/FLUSH): accepts stdp_addr_v only when idle (requests
//    arriving while busy are ignored), latches stdp_req_addr onto
//    STDP_active_addr, runs LTP then LTD, and at the end flushes the pre-list.
//  LTP processor: reads the n = min(num_potentiation, entries) newest
//    addresses from the pre-list, puts each on STDP_RD_addr, and when the
//    weight comes back 0 writes a 1 if rnd10 < ltp_probability.
//  LTD processor: (1) reads all NUM_SYN weights and counts the ones (Wsum);
//    (2) dW = Wsum - num_active_weights (0 if not positive),
//    p_LTD = 1024*dW / Wsum on a serial divider in DIV_CYCLES cycles, clipped
//    to 1023 (0 when dW is 0); (3) reads all weights again and writes 0 on each 1-weight when
//    rnd10 < p_LTD.
// Random numbers come from a 16-bit LFSR (10 of its bits used) that runs
// while the unit is busy. Input events are written into the pre-list only
// while the unit is idle.
//
// Bus timing: STDP_RD_addr is registered; the selected neuron returns the
// weight three cycles later; it is registered here (one cycle) and the
// decision is registered onto STDP_WR_en/STDP_WR_data, so the write
// arrives exactly five cycles after its read address, where the neuron's
// five-stage address delay places the write.
// Cycle count of one process, from the cycle after acceptance to the return
// to idle: (n+8) LTP + (NUM_SYN+5) count + DIV_CYCLES + (NUM_SYN+6) depress
// + 1 flush = n + 2093 at the defaults. The reference quotes n + 2090; the
// difference comes from the extra input and output registers here.
// Probabilities, buffer size and the 25-cycle division follow the reference;
// the exact pipeline alignment and the idle-only buffer writes are this
// design's.
module stdp_unit
  import stdp_pkg::*;
#(
  parameter int unsigned NUM_SYN    = 1024,
  parameter int unsigned CB_DEPTH   = 1024,
  parameter int unsigned DIV_CYCLES = 25,
  parameter logic [15:0] LFSR_SEED  = 16'hACE1,
  parameter int unsigned AW         = $clog2(NUM_SYN),
  parameter int unsigned CBW        = $clog2(CB_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // request from the STDP arbiter
  input  logic          stdp_addr_v,
  input  neuron_addr_t  stdp_req_addr,
  // replica of the core's input events
  input  logic          aerin_v,
  input  logic [AW-1:0] aerin,
  // learning parameters
  input  prob_t         ltp_probability,
  input  logic [AW-1:0] num_active_weights,
  input  logic [CBW-1:0] num_potentiation,
  // STDP bus
  output neuron_addr_t  stdp_active_addr,
  output logic [AW-1:0] stdp_rd_addr,
  output logic          stdp_wr_en,
  output logic          stdp_wr_data,
  input  logic          stdp_rd_data,
  // status
  output logic          busy,
  output logic          done,
  output logic [AW:0]   weight_sum,
  output prob_t         ltd_probability,
  output logic [CBW:0]  prelist_count
);

  typedef enum logic [2:0] {S_IDLE, S_LTP, S_SUM, S_DIV, S_DEP, S_FLUSH} state_t;

  localparam int unsigned PCW = (AW > CBW ? AW : CBW) + 2;

  state_t          state;
  logic [PCW-1:0]  pc;          // phase counter (rd_counter / div_latency_cnt)
  logic [CBW:0]    n_ltp;       // potentiation count of this process
  logic            aer_v_q;
  logic [AW-1:0]   aer_q;
  logic            cb_rd_en;
  logic [AW-1:0]   cb_rd_data;
  logic            cb_rd_valid;
  logic            rdv_q;       // STDP_RD_addr carries a valid read
  logic [3:0]      v_pipe;      // rdv_q delayed 1..4
  logic            rd_q;        // registered STDP_RD_data
  logic [9:0]      rnd;
  logic [15:0]     lfsr_state;
  logic            div_start, div_busy, div_done;
  logic [AW+CBW:0] div_q;
  logic [AW:0]     div_r;
  logic [AW:0]     delta_w;

  assign busy = (state != S_IDLE);

  // ---------------- pre-list ----------------
  circular_buffer #(.DEPTH(CB_DEPTH), .W(AW)) u_cb (
    .clk       (clk),
    .rst_n     (rst_n),
    .flush     (state == S_FLUSH),
    .wr_en     (aer_v_q && !busy),
    .wr_data   (aer_q),
    .rd_en     (cb_rd_en),
    .rd_offset (pc[CBW-1:0]),
    .rd_data   (cb_rd_data),
    .rd_valid  (cb_rd_valid),
    .count     (prelist_count)
  );

  assign cb_rd_en = (state == S_LTP) && ((CBW+1)'(pc) < n_ltp);

  lfsr16 #(.SEED(LFSR_SEED)) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (busy),
    .state (lfsr_state),
    .rnd10 (rnd)
  );

  // ---------------- divider for the LTD probability ----------------
  assign delta_w   = (weight_sum > (AW+1)'(num_active_weights)) ?
                     weight_sum - (AW+1)'(num_active_weights) : '0;
  assign div_start = (state == S_DIV) && (pc == '0);

  serial_divider #(.NUM_W(AW+CBW+1), .DEN_W(AW+1)) u_div (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (div_start),
    .num       ({delta_w, {CBW{1'b0}}}),   // x1024 as a 10-bit shift
    .den       (weight_sum),
    .busy      (div_busy),
    .done      (div_done),
    .quotient  (div_q),
    .remainder (div_r)
  );

  // ---------------- main sequencer ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      pc               <= '0;
      n_ltp            <= '0;
      stdp_active_addr <= '0;
      ltd_probability  <= '0;
      done             <= 1'b0;
    end else begin
      done <= 1'b0;
      pc   <= pc + 1'b1;
      unique case (state)
        S_IDLE: begin
          pc <= '0;
          if (stdp_addr_v) begin
            stdp_active_addr <= stdp_req_addr;
            n_ltp <= ((CBW+1)'(num_potentiation) < prelist_count) ?
                     (CBW+1)'(num_potentiation) : prelist_count;
            state <= S_LTP;
          end
        end
        S_LTP: if (pc == PCW'(n_ltp) + PCW'(7)) begin
          pc    <= '0;
          state <= S_SUM;
        end
        S_SUM: if (pc == PCW'(NUM_SYN + 4)) begin
          pc    <= '0;
          state <= S_DIV;
        end
        S_DIV: if (pc == PCW'(DIV_CYCLES - 1)) begin
          pc    <= '0;
          if (delta_w == '0) ltd_probability <= '0;   // also covers Wsum = 0
          else if (div_q > (AW+CBW+1)'(1023)) ltd_probability <= prob_t'(1023);
          else ltd_probability <= prob_t'(div_q);
          state <= S_DEP;
        end
        S_DEP: if (pc == PCW'(NUM_SYN + 5)) begin
          pc    <= '0;
          state <= S_FLUSH;
        end
        S_FLUSH: begin
          pc    <= '0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- read, count and write pipeline ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aer_v_q      <= 1'b0;
      aer_q        <= '0;
      stdp_rd_addr <= '0;
      rdv_q        <= 1'b0;
      v_pipe       <= '0;
      rd_q         <= 1'b0;
      stdp_wr_en   <= 1'b0;
      stdp_wr_data <= 1'b0;
      weight_sum   <= '0;
    end else begin
      aer_v_q <= aerin_v;
      aer_q   <= aerin;

      // STDP_RD_addr: from the pre-list in LTP, from the counter in LTD
      if (state == S_LTP) begin
        stdp_rd_addr <= cb_rd_data;
        rdv_q        <= cb_rd_valid;
      end else if ((state == S_SUM || state == S_DEP) && pc < PCW'(NUM_SYN)) begin
        stdp_rd_addr <= pc[AW-1:0];
        rdv_q        <= 1'b1;
      end else begin
        rdv_q        <= 1'b0;
      end
      v_pipe <= {v_pipe[2:0], rdv_q};
      rd_q   <= stdp_rd_data;

      // weight count (Cnt_Sum of weights)
      if (state == S_LTP) weight_sum <= '0;
      else if (state == S_SUM && v_pipe[3] && rd_q) weight_sum <= weight_sum + 1'b1;

      // stochastic write decision
      stdp_wr_en   <= 1'b0;
      stdp_wr_data <= 1'b0;
      if (state == S_LTP && v_pipe[3] && !rd_q && rnd < ltp_probability) begin
        stdp_wr_en   <= 1'b1;
        stdp_wr_data <= 1'b1;
      end else if (state == S_DEP && v_pipe[3] && rd_q && rnd < ltd_probability) begin
        stdp_wr_en   <= 1'b1;
        stdp_wr_data <= 1'b0;
      end
    end
  end

endmodule
