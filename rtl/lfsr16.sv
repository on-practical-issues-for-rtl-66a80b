// 16-bit Fibonacci LFSR, the random source of the STDP unit.
//
// Feedback polynomial x^16 + x^15 + x^13 + x^4 + 1 (maximal length, period
// 65535). The state shifts left by one bit on every enabled cycle and the
// new bit 0 is the XOR of taps 16, 15, 13 and 4. The STDP unit compares
// 10 of the 16 bits (rnd10 = state[9:0]) with a 10-bit probability. The
// polynomial, the choice of bits and the seed are this design's; the
// reference only says a 16-bit LFSR is used and 10 of its bits compared.
// A zero seed is replaced by 1 so the register can never lock up.
module lfsr16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] state,
  output logic [9:0]  rnd10
);

  localparam logic [15:0] SEED_NZ = (SEED == 16'h0) ? 16'h0001 : SEED;

  logic fb;
  assign fb    = state[15] ^ state[14] ^ state[12] ^ state[3];
  assign rnd10 = state[9:0];

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED_NZ;
    else if (en) state <= {state[14:0], fb};
  end

endmodule
