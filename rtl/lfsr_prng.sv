// Cache-internal pseudo-random number generator.
//
// A W-bit Fibonacci LFSR (default 32 bits, polynomial
// x^32 + x^22 + x^2 + x + 1, maximal length). The state is loaded from
// seed_in while rst_n is low, so an external entropy source can seed it at
// reset; an all-zero seed, which would lock the register, is replaced by a
// fixed non-zero constant. Each cycle with step high the register shifts
// left by one and a new value is visible on value the next cycle (one cycle
// of latency). The use of an LFSR with one cycle of latency follows the
// description; width, polynomial and zero-seed handling are this design's
// own choices. For W other than 32 a generic tap set is used and the
// sequence is not guaranteed to be of maximal length.
module lfsr_prng #(
  parameter int unsigned W = scramble_pkg::LFSR_W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] seed_in,   // sampled while rst_n is low
  input  logic         step,      // advance one state
  output logic [W-1:0] value      // current state
);

  localparam logic [W-1:0] NONZERO = {{(W-1){1'b0}}, 1'b1};

  logic [W-1:0] state_q;
  logic         fb;

  // Feedback taps, counted from bit 0: 31, 21, 1, 0 for W = 32.
  always_comb begin
    if (W == 32) fb = state_q[31] ^ state_q[21] ^ state_q[1] ^ state_q[0];
    else         fb = state_q[W-1] ^ state_q[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state_q <= (seed_in == '0) ? NONZERO : seed_in;
    else if (step) state_q <= {state_q[W-2:0], fb};
  end

  assign value = state_q;

endmodule
