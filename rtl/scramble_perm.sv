// Seeded set-index permutation pi_r(s) = f(s xor r0, r1).
//
// The set index s is first XORed with the low S seed bits r0. The result
// then passes through f, a network of seed-controlled conditional swaps (a
// randomized barrel shifter) driven by the remaining floor(S/2) bits r1.
// f works on a segment of n bits by exchanging bit i of its low half with
// bit i + n/2 when r1[i] is set, for i < n/2, and then applying itself to
// the low floor(n/2) bits and to the high n - floor(n/2) bits, with the
// same r1, down to single bits. When n is odd the top bit of the segment is
// not paired at that level. Every seed gives a bijection of the set
// indices. The network is unrolled here into levels of 2:1 multiplexers
// whose wiring is computed at elaboration time. Combinational, no clock.
//
// The XOR layer, the recursive conditional swaps and the reuse of the same
// control bits at every level follow the published construction; one
// control bit per swapped pair, the handling of odd widths and the packing
// seed = {r1, r0} are this design's own choices.
module scramble_perm #(
  parameter int unsigned S      = scramble_pkg::SET_BITS_DEF,
  parameter int unsigned SEED_W = scramble_pkg::seed_width(S)
) (
  input  logic [S-1:0]      set_in,   // set index taken from the address
  input  logic [SEED_W-1:0] seed,     // {r1, r0}
  output logic [S-1:0]      set_out   // scrambled set index
);

  localparam int unsigned R1_W   = SEED_W - S;
  localparam int unsigned LEVELS = (S > 1) ? $clog2(S) : 1;

  // Segment of bit position p at recursion level l: its low end (lo) and
  // width (n), packed as lo * 65536 + n.
  function automatic int segment(int l, int p);
    int lo, n, h;
    lo = 0;
    n  = int'(S);
    for (int k = 0; k < l; k++) begin
      h = n / 2;
      if (p < lo + h) n = h;
      else begin lo = lo + h; n = n - h; end
    end
    return lo * 65536 + n;
  endfunction

  // Partner of bit p at level l, or -1 when p is not swapped there.
  function automatic int partner(int l, int p);
    int lo, n, h;
    lo = segment(l, p) / 65536;
    n  = segment(l, p) % 65536;
    h  = n / 2;
    if (n < 2)          return -1;
    if (p - lo < h)     return p + h;
    if (p - lo < 2 * h) return p - h;
    return -1;
  endfunction

  // Control bit of r1 that decides the swap of bit p at level l.
  function automatic int control(int l, int p);
    int lo, n, h;
    lo = segment(l, p) / 65536;
    n  = segment(l, p) % 65536;
    h  = n / 2;
    return (p - lo < h) ? p - lo : p - lo - h;
  endfunction

  logic [S-1:0]    r0;
  logic [R1_W-1:0] r1;
  logic [S-1:0]    w [LEVELS+1];

  assign r0   = seed[S-1:0];
  assign r1   = seed[SEED_W-1:S];
  assign w[0] = set_in ^ r0;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar p = 0; p < S; p++) begin : g_bit
      localparam int PART = partner(l, p);
      localparam int CTL  = control(l, p);
      if (PART < 0) begin : g_pass
        assign w[l+1][p] = w[l][p];
      end else begin : g_swap
        assign w[l+1][p] = r1[CTL] ? w[l][PART] : w[l][p];
      end
    end
  end

  assign set_out = w[LEVELS];

endmodule
