// Test of the set permutation pi_r(s) = f(s xor r0, r1) at three widths
// (4, 6 = default, 7 bits). For every seed and every set index the output
// is compared with a reference that applies the same conditional swaps
// from an explicit work list of bit segments instead of a recursive
// netlist, and every seed must give a bijection of the set indices. With
// r1 = 0 the permutation must reduce to s xor r0.
module scramble_perm_tb;

  int unsigned checks = 0, failures = 0;

  // Reference: a work list of segments (lo, n); each segment of n >= 2
  // bits swaps bit lo+i with lo+i+n/2 when r[i] is set, then splits into
  // its low n/2 and high n - n/2 bits.
  function automatic logic [15:0] f_ref(logic [15:0] s, logic [15:0] r, int n);
    int lo_q[$], n_q[$];
    logic [15:0] v = s;
    lo_q.push_back(0); n_q.push_back(n);
    while (lo_q.size() > 0) begin
      int lo = lo_q.pop_front();
      int m  = n_q.pop_front();
      int h  = m / 2;
      if (m < 2) continue;
      for (int i = 0; i < h; i++) begin
        if (r[i]) begin
          logic t = v[lo + i];
          v[lo + i] = v[lo + i + h];
          v[lo + i + h] = t;
        end
      end
      lo_q.push_back(lo);     n_q.push_back(h);
      lo_q.push_back(lo + h); n_q.push_back(m - h);
    end
    return v;
  endfunction

  logic [3:0] s4, y4;  logic [5:0] k4;
  logic [5:0] s6, y6;  logic [8:0] k6;
  logic [6:0] s7, y7;  logic [9:0] k7;

  scramble_perm #(.S(4)) u4 (.set_in(s4), .seed(k4), .set_out(y4));
  scramble_perm         u6 (.set_in(s6), .seed(k6), .set_out(y6));
  scramble_perm #(.S(7)) u7 (.set_in(s7), .seed(k7), .set_out(y7));

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] seen;
    logic [15:0]  e;
    // S = 4: every seed, every index
    for (int k = 0; k < 64; k++) begin
      seen = '0;
      for (int s = 0; s < 16; s++) begin
        k4 = 6'(k); s4 = 4'(s); #1;
        e = f_ref(16'(s ^ (k & 15)), 16'(k >> 4), 4);
        checks++; if (y4 !== e[3:0]) begin failures++; $display("FAIL S=4 k=%0d s=%0d y=%0d exp=%0d", k, s, y4, e[3:0]); end
        seen[y4] = 1'b1;
      end
      checks++; if (seen[15:0] !== 16'hFFFF) begin failures++; $display("FAIL S=4 k=%0d not a bijection", k); end
    end
    // S = 6 (default): every seed, every index
    for (int k = 0; k < 512; k++) begin
      seen = '0;
      for (int s = 0; s < 64; s++) begin
        k6 = 9'(k); s6 = 6'(s); #1;
        e = f_ref(16'(s ^ (k & 63)), 16'(k >> 6), 6);
        checks++; if (y6 !== e[5:0]) begin failures++; $display("FAIL S=6 k=%0d s=%0d y=%0d exp=%0d", k, s, y6, e[5:0]); end
        if (k < 64) begin
          checks++; if (y6 !== 6'(s ^ k)) begin failures++; $display("FAIL S=6 r1=0 is not a plain xor"); end
        end
        seen[y6] = 1'b1;
      end
      checks++; if (seen[63:0] !== '1) begin failures++; $display("FAIL S=6 k=%0d not a bijection", k); end
    end
    // S = 7 (odd split at every level): every seed, every index
    for (int k = 0; k < 1024; k++) begin
      seen = '0;
      for (int s = 0; s < 128; s++) begin
        k7 = 10'(k); s7 = 7'(s); #1;
        e = f_ref(16'(s ^ (k & 127)), 16'(k >> 7), 7);
        checks++; if (y7 !== e[6:0]) begin failures++; $display("FAIL S=7 k=%0d s=%0d", k, s); end
        seen[y7] = 1'b1;
      end
      checks++; if (seen !== '1) begin failures++; $display("FAIL S=7 k=%0d not a bijection", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
