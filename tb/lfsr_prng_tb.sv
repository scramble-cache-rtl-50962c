// Test of the LFSR seed generator: the reset value is the external seed (a
// zero seed is replaced by 1), each step matches a reference shift register
// with taps 31, 21, 1, 0, a low step input holds the value, and a new value
// is visible one cycle after a step. A second run checks that the sequence
// from a fixed seed does not repeat its first value within 100000 steps.
module lfsr_prng_tb;

  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  logic [31:0] seed_in = 32'h1234_5678, value;
  always #5 clk = ~clk;

  lfsr_prng dut (.clk, .rst_n, .seed_in, .step, .value);

  int unsigned checks = 0, failures = 0;
  logic [31:0] model;

  function automatic logic [31:0] next(logic [31:0] v);
    return {v[30:0], v[31] ^ v[21] ^ v[1] ^ v[0]};
  endfunction

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++; if (value !== 32'h1234_5678) begin failures++; $display("FAIL reset value %h", value); end
    @(negedge clk); rst_n = 1'b1;
    model = 32'h1234_5678;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      step = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (step) model = next(model);
      checks++; if (value !== model) begin failures++; $display("FAIL step %0d: %h expected %h", i, value, model); end
      step = 1'b0;
    end
    // zero seed
    @(negedge clk); seed_in = '0; rst_n = 1'b0;
    #1;
    checks++; if (value !== 32'h1) begin failures++; $display("FAIL zero seed gave %h", value); end
    @(negedge clk); rst_n = 1'b1; step = 1'b1;
    for (int i = 0; i < 100000; i++) begin
      @(negedge clk);
      if (value == 32'h1) begin
        checks++; failures++; $display("FAIL sequence repeats after %0d steps", i + 1);
        break;
      end
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
