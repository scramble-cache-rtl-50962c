// Test of the write-back queue at its default size (4 entries of a 26-bit
// line address and 512-bit data). Random pushes and pops are compared with
// a queue model: entries leave in order with their data, push_ready is low
// only when the queue is full and not being popped, empty and head_valid
// follow the fill level, and a push and a pop in the same cycle on a full
// queue are both taken.
module wb_queue_tb;

  localparam int unsigned DEPTH = 4, ADDR_W = 26, DATA_W = 512;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              push = 1'b0, pop = 1'b0, push_ready, head_valid, empty;
  logic [ADDR_W-1:0] push_addr = '0, head_addr;
  logic [DATA_W-1:0] push_data = '0, head_data;

  wb_queue dut (.*);

  typedef struct packed { logic [ADDR_W-1:0] a; logic [DATA_W-1:0] d; } ent_t;
  ent_t q[$];
  int unsigned checks = 0, failures = 0, full_pushpop = 0, refused = 0;

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic took_push, took_pop;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      push = ($urandom_range(0, 99) < 55 + (i / 2000 % 2) * 30);
      push_addr = 26'($urandom);
      for (int j = 0; j < DATA_W / 32; j++) push_data[j*32 +: 32] = $urandom;
      pop = (q.size() > 0) && ($urandom_range(0, 99) < 50);
      #1;
      chk(empty == (q.size() == 0), "empty");
      chk(head_valid == (q.size() > 0), "head_valid");
      chk(push_ready == (q.size() < DEPTH || pop), "push_ready");
      if (q.size() > 0) chk(head_addr == q[0].a && head_data == q[0].d, "head contents");
      took_push = push && push_ready;
      took_pop  = pop;
      if (took_push && took_pop && q.size() == DEPTH) full_pushpop++;
      if (push && !push_ready) refused++;
      @(posedge clk);
      if (took_pop) void'(q.pop_front());
      if (took_push) q.push_back('{a: push_addr, d: push_data});
    end
    chk(full_pushpop > 0, "push and pop on a full queue never happened");
    chk(refused > 0, "a full queue never refused a push");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
