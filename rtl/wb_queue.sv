// Write-back queue between the cache and the memory port.
//
// A FIFO of DEPTH entries, each a line address and the line data of a
// dirty line leaving the cache (evicted victim or line of an expiring
// generation). push is taken when push_ready is high; the oldest entry is
// presented on head_* with head_valid and removed by pop. A push and a pop
// may happen in the same cycle, also when the queue is full. empty lets the
// cache wait until every older write has reached memory before it reads a
// line. The queue itself follows the description; depth and handshake are
// this design's own choices.
module wb_queue #(
  parameter int unsigned DEPTH  = scramble_pkg::WBQ_DEPTH_DEF,
  parameter int unsigned ADDR_W = 26,
  parameter int unsigned DATA_W = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic [ADDR_W-1:0] push_addr,
  input  logic [DATA_W-1:0] push_data,
  output logic              push_ready,
  output logic              head_valid,
  output logic [ADDR_W-1:0] head_addr,
  output logic [DATA_W-1:0] head_data,
  input  logic              pop,
  output logic              empty
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [ADDR_W-1:0]  addr_q [DEPTH];
  logic [DATA_W-1:0]  data_q [DEPTH];
  logic [PTR_W-1:0]   rd_ptr_q, wr_ptr_q;
  logic [PTR_W:0]     count_q;
  logic               do_push, do_pop;

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty      = (count_q == '0);
  assign head_valid = !empty;
  assign push_ready = (count_q != (PTR_W+1)'(DEPTH)) || pop;
  assign do_pop     = pop && !empty;
  assign do_push    = push && push_ready;
  assign head_addr  = addr_q[rd_ptr_q];
  assign head_data  = data_q[rd_ptr_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr_q <= '0;
      wr_ptr_q <= '0;
      count_q  <= '0;
    end else begin
      if (do_push) wr_ptr_q <= inc(wr_ptr_q);
      if (do_pop)  rd_ptr_q <= inc(rd_ptr_q);
      if (do_push && !do_pop)      count_q <= count_q + 1'b1;
      else if (do_pop && !do_push) count_q <= count_q - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      addr_q[wr_ptr_q] <= push_addr;
      data_q[wr_ptr_q] <= push_data;
    end
  end

  // Popping an empty queue is a protocol error of the user.
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("wb_queue: pop while empty");

endmodule
