// Behavioural model of the main memory behind the cache (the next level of
// the hierarchy is not part of the design). It accepts one line request per
// handshake on a valid/ready channel; ready is withdrawn at random (when
// STALL is set) to exercise back-pressure, and while a read is in flight.
// Writes take effect at the handshake. A read answers LAT cycles later with
// a one-cycle mem_resp_valid pulse. Lines never written hold
// tb_mem_pkg::init_word patterns. Not synthesizable.
module mem_model #(
  parameter int unsigned LADDR_W = 26,
  parameter int unsigned LINE_W  = 512,
  parameter int unsigned LAT     = 10,
  parameter bit          STALL   = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  output logic               req_ready,
  input  logic               req_we,
  input  logic [LADDR_W-1:0] req_addr,
  input  logic [LINE_W-1:0]  req_wdata,
  output logic               resp_valid,
  output logic [LINE_W-1:0]  resp_rdata,
  output int unsigned        n_reads,
  output int unsigned        n_writes
);

  logic [LINE_W-1:0] mem [longint unsigned];
  logic              rdy_q, busy_q;
  int unsigned       cnt_q;
  logic [LADDR_W-1:0] raddr_q;

  assign req_ready = rdy_q && !busy_q;

  function automatic logic [LINE_W-1:0] read_line(logic [LADDR_W-1:0] a);
    logic [LINE_W-1:0] l;
    if (mem.exists(longint'(a))) return mem[longint'(a)];
    for (int unsigned j = 0; j < LINE_W / 32; j++)
      l[j*32 +: 32] = tb_mem_pkg::init_word(longint'(a), j);
    return l;
  endfunction

  always @(posedge clk)
    if (rst_n && req_valid && req_ready && req_we) mem[longint'(req_addr)] = req_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdy_q      <= 1'b0;
      busy_q     <= 1'b0;
      cnt_q      <= 0;
      resp_valid <= 1'b0;
      n_reads    <= 0;
      n_writes   <= 0;
    end else begin
      rdy_q      <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
      resp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        if (req_we) begin
          n_writes <= n_writes + 1;
        end else begin
          busy_q  <= 1'b1;
          cnt_q   <= LAT;
          raddr_q <= req_addr;
          n_reads <= n_reads + 1;
        end
      end
      if (busy_q) begin
        if (cnt_q <= 1) begin
          busy_q     <= 1'b0;
          resp_valid <= 1'b1;
          resp_rdata <= read_line(raddr_q);
        end else begin
          cnt_q <= cnt_q - 1;
        end
      end
    end
  end

endmodule
