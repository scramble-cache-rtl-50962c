// History table and global generation counter.
//
// Entry g holds the permutation seed and the process identifier that were
// in use while the global generation counter c_glob had the value g, plus a
// valid bit (generations that have not yet existed since reset are
// invalid). c_glob counts modulo R. A one-cycle advance pulse moves c_glob
// to (c_glob + 1) mod R and overwrites that entry with new_seed / new_pid,
// so the table always holds the current seed and the R-1 previous ones.
// At reset c_glob = 0 and only entry 0 is valid, loaded with init_seed and
// init_pid. The read port is combinational: rd_gen selects an entry.
// Storing R seeds with a process identifier each and counting generations
// modulo R follow the description; indexing the table by generation and
// the reset contents are this design's own choices.
module history_table #(
  parameter int unsigned R      = scramble_pkg::HIST_DEPTH_DEF,
  parameter int unsigned SEED_W = scramble_pkg::seed_width(scramble_pkg::SET_BITS_DEF),
  parameter int unsigned PID_W  = scramble_pkg::PID_W_DEF,
  parameter int unsigned GEN_W  = (R > 1) ? $clog2(R) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SEED_W-1:0] init_seed,  // seed of generation 0 at reset
  input  logic [PID_W-1:0]  init_pid,
  input  logic              advance,    // start a new generation
  input  logic [SEED_W-1:0] new_seed,
  input  logic [PID_W-1:0]  new_pid,
  output logic [GEN_W-1:0]  c_glob,     // current generation
  output logic [GEN_W-1:0]  next_gen,   // (c_glob + 1) mod R, the generation to be reused
  output logic [SEED_W-1:0] cur_seed,
  output logic [PID_W-1:0]  cur_pid,
  input  logic [GEN_W-1:0]  rd_gen,
  output logic              rd_valid,
  output logic [SEED_W-1:0] rd_seed,
  output logic [PID_W-1:0]  rd_pid
);

  typedef struct packed {
    logic              valid;
    logic [SEED_W-1:0] seed;
    logic [PID_W-1:0]  pid;
  } entry_t;

  entry_t           tbl_q [R];
  logic [GEN_W-1:0] cglob_q;

  always_comb begin
    if (cglob_q == GEN_W'(R - 1)) next_gen = '0;
    else                          next_gen = cglob_q + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cglob_q <= '0;
      for (int unsigned g = 0; g < R; g++) tbl_q[g] <= '0;
      tbl_q[0] <= '{valid: 1'b1, seed: init_seed, pid: init_pid};
    end else if (advance) begin
      cglob_q         <= next_gen;
      tbl_q[next_gen] <= '{valid: 1'b1, seed: new_seed, pid: new_pid};
    end
  end

  assign c_glob   = cglob_q;
  assign cur_seed = tbl_q[cglob_q].seed;
  assign cur_pid  = tbl_q[cglob_q].pid;
  assign rd_valid = tbl_q[rd_gen].valid;
  assign rd_seed  = tbl_q[rd_gen].seed;
  assign rd_pid   = tbl_q[rd_gen].pid;

endmodule
