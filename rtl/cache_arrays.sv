// Storage of the Scramble Cache: 2^S sets of WAYS lines.
//
// Each line holds a valid bit, a dirty bit, its generation (the value of
// the global generation counter when it was placed), a tag and the line
// data. Because the set index is scrambled, the tag is the whole line
// address, set bits included. One synchronous read port returns all ways of
// a set one cycle after rd_en (outputs hold otherwise). One write port
// writes a complete line into one way and marks it valid; an invalidate
// port clears the valid bits of a mask of ways in another (or the same)
// set in the same cycle, the write taking precedence on a clash. A read of
// a set written in the same cycle returns the old contents. Valid bits are
// cleared at reset; the other fields are not initialised. The per-line
// generation field follows the description; ports, timing and the full
// line address tag are this design's own choices.
module cache_arrays #(
  parameter int unsigned S      = scramble_pkg::SET_BITS_DEF,
  parameter int unsigned WAYS   = scramble_pkg::WAYS_DEF,
  parameter int unsigned TAG_W  = 26,
  parameter int unsigned GEN_W  = 3,
  parameter int unsigned LINE_W = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // read port
  input  logic                       rd_en,
  input  logic [S-1:0]               rd_set,
  output logic [WAYS-1:0]            rd_valid,
  output logic [WAYS-1:0]            rd_dirty,
  output logic [WAYS-1:0][GEN_W-1:0] rd_gen,
  output logic [WAYS-1:0][TAG_W-1:0] rd_tag,
  output logic [LINE_W-1:0]          rd_data [WAYS],
  // line write port
  input  logic                       wr_en,
  input  logic [S-1:0]               wr_set,
  input  logic [$clog2(WAYS)-1:0]    wr_way,
  input  logic                       wr_dirty,
  input  logic [GEN_W-1:0]           wr_gen,
  input  logic [TAG_W-1:0]           wr_tag,
  input  logic [LINE_W-1:0]          wr_data,
  // invalidate port
  input  logic                       inv_en,
  input  logic [S-1:0]               inv_set,
  input  logic [WAYS-1:0]            inv_mask
);

  localparam int unsigned SETS = 1 << S;

  logic [WAYS-1:0]            valid_q [SETS];
  logic [WAYS-1:0]            dirty_q [SETS];
  logic [WAYS-1:0][GEN_W-1:0] gen_q   [SETS];
  logic [WAYS-1:0][TAG_W-1:0] tag_q   [SETS];
  logic [LINE_W-1:0]          data_q  [SETS][WAYS];

  // Valid bits: reset, invalidate, then write (write wins).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < SETS; i++) valid_q[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < SETS; i++) begin
        for (int unsigned w = 0; w < WAYS; w++) begin
          if (wr_en && wr_set == S'(i) && wr_way == $clog2(WAYS)'(w))
            valid_q[i][w] <= 1'b1;
          else if (inv_en && inv_set == S'(i) && inv_mask[w])
            valid_q[i][w] <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      dirty_q[wr_set][wr_way]        <= wr_dirty;
      gen_q[wr_set][wr_way]          <= wr_gen;
      tag_q[wr_set][wr_way]          <= wr_tag;
      data_q[wr_set][wr_way]         <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= '0;
    end else if (rd_en) begin
      rd_valid <= valid_q[rd_set];
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_dirty <= dirty_q[rd_set];
      rd_gen   <= gen_q[rd_set];
      rd_tag   <= tag_q[rd_set];
      for (int unsigned w = 0; w < WAYS; w++) rd_data[w] <= data_q[rd_set][w];
    end
  end

endmodule
