// Test of the cache storage at its default size (64 sets, 8 ways, 26-bit
// tags, 3-bit generations, 512-bit lines). Random line writes, invalidates
// and reads are compared with a model: a read returns the whole set one
// cycle later and the old contents when the set is written in the same
// cycle, an invalidate clears only the masked ways and loses against a
// write to the same way, and reset clears every valid bit.
module cache_arrays_tb;

  localparam int unsigned S = 6, WAYS = 8, TAG_W = 26, GEN_W = 3, LINE_W = 512;
  localparam int unsigned SETS = 1 << S;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       rd_en = 1'b0, wr_en = 1'b0, inv_en = 1'b0, wr_dirty = 1'b0;
  logic [S-1:0]               rd_set = '0, wr_set = '0, inv_set = '0;
  logic [2:0]                 wr_way = '0;
  logic [GEN_W-1:0]           wr_gen = '0;
  logic [TAG_W-1:0]           wr_tag = '0;
  logic [LINE_W-1:0]          wr_data = '0;
  logic [WAYS-1:0]            inv_mask = '0;
  logic [WAYS-1:0]            rd_valid, rd_dirty;
  logic [WAYS-1:0][GEN_W-1:0] rd_gen;
  logic [WAYS-1:0][TAG_W-1:0] rd_tag;
  logic [LINE_W-1:0]          rd_data [WAYS];

  cache_arrays dut (.*);

  // model
  logic              m_valid [SETS][WAYS];
  logic              m_dirty [SETS][WAYS];
  logic [GEN_W-1:0]  m_gen   [SETS][WAYS];
  logic [TAG_W-1:0]  m_tag   [SETS][WAYS];
  logic [LINE_W-1:0] m_data  [SETS][WAYS];

  int unsigned checks = 0, failures = 0;

  function automatic logic [LINE_W-1:0] rand_line();
    logic [LINE_W-1:0] l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  task automatic check_set(int s);
    for (int w = 0; w < WAYS; w++) begin
      checks++;
      if (rd_valid[w] !== m_valid[s][w]) begin
        failures++; $display("FAIL set %0d way %0d valid %b expected %b", s, w, rd_valid[w], m_valid[s][w]);
      end
      if (m_valid[s][w]) begin
        checks++;
        if (rd_dirty[w] !== m_dirty[s][w] || rd_gen[w] !== m_gen[s][w] ||
            rd_tag[w] !== m_tag[s][w] || rd_data[w] !== m_data[s][w]) begin
          failures++; $display("FAIL set %0d way %0d contents", s, w);
        end
      end
    end
  endtask

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rs;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) m_valid[s][w] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // after reset: every set empty
    for (int s = 0; s < SETS; s++) begin
      @(negedge clk); rd_en = 1'b1; rd_set = S'(s);
      @(negedge clk); rd_en = 1'b0; check_set(s);
    end
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      rd_en    = 1'b1;
      rd_set   = S'($urandom_range(0, 7));   // few sets: many clashes
      wr_en    = ($urandom_range(0, 1) == 1);
      wr_set   = S'($urandom_range(0, 7));
      wr_way   = 3'($urandom);
      wr_dirty = 1'($urandom);
      wr_gen   = 3'($urandom);
      wr_tag   = 26'($urandom);
      wr_data  = rand_line();
      inv_en   = ($urandom_range(0, 3) == 0);
      inv_set  = S'($urandom_range(0, 7));
      inv_mask = 8'($urandom);
      rs = int'(rd_set);
      @(negedge clk);
      // the read saw the contents before this edge
      check_set(rs);
      if (inv_en)
        for (int w = 0; w < WAYS; w++) if (inv_mask[w]) m_valid[inv_set][w] = 1'b0;
      if (wr_en) begin
        m_valid[wr_set][wr_way] = 1'b1;
        m_dirty[wr_set][wr_way] = wr_dirty;
        m_gen[wr_set][wr_way]   = wr_gen;
        m_tag[wr_set][wr_way]   = wr_tag;
        m_data[wr_set][wr_way]  = wr_data;
      end
      rd_en = 1'b0; wr_en = 1'b0; inv_en = 1'b0;
    end
    // outputs hold while rd_en is low
    @(negedge clk); rd_en = 1'b1; rd_set = '0;
    @(negedge clk); rd_en = 1'b0; rd_set = 6'd5;
    @(negedge clk); check_set(0);
    // reset clears all valid bits
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) m_valid[s][w] = 1'b0;
    for (int s = 0; s < 8; s++) begin
      @(negedge clk); rd_en = 1'b1; rd_set = S'(s);
      @(negedge clk); rd_en = 1'b0; check_set(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
