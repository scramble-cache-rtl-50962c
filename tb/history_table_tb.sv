// Test of the history table and global generation counter for R = 8
// (default) and R = 5 (counter not a power of two). After reset only
// generation 0 is valid and holds the reset seed. Each advance must move
// c_glob to (c_glob + 1) mod R and store the new seed and process
// identifier there; all entries are read back after every step and
// compared with a model, together with next_gen, cur_seed and cur_pid.
module history_table_tb;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  // R = 8
  logic        adv8 = 1'b0;
  logic [8:0]  nseed8 = '0, cseed8, rseed8;
  logic [7:0]  npid8 = '0, cpid8, rpid8;
  logic [2:0]  cg8, ng8, rg8 = '0;
  logic        rv8;
  history_table u8 (
    .clk, .rst_n, .init_seed (9'h1A5), .init_pid (8'h00),
    .advance (adv8), .new_seed (nseed8), .new_pid (npid8),
    .c_glob (cg8), .next_gen (ng8), .cur_seed (cseed8), .cur_pid (cpid8),
    .rd_gen (rg8), .rd_valid (rv8), .rd_seed (rseed8), .rd_pid (rpid8)
  );

  // R = 5
  logic        adv5 = 1'b0;
  logic [8:0]  nseed5 = '0, cseed5, rseed5;
  logic [7:0]  npid5 = '0, cpid5, rpid5;
  logic [2:0]  cg5, ng5, rg5 = '0;
  logic        rv5;
  history_table #(.R(5)) u5 (
    .clk, .rst_n, .init_seed (9'h033), .init_pid (8'h07),
    .advance (adv5), .new_seed (nseed5), .new_pid (npid5),
    .c_glob (cg5), .next_gen (ng5), .cur_seed (cseed5), .cur_pid (cpid5),
    .rd_gen (rg5), .rd_valid (rv5), .rd_seed (rseed5), .rd_pid (rpid5)
  );

  logic       mv8 [8]; logic [8:0] ms8 [8]; logic [7:0] mp8 [8]; int mg8;
  logic       mv5 [5]; logic [8:0] ms5 [5]; logic [7:0] mp5 [5]; int mg5;

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  task automatic compare_all();
    chk(cg8 == 3'(mg8), "R=8 c_glob");
    chk(ng8 == 3'((mg8 + 1) % 8), "R=8 next_gen");
    chk(cseed8 == ms8[mg8] && cpid8 == mp8[mg8], "R=8 current entry");
    for (int g = 0; g < 8; g++) begin
      rg8 = 3'(g); #1;
      chk(rv8 == mv8[g], $sformatf("R=8 valid of %0d", g));
      if (mv8[g]) chk(rseed8 == ms8[g] && rpid8 == mp8[g], $sformatf("R=8 entry %0d", g));
    end
    chk(cg5 == 3'(mg5), "R=5 c_glob");
    chk(ng5 == 3'((mg5 + 1) % 5), "R=5 next_gen");
    chk(cseed5 == ms5[mg5] && cpid5 == mp5[mg5], "R=5 current entry");
    for (int g = 0; g < 5; g++) begin
      rg5 = 3'(g); #1;
      chk(rv5 == mv5[g], $sformatf("R=5 valid of %0d", g));
      if (mv5[g]) chk(rseed5 == ms5[g] && rpid5 == mp5[g], $sformatf("R=5 entry %0d", g));
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) mv8[g] = 1'b0;
    for (int g = 0; g < 5; g++) mv5[g] = 1'b0;
    mv8[0] = 1'b1; ms8[0] = 9'h1A5; mp8[0] = 8'h00; mg8 = 0;
    mv5[0] = 1'b1; ms5[0] = 9'h033; mp5[0] = 8'h07; mg5 = 0;
    #12;
    compare_all();
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      adv8 = ($urandom_range(0, 1) == 1); nseed8 = 9'($urandom); npid8 = 8'($urandom);
      adv5 = ($urandom_range(0, 1) == 1); nseed5 = 9'($urandom); npid5 = 8'($urandom);
      @(negedge clk);
      if (adv8) begin mg8 = (mg8 + 1) % 8; mv8[mg8] = 1'b1; ms8[mg8] = nseed8; mp8[mg8] = npid8; end
      if (adv5) begin mg5 = (mg5 + 1) % 5; mv5[mg5] = 1'b1; ms5[mg5] = nseed5; mp5[mg5] = npid5; end
      adv8 = 1'b0; adv5 = 1'b0;
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
