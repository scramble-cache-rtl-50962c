// Helpers shared by the testbenches: the initial contents of the modelled
// main memory. Word j of line a starts as a fixed hash of a and j, so a test
// can predict the data of lines that were never written.
package tb_mem_pkg;

  function automatic logic [31:0] init_word(longint unsigned line_addr, int unsigned j);
    logic [31:0] a;
    a = 32'(line_addr);
    return (a * 32'h9E37_79B1) ^ (32'(j) * 32'h0101_0101) ^ 32'h5A5A_0000;
  endfunction

endpackage
