// Testbench-only helpers: the initial contents of the main memory model.
// Every 32-bit word at byte address a starts as a * 0x9E3779B1 + 0x12345678,
// so any word read back can be checked without storing the whole memory.
package tb_dcache_pkg;
  function automatic logic [31:0] init_word(input logic [31:0] a);
    return a * 32'h9E37_79B1 + 32'h1234_5678;
  endfunction
endpackage
