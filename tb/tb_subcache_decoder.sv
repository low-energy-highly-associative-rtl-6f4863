// Self-checking testbench for subcache_decoder: random addresses, the
// expected select/tag/word are computed from the bit layout independently.
module tb_subcache_decoder;
  int checks = 0, failures = 0;
  logic [31:0] addr;
  logic        en;
  logic [31:0] sel;
  logic [4:0]  set_idx;
  logic [21:0] tag;
  logic [2:0]  word_sel;

  subcache_decoder dut (.addr, .en, .sel, .set_idx, .tag, .word_sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      addr = $urandom;
      en   = (i % 7) != 3;
      #1;
      checks++;
      if (en && sel != (32'd1 << ((addr / 32) % 32))) begin
        failures++; $display("sel mismatch addr=%h sel=%h", addr, sel);
      end
      if (!en && sel != 0) begin failures++; $display("sel active while disabled"); end
      checks++;
      if (tag != 22'(addr / 1024)) begin failures++; $display("tag mismatch %h", addr); end
      checks++;
      if (word_sel != 3'((addr / 4) % 8)) begin failures++; $display("word mismatch %h", addr); end
      checks++;
      if (set_idx != 5'((addr / 32) % 32)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
