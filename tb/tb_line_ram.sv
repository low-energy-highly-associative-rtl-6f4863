// Self-checking testbench for line_ram: full-line writes, word reads and
// writes selected by a one-hot wordline and the column select, and line
// read-out, all compared with a testbench copy of the array. Reads must
// appear in rdata one cycle after rd_en.
module tb_line_ram;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [31:0] wl = '0;
  logic [2:0] word_sel = '0;
  logic rd_en = 0, wr_en = 0, line_wr_en = 0;
  logic [31:0] wdata = '0, rdata;
  logic [4:0] line_idx = '0;
  logic [255:0] line_wdata = '0, line_rdata;
  logic [255:0] ref_mem [32];

  line_ram dut (.clk, .wl, .word_sel, .rd_en, .wr_en, .wdata, .rdata,
                .line_wr_en, .line_idx, .line_wdata, .line_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] rnd_line();
    logic [255:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      line_wr_en = 1; line_idx = 5'(i); line_wdata = rnd_line();
      ref_mem[i] = line_wdata;
    end
    @(negedge clk); line_wr_en = 0;
    for (int k = 0; k < 600; k++) begin
      int l = $urandom_range(0, 31);
      int w = $urandom_range(0, 7);
      @(negedge clk);
      wl = 32'd1 << l; word_sel = 3'(w);
      if ($urandom % 3 == 0) begin
        wr_en = 1; rd_en = 0; wdata = $urandom;
        ref_mem[l][w*32 +: 32] = wdata;
        @(negedge clk); wr_en = 0; wl = '0;
      end else begin
        rd_en = 1; wr_en = 0;
        @(negedge clk); rd_en = 0; wl = '0;
        checks++;
        if (rdata != ref_mem[l][w*32 +: 32]) begin
          failures++; $display("read line %0d word %0d got %h exp %h", l, w, rdata, ref_mem[l][w*32 +: 32]);
        end
      end
      line_idx = 5'($urandom_range(0, 31)); #1;
      checks++;
      if (line_rdata != ref_mem[line_idx]) begin failures++; $display("line read-out mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
