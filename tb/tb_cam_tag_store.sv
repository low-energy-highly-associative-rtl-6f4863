// Self-checking testbench for cam_tag_store: fills entries with distinct
// random tags and searches with full and partial (LU-style) precharge
// enables; expected match vectors come from a testbench copy of the tags.
module tb_cam_tag_store;
  localparam int E = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [21:0] search_tag, wr_tag, rd_tag;
  logic [E-1:0] search_en, match;
  logic wr_en = 0, rd_valid;
  logic [4:0] wr_idx, rd_idx;
  logic [21:0] ref_tag [E];
  logic [E-1:0] ref_val;

  cam_tag_store dut (.clk, .rst_n, .search_tag, .search_en, .match,
                     .wr_en, .wr_idx, .wr_tag, .rd_idx, .rd_tag, .rd_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [E-1:0] expect_match(logic [21:0] t, logic [E-1:0] en);
    logic [E-1:0] m = '0;
    for (int i = 0; i < E; i++) m[i] = en[i] && ref_val[i] && ref_tag[i] == t;
    return m;
  endfunction

  task automatic search(logic [21:0] t, logic [E-1:0] en);
    @(negedge clk);
    search_tag = t; search_en = en;
    #1;
    checks++;
    if (match !== expect_match(t, en)) begin
      failures++;
      $display("match mismatch tag=%h en=%h got=%h exp=%h", t, en, match, expect_match(t, en));
    end
  endtask

  initial begin
    ref_val = '0;
    search_en = '0; search_tag = '0; wr_idx = '0; wr_tag = '0; rd_idx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // nothing matches after reset
    search(22'h0, '1);
    // fill 24 of 32 entries with distinct tags (i * 0x1357 + 5)
    for (int i = 0; i < 24; i++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = 5'(i); wr_tag = 22'(i * 22'h1357 + 5);
      @(posedge clk); #1 wr_en = 0;
      ref_tag[i] = 22'(i * 22'h1357 + 5); ref_val[i] = 1;
    end
    for (int k = 0; k < 300; k++) begin
      int i = $urandom_range(0, 31);
      logic [21:0] t = ($urandom % 4 == 0) ? 22'($urandom) : 22'(i * 22'h1357 + 5);
      logic [E-1:0] en;
      case (k % 3)
        0: en = '1;                         // full search
        1: en = E'(1) << $urandom_range(0, 31); // one LU line
        default: en = E'(1) << i;           // the line holding the tag
      endcase
      search(t, en);
      rd_idx = 5'(i); #1;
      checks++;
      if (rd_valid !== ref_val[i] || (ref_val[i] && rd_tag !== ref_tag[i])) begin
        failures++; $display("readout mismatch idx=%0d", i);
      end
    end
    // overwrite an entry, old tag must disappear
    @(negedge clk); wr_en = 1; wr_idx = 5'd3; wr_tag = 22'h3ABCD;
    @(posedge clk); #1 wr_en = 0; ref_tag[3] = 22'h3ABCD;
    search(22'(3 * 22'h1357 + 5), '1);
    search(22'h3ABCD, '1);
    search(22'h3ABCD, 32'h0000_0004);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
