// Self-checking testbench for lu_predictor: the LU_1 default instance and an
// LU_4 instance are compared with a most-recently-used list kept in the
// testbench.
module tb_lu_predictor;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic update = 0;
  logic [4:0] upd_idx = '0;
  logic [31:0] mask1, mask4;
  int ref4 [$];

  lu_predictor dut1 (.clk, .rst_n, .update, .upd_idx, .lu_mask(mask1));
  lu_predictor #(.N(4)) dut4 (.clk, .rst_n, .update, .upd_idx, .lu_mask(mask4));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last;
  logic [31:0] exp4;
  initial begin
    last = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (mask1 != 0 || mask4 != 0) begin failures++; $display("mask not empty after reset"); end
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      update  = ($urandom % 4) != 0;
      // a small working set so that LU_4 hits often
      upd_idx = 5'($urandom_range(0, 6) * 3);
      if (update) begin
        last = upd_idx;
        foreach (ref4[j]) if (ref4[j] == int'(upd_idx)) begin ref4.delete(j); break; end
        ref4.push_front(int'(upd_idx));
        if (ref4.size() > 4) void'(ref4.pop_back());
      end
      @(negedge clk);
      update = 0;
      checks++;
      if (mask1 != ((last < 0) ? 32'd0 : (32'd1 << last))) begin
        failures++; $display("LU_1 mask %h, last %0d", mask1, last);
      end
      exp4 = '0;
      foreach (ref4[j]) exp4[ref4[j]] = 1'b1;
      checks++;
      if (mask4 != exp4) begin failures++; $display("LU_4 mask %h exp %h", mask4, exp4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
