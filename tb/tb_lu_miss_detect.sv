// Self-checking testbench for lu_miss_detect: random match patterns in LU
// and full searches; checks Miss0, the latched full-search request (one
// cycle later), stall, true miss and the encoded hit line.
module tb_lu_miss_detect;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic lu_search = 0, full_search = 0;
  logic [31:0] match = '0;
  logic hit, miss0, full_q, stall, true_miss;
  logic [4:0] hit_idx;

  lu_miss_detect dut (.clk, .rst_n, .lu_search, .full_search, .match,
                      .hit, .hit_idx, .miss0, .full_q, .stall, .true_miss);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic prev_miss0;
  initial begin
    prev_miss0 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      int line;
      @(negedge clk);
      checks++;
      if (full_q != prev_miss0 || stall != prev_miss0) begin
        failures++; $display("latched miss %b expected %b", full_q, prev_miss0);
      end
      lu_search   = (k % 2) == 0;
      full_search = !lu_search;
      line  = $urandom_range(0, 31);
      match = ($urandom % 2) ? (32'd1 << line) : 32'd0;
      #1;
      checks++;
      if (hit != (match != 0)) failures++;
      checks++;
      if (miss0 != (lu_search && match == 0)) begin failures++; $display("miss0 wrong"); end
      checks++;
      if (true_miss != (full_search && match == 0)) begin failures++; $display("true_miss wrong"); end
      if (match != 0) begin
        checks++;
        if (hit_idx != 5'(line)) begin failures++; $display("hit_idx %0d exp %0d", hit_idx, line); end
      end
      prev_miss0 = lu_search && match == 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
