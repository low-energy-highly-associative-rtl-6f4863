// Self-checking testbench for drowsy_ctrl: lines outside the LU set must be
// drowsy one cycle after they leave it, LU lines and woken lines normal.
module tb_drowsy_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] lu_mask = '0, drowsy;
  logic wake = 0;
  logic [4:0] wake_idx = '0;
  logic [31:0] expd;

  drowsy_ctrl dut (.clk, .rst_n, .lu_mask, .wake, .wake_idx, .drowsy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++;
    if (drowsy != '1) begin failures++; $display("not all drowsy in reset"); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      lu_mask  = 32'd1 << $urandom_range(0, 31);
      if (k % 5 == 0) lu_mask |= 32'd1 << $urandom_range(0, 31);
      wake     = ($urandom % 2) == 1;
      wake_idx = 5'($urandom_range(0, 31));
      expd = ~lu_mask;
      if (wake) expd[wake_idx] = 1'b0;
      @(negedge clk);
      checks++;
      if (drowsy != expd) begin failures++; $display("drowsy %h exp %h", drowsy, expd); end
      wake = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
