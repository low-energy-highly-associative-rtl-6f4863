// Self-checking testbench for cache_miss_ctrl: a waiting sub-cache is
// emulated; the testbench plays main memory with an 80-cycle latency and
// checks the write-back of a dirty victim, the line read address, the fill
// line and the number of cycles the refill takes.
module tb_cache_miss_ctrl;
  localparam int LAT = 80;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic miss = 0, victim_dirty = 0, fill, mem_req, mem_we, mem_ack = 0, ev_writeback;
  logic [4:0] set_idx = '0;
  logic [21:0] miss_tag = '0, victim_tag = '0;
  logic [255:0] victim_line = '0, fill_line, mem_wdata, mem_rdata = '0;
  logic [31:0] mem_addr;

  cache_miss_ctrl dut (.clk, .rst_n, .miss, .set_idx, .miss_tag, .victim_dirty,
    .victim_tag, .victim_line, .fill, .fill_line, .mem_req, .mem_we, .mem_addr,
    .mem_wdata, .mem_ack, .mem_rdata, .ev_writeback);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one memory transaction: wait for a request, check it, ack after LAT
  task automatic serve(input logic exp_we, input logic [31:0] exp_addr,
                       input logic [255:0] exp_wdata, input logic [255:0] rd_line);
    int guard = 0;
    while (!mem_req && guard < 10) begin @(negedge clk); guard++; end
    checks++;
    if (!mem_req || mem_we != exp_we || mem_addr != exp_addr) begin
      failures++; $display("request we=%b addr=%h, expected we=%b addr=%h", mem_we, mem_addr, exp_we, exp_addr);
    end
    if (exp_we) begin
      checks++;
      if (mem_wdata != exp_wdata) begin failures++; $display("write-back data mismatch"); end
    end
    repeat (LAT - 1) @(negedge clk);
    mem_ack = 1; mem_rdata = rd_line;
    #1;
    checks++;
    if (!exp_we && (!fill || fill_line != rd_line)) begin failures++; $display("fill missing"); end
    if (exp_we && (fill || !ev_writeback)) begin failures++; $display("write-back ack wrong"); end
    @(negedge clk);
    mem_ack = 0;
  endtask

  initial begin
    logic [255:0] l1, l2;
    int t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      checks++;
      if (mem_req || fill) begin failures++; $display("activity without a miss"); end
      for (int i = 0; i < 8; i++) begin l1[i*32 +: 32] = $urandom; l2[i*32 +: 32] = $urandom; end
      set_idx = 5'($urandom); miss_tag = 22'($urandom); victim_tag = 22'($urandom);
      victim_line = l1; victim_dirty = k[0];
      miss = 1;
      t0 = $time;
      @(negedge clk);
      if (victim_dirty) serve(1'b1, {victim_tag, set_idx, 5'd0}, l1, '0);
      serve(1'b0, {miss_tag, set_idx, 5'd0}, '0, l2);
      miss = 0;
      // refill time: one cycle to see the miss, then LAT per transaction
      checks++;
      if (($time - t0) / 10 != 1 + LAT * (victim_dirty ? 2 : 1)) begin
        failures++; $display("refill took %0d cycles", ($time - t0) / 10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
