// Full-size testbench: lu_cam_dcache with all parameters at their defaults
// (32 KB, 32-way, 32-byte lines, 32 sub-caches, LU_1, no drowsy lines),
// driven by dcache_driver for 4000 word accesses with an 80-cycle main
// memory. Checks data, LU outcomes, latencies and event counts.
module tb_dcache_full_size;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks, failures;
  logic done;

  logic req, we, ready, stall, rv, mreq, mwe, mack;
  logic hit, lmiss, tmiss, wake, wb;
  logic [31:0] addr, wdata, rdata, maddr;
  logic [255:0] mwdata, mrdata;

  lu_cam_dcache dut (
    .clk, .rst_n, .cpu_req(req), .cpu_we(we), .cpu_addr(addr), .cpu_wdata(wdata),
    .cpu_ready(ready), .cpu_stall(stall), .cpu_resp_valid(rv), .cpu_rdata(rdata),
    .mem_req(mreq), .mem_we(mwe), .mem_addr(maddr), .mem_wdata(mwdata),
    .mem_ack(mack), .mem_rdata(mrdata),
    .ev_lu_hit(hit), .ev_lu_miss(lmiss), .ev_true_miss(tmiss), .ev_wake(wake),
    .ev_writeback(wb));

  dcache_driver #(.N_ACC(4000), .HOT_SETS(6), .TAGS(44), .SEED(3)) drv (
    .clk, .rst_n, .cpu_req(req), .cpu_we(we), .cpu_addr(addr), .cpu_wdata(wdata),
    .cpu_ready(ready), .cpu_stall(stall), .cpu_resp_valid(rv), .cpu_rdata(rdata),
    .mem_req(mreq), .mem_we(mwe), .mem_addr(maddr), .mem_wdata(mwdata),
    .mem_ack(mack), .mem_rdata(mrdata),
    .ev_lu_hit(hit), .ev_lu_miss(lmiss), .ev_true_miss(tmiss), .ev_wake(wake),
    .ev_writeback(wb), .done, .checks, .failures);

  initial begin
    repeat (1000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
