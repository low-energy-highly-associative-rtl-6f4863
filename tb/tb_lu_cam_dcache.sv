// End-to-end testbench of lu_cam_dcache. Three caches run the same kind of
// traffic side by side: the 32 KB / 32-way / 32 B cache with drowsy lines
// enabled (4-cycle latency on a misprediction), a smaller 2 KB, 8-way
// cache (8 sub-caches) with the default LU_1 and no drowsy lines, driven
// with back-to-back requests, and the
// 32 KB cache with an LU_4 predictor and drowsy lines. See dcache_driver
// for what is checked.
module tb_lu_cam_dcache;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks + c_checks, a_fail + b_fail + c_fail + 1);
    $finish;
  end

  int a_checks, a_fail, b_checks, b_fail, c_checks, c_fail;
  logic a_done, b_done, c_done;

  // ---------------------------------------------- full size, drowsy lines
  logic a_req, a_we, a_ready, a_stall, a_rv, a_mreq, a_mwe, a_mack;
  logic a_hit, a_lmiss, a_tmiss, a_wake, a_wb;
  logic [31:0] a_addr, a_wdata, a_rdata, a_maddr;
  logic [255:0] a_mwdata, a_mrdata;

  lu_cam_dcache #(.DROWSY_EN(1'b1)) dut_a (
    .clk, .rst_n, .cpu_req(a_req), .cpu_we(a_we), .cpu_addr(a_addr), .cpu_wdata(a_wdata),
    .cpu_ready(a_ready), .cpu_stall(a_stall), .cpu_resp_valid(a_rv), .cpu_rdata(a_rdata),
    .mem_req(a_mreq), .mem_we(a_mwe), .mem_addr(a_maddr), .mem_wdata(a_mwdata),
    .mem_ack(a_mack), .mem_rdata(a_mrdata),
    .ev_lu_hit(a_hit), .ev_lu_miss(a_lmiss), .ev_true_miss(a_tmiss), .ev_wake(a_wake),
    .ev_writeback(a_wb));

  dcache_driver #(.DROWSY_EN(1'b1), .N_ACC(3000), .SEED(7)) drv_a (
    .clk, .rst_n, .cpu_req(a_req), .cpu_we(a_we), .cpu_addr(a_addr), .cpu_wdata(a_wdata),
    .cpu_ready(a_ready), .cpu_stall(a_stall), .cpu_resp_valid(a_rv), .cpu_rdata(a_rdata),
    .mem_req(a_mreq), .mem_we(a_mwe), .mem_addr(a_maddr), .mem_wdata(a_mwdata),
    .mem_ack(a_mack), .mem_rdata(a_mrdata),
    .ev_lu_hit(a_hit), .ev_lu_miss(a_lmiss), .ev_true_miss(a_tmiss), .ev_wake(a_wake),
    .ev_writeback(a_wb), .done(a_done), .checks(a_checks), .failures(a_fail));

  // ------------------------------------------------- 2 KB, 8-way, 8 sets
  logic b_req, b_we, b_ready, b_stall, b_rv, b_mreq, b_mwe, b_mack;
  logic b_hit, b_lmiss, b_tmiss, b_wake, b_wb;
  logic [31:0] b_addr, b_wdata, b_rdata, b_maddr;
  logic [255:0] b_mwdata, b_mrdata;

  lu_cam_dcache #(.CACHE_BYTES(2048), .WAYS(8)) dut_b (
    .clk, .rst_n, .cpu_req(b_req), .cpu_we(b_we), .cpu_addr(b_addr), .cpu_wdata(b_wdata),
    .cpu_ready(b_ready), .cpu_stall(b_stall), .cpu_resp_valid(b_rv), .cpu_rdata(b_rdata),
    .mem_req(b_mreq), .mem_we(b_mwe), .mem_addr(b_maddr), .mem_wdata(b_mwdata),
    .mem_ack(b_mack), .mem_rdata(b_mrdata),
    .ev_lu_hit(b_hit), .ev_lu_miss(b_lmiss), .ev_true_miss(b_tmiss), .ev_wake(b_wake),
    .ev_writeback(b_wb));

  dcache_driver #(.M(8), .WAYS(8), .TAGS(12), .PIPELINED(1'b1), .N_ACC(3000), .SEED(11)) drv_b (
    .clk, .rst_n, .cpu_req(b_req), .cpu_we(b_we), .cpu_addr(b_addr), .cpu_wdata(b_wdata),
    .cpu_ready(b_ready), .cpu_stall(b_stall), .cpu_resp_valid(b_rv), .cpu_rdata(b_rdata),
    .mem_req(b_mreq), .mem_we(b_mwe), .mem_addr(b_maddr), .mem_wdata(b_mwdata),
    .mem_ack(b_mack), .mem_rdata(b_mrdata),
    .ev_lu_hit(b_hit), .ev_lu_miss(b_lmiss), .ev_true_miss(b_tmiss), .ev_wake(b_wake),
    .ev_writeback(b_wb), .done(b_done), .checks(b_checks), .failures(b_fail));

  // ----------------------------------- full size, LU_4, drowsy lines
  logic c_req, c_we, c_ready, c_stall, c_rv, c_mreq, c_mwe, c_mack;
  logic c_hit, c_lmiss, c_tmiss, c_wake, c_wb;
  logic [31:0] c_addr, c_wdata, c_rdata, c_maddr;
  logic [255:0] c_mwdata, c_mrdata;

  lu_cam_dcache #(.LU_N(4), .DROWSY_EN(1'b1)) dut_c (
    .clk, .rst_n, .cpu_req(c_req), .cpu_we(c_we), .cpu_addr(c_addr), .cpu_wdata(c_wdata),
    .cpu_ready(c_ready), .cpu_stall(c_stall), .cpu_resp_valid(c_rv), .cpu_rdata(c_rdata),
    .mem_req(c_mreq), .mem_we(c_mwe), .mem_addr(c_maddr), .mem_wdata(c_mwdata),
    .mem_ack(c_mack), .mem_rdata(c_mrdata),
    .ev_lu_hit(c_hit), .ev_lu_miss(c_lmiss), .ev_true_miss(c_tmiss), .ev_wake(c_wake),
    .ev_writeback(c_wb));

  dcache_driver #(.LU_N(4), .DROWSY_EN(1'b1), .N_ACC(3000), .REUSE_PCT(30), .SEED(5)) drv_c (
    .clk, .rst_n, .cpu_req(c_req), .cpu_we(c_we), .cpu_addr(c_addr), .cpu_wdata(c_wdata),
    .cpu_ready(c_ready), .cpu_stall(c_stall), .cpu_resp_valid(c_rv), .cpu_rdata(c_rdata),
    .mem_req(c_mreq), .mem_we(c_mwe), .mem_addr(c_maddr), .mem_wdata(c_mwdata),
    .mem_ack(c_mack), .mem_rdata(c_mrdata),
    .ev_lu_hit(c_hit), .ev_lu_miss(c_lmiss), .ev_true_miss(c_tmiss), .ev_wake(c_wake),
    .ev_writeback(c_wb), .done(c_done), .checks(c_checks), .failures(c_fail));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (a_done && b_done && c_done);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks + c_checks, a_fail + b_fail + c_fail);
    $finish;
  end
endmodule
