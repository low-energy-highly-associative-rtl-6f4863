// Stimulus, main memory and reference model for end-to-end tests of
// lu_cam_dcache. It plays an in-order processor that issues one word access
// at a time, with locality: most accesses go to a few hot sub-caches and
// often reuse the line used last; a pool of TAGS tags per sub-cache, more
// than its WAYS lines, forces replacements and write-backs.
// Checks, per access: the read data against a flat golden memory; the LU
// outcome (hit / misprediction / true miss) against a model of every
// sub-cache's tags, last LU_N lines and round-robin pointer; the latency (2 cycles
// on an LU hit, 3 on a misprediction, 4 if the line was drowsy, MEM_LAT + 4
// on a clean miss, 2 * MEM_LAT + 4 with a write-back); that written-back
// lines hold the latest data. At the end every mechanism must have occurred.
// With PIPELINED = 1 a new access is offered in the cycle after the previous
// one was taken, so LU hits follow each other back to back (one access per
// cycle); this mode is meant for caches without drowsy lines, whose
// misprediction latency does not depend on how recently a line left the LU
// set.
module dcache_driver
  import tb_dcache_pkg::*;
#(
  parameter int M          = 32,
  parameter int WAYS       = 32,
  parameter int LINE_BYTES = 32,
  parameter bit DROWSY_EN  = 1'b0,
  parameter int LU_N       = 1,
  parameter bit PIPELINED  = 1'b0,
  parameter int N_ACC      = 2000,
  parameter int HOT_SETS   = 4,
  parameter int TAGS       = 40,
  parameter int REUSE_PCT  = 60,
  parameter int MEM_LAT    = 80,
  parameter int SEED       = 1,
  localparam int LINE_W    = LINE_BYTES * 8,
  localparam int OFF_W     = $clog2(LINE_BYTES),
  localparam int SET_W     = $clog2(M)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              cpu_req,
  output logic              cpu_we,
  output logic [31:0]       cpu_addr,
  output logic [31:0]       cpu_wdata,
  input  logic              cpu_ready,
  input  logic              cpu_stall,
  input  logic              cpu_resp_valid,
  input  logic [31:0]       cpu_rdata,
  input  logic              mem_req,
  input  logic              mem_we,
  input  logic [31:0]       mem_addr,
  input  logic [LINE_W-1:0] mem_wdata,
  output logic              mem_ack,
  output logic [LINE_W-1:0] mem_rdata,
  input  logic              ev_lu_hit,
  input  logic              ev_lu_miss,
  input  logic              ev_true_miss,
  input  logic              ev_wake,
  input  logic              ev_writeback,
  output logic              done,
  output int                checks,
  output int                failures
);
  int n_reads, n_writes;
  main_memory_model #(.LINE_W(LINE_W), .LAT(MEM_LAT)) u_mem (
    .clk, .rst_n, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .n_reads, .n_writes);

  // golden memory: latest value of every word written by the processor
  logic [31:0] golden [logic [31:0]];
  function automatic logic [31:0] gold(logic [31:0] a);
    return golden.exists(a) ? golden[a] : init_word(a);
  endfunction

  // reference model of the sub-caches
  logic [31:0] m_tag   [M][WAYS];
  bit          m_valid [M][WAYS];
  bit          m_dirty [M][WAYS];
  int          m_lu [M][$];   // last LU_N distinct lines, most recent first
  int          m_rr [M];

  // event counters
  int c_lu_hit = 0, c_lu_miss = 0, c_true_miss = 0, c_wake = 0, c_wb = 0, c_stall = 0;
  // accesses taken on two consecutive clock edges
  int c_b2b = 0;
  bit took_q = 0;
  always @(posedge clk) begin
    if (took_q && cpu_req && cpu_ready) c_b2b++;
    took_q <= cpu_req && cpu_ready;
  end

  always @(posedge clk) if (rst_n) begin
    c_lu_hit    += int'(ev_lu_hit);
    c_lu_miss   += int'(ev_lu_miss);
    c_true_miss += int'(ev_true_miss);
    c_wake      += int'(ev_wake);
    c_wb        += int'(ev_writeback);
    c_stall     += int'(cpu_stall);
  end

  // written-back lines must hold the latest data
  always @(posedge clk) if (mem_req && mem_we && mem_ack) begin
    for (int w = 0; w < LINE_W / 32; w++) begin
      checks++;
      if (mem_wdata[w*32 +: 32] != gold(mem_addr + 32'(4 * w))) begin
        failures++; $display("write-back of %h word %0d holds stale data", mem_addr, w);
      end
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int e_lu_hit = 0, e_mispred = 0, e_miss = 0, e_wb = 0;

  // accesses taken by the cache and not yet answered, oldest first
  typedef struct {
    int          lat;
    logic        we;
    logic [31:0] addr;
    logic [31:0] data;
    longint      taken;
  } pend_t;
  pend_t pending [$];

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // responses come back in order; check latency and read data
  always @(negedge clk) if (rst_n && cpu_resp_valid) begin
    pend_t p;
    check(pending.size() > 0, "response without an access");
    if (pending.size() > 0) begin
      p = pending.pop_front();
      check(cyc - p.taken + 1 == longint'(p.lat),
            $sformatf("latency %0d for %h, expected %0d at %0t", cyc - p.taken + 1, p.addr, p.lat, $time));
      if (!p.we) check(cpu_rdata == p.data,
                       $sformatf("read %h: %h, expected %h", p.addr, cpu_rdata, p.data));
    end
  end

  task automatic access(input logic we, input logic [31:0] addr, input logic [31:0] wd);
    int s = int'(addr[OFF_W +: SET_W]);
    logic [31:0] t = addr >> (OFF_W + SET_W);
    int hw = -1, exp_lat;
    bit lu_hit, wb;
    for (int i = 0; i < WAYS; i++) if (m_valid[s][i] && m_tag[s][i] == t) hw = i;
    lu_hit = 0;
    foreach (m_lu[s][j]) if (hw >= 0 && m_lu[s][j] == hw) lu_hit = 1;
    if (hw < 0) begin
      int v = m_rr[s];
      wb = m_valid[s][v] && m_dirty[s][v];
      exp_lat = wb ? 2 * MEM_LAT + 4 : MEM_LAT + 4;
      m_tag[s][v] = t; m_valid[s][v] = 1; m_dirty[s][v] = 0;
      m_rr[s] = (v + 1) % WAYS;
      hw = v;
      e_miss++;
      if (wb) e_wb++;
    end else if (lu_hit) begin
      exp_lat = 2; e_lu_hit++;
    end else begin
      exp_lat = DROWSY_EN ? 4 : 3; e_mispred++;
    end
    foreach (m_lu[s][j]) if (m_lu[s][j] == hw) begin m_lu[s].delete(j); break; end
    m_lu[s].push_front(hw);
    if (m_lu[s].size() > LU_N) void'(m_lu[s].pop_back());
    if (we) m_dirty[s][hw] = 1;

    // sequential mode: one cycle gap after the previous response;
    // pipelined mode: the request is driven in the cycle after the previous
    // one was taken, and held until the cache is ready
    if (!PIPELINED) @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = addr; cpu_wdata = wd;
    #1;
    if (!PIPELINED) check(cpu_ready, "cache not ready for a new access");
    while (!cpu_ready) begin @(negedge clk); #1; end
    check(ev_lu_hit == lu_hit && ev_lu_miss == !lu_hit,
          $sformatf("LU outcome for %h: hit=%b expected %b", addr, ev_lu_hit, lu_hit));
    if (we) golden[addr] = wd;
    pending.push_back('{lat: exp_lat, we: we, addr: addr, data: gold(addr), taken: 0});
    @(negedge clk);
    pending[pending.size() - 1].taken = cyc;   // the edge that took the request
    cpu_req = 0; cpu_we = 0; cpu_addr = $urandom; cpu_wdata = $urandom;
    if (!PIPELINED) wait (pending.size() == 0);
  endtask

  initial begin
    logic [31:0] last;
    void'($urandom(SEED));
    checks = 0; failures = 0; done = 0;
    cpu_req = 0; cpu_we = 0; cpu_addr = '0; cpu_wdata = '0;
    for (int s = 0; s < M; s++) begin
      m_lu[s].delete(); m_rr[s] = 0;
      for (int i = 0; i < WAYS; i++) begin m_valid[s][i] = 0; m_dirty[s][i] = 0; end
    end
    last = 32'h0040_0000;
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    for (int k = 0; k < N_ACC; k++) begin
      logic [31:0] a;
      int s;
      if ($urandom_range(0, 99) < REUSE_PCT) begin
        a = last;
      end else begin
        s = ($urandom_range(0, 99) < 70) ? $urandom_range(0, HOT_SETS - 1) : $urandom_range(0, M - 1);
        a = (32'($urandom_range(0, TAGS - 1) * 13 + 1) << (OFF_W + SET_W)) | 32'(s << OFF_W);
      end
      a = {a[31:OFF_W], OFF_W'($urandom_range(0, LINE_BYTES / 4 - 1) * 4)};
      access(($urandom_range(0, 99) < 30), a, $urandom);
      last = a;
    end
    wait (pending.size() == 0);
    repeat (2) @(negedge clk);
    $display("accesses %0d: LU hits %0d (%0d%%), mispredictions %0d, true misses %0d, write-backs %0d, wake-ups %0d, stall cycles %0d, back-to-back %0d",
             N_ACC, c_lu_hit, c_lu_hit * 100 / N_ACC, c_lu_miss - c_true_miss, c_true_miss, c_wb, c_wake, c_stall, c_b2b);
    // tag compares: LU_N per access, plus WAYS for every full search,
    // against WAYS per access for a cache without prediction
    $display("tag compares %0d against %0d without LU prediction (%0d%% saved)",
             LU_N * N_ACC + WAYS * c_lu_miss, WAYS * N_ACC,
             100 - (LU_N * N_ACC + WAYS * c_lu_miss) * 100 / (WAYS * N_ACC));
    check(c_lu_hit == e_lu_hit, "LU hit count");
    check(c_lu_miss == e_mispred + e_miss, "LU miss count");
    check(c_true_miss == e_miss, "true miss count");
    check(c_wb == e_wb && n_writes == e_wb, "write-back count");
    check(n_reads == e_miss, "refill count");
    check(c_wake == (DROWSY_EN ? e_mispred : 0), "wake-up count");
    // every mechanism must have happened at least once
    check(c_lu_hit > 0, "no LU hit");
    check(c_lu_miss - c_true_miss > 0, "no LU misprediction");
    check(c_true_miss > 0, "no true miss");
    check(c_wb > 0, "no write-back");
    check(c_stall > 0, "no pipeline stall");
    if (DROWSY_EN) check(c_wake > 0, "no drowsy wake-up");
    if (PIPELINED) check(c_b2b > 0, "no back-to-back accesses");
    else           check(c_b2b == 0, "back-to-back accesses in sequential mode");
    done = 1;
  end
endmodule
