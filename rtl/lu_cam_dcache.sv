// Low-energy, highly associative CAM-tag data cache with last-use
// prediction: top level.
//
// A CACHE_BYTES cache of WAYS-way associativity and LINE_BYTES lines is
// split into M = CACHE_BYTES / (WAYS * LINE_BYTES) sub-caches (32 at the
// default 32 KB / 32-way / 32 B). An address decoder picks the sub-cache
// from log2(M) address bits; each sub-cache is a fully associative cache
// with a CAM tag store, a data RAM driven by the match lines, and last-use
// (LU) latches that restrict the first tag search to the line used last.
// A refill controller serves true misses from main memory.
//
// Processor port (single outstanding access, in-order pipeline):
//   cpu_req/cpu_we/cpu_addr/cpu_wdata are taken in a cycle where cpu_ready
//   is high. Cycle 1 does the LU search and the RAM access; cycle 2
//   transfers the data to the processor register, so cpu_resp_valid and
//   cpu_rdata appear 2 clock edges after the request edge on an LU hit,
//   3 after an LU misprediction (cpu_stall is high while the full search
//   runs), 4 with DROWSY_EN when the hit line was drowsy, and after the
//   refill on a true miss. Writes also produce cpu_resp_valid.
// Memory port: line-wide request/acknowledge, see cache_miss_ctrl.
// Events: one-cycle pulses per LU hit, LU misprediction, true miss, wake-up
// of a drowsy line and dirty write-back, for energy and performance
// accounting.
// Organisation, sizes and latencies follow the original scheme; word-only
// accesses, the write-back policy, round-robin replacement and the port
// handshakes are this design's choices.
module lu_cam_dcache
  import lu_cache_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = DC_CACHE_BYTES,
  parameter int unsigned WAYS        = DC_WAYS,
  parameter int unsigned LINE_BYTES  = DC_LINE_BYTES,
  parameter int unsigned LU_N        = 1,
  parameter bit          DROWSY_EN   = 1'b0,
  localparam int unsigned ADDR_W = DC_ADDR_W,
  localparam int unsigned WORD_W = DC_WORD_W,
  localparam int unsigned M      = CACHE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned SET_W  = $clog2(M),
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES),
  localparam int unsigned LINE_W = LINE_BYTES * 8,
  localparam int unsigned TAG_W  = ADDR_W - SET_W - OFF_W,
  localparam int unsigned WSEL_W = $clog2(LINE_W / WORD_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic [WORD_W-1:0] cpu_wdata,
  output logic              cpu_ready,
  output logic              cpu_stall,
  output logic              cpu_resp_valid,
  output logic [WORD_W-1:0] cpu_rdata,
  // main memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [LINE_W-1:0] mem_wdata,
  input  logic              mem_ack,
  input  logic [LINE_W-1:0] mem_rdata,
  // events
  output logic              ev_lu_hit,
  output logic              ev_lu_miss,
  output logic              ev_true_miss,
  output logic              ev_wake,
  output logic              ev_writeback
);

  logic              accept;
  logic [M-1:0]      sel;
  logic [SET_W-1:0]  set_idx;
  logic [TAG_W-1:0]  tag;
  logic [WSEL_W-1:0] word_sel;
  logic [SET_W-1:0]  cur_q;          // sub-cache of the current access

  subcache_decoder #(
    .ADDR_W(ADDR_W), .M(M), .LINE_BYTES(LINE_BYTES), .WORD_BYTES(WORD_W / 8)
  ) u_dec (
    .addr(cpu_addr), .en(accept), .sel, .set_idx, .tag, .word_sel
  );

  logic [M-1:0]      sc_busy, sc_resp, sc_miss, sc_vdirty, sc_fill;
  logic [M-1:0]      sc_lu_hit, sc_lu_miss, sc_true_miss, sc_wake;
  logic [WORD_W-1:0] sc_rdata    [M];
  logic [TAG_W-1:0]  sc_miss_tag [M];
  logic [TAG_W-1:0]  sc_vtag     [M];
  logic [LINE_W-1:0] sc_vline    [M];

  logic              fill;
  logic [LINE_W-1:0] fill_line;

  for (genvar s = 0; s < M; s++) begin : g_sc
    logic [WAYS-1:0] drowsy_unused;
    lu_subcache #(
      .LINES(WAYS), .TAG_W(TAG_W), .LINE_W(LINE_W), .WORD_W(WORD_W),
      .LU_N(LU_N), .DROWSY_EN(DROWSY_EN)
    ) u_sc (
      .clk, .rst_n,
      .req         (sel[s]),
      .we          (cpu_we),
      .tag,
      .word_sel,
      .wdata       (cpu_wdata),
      .busy        (sc_busy[s]),
      .resp_valid  (sc_resp[s]),
      .rdata       (sc_rdata[s]),
      .miss        (sc_miss[s]),
      .miss_tag    (sc_miss_tag[s]),
      .victim_dirty(sc_vdirty[s]),
      .victim_tag  (sc_vtag[s]),
      .victim_line (sc_vline[s]),
      .fill        (sc_fill[s]),
      .fill_line,
      .ev_lu_hit   (sc_lu_hit[s]),
      .ev_lu_miss  (sc_lu_miss[s]),
      .ev_true_miss(sc_true_miss[s]),
      .ev_wake     (sc_wake[s]),
      .drowsy      (drowsy_unused)
    );
    assign sc_fill[s] = fill && (cur_q == SET_W'(s));
  end

  assign cpu_ready = ~|sc_busy;
  assign cpu_stall = |sc_busy;
  assign accept    = cpu_req && cpu_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cur_q <= '0;
    else if (accept) cur_q <= set_idx;
  end

  // data transfer cycle to the processor
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cpu_resp_valid <= 1'b0;
    else        cpu_resp_valid <= sc_resp[cur_q];
  end
  always_ff @(posedge clk) begin
    if (sc_resp[cur_q]) cpu_rdata <= sc_rdata[cur_q];
  end

  cache_miss_ctrl #(
    .ADDR_W(ADDR_W), .SET_W(SET_W), .OFF_W(OFF_W), .LINE_W(LINE_W)
  ) u_mc (
    .clk, .rst_n,
    .miss        (sc_miss[cur_q]),
    .set_idx     (cur_q),
    .miss_tag    (sc_miss_tag[cur_q]),
    .victim_dirty(sc_vdirty[cur_q]),
    .victim_tag  (sc_vtag[cur_q]),
    .victim_line (sc_vline[cur_q]),
    .fill,
    .fill_line,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .ev_writeback
  );

  assign ev_lu_hit    = |sc_lu_hit;
  assign ev_lu_miss   = |sc_lu_miss;
  assign ev_true_miss = |sc_true_miss;
  assign ev_wake      = |sc_wake;

  // only one access is outstanding, so at most one sub-cache is busy
  a_one_busy: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sc_busy));

endmodule
