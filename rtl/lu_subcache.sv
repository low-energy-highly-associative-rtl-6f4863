// One fully associative sub-cache with an integrated last-use predictor.
//
// The sub-cache holds LINES lines: a CAM tag store whose match lines drive
// the wordlines of the data RAM directly. The LU latches record the line(s)
// used last. An access first precharges and compares only the LU line(s);
// on a hit the RAM word is read or written in the same cycle, so a correctly
// predicted access costs one compare instead of LINES. If the LU search
// misses, Miss0 is latched, the access stalls, and the next cycle runs a
// full precharge and a full CAM search. A hit there updates the LU latches
// and accesses the RAM; no hit is a true miss, and the sub-cache waits for
// the refill line (a round-robin victim is replaced). The RAM is only
// accessed after the prediction is verified (no speculative RAM access).
//
// With DROWSY_EN = 1 every line outside the LU set is kept drowsy; a full
// search that hits a drowsy line spends one extra cycle waking it before the
// RAM access.
//
// Interface and timing (cycle 1 = the cycle req is high while idle):
//   LU hit            : resp_valid/rdata in cycle 2
//   LU miss, full hit : busy in cycle 2, resp_valid in cycle 3
//   ... drowsy line   : busy in cycles 2-3, resp_valid in cycle 4
//   true miss         : miss from cycle 3 until fill; resp_valid the cycle
//                       after fill
// req, we, tag, word_sel and wdata are only sampled in cycle 1; the sub-cache
// keeps its own copy for the later cycles. Writes are word writes, set the
// line's dirty bit, and on a miss are merged into the refilled line
// (write-back, write-allocate: this design's choice, the original scheme does not
// give a write policy). The victim choice is also this design's choice.
module lu_subcache
  import lu_cache_pkg::*;
#(
  parameter int unsigned LINES     = 32,
  parameter int unsigned TAG_W     = 22,
  parameter int unsigned LINE_W    = 256,
  parameter int unsigned WORD_W    = DC_WORD_W,
  parameter int unsigned LU_N      = 1,
  parameter bit          DROWSY_EN = 1'b0,
  localparam int unsigned IDX_W  = $clog2(LINES),
  localparam int unsigned WSEL_W = $clog2(LINE_W / WORD_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // access
  input  logic              req,
  input  logic              we,
  input  logic [TAG_W-1:0]  tag,
  input  logic [WSEL_W-1:0] word_sel,
  input  logic [WORD_W-1:0] wdata,
  output logic              busy,        // not idle: stalls further requests
  output logic              resp_valid,  // access done (one-cycle pulse)
  output logic [WORD_W-1:0] rdata,
  // true miss and refill
  output logic              miss,        // waiting for a refill
  output logic [TAG_W-1:0]  miss_tag,
  output logic              victim_dirty,
  output logic [TAG_W-1:0]  victim_tag,
  output logic [LINE_W-1:0] victim_line,
  input  logic              fill,
  input  logic [LINE_W-1:0] fill_line,
  // events, one-cycle pulses
  output logic              ev_lu_hit,
  output logic              ev_lu_miss,
  output logic              ev_true_miss,
  output logic              ev_wake,
  output logic [LINES-1:0]  drowsy       // low-leakage lines (0 if !DROWSY_EN)
);

  sc_state_e st_q, st_d;

  logic              q_we;
  logic [TAG_W-1:0]  q_tag;
  logic [WSEL_W-1:0] q_word;
  logic [WORD_W-1:0] q_wdata;
  logic [IDX_W-1:0]  wake_idx_q;
  logic [IDX_W-1:0]  rr_q;        // round-robin victim pointer
  logic [LINES-1:0]  dirty_q;

  logic [LINES-1:0]  lu_mask;
  logic [LINES-1:0]  search_en;
  logic [TAG_W-1:0]  search_tag;
  logic [LINES-1:0]  match;
  logic              hit, miss0, full_q, stall, true_miss;
  logic [IDX_W-1:0]  hit_idx;
  logic              vic_valid;

  logic              lu_search, full_search;
  logic              need_wake;

  // ---------------------------------------------------------------- search
  assign lu_search   = (st_q == SC_IDLE) && req;
  assign full_search = (st_q == SC_FULL);
  assign search_tag  = (st_q == SC_IDLE) ? tag : q_tag;

  always_comb begin
    search_en = '0;
    if (lu_search)   search_en = lu_mask;   // precharge LU line(s) only
    if (full_search) search_en = '1;        // full precharge
  end

  cam_tag_store #(.ENTRIES(LINES), .TAG_W(TAG_W)) u_cam (
    .clk, .rst_n,
    .search_tag, .search_en, .match,
    .wr_en (fill && st_q == SC_MISS),
    .wr_idx(rr_q),
    .wr_tag(q_tag),
    .rd_idx(rr_q),
    .rd_tag(victim_tag),
    .rd_valid(vic_valid)
  );

  lu_miss_detect #(.ENTRIES(LINES)) u_miss (
    .clk, .rst_n,
    .lu_search, .full_search, .match,
    .hit, .hit_idx, .miss0, .full_q, .stall, .true_miss
  );

  // ------------------------------------------------------------- LU latches
  logic             lu_upd;
  logic [IDX_W-1:0] lu_upd_idx;
  always_comb begin
    lu_upd     = 1'b0;
    lu_upd_idx = hit_idx;
    if ((lu_search || full_search) && hit) lu_upd = 1'b1;
    if (st_q == SC_MISS && fill) begin
      lu_upd     = 1'b1;
      lu_upd_idx = rr_q;
    end
  end

  lu_predictor #(.ENTRIES(LINES), .N(LU_N)) u_lu (
    .clk, .rst_n,
    .update (lu_upd),
    .upd_idx(lu_upd_idx),
    .lu_mask
  );

  // ---------------------------------------------------------- drowsy lines
  logic             wake;
  logic [IDX_W-1:0] wake_idx;
  assign wake     = (full_search && hit && need_wake) || (st_q == SC_MISS && fill);
  assign wake_idx = (st_q == SC_MISS) ? rr_q : hit_idx;

  if (DROWSY_EN) begin : g_drowsy
    drowsy_ctrl #(.LINES(LINES)) u_drowsy (
      .clk, .rst_n, .lu_mask, .wake, .wake_idx, .drowsy
    );
  end else begin : g_awake
    assign drowsy = '0;
  end

  assign need_wake = drowsy[hit_idx];

  // ------------------------------------------------------------- data RAM
  logic [LINES-1:0]  wl;
  logic              ram_acc, ram_we;
  logic [WSEL_W-1:0] ram_word;
  logic [WORD_W-1:0] ram_wdata, ram_rdata;
  logic [LINE_W-1:0] fill_merged;

  always_comb begin
    wl        = '0;
    ram_acc   = 1'b0;
    ram_we    = q_we;
    ram_word  = q_word;
    ram_wdata = q_wdata;
    unique case (st_q)
      SC_IDLE: begin
        wl        = match;                 // match lines are the wordlines
        ram_acc   = lu_search && hit;
        ram_we    = we;
        ram_word  = word_sel;
        ram_wdata = wdata;
      end
      SC_FULL: begin
        wl      = need_wake ? '0 : match;
        ram_acc = hit && !need_wake;
      end
      SC_WAKE: begin
        wl[wake_idx_q] = 1'b1;
        ram_acc        = 1'b1;
      end
      SC_MISS: ;
    endcase
  end

  always_comb begin
    fill_merged = fill_line;
    if (q_we) fill_merged[q_word*WORD_W +: WORD_W] = q_wdata;
  end

  line_ram #(.LINES(LINES), .LINE_W(LINE_W), .WORD_W(WORD_W)) u_ram (
    .clk,
    .wl,
    .word_sel  (ram_word),
    .rd_en     (ram_acc && !ram_we),
    .wr_en     (ram_acc && ram_we),
    .wdata     (ram_wdata),
    .rdata     (ram_rdata),
    .line_wr_en(st_q == SC_MISS && fill),
    .line_idx  (rr_q),
    .line_wdata(fill_merged),
    .line_rdata(victim_line)
  );

  // ------------------------------------------------------------- control
  always_comb begin
    st_d = st_q;
    unique case (st_q)
      SC_IDLE: if (miss0) st_d = SC_FULL;
      SC_FULL: begin
        if (true_miss)      st_d = SC_MISS;
        else if (need_wake) st_d = SC_WAKE;
        else                st_d = SC_IDLE;
      end
      SC_WAKE: st_d = SC_IDLE;
      SC_MISS: if (fill) st_d = SC_IDLE;
    endcase
  end

  logic              from_fill_q;
  logic [WORD_W-1:0] fill_word_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= SC_IDLE;
      rr_q        <= '0;
      dirty_q     <= '0;
      resp_valid  <= 1'b0;
      from_fill_q <= 1'b0;
    end else begin
      st_q       <= st_d;
      resp_valid <= ram_acc || (st_q == SC_MISS && fill);
      if (ram_acc) from_fill_q <= 1'b0;
      if (ram_acc && ram_we) dirty_q[(st_q == SC_WAKE) ? wake_idx_q : hit_idx] <= 1'b1;
      if (st_q == SC_MISS && fill) begin
        dirty_q[rr_q] <= q_we;
        rr_q          <= rr_q + 1'b1;
        from_fill_q   <= 1'b1;
      end
    end
  end

  // request copy for the cycles after the first, wake target, refill word
  always_ff @(posedge clk) begin
    if (lu_search) begin
      q_we    <= we;
      q_tag   <= tag;
      q_word  <= word_sel;
      q_wdata <= wdata;
    end
    if (full_search) wake_idx_q <= hit_idx;
    if (st_q == SC_MISS && fill) fill_word_q <= fill_merged[q_word*WORD_W +: WORD_W];
  end

  assign rdata        = from_fill_q ? fill_word_q : ram_rdata;
  assign busy         = (st_q != SC_IDLE);
  assign miss         = (st_q == SC_MISS);
  assign miss_tag     = q_tag;
  assign victim_dirty = vic_valid && dirty_q[rr_q];

  assign ev_lu_hit    = lu_search && hit;
  assign ev_lu_miss   = miss0;
  assign ev_true_miss = true_miss;
  assign ev_wake      = full_search && hit && need_wake;

  // ----------------------------------------------------------- assertions
  // only one match line can be high (a tag is stored once)
  a_onehot_match: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match));
  // the latched Miss0 and the full-search state agree
  a_full_latch: assert property (@(posedge clk) disable iff (!rst_n) full_q == (st_q == SC_FULL));
  // the RAM is never accessed on a drowsy line
  a_awake: assert property (@(posedge clk) disable iff (!rst_n) !(ram_acc && |(wl & drowsy)));
  // stall is raised exactly while the full search runs
  a_stall: assert property (@(posedge clk) disable iff (!rst_n) stall |-> busy);

endmodule
