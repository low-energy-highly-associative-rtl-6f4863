// Refill and write-back controller for a true miss.
//
// When the sub-cache that is being accessed reports a true miss (after its
// full CAM search found nothing), this controller fetches the missing line
// from main memory and hands it to the sub-cache as a fill. If the victim
// line the sub-cache will replace is dirty, it is first written back. The
// memory port moves whole lines: mem_req is held with a stable address and
// data until mem_ack, which is a one-cycle pulse; on a read, mem_rdata is
// valid with mem_ack. fill is raised combinationally in the cycle of the
// read acknowledge, so the sub-cache takes the line at that clock edge.
// The original scheme only gives main memory an 80-cycle latency and
// no L2 cache; the write-back policy and this line-wide
// request/acknowledge port are this design's choices.
module cache_miss_ctrl
  import lu_cache_pkg::*;
#(
  parameter int unsigned ADDR_W     = DC_ADDR_W,
  parameter int unsigned SET_W      = 5,
  parameter int unsigned OFF_W      = 5,
  parameter int unsigned LINE_W     = 256,
  localparam int unsigned TAG_W     = ADDR_W - SET_W - OFF_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the sub-cache being accessed
  input  logic              miss,
  input  logic [SET_W-1:0]  set_idx,
  input  logic [TAG_W-1:0]  miss_tag,
  input  logic              victim_dirty,
  input  logic [TAG_W-1:0]  victim_tag,
  input  logic [LINE_W-1:0] victim_line,
  output logic              fill,
  output logic [LINE_W-1:0] fill_line,
  // main memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [LINE_W-1:0] mem_wdata,
  input  logic              mem_ack,
  input  logic [LINE_W-1:0] mem_rdata,
  // event: a dirty victim was written back (one-cycle pulse)
  output logic              ev_writeback
);

  mc_state_e st_q, st_d;

  always_comb begin
    st_d = st_q;
    unique case (st_q)
      MC_IDLE: if (miss) st_d = victim_dirty ? MC_WB : MC_RD;
      MC_WB:   if (mem_ack) st_d = MC_RD;
      MC_RD:   if (mem_ack) st_d = MC_IDLE;
      default: st_d = MC_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_q <= MC_IDLE;
    else        st_q <= st_d;
  end

  assign mem_req   = (st_q == MC_WB) || (st_q == MC_RD);
  assign mem_we    = (st_q == MC_WB);
  assign mem_addr  = (st_q == MC_WB) ? {victim_tag, set_idx, OFF_W'(0)}
                                     : {miss_tag,   set_idx, OFF_W'(0)};
  assign mem_wdata = victim_line;

  assign fill         = (st_q == MC_RD) && mem_ack;
  assign fill_line    = mem_rdata;
  assign ev_writeback = (st_q == MC_WB) && mem_ack;

  // a request is held, unchanged, until it is acknowledged
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req && !mem_ack) |=> (mem_req && $stable(mem_addr) && $stable(mem_we)));
  // the controller only works for a sub-cache that is waiting
  a_miss_pending: assert property (@(posedge clk) disable iff (!rst_n) mem_req |-> miss);

endmodule
