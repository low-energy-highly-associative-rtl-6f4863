// Last-use (LU) predictor of one sub-cache (the LU_i latches).
//
// The predictor remembers which line(s) of the fully associative sub-cache
// were used last and offers them as the lines to search first: lu_mask[i]
// is the LU_i bit that enables precharge of match line i. With N = 1 (the
// LU_1 predictor evaluated for the original scheme) exactly one line is marked, the
// line of the last access. For N > 1 (the generalised LU_n predictor) the
// last N distinct lines are kept in most-recently-used order: a line already
// in the list moves to the front, otherwise it is inserted at the front and
// the oldest entry drops out.
// Timing: update/upd_idx are sampled on the rising clock edge; lu_mask is a
// registered output, valid in the cycle after the update. Reset empties the
// list (mask all zero), so the first access after reset is an LU miss; the
// reset state is this design's choice.
module lu_predictor #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned N       = 1,     // order of the LU_n predictor
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               update,      // an access resolved to a line
  input  logic [IDX_W-1:0]   upd_idx,     // the line that was used
  output logic [ENTRIES-1:0] lu_mask      // LU_i bits
);

  logic [IDX_W-1:0] idx_q [N];
  logic [N-1:0]     vld_q;

  // position of upd_idx in the list; N means "not present"
  logic [$clog2(N+1)-1:0] pos;
  always_comb begin
    pos = ($clog2(N+1))'(N);
    for (int i = N - 1; i >= 0; i--)
      if (vld_q[i] && idx_q[i] == upd_idx) pos = ($clog2(N+1))'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      for (int i = 0; i < N; i++) idx_q[i] <= '0;
    end else if (update) begin
      // entries in front of the hit position (or all, if absent) shift back
      for (int i = 1; i < N; i++) begin
        if (i <= int'(pos) || int'(pos) == N) begin
          idx_q[i] <= idx_q[i-1];
          vld_q[i] <= vld_q[i-1];
        end
      end
      idx_q[0] <= upd_idx;
      vld_q[0] <= 1'b1;
    end
  end

  always_comb begin
    lu_mask = '0;
    for (int i = 0; i < N; i++)
      if (vld_q[i]) lu_mask[idx_q[i]] = 1'b1;
  end

endmodule
