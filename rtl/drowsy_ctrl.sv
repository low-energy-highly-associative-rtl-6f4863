// Drowsy-mode control of the lines of one sub-cache (static energy).
//
// Each line (data and tag) is either in normal mode or in a drowsy,
// low-leakage mode. Lines marked by the LU predictor are kept in normal
// mode; every other line is put in drowsy mode. A drowsy line must be woken
// before its data can be read or written, which costs one clock cycle:
// wake/wake_idx request it, and the line is normal from the next cycle on.
// A line leaving the LU set goes drowsy one cycle after lu_mask drops it.
// drowsy[i] = 1 means line i is in the low-leakage state. After reset all
// lines are drowsy. The policy (LU lines normal, others drowsy, one-cycle
// wake-up) is the original scheme's; the register-level timing is this design's.
module drowsy_ctrl #(
  parameter int unsigned LINES = 32,
  localparam int unsigned IDX_W = $clog2(LINES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LINES-1:0] lu_mask,
  input  logic             wake,
  input  logic [IDX_W-1:0] wake_idx,
  output logic [LINES-1:0] drowsy
);

  logic [LINES-1:0] awake_next;
  always_comb begin
    awake_next = lu_mask;
    if (wake) awake_next[wake_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drowsy <= '1;
    else        drowsy <= ~awake_next;
  end

endmodule
