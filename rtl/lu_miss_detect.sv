// LU miss detection and stall logic of one sub-cache.
//
// During the first (LU) search only the predicted line(s) are compared, so a
// low OR of all match lines (the 32-input OR giving Miss0) means the
// prediction failed. Miss0 is latched at the clock edge; the latched value
// (Missl) starts a full precharge and full CAM search in the next cycle and
// is also the stall signal to the in-order pipeline. If the full search
// finds no match either, a true miss is reported. The module also encodes
// the one-hot match lines into a line index for the LU latches.
// Timing: hit, hit_idx, miss0 and true_miss are combinational; full_q is
// registered. The Miss0 latch is built as a flip-flop here.
module lu_miss_detect #(
  parameter int unsigned ENTRIES = 32,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               lu_search,   // LU-only search in this cycle
  input  logic               full_search, // full search in this cycle
  input  logic [ENTRIES-1:0] match,
  output logic               hit,         // some match line is high
  output logic [IDX_W-1:0]   hit_idx,
  output logic               miss0,       // LU misprediction (or miss)
  output logic               full_q,      // latched Miss0: full search next
  output logic               stall,       // stall to the processor pipeline
  output logic               true_miss    // full search found nothing
);

  assign hit       = |match;
  assign miss0     = lu_search && !hit;
  assign true_miss = full_search && !hit;

  always_comb begin
    hit_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (match[i]) hit_idx = IDX_W'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) full_q <= 1'b0;
    else        full_q <= miss0;
  end

  assign stall = full_q;

endmodule
