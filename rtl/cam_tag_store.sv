// CAM tag store of one sub-cache.
//
// ENTRIES tags of TAG_W bits, each with a valid bit. A search compares the
// search tag with every entry in parallel and raises one match line
// (Match_i) per entry. In the circuit a match line is precharged and then
// discharged on a mismatch; here search_en[i] stands for the precharge of
// line i: an entry whose match line is not precharged never reports a match
// and spends no compare energy. The LU predictor drives search_en with the
// last-used line(s); after an LU miss all lines are enabled. At most one
// match line can be high, because a tag is stored at most once.
// Timing: match is combinational from search_tag/search_en; writes and the
// valid bits are updated on the rising clock edge. Reset clears the valid
// bits (reset behaviour is this design's choice).
module cam_tag_store #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned TAG_W   = 22,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // search
  input  logic [TAG_W-1:0]   search_tag,
  input  logic [ENTRIES-1:0] search_en,   // per-line precharge enable
  output logic [ENTRIES-1:0] match,
  // write (refill)
  input  logic               wr_en,
  input  logic [IDX_W-1:0]   wr_idx,
  input  logic [TAG_W-1:0]   wr_tag,
  // read-out of one entry (victim address for write-back)
  input  logic [IDX_W-1:0]   rd_idx,
  output logic [TAG_W-1:0]   rd_tag,
  output logic               rd_valid
);

  logic [TAG_W-1:0]   tags [ENTRIES];
  logic [ENTRIES-1:0] valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid <= '0;
    else if (wr_en) valid[wr_idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) tags[wr_idx] <= wr_tag;
  end

  always_comb begin
    for (int unsigned i = 0; i < ENTRIES; i++)
      match[i] = search_en[i] && valid[i] && (tags[i] == search_tag);
  end

  assign rd_tag   = tags[rd_idx];
  assign rd_valid = valid[rd_idx];

endmodule
