// Data RAM of one sub-cache: LINES lines of LINE_W bits.
//
// There is no address decoder: the CAM match lines (or the LU-selected
// line) drive the wordlines wl[i] directly. Once a wordline is active a
// column multiplexer picks one WORD_W-bit word (word_sel), which is written
// or latched into the output register rdata. A separate full-line port
// writes a refilled line and reads out a victim line for write-back.
// Timing: word and line writes and the rdata register update on the rising
// clock edge (rdata is valid the cycle after rd_en); line_rdata is
// combinational. wl must be one-hot or zero. The full-line port is this
// design's addition for refill; the original scheme gives the wordline/column
// organisation and the 32-bit word access.
module line_ram #(
  parameter int unsigned LINES  = 32,
  parameter int unsigned LINE_W = 256,
  parameter int unsigned WORD_W = 32,
  localparam int unsigned IDX_W  = $clog2(LINES),
  localparam int unsigned WSEL_W = $clog2(LINE_W / WORD_W)
) (
  input  logic              clk,
  // word access through the wordlines
  input  logic [LINES-1:0]  wl,
  input  logic [WSEL_W-1:0] word_sel,
  input  logic              rd_en,
  input  logic              wr_en,
  input  logic [WORD_W-1:0] wdata,
  output logic [WORD_W-1:0] rdata,
  // full-line access
  input  logic              line_wr_en,
  input  logic [IDX_W-1:0]  line_idx,
  input  logic [LINE_W-1:0] line_wdata,
  output logic [LINE_W-1:0] line_rdata
);

  logic [LINE_W-1:0] mem [LINES];

  // the active wordline as an index (wl is one-hot)
  logic [IDX_W-1:0] wl_idx;
  logic             wl_any;
  always_comb begin
    wl_idx = '0;
    for (int unsigned i = 0; i < LINES; i++)
      if (wl[i]) wl_idx = IDX_W'(i);
  end
  assign wl_any = |wl;

  always_ff @(posedge clk) begin
    if (line_wr_en)
      mem[line_idx] <= line_wdata;
    else if (wr_en && wl_any)
      mem[wl_idx][word_sel*WORD_W +: WORD_W] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en && wl_any) rdata <= mem[wl_idx][word_sel*WORD_W +: WORD_W];
  end

  assign line_rdata = mem[line_idx];

endmodule
