// Sub-cache address decoder.
//
// The cache is partitioned so that each set maps onto one CAM/RAM sub-cache.
// log2(M) address bits pick the sub-cache; the decoder turns them into a
// one-hot select and splits the remaining bits into the CAM search tag and
// the word offset that drives the RAM column multiplexer. Purely
// combinational. Field layout (LSB first): byte-in-word, word-in-line,
// sub-cache index, tag. The layout is this design's choice; the number of
// sub-cache bits, log2(M), is the original scheme's.
module subcache_decoder #(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned M          = 32,   // number of sub-caches
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned WORD_BYTES = 4,
  localparam int unsigned SET_W  = $clog2(M),
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES),
  localparam int unsigned WSEL_W = $clog2(LINE_BYTES / WORD_BYTES),
  localparam int unsigned BYTE_W = $clog2(WORD_BYTES),
  localparam int unsigned TAG_W  = ADDR_W - SET_W - OFF_W
) (
  input  logic [ADDR_W-1:0] addr,
  input  logic              en,        // decode enable (request valid)
  output logic [M-1:0]      sel,       // one-hot sub-cache select, 0 if !en
  output logic [SET_W-1:0]  set_idx,
  output logic [TAG_W-1:0]  tag,
  output logic [WSEL_W-1:0] word_sel
);

  assign set_idx  = addr[OFF_W +: SET_W];
  assign tag      = addr[ADDR_W-1 -: TAG_W];
  assign word_sel = addr[BYTE_W +: WSEL_W];

  always_comb begin
    sel = '0;
    if (en) sel[set_idx] = 1'b1;
  end

endmodule
