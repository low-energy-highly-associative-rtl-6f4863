// Behavioural model of main memory for the cache testbenches (there is no
// L2 cache). Line-wide request/acknowledge port: a request held high is
// served after LAT cycles (none while rst_n is low) counted from its first cycle; mem_ack is a
// one-cycle pulse in the last of them, and read data is valid with it.
// Lines never written return tb_dcache_pkg::init_word per word.
module main_memory_model
  import tb_dcache_pkg::*;
#(
  parameter int LINE_W = 256,
  parameter int LAT    = 80
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mem_req,
  input  logic              mem_we,
  input  logic [31:0]       mem_addr,
  input  logic [LINE_W-1:0] mem_wdata,
  output logic              mem_ack,
  output logic [LINE_W-1:0] mem_rdata,
  output int                n_reads,
  output int                n_writes
);
  localparam int WORDS = LINE_W / 32;
  logic [LINE_W-1:0] lines [logic [31:0]];
  bit busy = 0;
  int cnt = 0;

  initial begin mem_ack = 0; mem_rdata = '0; n_reads = 0; n_writes = 0; end

  function automatic logic [LINE_W-1:0] read_line(logic [31:0] a);
    logic [LINE_W-1:0] l;
    if (lines.exists(a)) return lines[a];
    for (int w = 0; w < WORDS; w++) l[w*32 +: 32] = init_word(a + 32'(4 * w));
    return l;
  endfunction

  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (!rst_n) begin
      busy <= 0;
    end else if (!busy) begin
      if (mem_req && !mem_ack) begin busy <= 1; cnt <= 1; end
    end else if (cnt == LAT - 2) begin
      busy    <= 0;
      mem_ack <= 1'b1;
      if (mem_we) begin lines[mem_addr] = mem_wdata; n_writes++; end
      else begin mem_rdata <= read_line(mem_addr); n_reads++; end
    end else cnt <= cnt + 1;
  end
endmodule
