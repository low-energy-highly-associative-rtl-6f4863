// Self-checking testbench for lu_subcache. Two sub-caches are tested one
// after the other: the default one (LU_1, no drowsy lines) and one with
// DROWSY_EN = 1. A reference model in the testbench keeps the tags, data,
// dirty bits, LU line and round-robin victim pointer of each, predicts for
// every access whether it is an LU hit, an LU misprediction or a true miss,
// and checks the read data, the victim offered for write-back, the event
// pulses and the latency: response 1 clock edge after the request edge for
// an LU hit, 2 for a misprediction, 3 when the hit line was drowsy.
module tb_lu_subcache;
  localparam int L = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic which = 0;                // 0: default sub-cache, 1: drowsy one
  logic req = 0, we = 0, fill = 0;
  logic [21:0] tag = '0;
  logic [2:0] word_sel = '0;
  logic [31:0] wdata = '0;
  logic [255:0] fill_line = '0;

  logic busy [2], resp_valid [2], miss [2], victim_dirty [2];
  logic ev_lu_hit [2], ev_lu_miss [2], ev_true_miss [2], ev_wake [2];
  logic [31:0] rdata [2];
  logic [21:0] miss_tag [2], victim_tag [2];
  logic [255:0] victim_line [2];
  logic [L-1:0] drowsy [2];

  lu_subcache dut0 (.clk, .rst_n, .req(req && !which), .we, .tag, .word_sel, .wdata,
    .busy(busy[0]), .resp_valid(resp_valid[0]), .rdata(rdata[0]), .miss(miss[0]),
    .miss_tag(miss_tag[0]), .victim_dirty(victim_dirty[0]), .victim_tag(victim_tag[0]),
    .victim_line(victim_line[0]), .fill(fill && !which), .fill_line,
    .ev_lu_hit(ev_lu_hit[0]), .ev_lu_miss(ev_lu_miss[0]), .ev_true_miss(ev_true_miss[0]),
    .ev_wake(ev_wake[0]), .drowsy(drowsy[0]));

  lu_subcache #(.DROWSY_EN(1'b1)) dut1 (.clk, .rst_n, .req(req && which), .we, .tag,
    .word_sel, .wdata,
    .busy(busy[1]), .resp_valid(resp_valid[1]), .rdata(rdata[1]), .miss(miss[1]),
    .miss_tag(miss_tag[1]), .victim_dirty(victim_dirty[1]), .victim_tag(victim_tag[1]),
    .victim_line(victim_line[1]), .fill(fill && which), .fill_line,
    .ev_lu_hit(ev_lu_hit[1]), .ev_lu_miss(ev_lu_miss[1]), .ev_true_miss(ev_true_miss[1]),
    .ev_wake(ev_wake[1]), .drowsy(drowsy[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic [21:0]  m_tag   [2][L];
  logic [255:0] m_data  [2][L];
  logic         m_valid [2][L];
  logic         m_dirty [2][L];
  int           m_lu [2], m_rr [2];
  int n_lu_hit [2], n_mispred [2], n_miss [2], n_wb [2];

  function automatic logic [255:0] mem_line(logic [21:0] t);
    logic [255:0] l;
    for (int w = 0; w < 8; w++) l[w*32 +: 32] = {t[9:0], 19'(t * 7 + 3), 3'(w)};
    return l;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL (%0d): %s", which, msg); end
  endtask

  task automatic access(input logic w_en, input logic [21:0] t, input logic [2:0] wd,
                        input logic [31:0] wv);
    int s = which;
    int hw = -1, lat = 0, exp_lat;
    bit lu_hit;
    logic [31:0] exp_rd;
    for (int i = 0; i < L; i++) if (m_valid[s][i] && m_tag[s][i] == t) hw = i;
    lu_hit = (hw >= 0) && (hw == m_lu[s]);
    @(negedge clk);
    check(!busy[s], "busy before request");
    req = 1; we = w_en; tag = t; word_sel = wd; wdata = wv;
    #1;
    check(ev_lu_hit[s] == lu_hit && ev_lu_miss[s] == !lu_hit, "LU prediction outcome");
    @(negedge clk);
    req = 0; we = $urandom; tag = 22'($urandom); wdata = $urandom;  // must not matter
    lat = 1;
    if (hw < 0) begin
      // true miss: the victim and the fill
      int v = m_rr[s];
      while (!miss[s] && lat < 5) begin @(negedge clk); lat++; end
      check(miss[s], "true miss not reported");
      check(miss_tag[s] == t, "miss tag");
      check(victim_dirty[s] == (m_valid[s][v] && m_dirty[s][v]), "victim dirty bit");
      if (m_valid[s][v] && m_dirty[s][v]) begin
        check(victim_tag[s] == m_tag[s][v], "victim tag");
        check(victim_line[s] == m_data[s][v], "victim data");
        n_wb[s]++;
      end
      repeat ($urandom_range(0, 4)) @(negedge clk);
      fill = 1; fill_line = mem_line(t);
      @(negedge clk);
      fill = 0;
      check(resp_valid[s], "no response the cycle after the fill");
      m_tag[s][v] = t; m_valid[s][v] = 1; m_dirty[s][v] = w_en;
      m_data[s][v] = mem_line(t);
      m_lu[s] = v; m_rr[s] = (v + 1) % L;
      hw = v;
      n_miss[s]++;
    end else begin
      exp_lat = lu_hit ? 1 : (s == 1 ? 3 : 2);
      while (!resp_valid[s] && lat < 6) begin @(negedge clk); lat++; end
      check(lat == exp_lat, $sformatf("latency %0d, expected %0d", lat, exp_lat));
      if (!lu_hit) n_mispred[s]++; else n_lu_hit[s]++;
      m_lu[s] = hw;
    end
    exp_rd = m_data[s][hw][wd*32 +: 32];
    if (w_en) begin
      m_data[s][hw][wd*32 +: 32] = wv;
      m_dirty[s][hw] = 1;
    end else begin
      check(rdata[s] == exp_rd, $sformatf("read data %h, expected %h", rdata[s], exp_rd));
    end
    @(negedge clk);
    check(!busy[s], "busy after response");
    check($countones(drowsy[s]) == (s == 1 ? L - 1 : 0), "drowsy line count");
    if (s == 1) check(!drowsy[s][m_lu[s]], "LU line must be awake");
  endtask

  initial begin
    logic [21:0] last;
    for (int s = 0; s < 2; s++) begin
      m_lu[s] = -1; m_rr[s] = 0;
      n_lu_hit[s] = 0; n_mispred[s] = 0; n_miss[s] = 0; n_wb[s] = 0;
      for (int i = 0; i < L; i++) begin m_valid[s][i] = 0; m_dirty[s][i] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      which = 1'(s);
      last = 22'h155;
      for (int k = 0; k < 1500; k++) begin
        logic [21:0] t;
        // 60% the last tag again, else one of 40 tags (more than 32 lines)
        t = ($urandom % 10 < 6) ? last : 22'($urandom_range(0, 39) * 97 + 11);
        access(($urandom % 3) == 0, t, 3'($urandom), $urandom);
        last = t;
      end
      $display("sub-cache %0d: LU hits %0d, mispredictions %0d, true misses %0d, write-backs %0d",
               s, n_lu_hit[s], n_mispred[s], n_miss[s], n_wb[s]);
      check(n_lu_hit[s] > 0 && n_mispred[s] > 0 && n_miss[s] > 0 && n_wb[s] > 0,
            "every access kind exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
