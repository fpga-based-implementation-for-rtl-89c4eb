// tb_statistics: drives packets at planned arrival times through a
// statistics block with a 1000-clock window and checks bps, pps and jitter
// (mean |gap difference| in ns, from the third packet of a window) against a
// model computed from the planned times.  Covers constant spacing (zero
// jitter), alternating gaps, a window with too few packets, and the 41-clock
// division latency of the jitter result.
module tb_statistics;
  import tb_pkt_pkg::*;
  localparam int SEC = 1000;
  logic clk = 0, rst = 1;
  logic in_wr = 0;
  logic [7:0] in_ctrl = 0;
  logic [63:0] in_data = 0;
  logic [31:0] bps, pps, jitter;
  logic window_done;
  int checks = 0, failures = 0;
  int cyc = 0;

  statistics #(.CLK_PER_SEC(SEC), .NS_PER_CLK(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Model for one window: header times (window-relative), sizes.
  int   hdr_t[$];
  int   hdr_len[$];
  longint exp_bits; int exp_pkts, exp_jit;

  task automatic model();
    longint s = 0; int n = 0;
    exp_bits = 0; exp_pkts = hdr_t.size();
    foreach (hdr_len[i]) exp_bits += hdr_len[i] * 8;
    for (int i = 2; i < hdr_t.size(); i++) begin
      int g1 = hdr_t[i-1] - hdr_t[i-2], g2 = hdr_t[i] - hdr_t[i-1];
      s += (g2 > g1 ? g2 - g1 : g1 - g2) * 8; n++;
    end
    exp_jit = (exp_pkts >= 3 && n > 0) ? int'(s / n) : 0;
  endtask

  task automatic send_pkt(input int len);
    bq_t q; wq_t w;
    for (int i = 0; i < len; i++) q.push_back(8'(i));
    w = to_words(16'h0001, 16'h0004, q);
    foreach (w[i]) begin
      @(negedge clk); in_wr = 1; {in_ctrl, in_data} = w[i];
    end
    @(negedge clk); in_wr = 0;
  endtask

  // Runs one window: packets start at the given offsets after the window start.
  task automatic window(input int starts[$], input int lens[$]);
    int base;
    hdr_t.delete(); hdr_len.delete();
    // Align to the first clock of a window.
    @(posedge window_done);
    base = cyc;                      // window counter is 0 on this clock edge
    foreach (starts[i]) begin
      while (cyc - base < starts[i] - 1) @(posedge clk);
      hdr_t.push_back(starts[i]);
      hdr_len.push_back(lens[i]);
      send_pkt(lens[i]);
    end
    model();
    @(posedge window_done);
    #1;
    check(bps == 32'(exp_bits), $sformatf("bps %0d exp %0d", bps, exp_bits));
    check(pps == 32'(exp_pkts), $sformatf("pps %0d exp %0d", pps, exp_pkts));
    repeat (43) @(posedge clk);
    #1;
    check(jitter == 32'(exp_jit), $sformatf("jitter %0d exp %0d", jitter, exp_jit));
  endtask

  initial begin
    int s[$], l[$];
    repeat (3) @(posedge clk);
    rst = 0;
    // Constant spacing of 50 clocks, 60-byte packets: zero jitter.
    s.delete(); l.delete();
    for (int i = 0; i < 18; i++) begin s.push_back(20 + 50*i); l.push_back(60); end
    window(s, l);
    // Alternating gaps of 40 and 60 clocks: every gap difference is 20 clocks = 160 ns.
    s.delete(); l.delete();
    begin int t = 20; for (int i = 0; i < 17; i++) begin s.push_back(t); l.push_back(100); t += (i % 2) ? 60 : 40; end end
    window(s, l);
    // Irregular gaps and sizes.
    s = '{10, 40, 100, 130, 300, 320, 500, 700, 720, 900};
    l = '{60, 60, 200, 64, 128, 60, 300, 128, 60, 90};
    window(s, l);
    // Two packets only: jitter reported as zero.
    s = '{100, 400}; l = '{60, 60};
    window(s, l);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
