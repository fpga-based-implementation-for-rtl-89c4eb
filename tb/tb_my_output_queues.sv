// tb_my_output_queues: sends packets with single and multiple destination
// masks (and one with only a CPU bit) while the four transmit queues accept
// words at random, and checks that every port receives exactly the packets
// addressed to it, whole and in order.  With all ports ready, it checks the
// throughput of back-to-back 60-byte packets (11 clocks each).
module tb_my_output_queues;
  import tb_pkt_pkg::*;
  logic clk = 0, rst = 1;
  logic in_wr = 0, in_rdy;
  logic [7:0] in_ctrl = 0;
  logic [63:0] in_data = 0;
  logic [3:0] out_wr, out_rdy;
  logic [3:0][7:0] out_ctrl;
  logic [3:0][63:0] out_data;
  logic [31:0] packets_routed;
  int checks = 0, failures = 0;
  int stall_pct = 50;
  wq_t exp[4], got[4];

  my_output_queues #(.N_PORTS(4), .IN_DEPTH(32), .OQ_DEPTH(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) for (int p = 0; p < 4; p++) out_rdy[p] = ($urandom % 100) >= stall_pct;
  always @(posedge clk) if (!rst)
    for (int p = 0; p < 4; p++) if (out_wr[p] && out_rdy[p]) got[p].push_back({out_ctrl[p], out_data[p]});

  task automatic send(input logic [15:0] dst, input int len);
    bq_t q; wq_t w;
    for (int i = 0; i < len; i++) q.push_back(8'($urandom));
    w = to_words(dst, 16'h0000, q);
    for (int p = 0; p < 4; p++) if (dst[2*p]) foreach (w[i]) exp[p].push_back(w[i]);
    foreach (w[i]) begin
      @(negedge clk);
      while (!in_rdy) begin in_wr = 0; @(negedge clk); end
      in_wr = 1; {in_ctrl, in_data} = w[i];
    end
    @(negedge clk); in_wr = 0;
  endtask

  task automatic compare();
    for (int p = 0; p < 4; p++) begin
      check(got[p].size() == exp[p].size(), $sformatf("port %0d: %0d words, expected %0d", p, got[p].size(), exp[p].size()));
      foreach (exp[p][i]) if (i < got[p].size())
        check(got[p][i] == exp[p][i], $sformatf("port %0d word %0d", p, i));
      got[p].delete(); exp[p].delete();
    end
  endtask

  initial begin
    int t0, t1, n0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 60; i++) begin
      logic [15:0] dst;
      case (i % 6)
        0: dst = 16'h0001; 1: dst = 16'h0004; 2: dst = 16'h0010; 3: dst = 16'h0040;
        4: dst = 16'h0055; default: dst = 16'h0002;   // CPU port only: discarded
      endcase
      send(dst, 60 + $urandom % 200);
    end
    repeat (3000) @(negedge clk);
    compare();
    check(packets_routed == 60, $sformatf("packets_routed %0d", packets_routed));
    // Throughput: 20 back-to-back 60-byte packets to port 0, no back-pressure.
    stall_pct = 0;
    n0 = packets_routed;
    t0 = $time;
    for (int i = 0; i < 20; i++) send(16'h0001, 60);
    while (packets_routed != n0 + 20) @(negedge clk);
    t1 = $time;
    // The input side offers one word per clock plus one idle clock per packet
    // (10 clocks); the module needs 11 per packet.
    check((t1 - t0) / 10 <= 20 * 11 + 10, $sformatf("20 packets took %0d clocks", (t1 - t0) / 10));
    repeat (50) @(negedge clk);
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
