// tb_pktgen_full: one full one-second statistics window at the line rate.
//
// pktgen_top runs with its default parameters (CLK_PER_SEC = 125,000,000
// clocks of 8 ns).  Four flows send 60-byte frames (18-byte UDP payload),
// each to its own MAC port, with the rater period set to 84 clocks: the
// 1 Gb/s line rate for a 60-byte frame (60 bytes plus 24 bytes of preamble,
// FCS and inter-frame gap, one byte per clock).  Each transmit stream is
// looped back to the receive stream of the same port, so the per-port
// statistics see exactly what the generator sent.
//
// Checks:
//  - the first frames of every port, byte for byte, against a reference frame;
//  - every frame's module header (length, word count, destination bit);
//  - at the end of the first window: pps of every port equals the number of
//    frames the testbench saw transmitted in that window and is within two
//    packets of CLK_PER_SEC/84 less the start-up clocks; bps = pps * 480;
//    jitter is zero (constant spacing); the aggregate statistics count all
//    four ports, less the packets still inside the arbiter at the edge;
//  - the parser counted every frame as UDP.
// The simulated time is 1 s (125 M clocks).
module tb_pktgen_full;
  import tb_pkt_pkg::*;
  import pktgen_pkg::*;
  localparam int SEC   = 125_000_000;
  localparam int LIMIT = 83;                 // period LIMIT+1 = 84 clocks

  logic clk = 0, rst = 1;
  logic send_enable = 0;
  logic [3:0][31:0] clk_limit = '0;
  flow_cfg_t [3:0] flow_cfg;
  logic [3:0][31:0] packets_generated;
  logic [31:0] num_packets_generated, packets_routed;
  logic [3:0][9:0] pending_requests;
  logic [1:0] current_flow;
  logic [3:0] rx_wr, rx_rdy, tx_wr, tx_rdy;
  logic [3:0][7:0] rx_ctrl, tx_ctrl;
  logic [3:0][63:0] rx_data, tx_data;
  logic [4:0][31:0] bps, pps, jitter;
  logic [4:0] window_done;
  logic arp_request, rx_udp_valid;
  logic [31:0] rx_udp_packets, rx_arp_packets, rx_dropped_packets, rx_udp_src_ip;
  logic [15:0] rx_udp_src_port;
  logic [63:0] rx_first_payload;

  pktgen_top dut (.*);
  always #4 clk = ~clk;

  // Loopback cabling.
  assign rx_wr   = tx_wr;
  assign rx_ctrl = tx_ctrl;
  assign rx_data = tx_data;
  assign tx_rdy  = rx_rdy;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1400ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Transmit monitor.
  wq_t txq[4];
  int  frames[4];            // frames whose last word left in the current window
  int  detailed[4];
  int  enable_cycle, cycle = 0;
  bit  in_window1 = 1;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (!rst) begin
    for (int p = 0; p < 4; p++) begin
      if (tx_wr[p] && tx_rdy[p]) begin
        if (tx_ctrl[p] == CTRL_MODHDR) begin
          check(tx_data[p][15:0] == 16'd60 && tx_data[p][47:32] == 16'd8 && tx_data[p][48 + 2*p],
                $sformatf("port %0d module header %h", p, tx_data[p]));
        end
        if (detailed[p] < 8) txq[p].push_back({tx_ctrl[p], tx_data[p]});
        if (is_eop(tx_ctrl[p])) begin
          if (in_window1) frames[p]++;
          if (detailed[p] < 8) begin
            automatic bq_t q, e;
            for (int i = 1; i < txq[p].size(); i++)
              for (int k = 0; k < 8; k++) if (q.size() < 60) q.push_back(txq[p][i][63 - 8*k -: 8]);
            e = udp_frame(flow_cfg[p].dstmac, flow_cfg[p].srcmac, 0, flow_cfg[p].tos,
                          flow_cfg[p].srcip, flow_cfg[p].dstip, flow_cfg[p].srcport, flow_cfg[p].dstport,
                          0, 0, 0, 0, 18, 32'(detailed[p]));
            check(q == e, $sformatf("port %0d frame %0d contents", p, detailed[p]));
            detailed[p]++;
            txq[p].delete();
          end
        end
      end
    end
  end

  // pps counts a packet at its last word; the window closes
  // CLK_PER_SEC clocks after reset.  Stop counting at the closing edge.
  always @(posedge clk) if (window_done[0]) in_window1 = 0;

  initial begin
    for (int p = 0; p < 4; p++) begin
      frames[p] = 0; detailed[p] = 0;
      flow_cfg[p] = '0;
      flow_cfg[p].payload_size_bytes = 32'd18;
      flow_cfg[p].dstip   = 32'hC0A80100 + 32'(p + 1);
      flow_cfg[p].srcip   = 32'hC0A80200 + 32'(p + 1);
      flow_cfg[p].dstport = 16'd5000 + 16'(p);
      flow_cfg[p].srcport = 16'd6000 + 16'(p);
      flow_cfg[p].dstmac  = 48'h0A0000000010 + 48'(p);
      flow_cfg[p].srcmac  = 48'h0B0000000020 + 48'(p);
      flow_cfg[p].tos     = 8'(p);
      flow_cfg[p].fpga_dst_port = 16'h0001 << (2 * p);
    end
    repeat (5) @(posedge clk);
    rst = 0;
    clk_limit = {32'(LIMIT), 32'(LIMIT), 32'(LIMIT), 32'(LIMIT)};
    send_enable = 1;
    enable_cycle = cycle;

    @(posedge window_done[0]);
    #1;
    for (int p = 0; p < 4; p++) begin
      // Requests start one period after enable; the window holds the rest.
      automatic int expect_pps = (SEC - enable_cycle) / (LIMIT + 1);
      check(pps[p] >= 32'(expect_pps - 2) && pps[p] <= 32'(expect_pps),
            $sformatf("port %0d pps %0d, line rate gives %0d", p, pps[p], expect_pps));
      check(pps[p] == 32'(frames[p]) || pps[p] == 32'(frames[p] + 1),
            $sformatf("port %0d pps %0d, frames sent %0d", p, pps[p], frames[p]));
      check(bps[p] == pps[p] * 32'd480, $sformatf("port %0d bps %0d pps %0d", p, bps[p], pps[p]));
    end
    // The merged stream lags the port streams by the arbiter's FIFOs, so up to
    // one packet per port can fall into the next window.
    check(pps[4] + 4 >= pps[0] + pps[1] + pps[2] + pps[3] && pps[4] <= pps[0] + pps[1] + pps[2] + pps[3],
          $sformatf("aggregate pps %0d", pps[4]));
    // Bits are added at a packet's module header, packets at its last word.
    check(bps[4] >= pps[4] * 32'd480 && bps[4] <= (pps[4] + 4) * 32'd480, $sformatf("aggregate bps %0d", bps[4]));
    // Jitter appears 42 clocks after the window closes.
    repeat (50) @(posedge clk);
    for (int p = 0; p < 4; p++)
      check(jitter[p] == 0, $sformatf("port %0d jitter %0d with constant spacing", p, jitter[p]));
    check(rx_udp_packets >= pps[4] && rx_arp_packets == 0 && rx_dropped_packets == 0,
          $sformatf("parser udp %0d arp %0d dropped %0d", rx_udp_packets, rx_arp_packets, rx_dropped_packets));
    check(num_packets_generated >= pps[4], $sformatf("generated %0d", num_packets_generated));
    $display("window 1: pps %0d %0d %0d %0d aggregate %0d, bps port 0 %0d",
             pps[0], pps[1], pps[2], pps[3], pps[4], bps[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
