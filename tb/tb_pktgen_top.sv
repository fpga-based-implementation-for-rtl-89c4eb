// tb_pktgen_top: end-to-end test of the generator and receiver.
//
// The four ports are cabled in pairs (0<->1, 2<->3) through a model of the
// gigabit MAC and wire: a transmit queue accepts a frame at word rate, then
// holds tx_rdy low until the frame's time on a 1 Gb/s line has passed
// (1 byte per 8 ns clock, plus 24 bytes of preamble, FCS and gap).  The frame
// then appears on the peer's receive stream.  The testbench can also insert
// frames of its own on a receive stream (an ARP request, an IPv6 frame).
//
// Checks:
//  - every transmitted frame, byte for byte, against a reference frame built
//    from its flow's configuration (sequence numbers and payload pattern
//    counted per flow and port), and its module header;
//  - per port and per statistics window: bps, pps and jitter against a model
//    computed from the observed receive streams;
//  - the rate: a flow at the 60-byte line rate (one packet per 84 clocks)
//    delivers CLK_PER_SEC/84 packets per window, with four flows running;
//  - parser totals, aggregate-stream totals and request counters.
// It counts each mechanism of the design (queued requests, round-robin
// switching, transmit back-pressure, ARP request and reply, 802.1Q, RTP,
// ARP flow, multi-port destination, parser drop, zero and non-zero jitter)
// and fails if one never happens.
module tb_pktgen_top;
  import tb_pkt_pkg::*;
  import pktgen_pkg::*;
  localparam int SEC = 4000;
  localparam int PEER[4] = '{1, 0, 3, 2};

  logic clk = 0, rst = 1;
  logic send_enable = 0;
  logic [3:0][31:0] clk_limit = '0;
  flow_cfg_t [3:0] flow_cfg;
  logic [3:0][31:0] packets_generated;
  logic [31:0] num_packets_generated, packets_routed;
  logic [3:0][9:0] pending_requests;
  logic [1:0] current_flow;
  logic [3:0] rx_wr = 0, rx_rdy, tx_wr, tx_rdy;
  logic [3:0][7:0] rx_ctrl = '0, tx_ctrl;
  logic [3:0][63:0] rx_data = '0, tx_data;
  logic [4:0][31:0] bps, pps, jitter;
  logic [4:0] window_done;
  logic arp_request, rx_udp_valid;
  logic [31:0] rx_udp_packets, rx_arp_packets, rx_dropped_packets, rx_udp_src_ip;
  logic [15:0] rx_udp_src_port;
  logic [63:0] rx_first_payload;

  pktgen_top #(.CLK_PER_SEC(SEC)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int m_backlog, m_rr_switch, m_tx_stall, m_arp_req, m_arp_reply, m_vlan, m_rtp, m_arp_flow,
      m_multi, m_drop, m_jit_zero, m_jit_nonzero, m_rx_stall;

  // ---------------- MAC / wire model ----------------
  logic [3:0] tx_was_busy = 0;
  wq_t  txq[4];            // frame being received from tx
  wq_t  wireq[4];           // words waiting to enter the peer's rx stream (by rx port)
  int   busy_cnt[4];
  int   words_in_pkt[4];
  int   tx_frames[4];
  bq_t  inject[$];         // frames to insert on rx port 0
  int   total_rx_udp = 0, total_rx_arp = 0, total_rx_other = 0;

  always_comb for (int p = 0; p < 4; p++) tx_rdy[p] = (busy_cnt[p] == 0);

  // Per-flow, per-port transmit counts (sequence number check).
  int seqn[4][4];
  int flow_total[4];       // packets the generator has built per flow

  function automatic int frame_flow(input bq_t q);
    logic [47:0] smac = {q[6], q[7], q[8], q[9], q[10], q[11]};
    for (int f = 0; f < 4; f++) if (smac == flow_cfg[f].srcmac) return f;
    return -1;
  endfunction

  task automatic check_frame(input int p, input wq_t w);
    bq_t q, e;
    int n, f, lowest;
    logic [63:0] mh = w[0][63:0];
    n = int'(mh[15:0]);
    for (int i = 1; i < w.size(); i++)
      for (int k = 0; k < 8; k++) if (q.size() < n) q.push_back(w[i][63 - 8*k -: 8]);
    check(q.size() == n && w.size() == (n + 7) / 8 + 1, $sformatf("port %0d frame length %0d", p, n));
    check(mh[48 + 2*p] == 1'b1, "module header names this port");
    check(int'(mh[47:32]) == (n + 7) / 8, "module header word count");
    f = frame_flow(q);
    check(f >= 0, "frame from a known flow");
    if (f < 0) return;
    // Count each built packet once: on the lowest port it is sent to.
    lowest = -1;
    for (int k = 3; k >= 0; k--) if (flow_cfg[f].fpga_dst_port[2*k]) lowest = k;
    if ({q[0], q[1], q[2], q[3], q[4], q[5]} != 48'hFFFFFFFFFFFF) begin
      if (p == lowest) flow_total[f]++;
      else m_multi++;
    end
    if ({q[0], q[1], q[2], q[3], q[4], q[5]} == 48'hFFFFFFFFFFFF) begin
      m_arp_reply++;
      e = arp_frame(48'hFFFFFFFFFFFF, flow_cfg[0].srcmac, flow_cfg[0].cos_value, 16'd2,
                    flow_cfg[0].srcmac, flow_cfg[0].srcip, flow_cfg[0].srcmac, flow_cfg[0].srcip, 60);
    end else if (flow_cfg[f].arp_enable) begin
      m_arp_flow++;
      e = arp_frame(flow_cfg[f].dstmac, flow_cfg[f].srcmac, flow_cfg[f].cos_value, flow_cfg[f].arp_opcode,
                    flow_cfg[f].srcmac, flow_cfg[f].srcip, flow_cfg[f].dstmac, flow_cfg[f].dstip, 60);
    end else begin
      logic [31:0] ts = 0;
      int hb = (flow_cfg[f].cos_value != 0 ? 18 : 14) + 28;
      if (flow_cfg[f].rtp_enable) begin
        ts = {q[hb+4], q[hb+5], q[hb+6], q[hb+7]};
        m_rtp++;
      end
      e = udp_frame(flow_cfg[f].dstmac, flow_cfg[f].srcmac, flow_cfg[f].cos_value, flow_cfg[f].tos,
                    flow_cfg[f].srcip, flow_cfg[f].dstip, flow_cfg[f].srcport, flow_cfg[f].dstport,
                    flow_cfg[f].rtp_enable, flow_cfg[f].pt, 16'(seqn[f][p]), ts,
                    int'(flow_cfg[f].payload_size_bytes), 32'(seqn[f][p]));
      seqn[f][p]++;
    end
    if (flow_cfg[f].cos_value != 0) m_vlan++;
    check(e.size() == q.size(), $sformatf("flow %0d frame size %0d expected %0d", f, q.size(), e.size()));
    if (e.size() == q.size()) begin
      int bad = 0;
      foreach (e[i]) if (e[i] != q[i]) bad++;
      check(bad == 0, $sformatf("flow %0d port %0d: %0d bytes differ", f, p, bad));
    end
  endtask

  always @(posedge clk) if (!rst) begin
    for (int p = 0; p < 4; p++) begin
      // A word that leaves on the first ready clock had waited for the MAC.
      if (tx_wr[p] && tx_was_busy[p]) m_tx_stall++;
      tx_was_busy[p] = !tx_rdy[p];
      if (busy_cnt[p] > 0) busy_cnt[p]--;
      if (tx_wr[p] && tx_rdy[p]) begin
        txq[p].push_back({tx_ctrl[p], tx_data[p]});
        if (is_eop(tx_ctrl[p])) begin
          automatic int n = int'(txq[p][0][15:0]);
          check_frame(p, txq[p]);
          tx_frames[p]++;
          // Wire time of the frame, less the clocks already spent on its words.
          busy_cnt[p] = n + 24 - txq[p].size();
          foreach (txq[p][i]) wireq[PEER[p]].push_back(txq[p][i]);
          txq[p].delete();
        end
      end
    end
  end

  // Receive stream drivers: rx_rdy only changes at a clock edge, so a word
  // offered at the falling edge while rx_rdy is high is taken at the next edge.
  logic [3:0] rx_busy_pkt;
  always @(negedge clk) if (!rst) begin
    for (int p = 0; p < 4; p++) begin
      if (p == 0 && !rx_busy_pkt[0] && inject.size() > 0) begin
        automatic bq_t fq = inject.pop_front();
        automatic wq_t iw = to_words(16'h0000, 16'h0001, fq);
        for (int i = iw.size() - 1; i >= 0; i--) wireq[0].push_front(iw[i]);
      end
      if (wireq[p].size() > 0 && !rx_rdy[p]) m_rx_stall++;
      if (wireq[p].size() > 0 && rx_rdy[p]) begin
        rx_wr[p] = 1;
        {rx_ctrl[p], rx_data[p]} = wireq[p].pop_front();
        rx_busy_pkt[p] = !is_eop(rx_ctrl[p]);
      end else rx_wr[p] = 0;
    end
  end

  // ---------------- statistics model ----------------
  int w_hdr_t[4][$];
  longint w_bits[4];
  int w_eops[4];
  int exp_bps[4], exp_pps[4], exp_jit[4];
  int cyc = 0;
  int windows = 0;
  int agg_pps_sum = 0;
  int delivered = 0;
  int line_rate_windows = 0;

  function automatic int jit_model(input int t[$], input int eops);
    longint s = 0; int n = 0;
    for (int i = 2; i < t.size(); i++) begin
      int g1 = t[i-1] - t[i-2], g2 = t[i] - t[i-1];
      s += (g2 > g1 ? g2 - g1 : g1 - g2) * 8; n++;
    end
    return (eops >= 3 && n > 0) ? int'(s / n) : 0;
  endfunction

  always @(posedge clk) begin
    int hdr_now[4], eop_now[4];
    int bits_now[4];
    cyc++;
    for (int p = 0; p < 4; p++) begin
      hdr_now[p] = 0; eop_now[p] = 0; bits_now[p] = 0;
      if (!rst && rx_wr[p] && rx_rdy[p]) begin
        if (rx_ctrl[p] == 8'hFF) begin hdr_now[p] = 1; bits_now[p] = int'(rx_data[p][15:0]) * 8; end
        if (is_eop(rx_ctrl[p])) begin
          eop_now[p] = 1; delivered++;
        end
      end
    end
    #1;
    for (int p = 0; p < 4; p++) begin
      if (window_done[p]) begin
        // This clock's events belong to the new window.
        exp_bps[p] = int'(w_bits[p]); exp_pps[p] = w_eops[p];
        exp_jit[p] = jit_model(w_hdr_t[p], w_eops[p]);
        w_hdr_t[p].delete(); w_bits[p] = 0; w_eops[p] = 0;
      end
      if (hdr_now[p]) begin w_hdr_t[p].push_back(cyc); w_bits[p] += bits_now[p]; end
      if (eop_now[p]) w_eops[p]++;
    end
    if (window_done[0]) fork begin
      windows++;
      for (int p = 0; p < 4; p++) begin
        check(bps[p] == 32'(exp_bps[p]), $sformatf("window %0d port %0d bps %0d expected %0d", windows, p, bps[p], exp_bps[p]));
        check(pps[p] == 32'(exp_pps[p]), $sformatf("window %0d port %0d pps %0d expected %0d", windows, p, pps[p], exp_pps[p]));
      end
      agg_pps_sum += int'(pps[4]);
      repeat (45) @(posedge clk);
      #1;
      for (int p = 0; p < 4; p++) begin
        check(jitter[p] == 32'(exp_jit[p]), $sformatf("window %0d port %0d jitter %0d expected %0d", windows, p, jitter[p], exp_jit[p]));
        if (exp_pps[p] >= 3) begin
          if (jitter[p] == 0) m_jit_zero++; else m_jit_nonzero++;
        end
      end
    end join_none
  end

  // Request queue and round robin observation.
  logic [1:0] prev_flow;
  always @(posedge clk) if (!rst) begin
    automatic int waiting = 0;
    for (int f = 0; f < 4; f++) begin
      if (pending_requests[f] > 1) m_backlog++;
      if (pending_requests[f] != 0) waiting++;
    end
    if (current_flow != prev_flow && waiting >= 2) m_rr_switch++;
    prev_flow <= current_flow;
    if (arp_request) m_arp_req++;
  end

  function automatic void set_flow(input int f, input int payload, input logic [2:0] cos, input bit rtp,
                                   input bit arp, input logic [15:0] dst);
    flow_cfg[f] = '0;
    for (int p = 0; p < 4; p++) seqn[f][p] = flow_total[f];
    flow_cfg[f].payload_size_bytes = 32'(payload);
    flow_cfg[f].dstmac  = 48'h00_1B_21_00_00_10 + 48'(f);
    flow_cfg[f].srcmac  = 48'h00_4E_46_32_43_00 + 48'(f);
    flow_cfg[f].srcip   = 32'hC0A80A01 + 32'(f);
    flow_cfg[f].dstip   = 32'hC0A80B01 + 32'(f);
    flow_cfg[f].srcport = 16'd5001 + 16'(f);
    flow_cfg[f].dstport = 16'd5002 + 16'(f);
    flow_cfg[f].cos_value = cos;
    flow_cfg[f].tos     = 8'(f * 8);
    flow_cfg[f].rtp_enable = rtp;
    flow_cfg[f].pt      = rtp ? 7'd18 : 7'd0;
    flow_cfg[f].arp_enable = arp;
    flow_cfg[f].arp_opcode = 16'd1;
    flow_cfg[f].fpga_dst_port = dst;
  endfunction

  task automatic wait_windows(input int n);
    repeat (n) @(posedge window_done[0]);
  endtask

  task automatic drain();
    // Stop the raters and wait until every queued request has left the wire.
    send_enable = 0;
    do begin
      repeat (200) @(negedge clk);
    end while (pending_requests != 0 || tx_wr != 0 || busy_cnt[0] + busy_cnt[1] + busy_cnt[2] + busy_cnt[3] != 0
               || wireq[0].size() + wireq[1].size() + wireq[2].size() + wireq[3].size() != 0);
  endtask

  initial begin
    for (int f = 0; f < 4; f++) flow_total[f] = 0;
    for (int p = 0; p < 4; p++) begin busy_cnt[p] = 0; tx_frames[p] = 0; w_bits[p] = 0; w_eops[p] = 0; end
    m_backlog = 0; m_rr_switch = 0; m_tx_stall = 0; m_arp_req = 0; m_arp_reply = 0; m_vlan = 0; m_rtp = 0;
    m_arp_flow = 0; m_multi = 0; m_drop = 0; m_jit_zero = 0; m_jit_nonzero = 0; m_rx_stall = 0;
    rx_busy_pkt = 0; prev_flow = 0;
    set_flow(0, 18, 0, 0, 0, 16'h0004);    // port 1, minimum frame
    set_flow(1, 18, 0, 0, 0, 16'h0001);    // port 0, minimum frame
    set_flow(2, 18, 0, 0, 0, 16'h0040);    // port 3, minimum frame
    set_flow(3, 18, 0, 0, 0, 16'h0010);    // port 2, minimum frame
    repeat (5) @(posedge clk);
    rst = 0;

    // Phase 1: four flows at the 60-byte line rate (84 clocks per packet).
    clk_limit = {32'd83, 32'd83, 32'd83, 32'd83};
    send_enable = 1;
    wait_windows(1);
    for (int w = 0; w < 3; w++) begin
      @(posedge window_done[0]); #2;
      for (int p = 0; p < 4; p++)
        check(pps[p] >= SEC / 84 && pps[p] <= SEC / 84 + 1, $sformatf("line rate: port %0d pps %0d", p, pps[p]));
      line_rate_windows++;
    end
    drain();

    // Phase 2: mixed flows: single flow alone on port 1 (constant spacing),
    // 802.1Q, RTP to two ports, ARP request flow, injected frames.
    set_flow(0, 234, 0, 0, 0, 16'h0004);                 // port 1
    set_flow(1, 100, 3'd5, 0, 0, 16'h0040);              // port 3, 802.1Q
    set_flow(2, 50, 0, 1, 0, 16'h0050);                  // ports 2 and 3, RTP
    set_flow(3, 0, 3'd2, 0, 1, 16'h0010);                // port 2, ARP requests
    clk_limit = {32'd1499, 32'd211, 32'd257, 32'd299};
    send_enable = 1;
    inject.push_back(arp_frame(48'hFFFFFFFFFFFF, 48'h665544332211, 0, 16'd1, 48'h665544332211,
                               32'hC0A80A63, 48'h0, 32'hC0A80A01, 60));
    begin
      automatic bq_t v6 = udp_frame(48'h0, 48'h1, 0, 0, 1, 2, 3, 4, 0, 0, 0, 0, 40, 0);
      v6[12] = 8'h86; v6[13] = 8'hDD;
      inject.push_back(v6);
    end
    wait_windows(3);
    drain();

    // Phase 3: overload: 1514-byte frames requested every 101 clocks on two
    // flows to the same port; requests queue up and the transmit queue pushes back.
    set_flow(0, 1472, 0, 0, 0, 16'h0001);
    set_flow(1, 1472, 0, 0, 0, 16'h0001);
    clk_limit = {32'd0, 32'd0, 32'd100, 32'd100};
    send_enable = 1;
    repeat (1500) @(negedge clk);
    drain();
    wait_windows(2);

    // Totals.
    // The receive parser takes untagged frames only: 802.1Q frames count as dropped.
    check(rx_arp_packets == 32'(m_arp_reply + 1), $sformatf("parser ARP count %0d", rx_arp_packets));
    check(rx_dropped_packets == 32'(m_vlan + 1), $sformatf("parser drops %0d", rx_dropped_packets));
    m_drop = int'(rx_dropped_packets);
    check(rx_udp_packets + rx_arp_packets + rx_dropped_packets == 32'(delivered),
          $sformatf("parser saw %0d of %0d packets", rx_udp_packets + rx_arp_packets + rx_dropped_packets, delivered));
    check(agg_pps_sum == delivered, $sformatf("aggregate pps sum %0d, delivered %0d", agg_pps_sum, delivered));
    check(num_packets_generated == 32'(tx_frames[0] + tx_frames[1] + tx_frames[2] + tx_frames[3] - m_multi),
          $sformatf("generated %0d", num_packets_generated));
    check(m_arp_reply == m_arp_req, $sformatf("%0d ARP requests, %0d replies", m_arp_req, m_arp_reply));

    $display("mechanisms: backlog=%0d rr_switch=%0d tx_stall=%0d rx_stall=%0d arp_req=%0d arp_reply=%0d vlan=%0d rtp=%0d arp_flow=%0d multi=%0d drop=%0d jitter0=%0d jitter>0=%0d line_rate_windows=%0d",
             m_backlog, m_rr_switch, m_tx_stall, m_rx_stall, m_arp_req, m_arp_reply, m_vlan, m_rtp, m_arp_flow,
             m_multi, m_drop, m_jit_zero, m_jit_nonzero, line_rate_windows);
    check(m_backlog > 0, "queued requests never happened");
    check(m_rr_switch > 0, "round-robin switch never happened");
    check(m_tx_stall > 0, "transmit back-pressure never happened");
    check(m_arp_req > 0 && m_arp_reply > 0, "ARP request/reply never happened");
    check(m_vlan > 0, "802.1Q frame never sent");
    check(m_rtp > 0, "RTP frame never sent");
    check(m_arp_flow > 0, "ARP flow never sent");
    check(m_multi > 0, "multi-port packet never sent");
    check(m_drop > 0, "parser drop never happened");
    check(m_jit_zero > 0, "zero-jitter window never happened");
    check(m_jit_nonzero > 0, "non-zero jitter never measured");
    check(line_rate_windows == 3, "line-rate windows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
