// tb_packet_generator: the testbench plays the send stage (captures the
// packed headers on new_send and answers with send_done after a delay) and
// checks, for plain UDP, 802.1Q-tagged UDP, RTP and ARP flows:
//   - every header byte against a reference frame built from the protocol
//     definitions (including the IPv4 checksum and length fields),
//   - header size, payload size, payload pattern (the flow's packet count),
//     and the module header (destination, word and byte lengths),
//   - the round-robin service order against a model of the policy, with
//     several requests queued for one flow (pending counter above one),
//   - that an arp_request is answered next by a gratuitous ARP reply.
module tb_packet_generator;
  import tb_pkt_pkg::*;
  import pktgen_pkg::*;
  logic clk = 0, rst = 1;
  flow_cfg_t [3:0] cfg;
  logic [3:0] signal_generation = 0;
  logic arp_request = 0, send_done = 0, new_send;
  logic [463:0] all_together;
  logic [20:0] bitsofheader;
  logic [31:0] payload_size, payload, num_packets_generated;
  logic [63:0] module_header;
  logic [1:0] current_flow;
  logic [3:0][9:0] signal_in;
  int checks = 0, failures = 0;
  int cyc = 0;
  int pending[4] = '{0, 0, 0, 0};
  bit waited[4][4], served_between[4][4];
  int sent[4] = '{0, 0, 0, 0};
  int arp_wait = 0, arp_replies = 0, max_backlog = 0;
  int npk = 0;

  packet_generator #(.N_FLOWS(4)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bq_t expected(input int f, input bit reply, input logic [15:0] ts);
    flow_cfg_t c = cfg[reply ? 0 : f];
    if (reply)
      return arp_frame(48'hFFFFFFFFFFFF, c.srcmac, c.cos_value, 16'd2, c.srcmac, c.srcip, c.srcmac, c.srcip, 60);
    if (c.arp_enable)
      return arp_frame(c.dstmac, c.srcmac, c.cos_value, c.arp_opcode, c.srcmac, c.srcip, c.dstmac, c.dstip, 60);
    return udp_frame(c.dstmac, c.srcmac, c.cos_value, c.tos, c.srcip, c.dstip, c.srcport, c.dstport,
                     c.rtp_enable, c.pt, 16'(sent[f]), {16'd0, ts}, int'(c.payload_size_bytes), 32'(sent[f]));
  endfunction

  always @(posedge clk) if (!rst) begin
    for (int f = 0; f < 4; f++) begin
      if (signal_generation[f]) pending[f]++;
      if (int'(signal_in[f]) > max_backlog) max_backlog = int'(signal_in[f]);
    end
    if (arp_request) arp_wait = 1;
    for (int f = 0; f < 4; f++) for (int g = 0; g < 4; g++) if (pending[g] == 0) waited[f][g] = 0;
  end

  // Send-stage model.
  always @(posedge clk) if (!rst && new_send) begin
    int f; bit reply; bq_t e; int hb, pb; logic [15:0] ts;
    reply = (all_together[463 -: 48] == 48'hFFFFFFFFFFFF);
    if (reply) check(arp_wait != 0 && arp_wait <= 2, $sformatf("ARP reply after %0d packets", arp_wait - 1));
    else if (arp_wait != 0) arp_wait++;
    f = -1;
    // The flow is recognised by its source MAC address.
    for (int k = 0; k < 4; k++) if (all_together[463 - 48 -: 48] == cfg[k].srcmac) f = k;
    if (reply) check(f == 0, "ARP reply uses flow 0 addresses");
    else begin
      check(f >= 0 && pending[f] > 0, "packet sent without a request");
      // Round robin: every other flow that has waited since f's last packet was served.
      if (f >= 0) for (int g = 0; g < 4; g++) if (g != f)
        check(!(waited[f][g] && !served_between[f][g]), $sformatf("flow %0d served twice while flow %0d waited", f, g));
    end
    if (f >= 0) begin
      hb = int'(bitsofheader) / 8;
      // RTP timestamp: value of the clock counter a few clocks ago.
      ts = (cfg[f].rtp_enable && !reply && !cfg[f].arp_enable) ? all_together[463 - 8*(hb-6) -: 16] : 16'd0;
      check(reply || !cfg[f].rtp_enable || 16'(cyc - int'(ts)) <= 16'd8, $sformatf("RTP timestamp %0d at clock %0d", ts, cyc));
      e = expected(f, reply, ts);
      pb = e.size() - hb;
      check(hb == ((reply || cfg[f].arp_enable) ? 28 : (cfg[f].rtp_enable ? 40 : 28)) + (cfg[reply ? 0 : f].cos_value != 0 ? 18 : 14),
            $sformatf("flow %0d header bytes %0d", f, hb));
      for (int i = 0; i < hb && i < 58; i++)
        check(all_together[463 - 8*i -: 8] == e[i], $sformatf("flow %0d%s byte %0d: %h expected %h", f, reply ? " (ARP reply)" : "", i, all_together[463 - 8*i -: 8], e[i]));
      check(payload_size == 32'(pb * 8), $sformatf("flow %0d payload bits %0d", f, payload_size));
      if (!reply && !cfg[f].arp_enable) check(payload == 32'(sent[f]), "payload pattern = packet count");
      check(module_header == {cfg[reply ? 0 : f].fpga_dst_port, 16'((e.size() + 7) / 8), 16'd0, 16'(e.size())},
            $sformatf("module header %h", module_header));
      if (reply) begin arp_wait = 0; arp_replies++; end
      else begin
        pending[f]--; sent[f]++;
        for (int g = 0; g < 4; g++) begin
          served_between[g][f] = 1;
          served_between[f][g] = 0;
          waited[f][g] = (pending[g] > 0);
        end
      end
      npk++;
    end
    fork begin
      repeat (3 + $urandom % 12) @(negedge clk);
      send_done = 1; @(negedge clk); send_done = 0;
    end join_none
  end

  task automatic pulse(input logic [3:0] m);
    @(negedge clk); signal_generation = m; @(negedge clk); signal_generation = 0;
  endtask

  initial begin
    for (int f = 0; f < 4; f++) for (int g = 0; g < 4; g++) begin waited[f][g] = 0; served_between[f][g] = 0; end
    for (int f = 0; f < 4; f++) begin
      cfg[f] = '0;
      cfg[f].dstmac = 48'h0A0000000000 + f;  cfg[f].srcmac = 48'h020000000010 + f;
      cfg[f].srcip  = 32'hC0A80A01 + f;      cfg[f].dstip  = 32'hC0A80B01 + f;
      cfg[f].srcport = 16'd5000 + 16'(f);    cfg[f].dstport = 16'd6000 + 16'(f);
      cfg[f].fpga_dst_port = 16'(1 << (2 * f));
    end
    cfg[0].payload_size_bytes = 18;
    cfg[1].payload_size_bytes = 100; cfg[1].cos_value = 3'd5; cfg[1].tos = 8'h20;
    cfg[2].payload_size_bytes = 50;  cfg[2].rtp_enable = 1; cfg[2].pt = 7'd18; cfg[2].fpga_dst_port = 16'h0055;
    cfg[3].arp_enable = 1; cfg[3].arp_opcode = 16'd1; cfg[3].cos_value = 3'd1;
    repeat (3) @(posedge clk);
    rst = 0;
    // Five queued requests for flow 0 and one each for the others.
    pulse(4'b1111);
    for (int i = 0; i < 4; i++) pulse(4'b0001);
    repeat (300) @(negedge clk);
    check(max_backlog >= 4, $sformatf("pending counter reached %0d", max_backlog));
    // ARP request while requests are pending.
    pulse(4'b0110); pulse(4'b0110);
    @(negedge clk); arp_request = 1; @(negedge clk); arp_request = 0;
    pulse(4'b1000);
    repeat (300) @(negedge clk);
    // Random request traffic.
    for (int i = 0; i < 200; i++) pulse(4'($urandom));
    repeat (12000) @(negedge clk);
    check(arp_replies == 1, $sformatf("ARP replies %0d", arp_replies));
    for (int f = 0; f < 4; f++) check(pending[f] == 0, $sformatf("flow %0d: %0d requests not served", f, pending[f]));
    check(num_packets_generated == 32'(npk), "num_packets_generated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
