// tb_packet_parser: feeds UDP, RTP, ARP request, ARP reply, TCP and non-IP
// frames (with idle gaps and back-to-back) and checks the arp_request pulses,
// the parsed UDP fields, the first payload word and the per-type counters.
module tb_packet_parser;
  import tb_pkt_pkg::*;
  logic clk = 0, rst = 1;
  logic in_wr = 0;
  logic [7:0] in_ctrl = 0;
  logic [63:0] in_data = 0;
  logic in_rdy, arp_request, udp_valid;
  logic [31:0] udp_src_ip, udp_dst_ip, udp_packets, arp_packets, dropped_packets;
  logic [15:0] udp_src_port, udp_dst_port;
  logic [63:0] first_payload;
  int checks = 0, failures = 0;
  int arp_pulses = 0, udp_pulses = 0;

  packet_parser #(.FIFO_DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

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

  // Expected values of the next UDP result.
  logic [31:0] e_sip, e_dip; logic [15:0] e_sp, e_dp; logic [63:0] e_pay;
  always @(posedge clk) if (!rst) begin
    if (arp_request) arp_pulses++;
    if (udp_valid) begin
      udp_pulses++;
      check(udp_src_ip == e_sip && udp_dst_ip == e_dip, "UDP addresses");
      check(udp_src_port == e_sp && udp_dst_port == e_dp, "UDP ports");
      check(first_payload == e_pay, $sformatf("first payload %h exp %h", first_payload, e_pay));
    end
  end

  task automatic send(const ref bq_t q, input int gap);
    wq_t w = to_words(16'h0001, 16'h0004, q);
    foreach (w[i]) begin
      @(negedge clk);
      while (!in_rdy) begin in_wr = 0; @(negedge clk); end
      in_wr = 1; {in_ctrl, in_data} = w[i];
    end
    @(negedge clk); in_wr = 0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    bq_t q;
    int a0, p0;
    repeat (3) @(posedge clk);
    rst = 0;
    // UDP frame, payload pattern 0x11223344.
    q = udp_frame(48'h0A0B0C0D0E0F, 48'h001122334455, 0, 0, 32'hC0A80A01, 32'hC0A80A02,
                  16'd5001, 16'd5002, 0, 0, 0, 0, 18, 32'h11223344);
    e_sip = 32'hC0A80A01; e_dip = 32'hC0A80A02; e_sp = 5001; e_dp = 5002; e_pay = 64'h1122334411223344;
    send(q, 3);
    // ARP request: one arp_request pulse.
    q = arp_frame(48'hFFFFFFFFFFFF, 48'h665544332211, 0, 16'd1, 48'h665544332211, 32'h0A000001,
                  48'h0, 32'h0A000002, 60);
    send(q, 0);
    // ARP reply: no pulse.
    q = arp_frame(48'h665544332211, 48'h001122334455, 0, 16'd2, 48'h001122334455, 32'h0A000002,
                  48'h665544332211, 32'h0A000001, 60);
    send(q, 0);
    // TCP over IPv4: dropped.
    q = udp_frame(48'h0A0B0C0D0E0F, 48'h001122334455, 0, 0, 1, 2, 3, 4, 0, 0, 0, 0, 30, 32'h0);
    q[23] = 8'd6;
    send(q, 0);
    // IPv6 EtherType: dropped.
    q[12] = 8'h86; q[13] = 8'hDD;
    send(q, 2);
    // Unpadded 42-byte ARP request, back to back with a large UDP frame.
    q = arp_frame(48'hFFFFFFFFFFFF, 48'h665544332211, 0, 16'd1, 48'h665544332211, 32'h0A000001,
                  48'h0, 32'h0A000003, 42);
    send(q, 0);
    e_sip = 32'h01020304; e_dip = 32'h05060708; e_sp = 1234; e_dp = 80; e_pay = 64'hDEADBEEFDEADBEEF;
    q = udp_frame(48'h0A0B0C0D0E0F, 48'h001122334455, 0, 8'h10, 32'h01020304, 32'h05060708,
                  16'd1234, 16'd80, 0, 0, 0, 0, 1472, 32'hDEADBEEF);
    send(q, 0);
    repeat (50) @(negedge clk);
    check(arp_pulses == 2, $sformatf("arp_request pulses %0d", arp_pulses));
    check(udp_pulses == 2, $sformatf("udp results %0d", udp_pulses));
    check(udp_packets == 2, $sformatf("udp_packets %0d", udp_packets));
    check(arp_packets == 3, $sformatf("arp_packets %0d", arp_packets));
    check(dropped_packets == 2, $sformatf("dropped_packets %0d", dropped_packets));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
