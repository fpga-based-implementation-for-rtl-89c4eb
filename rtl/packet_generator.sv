// packet_generator: builds the headers of the generated packets.
//
// Requests: each one-cycle pulse on signal_generation[f] (from the rater)
// adds one to a 10-bit pending-request counter signal_in[f], and every packet
// sent for flow f subtracts one, so up to 1023 requests wait while the module
// is busy and no request is lost.
//
// Time slots: a round-robin register current_flow picks the flow to serve.
// If current_flow has a pending request its packet is built and sent;
// otherwise current_flow moves to the next flow.  After each packet
// current_flow always moves on.  A slot therefore lasts as long as its packet.
// A pending ARP request from the packet parser is answered first, with a
// gratuitous ARP reply built from flow 0's addresses (this design's choice of
// flow).
//
// Main FSM: WAIT -> GENERATE_PACKET (1 clock: fill the MAC, IPv4, UDP, RTP
// or ARP header registers from the flow's configuration and add the ten
// 16-bit words of the IPv4 header into a 19-bit sum) -> ALL_TO_ONE (1 clock:
// fold the carries, insert the header checksum 0xFFFF - sum, pack all headers
// left-aligned into all_together[463:0], compute the header size) -> SEND
// (pulse new_send and wait for the send stage to report done).
//
// Header contents: 802.1Q tag (TPID 0x8100, PCP = cos_value, CFI 0, VID 0)
// only when cos_value is not zero; IPv4 version 4, IHL 5, ToS from the flow,
// ID/flags/offset 0, TTL 255, protocol 17; UDP checksum 0; RTP version 2,
// payload type from the flow, sequence number counting the flow's packets,
// timestamp from a 16-bit clock counter, SSRC 0xAD0F01AD.  ARP: HTYPE 1,
// PTYPE 0x0800, HLEN 6, PLEN 4.  The IPv4 and UDP length fields include the
// RTP header when present (the thesis's equations give 28 + payload and
// 8 + payload, the size without RTP).  ARP frames are padded with payload
// bytes to the 60-byte Ethernet minimum (this design's choice).  The payload
// pattern is the flow's 32-bit packet sequence number.
//
// Timing: a packet leaves GENERATE_PACKET two clocks after it is chosen; the
// next choice is made in the clock after the send stage reports done.
module packet_generator
  import pktgen_pkg::*;
#(
  parameter int unsigned N_FLOWS = pktgen_pkg::NUM_FLOWS
) (
  input  logic                        clk,
  input  logic                        rst,
  input  flow_cfg_t [N_FLOWS-1:0]   cfg,
  input  logic [N_FLOWS-1:0]        signal_generation,
  input  logic                        arp_request,
  input  logic                        send_done,
  output logic                        new_send,
  output logic [HDR_BITS-1:0]         all_together,
  output logic [20:0]                 bitsofheader,
  output logic [31:0]                 payload_size,     // in bits
  output logic [31:0]                 payload,          // repeated payload pattern
  output logic [63:0]                 module_header,
  output logic [31:0]                 num_packets_generated,
  output logic [$clog2(N_FLOWS)-1:0] current_flow,
  output logic [N_FLOWS-1:0][9:0]   signal_in
);
  typedef enum logic [1:0] {WAIT, GENERATE_PACKET, ALL_TO_ONE, SEND} st_t;
  st_t state;

  localparam int unsigned FW = $clog2(N_FLOWS);

  logic                       arp_pending;
  logic                       is_arp_reply;     // packet in progress answers an ARP request
  logic [FW-1:0]              flow;             // flow of the packet in progress
  logic [N_FLOWS-1:0][31:0] seq;              // packets sent per flow
  logic [15:0]                time_stamp;
  logic [N_FLOWS-1:0]       served;

  // Header registers (Table 3.1 sizes).
  logic [143:0] mac_header;     // 14 or 18 bytes, left-aligned
  logic         vlan;
  logic         arp;
  logic         rtp;
  logic [159:0] ip_header;
  logic [63:0]  udp_header;
  logic [95:0]  rtp_header;
  logic [223:0] arp_header;
  logic [31:0]  pay_bytes;
  logic [15:0]  fpga_dst;
  logic [18:0]  temp;

  // Configuration of the flow being chosen (in WAIT) or built (afterwards);
  // an ARP reply takes flow 0's addresses.
  flow_cfg_t     c;
  logic [FW-1:0] sel_flow;
  always_comb begin
    if (state == WAIT) sel_flow = arp_pending ? '0 : current_flow;
    else               sel_flow = is_arp_reply ? '0 : flow;
  end
  assign c = cfg[sel_flow];

  // Fields for GENERATE_PACKET, from the chosen flow's configuration.
  logic [15:0] rtp_len, ip_len, udp_len;
  logic [159:0] ip_fields;
  assign rtp_len   = c.rtp_enable ? 16'd12 : 16'd0;
  assign ip_len    = 16'd28 + rtp_len + c.payload_size_bytes[15:0];
  assign udp_len   = 16'd8  + rtp_len + c.payload_size_bytes[15:0];
  assign ip_fields = {4'd4, 4'd5, c.tos, ip_len, 16'd0, 3'd0, 13'd0, 8'd255, IP_PROTO_UDP,
                      16'd0, c.srcip, c.dstip};

  function automatic logic [18:0] sum16x10(input logic [159:0] h);
    logic [18:0] s;
    s = '0;
    for (int i = 0; i < 10; i++) s = s + 19'(h[i*16 +: 16]);
    return s;
  endfunction

  // ALL_TO_ONE: checksum and packing.
  logic [16:0] fold1;
  logic [15:0] sum, checksum;
  logic [159:0] ip_final;
  logic [20:0]  hdr_bits;
  logic [HDR_BITS-1:0] packed_hdr;
  logic [31:0]  frame_bytes, pad_bytes;
  assign fold1    = {1'b0, temp[15:0]} + {14'd0, temp[18:16]};
  assign sum      = fold1[15:0] + {15'd0, fold1[16]};
  assign checksum = 16'hFFFF - sum;
  assign ip_final = {ip_header[159:80], checksum, ip_header[63:0]};

  always_comb begin
    packed_hdr = '0;
    hdr_bits   = '0;
    unique case ({vlan, arp, rtp})
      3'b000: begin packed_hdr = {mac_header[143:32], ip_final, udp_header, 128'd0};             hdr_bits = 21'd336; end
      3'b001: begin packed_hdr = {mac_header[143:32], ip_final, udp_header, rtp_header, 32'd0};  hdr_bits = 21'd432; end
      3'b100: begin packed_hdr = {mac_header, ip_final, udp_header, 96'd0};                      hdr_bits = 21'd368; end
      3'b101: begin packed_hdr = {mac_header, ip_final, udp_header, rtp_header};                 hdr_bits = 21'd464; end
      3'b010, 3'b011: begin packed_hdr = {mac_header[143:32], arp_header, 128'd0};               hdr_bits = 21'd336; end
      default: begin packed_hdr = {mac_header, arp_header, 96'd0};                              hdr_bits = 21'd368; end
    endcase
  end
  // ARP frames are padded to 60 bytes.
  assign pad_bytes   = (vlan ? 32'd46 : 32'd42) >= 32'd60 ? 32'd0 : 32'd60 - (vlan ? 32'd46 : 32'd42);
  assign frame_bytes = 32'(hdr_bits[20:3]) + (arp ? pad_bytes : pay_bytes);

  always_ff @(posedge clk) begin
    if (rst) begin
      state                 <= WAIT;
      current_flow          <= '0;
      flow                  <= '0;
      signal_in             <= '0;
      arp_pending           <= 1'b0;
      is_arp_reply          <= 1'b0;
      seq                   <= '0;
      time_stamp            <= '0;
      new_send              <= 1'b0;
      all_together          <= '0;
      bitsofheader          <= '0;
      payload_size          <= '0;
      payload               <= '0;
      module_header         <= '0;
      num_packets_generated <= '0;
      mac_header            <= '0;
      vlan                  <= 1'b0;
      arp                   <= 1'b0;
      rtp                   <= 1'b0;
      ip_header             <= '0;
      udp_header            <= '0;
      rtp_header            <= '0;
      arp_header            <= '0;
      pay_bytes             <= '0;
      fpga_dst              <= '0;
      temp                  <= '0;
    end else begin
      time_stamp <= time_stamp + 1'b1;
      new_send   <= 1'b0;

      // Pending request counters: +1 per rater pulse, -1 per packet served.
      for (int f = 0; f < N_FLOWS; f++) begin
        if (signal_generation[f] && !served[f]) begin
          if (signal_in[f] != 10'h3FF) signal_in[f] <= signal_in[f] + 1'b1;
        end else if (!signal_generation[f] && served[f]) begin
          signal_in[f] <= signal_in[f] - 1'b1;
        end
      end
      if (arp_request) arp_pending <= 1'b1;

      unique case (state)
        WAIT: begin
          if (arp_pending || signal_in[current_flow] != 0) begin
            state        <= GENERATE_PACKET;
            is_arp_reply <= arp_pending;
            flow         <= current_flow;
            if (arp_pending) arp_pending <= arp_request;
            // Header registers.
            vlan <= (c.cos_value != 0);
            arp  <= arp_pending || c.arp_enable;
            rtp  <= c.rtp_enable && !(arp_pending || c.arp_enable);
            if (c.cos_value != 0)
              mac_header <= {(arp_pending ? 48'hFFFF_FFFF_FFFF : c.dstmac), c.srcmac,
                             ETH_TYPE_VLAN, c.cos_value, 1'b0, 12'd0,
                             (arp_pending || c.arp_enable) ? ETH_TYPE_ARP : ETH_TYPE_IPV4};
            else
              mac_header <= {(arp_pending ? 48'hFFFF_FFFF_FFFF : c.dstmac), c.srcmac,
                             (arp_pending || c.arp_enable) ? ETH_TYPE_ARP : ETH_TYPE_IPV4, 32'd0};
            pay_bytes  <= c.payload_size_bytes;
            fpga_dst   <= c.fpga_dst_port;
          end else begin
            current_flow <= current_flow + 1'b1;
          end
        end
        GENERATE_PACKET: begin
          // Fill the header registers (checksum field still zero) and start
          // the checksum sum.
          ip_header  <= ip_fields;
          temp       <= sum16x10(ip_fields);
          udp_header <= {c.srcport, c.dstport, udp_len, 16'd0};
          rtp_header <= {2'd2, 1'b0, 1'b0, 4'd0, 1'b0, c.pt, seq[flow][15:0],
                         16'd0, time_stamp, RTP_SSRC};
          arp_header <= is_arp_reply
                      ? {16'd1, ETH_TYPE_IPV4, 8'd6, 8'd4, 16'd2, c.srcmac, c.srcip, c.srcmac, c.srcip}
                      : {16'd1, ETH_TYPE_IPV4, 8'd6, 8'd4, c.arp_opcode, c.srcmac, c.srcip, c.dstmac, c.dstip};
          state      <= ALL_TO_ONE;
        end
        ALL_TO_ONE: begin
          all_together  <= packed_hdr;
          bitsofheader  <= hdr_bits;
          payload_size  <= (arp ? pad_bytes : pay_bytes) << 3;
          payload       <= arp ? 32'd0 : seq[flow];
          module_header <= {fpga_dst, 16'((frame_bytes + 32'd7) >> 3), 16'd0, frame_bytes[15:0]};
          new_send      <= 1'b1;
          state         <= SEND;
        end
        SEND: begin
          if (send_done) begin
            num_packets_generated <= num_packets_generated + 1'b1;
            if (!is_arp_reply) begin
              seq[flow]    <= seq[flow] + 1'b1;
              current_flow <= current_flow + 1'b1;
            end
            state <= WAIT;
          end
        end
        default: state <= WAIT;
      endcase
    end
  end

  // A flow's request is consumed when its packet is chosen.
  always_comb begin
    served = '0;
    if (state == WAIT && !arp_pending && signal_in[current_flow] != 0)
      served[current_flow] = 1'b1;
  end
endmodule
