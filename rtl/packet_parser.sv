// packet_parser: header parser of the receive path.
//
// Received words are first buffered in a FIFO (in_rdy is its back-pressure).
// A state machine then rebuilds the headers one 64-bit word per clock:
//   WAIT            drop words until a module header (ctrl 8'hFF) arrives
//   ETHERNET_HEADER two words: MAC header bytes 0..13 plus the first two bytes
//                   of the next header
//   IP_ARP_HEADER   three words of IPv4 header, or four words of ARP packet
//   UDP_HEADER      one word with the last two bytes of the UDP header
//   PAYLOAD         first payload word, then back to WAIT
// An EtherType that is neither IPv4 (0x0800) nor ARP (0x0806), or an IPv4
// protocol other than UDP (17), ends parsing of that packet (it is dropped).
// When an ARP packet with operation 1 (request) has been read, arp_request
// pulses for one clock; the packet generator answers it with a gratuitous ARP
// reply.  For UDP packets udp_valid pulses with the parsed fields.  The
// thesis's text gives 0x8100 as the ARP EtherType in this section; the ARP
// EtherType 0x0806 that the generator itself uses is followed here.
module packet_parser
  import pktgen_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_wr,
  input  logic [7:0]  in_ctrl,
  input  logic [63:0] in_data,
  output logic        in_rdy,
  output logic        arp_request,
  output logic        udp_valid,
  output logic [31:0] udp_src_ip,
  output logic [31:0] udp_dst_ip,
  output logic [15:0] udp_src_port,
  output logic [15:0] udp_dst_port,
  output logic [63:0] first_payload,
  output logic [31:0] udp_packets,
  output logic [31:0] arp_packets,
  output logic [31:0] dropped_packets
);
  typedef enum logic [2:0] {WAIT, ETHERNET_HEADER, IP_ARP_HEADER, UDP_HEADER, PAYLOAD} st_t;
  st_t state;

  logic        f_empty, f_full, f_afull;
  logic [71:0] f_dout;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;
  logic [7:0]  ctrl;
  logic [63:0] data;
  logic        pop;

  sync_fifo #(.WIDTH(72), .DEPTH(FIFO_DEPTH), .AFULL_SLACK(1)) u_fifo (
    .clk, .rst,
    .wr_en(in_wr), .wr_data({in_ctrl, in_data}),
    .rd_en(pop), .rd_data(f_dout),
    .empty(f_empty), .full(f_full), .almost_full(f_afull), .count(f_count)
  );

  assign in_rdy = !f_afull;
  assign pop    = !f_empty;            // one word per clock, never stalls
  assign ctrl   = f_dout[71:64];
  assign data   = f_dout[63:0];

  logic [2:0]   wcnt;                  // word index inside the current state
  logic [111:0] mac_header;
  logic [15:0]  mac_type;
  logic [159:0] ip_header;
  logic [63:0]  udp_header;
  logic [15:0]  arp_oper;
  logic [47:0]  pay_hi;

  wire eop = is_eop(ctrl);

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= WAIT;
      wcnt            <= '0;
      mac_header      <= '0;
      mac_type        <= '0;
      ip_header       <= '0;
      udp_header      <= '0;
      arp_oper        <= '0;
      pay_hi          <= '0;
      arp_request     <= 1'b0;
      udp_valid       <= 1'b0;
      udp_src_ip      <= '0;
      udp_dst_ip      <= '0;
      udp_src_port    <= '0;
      udp_dst_port    <= '0;
      first_payload   <= '0;
      udp_packets     <= '0;
      arp_packets     <= '0;
      dropped_packets <= '0;
    end else begin
      arp_request <= 1'b0;
      udp_valid   <= 1'b0;
      if (pop) begin
        if (ctrl == CTRL_MODHDR) begin
          // A module header always starts a new packet.
          state <= ETHERNET_HEADER;
          wcnt  <= '0;
        end else begin
          unique case (state)
            WAIT: ;
            ETHERNET_HEADER: begin
              if (wcnt == 0) begin
                mac_header[111:48] <= data;
                wcnt <= 3'd1;
                if (eop) begin state <= WAIT; dropped_packets <= dropped_packets + 1'b1; end
              end else begin
                mac_header[47:0] <= data[63:16];
                mac_type         <= data[31:16];
                ip_header[159:144] <= data[15:0];    // first 16 bits of the next header
                wcnt <= '0;
                if (eop || (data[31:16] != ETH_TYPE_IPV4 && data[31:16] != ETH_TYPE_ARP)) begin
                  state <= WAIT;
                  dropped_packets <= dropped_packets + 1'b1;
                end else begin
                  state <= IP_ARP_HEADER;
                end
              end
            end
            IP_ARP_HEADER: begin
              wcnt <= wcnt + 1'b1;
              if (mac_type == ETH_TYPE_IPV4) begin
                unique case (wcnt)
                  3'd0: ip_header[143:80] <= data;
                  3'd1: ip_header[79:16]  <= data;
                  default: begin
                    ip_header[15:0]    <= data[63:48];
                    udp_header[63:16]  <= data[47:0];
                  end
                endcase
                if (wcnt == 3'd2) begin
                  wcnt <= '0;
                  if (eop || ip_header[87:80] != IP_PROTO_UDP) begin
                    state <= WAIT;
                    dropped_packets <= dropped_packets + 1'b1;
                  end else begin
                    state <= UDP_HEADER;
                  end
                end else if (eop) begin
                  state <= WAIT;
                  dropped_packets <= dropped_packets + 1'b1;
                end
              end else begin
                // ARP: operation code is in bytes 6..7 of the ARP packet.
                if (wcnt == 3'd0) arp_oper <= data[31:16];
                if (wcnt == 3'd3 || eop) begin
                  state <= WAIT;
                  wcnt  <= '0;
                  if (wcnt == 3'd3) begin
                    arp_packets <= arp_packets + 1'b1;
                    if (arp_oper == 16'd1) arp_request <= 1'b1;
                  end else begin
                    dropped_packets <= dropped_packets + 1'b1;
                  end
                end
              end
            end
            UDP_HEADER: begin
              udp_header[15:0] <= data[63:48];
              pay_hi           <= data[47:0];
              udp_src_ip   <= ip_header[63:32];
              udp_dst_ip   <= ip_header[31:0];
              udp_src_port <= udp_header[63:48];
              udp_dst_port <= udp_header[47:32];
              udp_packets  <= udp_packets + 1'b1;
              state        <= eop ? WAIT : PAYLOAD;
              if (eop) begin
                first_payload <= {data[47:0], 16'd0};
                udp_valid     <= 1'b1;
              end
            end
            PAYLOAD: begin
              // The payload starts at frame byte 42, two bytes into the previous word.
              first_payload <= {pay_hi, data[63:48]};
              state     <= WAIT;
              udp_valid <= 1'b1;
            end
            default: state <= WAIT;
          endcase
        end
      end
    end
  end
endmodule
