// pktgen_pkg: types and constants shared by the packet generator and receiver.
//
// The datapath follows the NetFPGA-1G user data path convention: 64-bit data
// words plus an 8-bit ctrl byte.  ctrl = 8'hFF marks the module header word,
// 8'h00 a packet body word, and any other value marks the last word of the
// packet, with 1 << (valid_bytes-1) giving the number of valid bytes
// (8'h80 = 8 bytes ... 8'h01 = 1 byte).  Byte 0 of the frame travels in
// data[63:56].
//
// Module header layout (data[63:0]):
//   [63:48] destination port mask, one-hot, MAC port i = bit 2*i, CPU port i = bit 2*i+1
//   [47:32] packet length in 64-bit words
//   [31:16] source port mask, same encoding
//   [15:0]  packet length in bytes
//
// flow_cfg_t groups the per-flow registers of the packet generator
// (payload size, addresses, ports, packet type options).  The widths are those
// of the header fields they fill; the register system keeps them in 32-bit
// registers.  The ctrl codes and module header layout are the NetFPGA
// platform's, as the thesis uses them; the constants (EtherTypes, UDP
// protocol number, RTP SSRC 0xAD0F01AD) are the thesis's header tables;
// grouping the flow registers in one struct is this design's choice.
package pktgen_pkg;

  localparam int unsigned NUM_FLOWS = 4;
  localparam int unsigned NUM_PORTS = 4;
  localparam int unsigned DATA_W    = 64;
  localparam int unsigned CTRL_W    = 8;

  localparam logic [7:0] CTRL_MODHDR = 8'hFF;
  localparam logic [7:0] CTRL_BODY   = 8'h00;

  // Largest header block: MAC with 802.1Q tag (18) + IPv4 (20) + UDP (8) + RTP (12) bytes.
  localparam int unsigned HDR_BITS = 464;

  localparam logic [15:0] ETH_TYPE_IPV4 = 16'h0800;
  localparam logic [15:0] ETH_TYPE_ARP  = 16'h0806;
  localparam logic [15:0] ETH_TYPE_VLAN = 16'h8100;
  localparam logic [7:0]  IP_PROTO_UDP  = 8'd17;
  localparam logic [31:0] RTP_SSRC      = 32'hAD0F01AD;

  typedef struct packed {
    logic [31:0] payload_size_bytes;
    logic [31:0] dstip;
    logic [31:0] srcip;
    logic [15:0] dstport;
    logic [15:0] srcport;
    logic [47:0] dstmac;
    logic [47:0] srcmac;
    logic        arp_enable;
    logic [15:0] arp_opcode;
    logic        rtp_enable;
    logic [6:0]  pt;
    logic [2:0]  cos_value;
    logic [7:0]  tos;
    logic [15:0] fpga_dst_port;
  } flow_cfg_t;

  // Number of valid bytes (1..8) -> end-of-packet ctrl code.
  function automatic logic [7:0] eop_ctrl(input logic [3:0] nbytes);
    return 8'h01 << (nbytes - 4'd1);
  endfunction

  // End-of-packet ctrl code -> number of valid bytes (1..8); 0 if not a single bit.
  function automatic logic [3:0] ctrl_bytes(input logic [7:0] ctrl);
    logic [3:0] n;
    n = 4'd0;
    for (int i = 0; i < 8; i++)
      if (ctrl == (8'h01 << i)) n = 4'(i + 1);
    return n;
  endfunction

  function automatic logic is_eop(input logic [7:0] ctrl);
    return (ctrl != CTRL_MODHDR) && (ctrl != CTRL_BODY);
  endfunction

endpackage
