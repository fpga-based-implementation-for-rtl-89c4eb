// pktgen_top: user data path of a four-flow gigabit packet generator and
// receiver for network measurements.
//
// Transmit side: rater -> packet_generator -> send -> my_output_queues.
// The rater issues a generation request per flow at a programmable period,
// the packet generator serves the four flows in round-robin time slots and
// builds their MAC/802.1Q/IPv4/UDP/RTP or ARP headers, the send stage cuts
// each packet into 64-bit words behind a module header, and the output
// queues copy it to the MAC transmit queue(s) named in that header.
//
// Receive side: the four MAC receive streams are each watched by a
// statistics block (bits/s, packets/s, jitter per second), merged by the
// input arbiter, watched by a fifth statistics block for the aggregate, and
// parsed by the packet parser, whose arp_request pulse makes the generator
// send a gratuitous ARP reply.
//
// All streams use the NetFPGA push handshake: 64-bit data, 8-bit ctrl, wr
// from the sender and rdy from the receiver; the sender raises wr only while
// rdy is high, and a word moves on every clock with wr high.  The
// configuration and result registers, which the NetFPGA register system maps
// onto the host bus, are plain ports here, and the MAC queues are outside
// this module.  One clock is 8 ns (125 MHz); CLK_PER_SEC sets the statistics
// window.  The block structure and wiring, including the four per-port and
// one aggregate statistics blocks and the arp_request path, follow the
// thesis; flattening the register file into ports is this design's choice.
module pktgen_top
  import pktgen_pkg::*;
#(
  parameter int unsigned CLK_PER_SEC = 125_000_000,
  parameter int unsigned OQ_DEPTH    = 512
) (
  input  logic                        clk,
  input  logic                        rst,
  // Generator registers
  input  logic                        send_enable,
  input  logic [NUM_FLOWS-1:0][31:0]  clk_limit,
  input  flow_cfg_t [NUM_FLOWS-1:0]   flow_cfg,
  output logic [NUM_FLOWS-1:0][31:0]  packets_generated,
  output logic [31:0]                 num_packets_generated,
  output logic [NUM_FLOWS-1:0][9:0]   pending_requests,
  output logic [$clog2(NUM_FLOWS)-1:0] current_flow,
  output logic [31:0]                 packets_routed,
  // MAC receive queues
  input  logic [NUM_PORTS-1:0]        rx_wr,
  input  logic [NUM_PORTS-1:0][7:0]   rx_ctrl,
  input  logic [NUM_PORTS-1:0][63:0]  rx_data,
  output logic [NUM_PORTS-1:0]        rx_rdy,
  // MAC transmit queues
  output logic [NUM_PORTS-1:0]        tx_wr,
  output logic [NUM_PORTS-1:0][7:0]   tx_ctrl,
  output logic [NUM_PORTS-1:0][63:0]  tx_data,
  input  logic [NUM_PORTS-1:0]        tx_rdy,
  // Statistics registers: index NUM_PORTS is the aggregate stream
  output logic [NUM_PORTS:0][31:0]    bps,
  output logic [NUM_PORTS:0][31:0]    pps,
  output logic [NUM_PORTS:0][31:0]    jitter,
  output logic [NUM_PORTS:0]          window_done,
  // Parser results
  output logic                        arp_request,
  output logic [31:0]                 rx_udp_packets,
  output logic [31:0]                 rx_arp_packets,
  output logic [31:0]                 rx_dropped_packets,
  output logic                        rx_udp_valid,
  output logic [31:0]                 rx_udp_src_ip,
  output logic [15:0]                 rx_udp_src_port,
  output logic [63:0]                 rx_first_payload
);
  // ---------------- transmit side ----------------
  logic [NUM_FLOWS-1:0]       signal_generation;
  logic                       new_send, send_done, send_busy;
  logic [HDR_BITS-1:0]        all_together;
  logic [20:0]                bitsofheader;
  logic [31:0]                payload_size, payload;
  logic [63:0]                module_header;
  logic                       gen_wr, gen_rdy;
  logic [7:0]                 gen_ctrl;
  logic [63:0]                gen_data;

  rater #(.N_FLOWS(NUM_FLOWS)) u_rater (
    .clk, .rst,
    .enable           (send_enable),
    .clk_limit        (clk_limit),
    .signal_out       (signal_generation),
    .packets_generated(packets_generated)
  );

  packet_generator #(.N_FLOWS(NUM_FLOWS)) u_gen (
    .clk, .rst,
    .cfg                  (flow_cfg),
    .signal_generation    (signal_generation),
    .arp_request          (arp_request),
    .send_done            (send_done),
    .new_send             (new_send),
    .all_together         (all_together),
    .bitsofheader         (bitsofheader),
    .payload_size         (payload_size),
    .payload              (payload),
    .module_header        (module_header),
    .num_packets_generated(num_packets_generated),
    .current_flow         (current_flow),
    .signal_in            (pending_requests)
  );

  send u_send (
    .clk, .rst,
    .in_new_send     (new_send),
    .in_alltogether  (all_together),
    .in_bitsofheader (bitsofheader),
    .in_payload_size (payload_size),
    .in_payload      (payload),
    .in_module_header(module_header),
    .out_done        (send_done),
    .busy            (send_busy),
    .out_data        (gen_data),
    .out_ctrl        (gen_ctrl),
    .out_wr          (gen_wr),
    .out_rdy         (gen_rdy)
  );

  my_output_queues #(.N_PORTS(NUM_PORTS), .OQ_DEPTH(OQ_DEPTH)) u_oq (
    .clk, .rst,
    .in_wr         (gen_wr),
    .in_ctrl       (gen_ctrl),
    .in_data       (gen_data),
    .in_rdy        (gen_rdy),
    .out_wr        (tx_wr),
    .out_ctrl      (tx_ctrl),
    .out_data      (tx_data),
    .out_rdy       (tx_rdy),
    .packets_routed(packets_routed)
  );

  // ---------------- receive side ----------------
  logic        agg_wr, agg_rdy;
  logic [7:0]  agg_ctrl;
  logic [63:0] agg_data;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port_stats
    statistics #(.CLK_PER_SEC(CLK_PER_SEC)) u_stats (
      .clk, .rst,
      .in_wr      (rx_wr[p] && rx_rdy[p]),
      .in_ctrl    (rx_ctrl[p]),
      .in_data    (rx_data[p]),
      .bps        (bps[p]),
      .pps        (pps[p]),
      .jitter     (jitter[p]),
      .window_done(window_done[p])
    );
  end

  input_arbiter #(.N_PORTS(NUM_PORTS)) u_arb (
    .clk, .rst,
    .in_wr   (rx_wr),
    .in_ctrl (rx_ctrl),
    .in_data (rx_data),
    .in_rdy  (rx_rdy),
    .out_wr  (agg_wr),
    .out_ctrl(agg_ctrl),
    .out_data(agg_data),
    .out_rdy (agg_rdy)
  );

  statistics #(.CLK_PER_SEC(CLK_PER_SEC)) u_stats_agg (
    .clk, .rst,
    .in_wr      (agg_wr && agg_rdy),
    .in_ctrl    (agg_ctrl),
    .in_data    (agg_data),
    .bps        (bps[NUM_PORTS]),
    .pps        (pps[NUM_PORTS]),
    .jitter     (jitter[NUM_PORTS]),
    .window_done(window_done[NUM_PORTS])
  );

  logic [31:0] udp_dst_ip;
  logic [15:0] udp_dst_port;

  packet_parser u_parser (
    .clk, .rst,
    .in_wr          (agg_wr && agg_rdy),
    .in_ctrl        (agg_ctrl),
    .in_data        (agg_data),
    .in_rdy         (agg_rdy),
    .arp_request    (arp_request),
    .udp_valid      (rx_udp_valid),
    .udp_src_ip     (rx_udp_src_ip),
    .udp_dst_ip     (udp_dst_ip),
    .udp_src_port   (rx_udp_src_port),
    .udp_dst_port   (udp_dst_port),
    .first_payload  (rx_first_payload),
    .udp_packets    (rx_udp_packets),
    .arp_packets    (rx_arp_packets),
    .dropped_packets(rx_dropped_packets)
  );
endmodule
