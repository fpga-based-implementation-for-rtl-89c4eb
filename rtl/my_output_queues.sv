// my_output_queues: routes generated packets to the MAC transmit queues.
//
// Incoming words (NetFPGA push handshake, in_rdy is back-pressure) are first
// stored in an input FIFO.  A state machine moves one packet at a time:
//   WAIT           until the input FIFO holds a word
//   DST_PORT_CALC  one clock: read the module header at the FIFO head and
//                  take the destination MAC queues from bits [63:48]
//                  (MAC port i is bit 2*i; the CPU bits are ignored)
//   SEND           copy the words, module header first, into every selected
//                  output FIFO, one word per clock while none of them is full;
//                  the word whose ctrl is neither 8'h00 nor 8'hFF ends the packet
// A packet whose mask selects no MAC queue is read and discarded.  Each
// output FIFO drains to its MAC transmit queue under the same push
// handshake.  The one-clock decision and the on-chip FIFOs replacing the
// SRAM buffering follow the thesis; the FIFO depths are this design's
// choice.  Per packet the module spends one clock in DST_PORT_CALC plus one
// clock per word and one in WAIT, so a 60-byte packet (module header + 8
// words) moves in 11 clocks.
module my_output_queues
  import pktgen_pkg::*;
#(
  parameter int unsigned N_PORTS  = pktgen_pkg::NUM_PORTS,
  parameter int unsigned IN_DEPTH = 32,
  parameter int unsigned OQ_DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_wr,
  input  logic [7:0]               in_ctrl,
  input  logic [63:0]              in_data,
  output logic                     in_rdy,
  output logic [N_PORTS-1:0]       out_wr,
  output logic [N_PORTS-1:0][7:0]  out_ctrl,
  output logic [N_PORTS-1:0][63:0] out_data,
  input  logic [N_PORTS-1:0]       out_rdy,
  output logic [31:0]              packets_routed
);
  typedef enum logic [1:0] {WAIT, DST_PORT_CALC, SEND} st_t;
  st_t state;

  logic        if_empty, if_full, if_afull, if_rd;
  logic [71:0] if_dout;
  logic [$clog2(IN_DEPTH+1)-1:0] if_count;

  sync_fifo #(.WIDTH(72), .DEPTH(IN_DEPTH), .AFULL_SLACK(1)) u_in_fifo (
    .clk, .rst,
    .wr_en(in_wr), .wr_data({in_ctrl, in_data}),
    .rd_en(if_rd), .rd_data(if_dout),
    .empty(if_empty), .full(if_full), .almost_full(if_afull), .count(if_count)
  );
  assign in_rdy = !if_afull;

  logic [N_PORTS-1:0] dst, oq_full, oq_empty, oq_wr;
  logic               blocked;

  always_comb begin
    blocked = 1'b0;
    for (int p = 0; p < N_PORTS; p++)
      if (dst[p] && oq_full[p]) blocked = 1'b1;
  end

  assign if_rd = (state == SEND) && !if_empty && !blocked;
  assign oq_wr = if_rd ? dst : '0;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_oq
    logic [71:0] dout;
    logic        afull;
    logic [$clog2(OQ_DEPTH+1)-1:0] cnt;
    sync_fifo #(.WIDTH(72), .DEPTH(OQ_DEPTH), .AFULL_SLACK(1)) u_oq (
      .clk, .rst,
      .wr_en(oq_wr[p]), .wr_data(if_dout),
      .rd_en(out_wr[p] && out_rdy[p]), .rd_data(dout),
      .empty(oq_empty[p]), .full(oq_full[p]), .almost_full(afull), .count(cnt)
    );
    assign out_wr[p]   = !oq_empty[p] && out_rdy[p];
    assign out_ctrl[p] = dout[71:64];
    assign out_data[p] = dout[63:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= WAIT;
      dst            <= '0;
      packets_routed <= '0;
    end else begin
      unique case (state)
        WAIT: if (!if_empty) state <= DST_PORT_CALC;
        DST_PORT_CALC: begin
          for (int p = 0; p < N_PORTS; p++) dst[p] <= if_dout[48 + 2*p];
          state <= SEND;
        end
        SEND: if (if_rd && is_eop(if_dout[71:64])) begin
          packets_routed <= packets_routed + 1'b1;
          state          <= WAIT;
        end
        default: state <= WAIT;
      endcase
    end
  end
endmodule
