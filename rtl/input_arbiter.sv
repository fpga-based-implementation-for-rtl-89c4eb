// input_arbiter: merges the MAC receive queues into one packet stream.
//
// Each of the N_PORTS inputs (NetFPGA push handshake) has its own small
// FIFO.  The arbiter serves the inputs in turn, a whole packet at a time:
// starting after the input served last, it takes the first FIFO that holds a
// module header word and forwards words from it, one per clock while out_rdy
// is high, until the word that ends the packet.  It then moves on.  The
// thesis gives this block's role in the reference pipeline (serve the
// receive queues in sequence); the per-input FIFOs and the packet-wise round
// robin are this design's choices.  Words that arrive in a FIFO without a
// leading module header are dropped.
module input_arbiter
  import pktgen_pkg::*;
#(
  parameter int unsigned N_PORTS    = pktgen_pkg::NUM_PORTS,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [N_PORTS-1:0]       in_wr,
  input  logic [N_PORTS-1:0][7:0]  in_ctrl,
  input  logic [N_PORTS-1:0][63:0] in_data,
  output logic [N_PORTS-1:0]       in_rdy,
  output logic                     out_wr,
  output logic [7:0]               out_ctrl,
  output logic [63:0]              out_data,
  input  logic                     out_rdy
);
  localparam int unsigned PW = (N_PORTS > 1) ? $clog2(N_PORTS) : 1;

  logic [N_PORTS-1:0]        f_empty, f_rd;
  logic [N_PORTS-1:0][71:0]  f_dout;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_in
    logic full, afull;
    logic [$clog2(FIFO_DEPTH+1)-1:0] cnt;
    sync_fifo #(.WIDTH(72), .DEPTH(FIFO_DEPTH), .AFULL_SLACK(1)) u_fifo (
      .clk, .rst,
      .wr_en(in_wr[p]), .wr_data({in_ctrl[p], in_data[p]}),
      .rd_en(f_rd[p]), .rd_data(f_dout[p]),
      .empty(f_empty[p]), .full(full), .almost_full(afull), .count(cnt)
    );
    assign in_rdy[p] = !afull;
  end

  logic          active;     // a packet is being forwarded
  logic [PW-1:0] cur;        // input being served
  logic [PW-1:0] last;       // input served last
  logic          found;
  logic [PW-1:0] next_in;

  // Round-robin search for the next input with a packet at its head.
  always_comb begin
    found   = 1'b0;
    next_in = last;
    for (int k = 1; k <= N_PORTS; k++) begin
      automatic int unsigned idx = (32'(last) + k) % N_PORTS;
      if (!found && !f_empty[idx] && f_dout[idx][71:64] == CTRL_MODHDR) begin
        found   = 1'b1;
        next_in = PW'(idx);
      end
    end
  end

  assign out_wr   = active && !f_empty[cur] && out_rdy;
  assign out_ctrl = f_dout[cur][71:64];
  assign out_data = f_dout[cur][63:0];

  always_comb begin
    f_rd = '0;
    if (active) begin
      f_rd[cur] = out_wr && out_rdy;
    end
    // Drop stray words that do not start a packet.
    for (int p = 0; p < N_PORTS; p++)
      if (!(active && PW'(p) == cur) && !f_empty[p] && f_dout[p][71:64] != CTRL_MODHDR)
        f_rd[p] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      cur    <= '0;
      last   <= PW'(N_PORTS - 1);
    end else if (!active) begin
      if (found) begin
        active <= 1'b1;
        cur    <= next_in;
      end
    end else if (out_wr && out_rdy && is_eop(out_ctrl)) begin
      active <= 1'b0;
      last   <= cur;
    end
  end
endmodule
