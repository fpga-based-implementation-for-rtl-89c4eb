// sync_fifo: single-clock first-word-fall-through FIFO used for packet buffering.
//
// The thesis buffers packets in on-chip FIFOs in the parser, the send stage
// and the output queues but does not describe a FIFO; this is the plain
// circular-buffer form.  The head entry is visible on rd_data whenever
// empty is low; rd_en pops it at the clock edge.  wr_en while full and rd_en
// while empty are ignored.  count gives the occupancy and almost_full rises
// when AFULL_SLACK or fewer entries are free.
module sync_fifo #(
  parameter int unsigned WIDTH       = 72,
  parameter int unsigned DEPTH       = 16,
  parameter int unsigned AFULL_SLACK = 2
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic                     almost_full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty       = (count == 0);
  assign full        = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign almost_full = (32'(count) + AFULL_SLACK >= DEPTH);
  assign do_wr       = wr_en && !full;
  assign do_rd       = rd_en && !empty;
  assign rd_data     = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (32'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (32'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end
endmodule
