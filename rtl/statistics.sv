// statistics: receive statistics of one packet stream, per one-second window.
//
// The module watches a NetFPGA word stream (in_wr marks a word that was
// transferred).  Its state machine follows each packet: WAIT, CTRL_FF on the
// module header, CTRL_00 on body words and CTRL_XX on the last word.  On the
// module header it takes the packet length in bytes from bits [15:0] and the
// arrival time from the free-running second counter; on the last word it
// counts the packet.
//
// A 32-bit counter runs from 0 to CLK_PER_SEC-1 (125,000,000 clocks of 8 ns
// make one second).  When it wraps, the accumulated bit count and packet
// count are copied to bps and pps and cleared.  Jitter is the mean absolute
// difference between consecutive inter-arrival gaps, in nanoseconds: for each
// packet from the third on in a window, |gap_n - gap_(n-1)| * NS_PER_CLK is
// added to sum_jitter, and at the end of the window the division module
// divides sum_jitter by the number of samples (normally pps - 2).  The result appears
// in jitter WIDTH+1 clocks after the window closes; with fewer than three
// packets in the window jitter is zero.  Gaps are measured modulo the second
// counter so a wrap between two arrivals is handled.  The FSM, the register
// names and the counter follow the thesis; that the inter-arrival history
// restarts at each window is this design's reading of its three-packet rule.
module statistics
  import pktgen_pkg::*;
#(
  parameter int unsigned CLK_PER_SEC = 125_000_000,
  parameter int unsigned NS_PER_CLK  = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_wr,
  input  logic [7:0]  in_ctrl,
  input  logic [63:0] in_data,
  output logic [31:0] bps,
  output logic [31:0] pps,
  output logic [31:0] jitter,
  output logic        window_done   // one-cycle pulse when bps/pps are updated
);
  typedef enum logic [1:0] {WAIT, CTRL_FF, CTRL_00, CTRL_XX} st_t;
  st_t state;

  logic [31:0] counter;
  logic [31:0] total_bits;
  logic [31:0] packets;
  logic [31:0] packet1, packet2;     // arrival times of the two previous packets
  logic [31:0] last_gap;
  logic [31:0] absolute_value;
  logic [31:0] sum_jitter;
  logic [31:0] samples;             // jitter samples summed in this window
  logic [1:0]  seen;                 // packets seen in this window, saturating at 2
  logic        sec_end;

  logic [31:0] gap_now;
  logic [31:0] diff;

  logic        div_start;
  logic [40:0] div_dividend, div_divider, div_q, div_r;
  logic        div_ready, div_busy;

  assign sec_end = (counter == CLK_PER_SEC - 1);
  // Gap since the previous arrival, taken modulo the second counter.
  assign gap_now = (counter >= packet2) ? (counter - packet2)
                                        : (counter + CLK_PER_SEC - packet2);
  assign diff    = (gap_now >= last_gap) ? (gap_now - last_gap) : (last_gap - gap_now);

  wire hdr_word = in_wr && (in_ctrl == CTRL_MODHDR);
  wire eop_word = in_wr && is_eop(in_ctrl);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= WAIT;
      counter <= '0;
    end else begin
      counter <= sec_end ? '0 : counter + 1'b1;
      unique case (state)
        WAIT, CTRL_XX: state <= hdr_word ? CTRL_FF : WAIT;
        CTRL_FF, CTRL_00: begin
          if (eop_word)                       state <= CTRL_XX;
          else if (in_wr && in_ctrl == CTRL_BODY) state <= CTRL_00;
          else if (hdr_word)                  state <= CTRL_FF;
        end
        default: state <= WAIT;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      total_bits     <= '0;
      packets        <= '0;
      packet1        <= '0;
      packet2        <= '0;
      last_gap       <= '0;
      absolute_value <= '0;
      sum_jitter     <= '0;
      seen           <= '0;
      samples        <= '0;
      bps            <= '0;
      pps            <= '0;
      window_done    <= 1'b0;
      div_start      <= 1'b0;
      div_dividend   <= '0;
      div_divider    <= '0;
    end else begin
      window_done <= 1'b0;
      div_start   <= 1'b0;
      if (sec_end) begin
        // Close the window.  A packet header arriving in this same cycle is
        // counted in the new window.
        bps          <= total_bits;
        pps          <= packets;
        window_done  <= 1'b1;
        div_start    <= 1'b1;
        div_dividend <= 41'(sum_jitter);
        div_divider  <= (packets >= 3) ? 41'(samples) : 41'd0;
        samples      <= '0;
        total_bits   <= hdr_word ? {13'd0, in_data[15:0], 3'b000} : '0;
        packets      <= '0;
        sum_jitter   <= '0;
        seen         <= hdr_word ? 2'd1 : 2'd0;
        if (hdr_word) packet2 <= counter;
      end else begin
        if (hdr_word) begin
          total_bits <= total_bits + {13'd0, in_data[15:0], 3'b000};
          packet1    <= packet2;
          packet2    <= counter;
          last_gap   <= gap_now;
          if (seen == 2'd2) begin
            samples        <= samples + 1'b1;
            absolute_value <= diff;
            sum_jitter     <= sum_jitter + diff * NS_PER_CLK;
          end
          if (seen != 2'd2) seen <= seen + 1'b1;
        end
        if (eop_word) packets <= packets + 1'b1;
      end
    end
  end

  division #(.WIDTH(41)) u_div (
    .clk        (clk),
    .rst        (rst),
    .in_start   (div_start),
    .in_dividend(div_dividend),
    .in_divider (div_divider),
    .quotient   (div_q),
    .remainder  (div_r),
    .ready      (div_ready),
    .busy       (div_busy)
  );

  always_ff @(posedge clk) begin
    if (rst)
      jitter <= '0;
    else if (div_ready)
      jitter <= (div_divider == 0) ? 32'd0 : div_q[31:0];
  end
endmodule
