// division: serial unsigned divider, one quotient bit per clock.
//
// A one-cycle pulse on in_start loads in_dividend and in_divider into internal
// registers (the inputs need not be held) and starts a restoring
// shift-and-subtract division.  After WIDTH clock cycles quotient and
// remainder hold the result and ready pulses for one cycle.  A new in_start
// while a division is running abandons it and starts the new one.  Dividing
// by zero is not checked: the algorithm then yields a quotient of all ones,
// and the caller is expected to test the divisor.  The 41-bit width, the
// restart rule and the all-ones result follow the thesis; the restoring
// algorithm is this design's choice.
module division #(
  parameter int unsigned WIDTH = 41
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_start,
  input  logic [WIDTH-1:0] in_dividend,
  input  logic [WIDTH-1:0] in_divider,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder,
  output logic             ready,
  output logic             busy
);
  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] dvd;      // dividend bits still to be shifted in (MSB first)
  logic [WIDTH-1:0] dvs;
  logic [WIDTH-1:0] q;
  logic [WIDTH:0]   r;        // partial remainder, one bit wider than the operands
  logic [CW-1:0]    cnt;

  logic [WIDTH:0]   r_shift;
  logic [WIDTH:0]   r_sub;
  assign r_shift = {r[WIDTH-1:0], dvd[WIDTH-1]};
  assign r_sub   = r_shift - {1'b0, dvs};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      ready     <= 1'b0;
      cnt       <= '0;
      dvd       <= '0;
      dvs       <= '0;
      q         <= '0;
      r         <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      ready <= 1'b0;
      if (in_start) begin
        busy <= 1'b1;
        dvd  <= in_dividend;
        dvs  <= in_divider;
        q    <= '0;
        r    <= '0;
        cnt  <= CW'(WIDTH);
      end else if (busy) begin
        dvd <= dvd << 1;
        if (!r_sub[WIDTH]) begin
          r <= r_sub;
          q <= {q[WIDTH-2:0], 1'b1};
        end else begin
          r <= r_shift;
          q <= {q[WIDTH-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy      <= 1'b0;
          ready     <= 1'b1;
          quotient  <= {q[WIDTH-2:0], !r_sub[WIDTH]};
          remainder <= !r_sub[WIDTH] ? r_sub[WIDTH-1:0] : r_shift[WIDTH-1:0];
        end
      end
    end
  end
endmodule
