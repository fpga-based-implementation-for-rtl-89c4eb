// rater: per-flow packet rate generators.
//
// Each of the N_FLOWS flows has a 32-bit counter that advances every clock
// while enable is high.  When it reaches that flow's clk_limit the counter
// restarts at zero and signal_out[f] is high for one clock: a request to
// generate one packet of flow f.  The period is therefore clk_limit+1 clocks.
// The requests do not wait for any ready signal, so the packet rate does not
// depend on the rest of the pipeline.  packets_generated[f] counts the
// requests issued.  As in the thesis, the four raters are one module with
// replicated registers.  A clk_limit of zero keeps that flow idle (this
// design's choice, so unused flows can be switched off), and clearing enable
// resets the counters.
module rater #(
  parameter int unsigned N_FLOWS = pktgen_pkg::NUM_FLOWS
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       enable,
  input  logic [N_FLOWS-1:0][31:0] clk_limit,
  output logic [N_FLOWS-1:0]       signal_out,
  output logic [N_FLOWS-1:0][31:0] packets_generated
);
  logic [N_FLOWS-1:0][31:0] counter;

  always_ff @(posedge clk) begin
    if (rst) begin
      counter           <= '0;
      signal_out        <= '0;
      packets_generated <= '0;
    end else begin
      for (int f = 0; f < N_FLOWS; f++) begin
        signal_out[f] <= 1'b0;
        if (!enable || clk_limit[f] == 0) begin
          counter[f] <= '0;
        end else if (counter[f] >= clk_limit[f]) begin
          counter[f]           <= '0;
          signal_out[f]        <= 1'b1;
          packets_generated[f] <= packets_generated[f] + 1'b1;
        end else begin
          counter[f] <= counter[f] + 1'b1;
        end
      end
    end
  end
endmodule
