// tb_rater: four flows with different limits; checks that each request pulse
// comes exactly limit+1 clocks after the previous one, the request counters,
// and that a zero limit or a low enable keeps a flow idle.
module tb_rater;
  logic clk = 0, rst = 1, enable = 0;
  logic [3:0][31:0] clk_limit;
  logic [3:0] signal_out;
  logic [3:0][31:0] packets_generated;
  int checks = 0, failures = 0;
  int last_t[4], pulses[4];
  int t = 0;

  rater #(.N_FLOWS(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    t++;
    for (int f = 0; f < 4; f++) if (!rst && signal_out[f]) begin
      if (pulses[f] > 0) check(t - last_t[f] == int'(clk_limit[f]) + 1,
                               $sformatf("flow %0d period %0d", f, t - last_t[f]));
      last_t[f] = t;
      pulses[f]++;
    end
  end

  initial begin
    clk_limit[0] = 7; clk_limit[1] = 20; clk_limit[2] = 83; clk_limit[3] = 0;
    for (int f = 0; f < 4; f++) begin pulses[f] = 0; last_t[f] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (50) @(posedge clk);
    check(pulses[0] == 0, "no requests while disabled");
    @(negedge clk) enable = 1;
    repeat (2000) @(posedge clk);
    @(negedge clk) enable = 0;
    repeat (5) @(posedge clk);
    check(pulses[0] == 2000 / 8, $sformatf("flow 0 count %0d", pulses[0]));
    check(pulses[1] == 2000 / 21, $sformatf("flow 1 count %0d", pulses[1]));
    check(pulses[2] == 2000 / 84, $sformatf("flow 2 count %0d", pulses[2]));
    check(pulses[3] == 0, "flow 3 idle with zero limit");
    for (int f = 0; f < 4; f++)
      check(packets_generated[f] == 32'(pulses[f]), $sformatf("packets_generated[%0d]", f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
