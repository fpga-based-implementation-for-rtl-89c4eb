// tb_division: random and corner-case divisions against the '/' and '%'
// operators, the 41-cycle latency, divide-by-zero giving all ones, and an
// operation abandoned by a new start pulse.
module tb_division;
  localparam int W = 41;
  logic clk = 0, rst = 1;
  logic in_start = 0;
  logic [W-1:0] in_dividend = 0, in_divider = 0, quotient, remainder;
  logic ready, busy;
  int checks = 0, failures = 0;

  division #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic [W-1:0] a, input logic [W-1:0] b);
    int cyc;
    @(negedge clk);
    in_start = 1; in_dividend = a; in_divider = b;
    @(negedge clk);
    in_start = 0; in_dividend = '1; in_divider = 41'd3;   // inputs need not be held
    cyc = 1;
    while (!ready && cyc < 100) begin @(negedge clk); cyc++; end
    check(cyc - 1 == W, $sformatf("latency %0d", cyc - 1));
    if (b == 0) check(quotient == '1, "divide by zero gives all ones");
    else begin
      check(quotient == a / b, $sformatf("%0d / %0d = %0d", a, b, quotient));
      check(remainder == a % b, $sformatf("%0d %% %0d = %0d", a, b, remainder));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    run(41'd1000, 41'd7);
    run(41'd0, 41'd5);
    run('1, 41'd1);
    run('1, '1);
    run(41'd12345, 41'd0);
    run(41'd5, 41'd9);
    for (int i = 0; i < 40; i++) begin
      logic [W-1:0] a, b;
      a = {$urandom, $urandom};
      b = (i % 2) ? W'($urandom % 5000 + 1) : {$urandom, $urandom} >> ($urandom % 40);
      run(a, b);
    end
    // Restart while busy: the first operation is abandoned.
    @(negedge clk);
    in_start = 1; in_dividend = 41'd999999; in_divider = 41'd3;
    @(negedge clk); in_start = 0;
    repeat (10) @(negedge clk);
    check(busy, "busy during division");
    run(41'd100, 41'd6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
