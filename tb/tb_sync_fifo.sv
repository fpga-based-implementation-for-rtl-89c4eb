// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, empty/full flags and the occupancy count.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst = 1;
  logic wr_en, rd_en, empty, full, almost_full;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D), .AFULL_SLACK(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(32'(count) == model.size(), "count");
      check(almost_full == (model.size() + 2 >= D), "almost_full flag");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      wr_en   = ($urandom % 100) < ((i / 200) % 2 ? 70 : 35);
      rd_en   = ($urandom % 100) < ((i / 200) % 2 ? 35 : 70);
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model update at the clock edge.
  always @(posedge clk) if (!rst) begin
    automatic bit do_rd = rd_en && model.size() > 0;
    automatic bit do_wr = wr_en && model.size() < D;
    if (do_rd) void'(model.pop_front());
    if (do_wr) model.push_back(wr_data);
  end
endmodule
