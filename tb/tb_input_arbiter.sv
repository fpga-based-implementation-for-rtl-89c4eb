// tb_input_arbiter: four sources send numbered packets with random gaps while
// the output accepts words at random.  Checks that packets come out whole
// (never interleaved), each source's packets in order and unchanged, that
// every packet arrives, and that with all four queues loaded the sources are
// served in turn.
module tb_input_arbiter;
  import tb_pkt_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] in_wr = 0, in_rdy;
  logic [3:0][7:0] in_ctrl = 0;
  logic [3:0][63:0] in_data = 0;
  logic out_wr, out_rdy;
  logic [7:0] out_ctrl;
  logic [63:0] out_data;
  int checks = 0, failures = 0;
  int stall_pct = 30;
  wq_t exp[4];
  int src_order[$];
  int done_src = 0;

  input_arbiter #(.N_PORTS(4), .FIFO_DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) out_rdy = ($urandom % 100) >= stall_pct;

  // Receiver: the module header's source field names the sender.
  int cur_src = -1;
  always @(posedge clk) if (!rst && out_wr && out_rdy) begin
    logic [71:0] w;
    w = {out_ctrl, out_data};
    if (out_ctrl == 8'hFF) begin
      check(cur_src == -1, "packet started inside another packet");
      cur_src = 0;
      for (int p = 0; p < 4; p++) if (out_data[16 + 2*p]) cur_src = p;
      src_order.push_back(cur_src);
    end
    if (cur_src < 0) begin check(0, "word outside a packet"); end
    else begin
      check(exp[cur_src].size() > 0 && exp[cur_src][0] == w, $sformatf("word from source %0d", cur_src));
      if (exp[cur_src].size() > 0) void'(exp[cur_src].pop_front());
      if (out_ctrl != 8'hFF && out_ctrl != 8'h00) cur_src = -1;
    end
  end

  task automatic source(input int p, input int npkts, input int maxgap);
    for (int k = 0; k < npkts; k++) begin
      bq_t q; wq_t w;
      int len = 60 + $urandom % 120;
      for (int i = 0; i < len; i++) q.push_back(8'(p * 64 + k));
      w = to_words(16'h0000, 16'(1 << (2*p)), q);
      foreach (w[i]) exp[p].push_back(w[i]);
      foreach (w[i]) begin
        @(negedge clk);
        while (!in_rdy[p]) begin in_wr[p] = 0; @(negedge clk); end
        in_wr[p] = 1; {in_ctrl[p], in_data[p]} = w[i];
      end
      @(negedge clk); in_wr[p] = 0;
      repeat ($urandom % (maxgap + 1)) @(negedge clk);
    end
    done_src++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    fork
      source(0, 30, 40);
      source(1, 30, 0);
      source(2, 30, 10);
      source(3, 30, 0);
    join
    repeat (500) @(negedge clk);
    for (int p = 0; p < 4; p++) check(exp[p].size() == 0, $sformatf("source %0d: %0d words not delivered", p, exp[p].size()));
    check(src_order.size() == 120, $sformatf("%0d packets delivered", src_order.size()));
    // Round robin with all queues loaded: no source is served twice in a row
    // while source 1 and 3 (never idle) both wait.
    begin
      int repeats = 0;
      for (int i = 1; i < src_order.size() / 2; i++)
        if (src_order[i] == src_order[i-1] && (src_order[i] == 1 || src_order[i] == 3)) repeats++;
      check(repeats == 0, $sformatf("%0d back-to-back services of a busy source", repeats));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
