// tb_send: hands packets of every header size (42, 46, 54, 58 bytes) and
// many payload sizes to the send stage and compares the words that come out
// with the reference byte stream: module header first, headers, then the
// 32-bit payload pattern repeated, ctrl codes 8'hFF / 8'h00 / end-of-packet
// valid-byte code.  Also checks out_done and the W+3 clock duration with no
// back-pressure, and data integrity under random back-pressure.
module tb_send;
  import tb_pkt_pkg::*;
  logic clk = 0, rst = 1;
  logic in_new_send = 0;
  logic [463:0] in_alltogether = 0;
  logic [20:0] in_bitsofheader = 0;
  logic [31:0] in_payload_size = 0, in_payload = 0;
  logic [63:0] in_module_header = 0;
  logic out_done, busy, out_wr, out_rdy;
  logic [63:0] out_data;
  logic [7:0] out_ctrl;
  int checks = 0, failures = 0;
  int stall_pct = 0;
  wq_t got;

  send #(.FIFO_DEPTH(16)) dut (.*);
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
  always @(posedge clk) if (!rst && out_wr && out_rdy) got.push_back({out_ctrl, out_data});

  task automatic one(input int hbytes, input int pbytes, input logic [31:0] pat);
    bq_t frame; wq_t exp;
    logic [463:0] hdr = '0;
    int t0, dur;
    for (int i = 0; i < hbytes; i++) begin
      byte unsigned b = 8'($urandom);
      frame.push_back(b);
      hdr[463 - 8*i -: 8] = b;
    end
    for (int i = 0; i < pbytes; i++) frame.push_back(pat[31 - 8*(i%4) -: 8]);
    exp = to_words(16'h0040, 16'h0000, frame);
    got.delete();
    @(negedge clk);
    in_new_send = 1; in_alltogether = hdr; in_bitsofheader = 21'(hbytes * 8);
    in_payload_size = 32'(pbytes * 8); in_payload = pat;
    in_module_header = exp[0][63:0];
    t0 = $time;
    @(negedge clk); in_new_send = 0; in_alltogether = '1;
    while (!out_done) @(negedge clk);
    dur = ($time - t0) / 10;
    if (stall_pct == 0)
      check(dur == exp.size() + 2, $sformatf("duration %0d for %0d words", dur, exp.size()));
    while (got.size() < exp.size() && ($time - t0) < 100000) @(negedge clk);
    repeat (3) @(negedge clk);
    check(got.size() == exp.size(), $sformatf("h%0d p%0d: %0d words, expected %0d", hbytes, pbytes, got.size(), exp.size()));
    foreach (exp[i]) if (i < got.size())
      check(got[i] == exp[i], $sformatf("h%0d p%0d word %0d: %h expected %h", hbytes, pbytes, i, got[i], exp[i]));
  endtask

  initial begin
    int hs[4] = '{42, 46, 54, 58};
    repeat (3) @(posedge clk);
    rst = 0;
    foreach (hs[h])
      for (int p = 0; p < 24; p++) one(hs[h], (p < 18) ? p : 18 + 97 * p, $urandom);
    one(42, 1472, 32'h01020304);
    stall_pct = 60;
    for (int i = 0; i < 20; i++) one(hs[i % 4], $urandom % 300, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
