// tb_sync_fifo: random pushes and pops on the 128 x 8 FIFO against a
// queue reference: data order, empty/full flags and count; writes when full
// and reads when empty must be ignored. The FIFO is filled completely once.
// The 1024-bit size is the described one; show-ahead behaviour is this
// design's choice.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic wr = 0, rd = 0, empty, full;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] count;
  logic [7:0] q [$];
  int saw_full = 0;
  sync_fifo dut (.clk, .rst_n, .wr, .wdata, .rd, .rdata, .empty, .full, .count);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int pw, pr, sz;
      bit do_w, do_r;
      pw = (i < 1000) ? 50 : (i < 1500) ? 95 : (i < 2200) ? 5 : 50;
      pr = (i < 1000) ? 50 : (i < 1500) ? 5 : (i < 2200) ? 95 : 50;
      @(negedge clk);
      wr = ($urandom_range(0, 99) < pw); wdata = 8'($urandom);
      rd = ($urandom_range(0, 99) < pr);
      sz = q.size();
      check(empty == (sz == 0), "empty flag");
      check(full == (sz == 128), "full flag");
      check(count == 8'(sz), $sformatf("count %0d vs %0d", count, sz));
      if (sz == 128) saw_full++;
      if (sz > 0) check(rdata == q[0], $sformatf("head %h vs %h", rdata, q[0]));
      do_w = wr && sz < 128;
      do_r = rd && sz > 0;
      @(posedge clk);
      if (do_r) void'(q.pop_front());
      if (do_w) q.push_back(wdata);
    end
    check(saw_full > 0, "FIFO was full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
