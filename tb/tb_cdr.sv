// tb_cdr: clock and data recovery test. A random bit stream, with a forced
// transition after at most six equal bits as HDLC bit stuffing guarantees,
// is sent with bit lengths varying randomly between BIT_PERIOD-2 and
// BIT_PERIOD+2 samples. The recovered bits must reproduce the sent sequence,
// one strobe per bit, and during a long run of equal bits the strobes must
// stay BIT_PERIOD clocks apart.
// The jitter range is this testbench's choice; the described design only says
// a recovery unit extracts the clock.
module tb_cdr;
  localparam int BP = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic din = 1'b1, bit_out, bit_ce, resync;
  cdr dut (.clk, .rst_n, .din, .bit_out, .bit_ce, .resync);

  logic got [$];
  int   ce_times [$];
  int   cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (bit_ce) begin got.push_back(bit_out); ce_times.push_back(cyc); end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic sent [$];
    int run = 0;
    logic b, prev = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // preamble 0101 then random bits
    for (int i = 0; i < 600; i++) begin
      int len;
      if (i < 4) b = i[0];
      else if (run >= 6) b = ~prev;
      else b = 1'($urandom);
      run = (b == prev) ? run + 1 : 1;
      prev = b;
      sent.push_back(b);
      din = b;
      len = (i >= 300 && i < 320) ? BP : BP - 2 + $urandom_range(0, 4);
      repeat (len) @(negedge clk);
    end
    repeat (2 * BP) @(negedge clk);
    // align: the received stream must contain the sent one after the preamble
    begin
      int off;
      off = -1;
      for (int s = 0; s < 10 && off < 0; s++) begin
        bit m;
        m = 1;
        for (int k = 0; k < sent.size() && s + k < got.size() && m; k++)
          if (got[s+k] != sent[k]) m = 0;
        if (m) off = s;
      end
      check(off >= 0, "recovered bits equal the sent bits");
      check(got.size() >= sent.size(), $sformatf("%0d strobes for %0d bits", got.size(), sent.size()));
      check(got.size() <= sent.size() + 10, "no extra strobes");
    end
    // constant line: strobes BP apart
    din = 1'b1;
    repeat (20 * BP) @(negedge clk);
    begin
      int n;
      n = ce_times.size();
      for (int k = n - 10; k < n; k++)
        check(ce_times[k] - ce_times[k-1] == BP, $sformatf("strobe spacing %0d", ce_times[k] - ce_times[k-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
