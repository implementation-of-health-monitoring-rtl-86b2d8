// tb_dual_ram: fills the 256 x 8 RAM through the write port with random data
// while reading back earlier addresses through the read port, then reads all
// of it; every read must return, one clock later, the byte last written to
// that address (a reference array is kept here). Also checks that a read of
// an address written in the same cycle returns the old byte.
// The 2048-bit size is the described one; the byte organisation and read
// latency checked here are this design's choices.
module tb_dual_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic we = 0, re = 0;
  logic [7:0] waddr = 0, raddr = 0, wdata = 0, rdata;
  logic [7:0] refm [256];
  dual_ram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [7:0] expv;
    @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      we = 1; waddr = 8'(a); wdata = 8'($urandom); refm[a] = wdata;
      re = (a > 0); raddr = 8'(a - 1); expv = refm[(a + 255) % 256];
      @(negedge clk);
      if (a > 0) check(rdata == expv, $sformatf("read-behind %0d", a - 1));
    end
    we = 0;
    for (int a = 0; a < 256; a++) begin
      re = 1; raddr = 8'(255 - a);
      @(negedge clk);
      check(rdata == refm[255 - a], $sformatf("read %0d: %h vs %h", 255 - a, rdata, refm[255 - a]));
    end
    // same-address read and write: old data
    we = 1; waddr = 8'd7; wdata = ~refm[7]; re = 1; raddr = 8'd7;
    @(negedge clk);
    check(rdata == refm[7], "read during write returns old byte");
    we = 0;
    @(negedge clk);
    check(rdata == ~refm[7], "new byte after the write");
    re = 0; raddr = 8'd0;
    @(negedge clk);
    check(rdata == ~refm[7], "output holds while re is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
