// tb_rx_fpga: receiver FPGA test from the line side. The testbench builds
// the line itself: idle flags, then frames of address byte, RLE-coded
// samples (reference encoder here), FCS (independent bit-wise CRC here),
// zero insertion and closing flag. Each line bit lasts BIT_PERIOD-2 ..
// BIT_PERIOD+2 clocks at random, so clock recovery has to track. A
// behavioural SPI slave stands in for the PC display and collects what the
// FPGA sends.
// Frames: two good CRC-16 frames, one frame for another address (must be
// ignored), one frame with a corrupted FCS (counted bad; its samples are
// still passed, as the receiver forwards data before the FCS is known), and
// a good CRC-32 frame. Checks: the samples reaching the PC in order and the
// good/bad frame counters.
module tb_rx_fpga;
  import hm_pkg::*;
  localparam int         BP   = 32;
  localparam logic [7:0] ADDR = 8'h03;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic rx_raw = 1'b1, fcs32_sel = 1'b0;
  logic pc_sck, pc_mosi, pc_miso, pc_ss_n;
  logic [15:0] frames_ok, frames_bad, bytes_out, fifo_drops;
  rx_fpga #(.BIT_PERIOD(BP), .ADDR(ADDR)) dut (
    .clk, .rst_n, .rx_raw, .fcs32_sel, .pc_sck, .pc_mosi, .pc_miso, .pc_ss_n,
    .frames_ok, .frames_bad, .bytes_out, .fifo_drops);
  spi_slave_model u_pc (
    .cpol(1'b0), .cpha(1'b0), .dord(1'b0), .sck(pc_sck), .mosi(pc_mosi), .ss_n(pc_ss_n),
    .tx_byte(8'h00), .miso(pc_miso));

  function automatic void rle_enc(logic [7:0] s [$], ref logic [7:0] o [$]);
    logic [3:0] toks [$];
    foreach (s[i]) begin
      int p = 0;
      while (p < 8) begin
        int l = 1;
        while (p + l < 8 && s[i][p+l] == s[i][p]) l++;
        toks.push_back({s[i][p], 3'(l - 1)});
        p += l;
      end
    end
    if (toks.size() % 2) toks.push_back(4'h0);
    for (int i = 0; i < toks.size(); i += 2) o.push_back({toks[i+1], toks[i]});
  endfunction

  function automatic logic [31:0] fcs_of(logic [7:0] b [$], bit is32);
    logic [31:0] c = is32 ? 32'hFFFF_FFFF : 32'h0000_FFFF;
    foreach (b[i]) for (int k = 0; k < 8; k++) begin
      logic fb = c[0] ^ b[i][k];
      c = c >> 1;
      if (fb) c ^= is32 ? 32'hEDB8_8320 : 32'h0000_8408;
    end
    return is32 ? ~c : {16'h0, ~c[15:0]};
  endfunction

  task automatic send_bit(logic b);
    rx_raw = b;
    repeat (BP - 2 + $urandom_range(0, 4)) @(negedge clk);
  endtask

  task automatic send_flags(int n);
    repeat (n) for (int k = 0; k < 8; k++) send_bit(HDLC_FLAG[k]);
  endtask

  // corrupt: flip bit 3 of the first FCS byte
  task automatic send_frame(logic [7:0] addr, logic [7:0] samples [$], bit is32, bit corrupt);
    logic [7:0] body [$];
    logic [31:0] fcs;
    int ones;
    body.push_back(addr);
    rle_enc(samples, body);
    fcs = fcs_of(body, is32);
    if (corrupt) fcs[3] = ~fcs[3];
    for (int i = 0; i < (is32 ? 4 : 2); i++) body.push_back(fcs[8*i +: 8]);
    send_flags(1);
    ones = 0;
    foreach (body[i]) for (int k = 0; k < 8; k++) begin
      send_bit(body[i][k]);
      ones = body[i][k] ? ones + 1 : 0;
      if (ones == 5) begin send_bit(1'b0); ones = 0; end
    end
    send_flags(1);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] a [$], b [$], c [$], d [$], x [$], expect_q [$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 24; i++) begin
      a.push_back(8'(100 + i / 4));
      b.push_back(8'($urandom));
      c.push_back(8'(i * 11));
      d.push_back((i % 6 < 3) ? 8'hFF : 8'h00);
      x.push_back(8'hA5);
    end
    send_flags(4);
    send_frame(ADDR, a, 1'b0, 1'b0);
    send_flags(2);
    send_frame(ADDR, b, 1'b0, 1'b0);
    send_flags(2);
    send_frame(8'h05, x, 1'b0, 1'b0);
    send_flags(2);
    send_frame(ADDR, c, 1'b0, 1'b1);
    send_flags(2);
    fcs32_sel = 1'b1;
    send_flags(2);
    send_frame(ADDR, d, 1'b1, 1'b0);
    send_flags(4);
    expect_q = {a, b, c, d};
    for (int t = 0; t < 20000 && u_pc.rxq.size() < expect_q.size(); t++) @(posedge clk);
    repeat (200) @(posedge clk);
    check(u_pc.rxq.size() == expect_q.size(),
          $sformatf("%0d samples at the PC, expected %0d", u_pc.rxq.size(), expect_q.size()));
    for (int i = 0; i < expect_q.size() && i < u_pc.rxq.size(); i++)
      check(u_pc.rxq[i] == expect_q[i], $sformatf("sample %0d: %h expected %h", i, u_pc.rxq[i], expect_q[i]));
    check(frames_ok == 16'd3, $sformatf("frames_ok %0d, expected 3", frames_ok));
    check(frames_bad == 16'd1, $sformatf("frames_bad %0d, expected 1", frames_bad));
    check(bytes_out == 16'(expect_q.size()), $sformatf("bytes_out %0d", bytes_out));
    check(fifo_drops == 16'd0, "no FIFO drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
