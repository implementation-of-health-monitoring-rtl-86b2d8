// tb_hdlc: loopback test of the HDLC framer and de-framer.
// The framer's TXD feeds the de-framer's RXD. For each frame the testbench
// builds the expected line bits itself (flag, address, data, FCS computed by
// an independent byte-wise CRC, zero insertion, flag) and looks for them in
// the captured line, then checks the bytes and status the de-framer returns.
// Covered: the 0x48 example frame, CRC-16 and CRC-32, idle flags and idle
// ones, data full of ones (bit stuffing), a slow TX_CE, a corrupted bit on
// the line (FCS error), an underrun (abort), and RX_SPACE_AVAIL low (overflow).
// The one-byte 01001000 frame is the described example; the other frames are
// this testbench's own.
module tb_hdlc;
  import hm_pkg::*;
  localparam logic [7:0] ADDR = 8'h03;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // clock enable: every CE_DIV-th cycle
  int ce_div = 1, ce_cnt = 0;
  logic tx_ce, rx_ce;
  always_ff @(posedge clk) ce_cnt <= (ce_cnt + 1 >= ce_div) ? 0 : ce_cnt + 1;
  assign tx_ce = (ce_cnt == 0);
  always_ff @(posedge clk) rx_ce <= tx_ce;

  // byte source
  logic [7:0] src [256];
  int src_len = 0, src_idx = 0;
  logic send_en = 1'b0, starve = 1'b0;
  int starve_after = 1000;
  logic tx_data_valid, tx_eof, tx_load, tx_underrun;
  logic [7:0] tx_data;
  logic idle_sel = 1'b1, fcs16_32 = 1'b0;
  assign tx_data       = src[src_idx[7:0]];
  assign tx_data_valid = send_en && (src_idx < src_len) && !(starve && src_idx >= starve_after);
  assign tx_eof        = (src_idx == src_len - 1);
  always_ff @(posedge clk) if (tx_load) src_idx <= src_idx + 1;

  logic txd, rxd, flip = 1'b0;
  assign rxd = txd ^ flip;

  logic [7:0] rx_data;
  logic rx_ready, rx_sof, rx_eof, space = 1'b1;
  rx_status_t rx_status;

  hdlc_tx #(.ADDR(ADDR)) u_tx (
    .clk, .rst_n, .tx_ce, .tx_data, .tx_data_valid, .tx_eof, .idle_sel, .fcs16_32,
    .txd, .tx_load, .tx_underrun);
  hdlc_rx u_rx (
    .clk, .rst_n, .rx_ce, .rxd, .fcs16_32, .rx_space_avail(space),
    .rx_data, .rx_ready, .rx_sof, .rx_eof, .rx_status);

  // capture line bits and receiver output
  bit line [$];
  logic [7:0] got [$];
  int sof_cnt = 0, eof_cnt = 0, underruns = 0, sof_ok = 0;
  rx_status_t last_status;
  always_ff @(posedge clk) begin
    if (rx_ce) line.push_back(txd);
    if (rx_ready) begin
      if (rx_sof) begin sof_cnt++; if (got.size() == 0) sof_ok++; end
      got.push_back(rx_data);
    end
    if (rx_eof && rst_n) begin eof_cnt++; last_status <= rx_status; end
    if (tx_underrun) underruns++;
  end

  // independent reference: byte-wise reflected CRC
  function automatic logic [31:0] ref_crc(logic [7:0] b [$], bit is32);
    logic [31:0] c;
    c = is32 ? 32'hFFFF_FFFF : 32'h0000_FFFF;
    for (int i = 0; i < b.size(); i++) begin
      c ^= {24'h0, b[i]};
      for (int k = 0; k < 8; k++)
        c = c[0] ? ((c >> 1) ^ (is32 ? 32'hEDB88320 : 32'h8408)) : (c >> 1);
    end
    if (!is32) c &= 32'hFFFF;
    return c;
  endfunction

  function automatic void expected_line(logic [7:0] body [$], bit is32, ref bit e [$]);
    logic [31:0] fcs;
    logic [7:0] all [$];
    int ones = 0;
    all = body;
    fcs = ~ref_crc(body, is32);
    for (int i = 0; i < (is32 ? 4 : 2); i++) all.push_back(fcs[8*i +: 8]);
    e.delete();
    for (int k = 0; k < 8; k++) e.push_back(HDLC_FLAG[k]);
    foreach (all[i]) for (int k = 0; k < 8; k++) begin
      e.push_back(all[i][k]);
      ones = all[i][k] ? ones + 1 : 0;
      if (ones == 5) begin e.push_back(1'b0); ones = 0; end
    end
    for (int k = 0; k < 8; k++) e.push_back(HDLC_FLAG[k]);
  endfunction

  function automatic bit line_has(bit e [$]);
    for (int s = 0; s + e.size() <= line.size(); s++) begin
      bit m = 1'b1;
      for (int k = 0; k < e.size() && m; k++) if (line[s+k] != e[k]) m = 1'b0;
      if (m) return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic wait_eof(int n, int limit);
    int t = 0;
    while (eof_cnt < n && t < limit) begin @(posedge clk); t++; end
  endtask

  // send one frame and check everything about it
  task automatic frame(logic [7:0] d [$], bit is32, string name);
    logic [7:0] body [$];
    bit e [$];
    int n0 = eof_cnt;
    body.push_back(ADDR);
    foreach (d[i]) body.push_back(d[i]);
    foreach (d[i]) src[i] = d[i];
    got.delete(); line.delete(); sof_ok = 0;
    fcs16_32 = is32;
    src_len = d.size(); src_idx = 0;
    @(posedge clk); send_en = 1'b1;
    wait_eof(n0 + 1, 20000 * ce_div);
    send_en = 1'b0;
    repeat (20 * ce_div) @(posedge clk);
    check(eof_cnt == n0 + 1, {name, ": one end of frame"});
    check(last_status == '0, {name, ": status good"});
    check(got.size() == body.size(), $sformatf("%s: byte count %0d vs %0d", name, got.size(), body.size()));
    for (int i = 0; i < body.size() && i < got.size(); i++)
      check(got[i] == body[i], $sformatf("%s: byte %0d %h vs %h", name, i, got[i], body[i]));
    check(sof_ok == 1, {name, ": RX_SOF on first byte"});
    expected_line(body, is32, e);
    check(line_has(e), {name, ": line bits match reference frame"});
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d [$];
    logic [7:0] chk [$];
    // the reference CRC against published check values of "123456789"
    chk = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    check((~ref_crc(chk, 1'b0) & 32'hFFFF) == 32'h906E, "reference CRC-16 check value");
    check(~ref_crc(chk, 1'b1) == 32'hCBF43926, "reference CRC-32 check value");

    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (40) @(posedge clk);

    d = '{8'h48};                                 frame(d, 1'b0, "example 0x48 fcs16");
    d = '{8'h48};                                 frame(d, 1'b1, "example 0x48 fcs32");
    d = '{8'hFF, 8'hFF, 8'h7E, 8'hF8, 8'h1F, 8'h00}; frame(d, 1'b0, "stuffing fcs16");
    d = '{8'hFF, 8'h7E, 8'h7E, 8'hFE, 8'h3F};     frame(d, 1'b1, "stuffing fcs32");
    idle_sel = 1'b0;
    d.delete(); for (int i = 0; i < 40; i++) d.push_back(8'($urandom));
    frame(d, 1'b0, "random idle ones");
    ce_div = 3;
    d.delete(); for (int i = 0; i < 25; i++) d.push_back(8'($urandom));
    frame(d, 1'b1, "random slow ce");
    ce_div = 1; idle_sel = 1'b1;

    // corrupted line bit: FCS error expected
    begin
      int n0;
      n0 = eof_cnt;
      d = '{8'h11, 8'h22, 8'h33, 8'h44};
      foreach (d[i]) src[i] = d[i];
      src_len = 4; src_idx = 0; fcs16_32 = 1'b0; got.delete();
      send_en = 1'b1;
      wait (src_idx == 2);
      while (!(rx_ce && txd)) @(posedge clk);
      flip = 1'b1; @(posedge clk); flip = 1'b0;
      wait_eof(n0 + 1, 20000);
      send_en = 1'b0;
      repeat (20) @(posedge clk);
      check(eof_cnt == n0 + 1 && (last_status.fcs_error || last_status.misaligned), "corrupted frame flagged as bad");
    end

    // underrun: source stops after two bytes
    begin
      int n0, u0;
      n0 = eof_cnt; u0 = underruns;
      d = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05};
      foreach (d[i]) src[i] = d[i];
      src_len = 5; src_idx = 0; starve = 1'b1; starve_after = 2;
      send_en = 1'b1;
      wait_eof(n0 + 1, 20000);
      send_en = 1'b0; starve = 1'b0;
      repeat (40) @(posedge clk);
      check(underruns == u0 + 1, "TX_UNDERRUN pulsed once");
      check(eof_cnt == n0 + 1 && last_status.aborted, "receiver reports abort");
    end

    // no space at the receiver: overflow
    begin
      int n0;
      n0 = eof_cnt;
      d = '{8'hA1, 8'hA2, 8'hA3};
      foreach (d[i]) src[i] = d[i];
      src_len = 3; src_idx = 0; space = 1'b0; got.delete();
      send_en = 1'b1;
      wait_eof(n0 + 1, 20000);
      send_en = 1'b0; space = 1'b1;
      repeat (20) @(posedge clk);
      check(eof_cnt == n0 + 1 && last_status.overflow && got.size() == 0, "overflow reported, nothing delivered");
    end

    // a good frame after the errors
    d = '{8'h5A, 8'hC3};                           frame(d, 1'b0, "recovery fcs16");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
