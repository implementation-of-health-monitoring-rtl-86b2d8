// tb_tx_fpga: test of the transmitter FPGA with the ADC model.
// The testbench sets the ADC input to a new voltage after every conversion,
// chosen so the expected 8-bit code is known, and records the codes. It
// captures TXD at every bit strobe and decodes the line on its own: finds
// the flags, removes inserted zeros, checks the address byte and the FCS, and
// expands the run-length tokens. The decoded samples must equal the recorded
// codes in order, frame after frame. The sample rate is set faster than the
// line can carry, so banks also overflow and samples are dropped; dropped
// periods start no conversion, so the comparison still holds. Both FCS sizes
// are used.
module tb_tx_fpga;
  import hm_pkg::*;
  localparam int FRAME = 8;
  localparam real VREF = 3.3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic fcs32_sel = 1'b0, idle_sel = 1'b1;
  logic sck, mosi, miso, ss_n, txd, tx_ce;
  logic [15:0] samples, dropped, frames_sent, underruns;
  real vin = 0.0;

  tx_fpga #(.SAMPLE_PERIOD(150), .BIT_PERIOD(16), .FRAME_BYTES(FRAME), .ADDR(8'h03)) dut (
    .clk, .rst_n, .fcs32_sel, .idle_sel, .adc_sck(sck), .adc_mosi(mosi), .adc_miso(miso), .adc_ss_n(ss_n),
    .txd, .tx_ce, .samples, .dropped, .frames_sent, .underruns);
  adc8 #(.VREF(VREF)) u_adc (.vin, .sclk(sck), .cs_n(ss_n), .miso);

  // ADC input: a new known code after each conversion
  logic [7:0] codes [$];
  logic [7:0] next_code = 8'h00;
  initial vin = (real'(next_code) + 0.5) * VREF / 256.0;
  always @(negedge ss_n) begin
    codes.push_back(next_code);
    #1;
    // runs of equal codes, steps and random values
    next_code = ($urandom_range(0, 3) == 0) ? 8'($urandom) : next_code + 8'($urandom_range(0, 2));
    vin = (real'(next_code) + 0.5) * VREF / 256.0;
  end

  // line capture (TXD changes in the clock where tx_ce is high)
  bit line [$];
  logic ce_d;
  always_ff @(posedge clk) begin
    ce_d <= tx_ce;
    if (ce_d && rst_n) line.push_back(txd);
  end

  function automatic logic [31:0] crc_bytes(logic [7:0] b [$], int n, bit is32);
    logic [31:0] c;
    c = is32 ? 32'hFFFF_FFFF : 32'hFFFF;
    for (int i = 0; i < n; i++) begin
      c ^= {24'h0, b[i]};
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ (is32 ? 32'hEDB88320 : 32'h8408)) : (c >> 1);
    end
    return is32 ? ~c : (~c & 32'hFFFF);
  endfunction

  // decode all complete frames in the line; returns decoded samples
  int frames_ok = 0, frames_bad = 0;
  function automatic void decode(bit is32, ref logic [7:0] out [$]);
    int i = 0, nf = is32 ? 4 : 2;
    while (i + 8 <= line.size()) begin
      bit f = 1;
      for (int k = 0; k < 8; k++) if (line[i+k] != HDLC_FLAG[k]) f = 0;
      if (!f) begin i++; continue; end
      i += 8;
      begin
        logic [7:0] bytes [$];
        logic [7:0] cur = 0;
        int nb = 0, ones = 0, j = i;
        bit closed = 0;
        while (j + 8 <= line.size()) begin
          bit g = 1;
          for (int k = 0; k < 8; k++) if (line[j+k] != HDLC_FLAG[k]) g = 0;
          if (g) begin closed = 1; break; end
          if (ones == 5 && line[j] == 0) begin ones = 0; j++; continue; end
          ones = line[j] ? ones + 1 : 0;
          cur = {line[j], cur[7:1]}; nb++;
          if (nb == 8) begin bytes.push_back(cur); nb = 0; end
          j++;
        end
        if (!closed) return;
        if (bytes.size() > 0) begin
          logic [31:0] fcs = 0;
          for (int k = 0; k < nf; k++) fcs[8*k +: 8] = bytes[bytes.size() - nf + k];
          if (nb == 0 && bytes.size() > nf + 1 && bytes[0] == 8'h03 &&
              fcs == crc_bytes(bytes, bytes.size() - nf, is32)) begin
            logic [7:0] acc = 0;
            int fill = 0;
            frames_ok++;
            for (int k = 1; k < bytes.size() - nf; k++)
              for (int h = 0; h < 2; h++) begin
                logic [3:0] t = h ? bytes[k][7:4] : bytes[k][3:0];
                for (int r = 0; r <= t[2:0]; r++) begin acc[fill] = t[3]; fill++; end
                if (fill == 8) begin out.push_back(acc); fill = 0; end
              end
          end else frames_bad++;
        end
        i = j;
      end
    end
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] got [$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (frames_sent == 4);
    repeat (3000) @(posedge clk);
    decode(1'b0, got);
    check(frames_bad == 0, $sformatf("%0d frames failed the reference decoder", frames_bad));
    check(frames_ok >= 4, $sformatf("%0d good frames with CRC-16", frames_ok));
    check(got.size() == frames_ok * FRAME, $sformatf("%0d samples decoded", got.size()));
    for (int k = 0; k < got.size() && k < codes.size(); k++)
      check(got[k] == codes[k], $sformatf("sample %0d: %h vs %h", k, got[k], codes[k]));
    check(dropped > 0, "sample periods dropped while both banks were busy");
    check(underruns == 0, "no framer underrun");
    check(samples == codes.size(), "sample counter equals conversions");
    $display("frames %0d samples %0d dropped %0d", frames_ok, samples, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
