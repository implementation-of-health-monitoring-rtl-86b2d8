// tb_health_monitor_top: end-to-end test of the whole link at its default
// sizes (128-sample frames, one sample every 2048 clocks, 32 clocks per bit).
// An ECG-like waveform (baseline, P wave, QRS spike, T wave, about 160
// samples per beat) drives the ADC model; the modulator output passes the
// noise channel model (sigma 20 against amplitude 127) into the demodulator;
// a behavioural SPI slave plays the PC display. Frames 1-2 use a 16-bit FCS
// with flag idle, frames 3-4 a 32-bit FCS with mark idle (switched while the
// line is idle); during frame 5 a burst of strong noise must make the
// receiver report a bad frame. The samples the PC receives for frames 1-4 must
// equal, in order, the ADC codes of the samples taken. Each mechanism of the
// link is counted and must occur at least once.
// The chain is the described one; the waveform, noise level and frame
// schedule are this testbench's own choices.
module tb_health_monitor_top;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam real VREF = 3.3;
  localparam int  FRAME = 128;

  real  vin = 1.0, sigma = 20.0;
  logic fcs32_sel = 1'b0, idle_sel = 1'b1;
  logic signed [7:0] tx_out;
  logic signed [9:0] rx_in;
  logic pc_sck, pc_mosi, pc_miso, pc_ss_n;
  logic [15:0] samples, samples_dropped, frames_sent, tx_underruns, frames_ok, frames_bad, bytes_to_pc, rx_fifo_drops;

  health_monitor_top dut (
    .clk, .rst_n, .ecg_vin(vin), .fcs32_sel, .idle_sel, .psk_tx_out(tx_out), .psk_rx_in(rx_in),
    .pc_sck, .pc_mosi, .pc_miso, .pc_ss_n, .samples, .samples_dropped, .frames_sent,
    .tx_underruns, .frames_ok, .frames_bad, .bytes_to_pc, .rx_fifo_drops);
  awgn_channel #(.IN_W(8), .OUT_W(10)) u_ch (.clk, .sigma, .s_in(tx_out), .r_out(rx_in));
  spi_slave_model u_pc (.cpol(1'b0), .cpha(1'b0), .dord(1'b0), .sck(pc_sck), .mosi(pc_mosi),
                        .ss_n(pc_ss_n), .tx_byte(8'h00), .miso(pc_miso));

  // ECG-like code sequence, one value per conversion
  function automatic int ecg(int n);
    int p = n % 160;
    int v = 90;
    if (p >= 20 && p < 36)  v += 12 - ((p - 28) * (p - 28)) / 6;        // P wave
    if (p >= 50 && p < 54)  v -= 12 * (p - 49);                         // Q
    if (p >= 54 && p < 60)  v += 140 - 40 * ((p > 56) ? (p - 56) : (56 - p)); // R
    if (p >= 60 && p < 66)  v -= 30 - 5 * (p - 60);                     // S
    if (p >= 90 && p < 120) v += 24 - ((p - 105) * (p - 105)) / 10;     // T wave
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  logic [7:0] codes [$];
  int nconv = 0;
  initial vin = (real'(ecg(0)) + 0.5) * VREF / 256.0;
  always @(negedge dut.u_tx.adc_ss_n) begin
    codes.push_back(8'(ecg(nconv)));
    nconv++;
    #1 vin = (real'(ecg(nconv)) + 0.5) * VREF / 256.0;
  end

  // mechanism counters
  int n_stuff = 0, n_destuff = 0, n_resync = 0, n_flips = 0, n_tokens = 0, n_decoded = 0;
  int n_idle_flag = 0, n_idle_ones = 0, n_fcs16_ok = 0, n_fcs32_ok = 0, n_adc_spi = 0, n_pc_spi = 0;
  logic txd_d;
  always_ff @(posedge clk) if (rst_n) begin
    txd_d <= dut.txd;
    if (dut.u_tx.u_hdlc.tx_ce && dut.u_tx.u_hdlc.stuff) n_stuff++;
    if (dut.u_rx.u_hdlc.data_tick && dut.u_rx.u_hdlc.zero) n_destuff++;
    if (dut.u_rx.resync) n_resync++;
    if (dut.txd != txd_d) n_flips++;
    if (dut.u_tx.h_valid && dut.u_tx.h_load) n_tokens++;
    if (dut.u_rx.s_valid) n_decoded++;
    if (dut.u_tx.u_hdlc.tx_ce && dut.u_tx.u_hdlc.u_ctrl.state == 0) begin
      if (idle_sel) n_idle_flag++; else n_idle_ones++;
    end
    if (dut.u_rx.rx_eof && dut.u_rx.rx_status == 0) begin
      if (fcs32_sel) n_fcs32_ok++; else n_fcs16_ok++;
    end
    if ($past(dut.u_tx.u_spi.busy) && !dut.u_tx.u_spi.busy) n_adc_spi++;
    if ($past(dut.u_rx.u_spi.busy) && !dut.u_rx.u_spi.busy) n_pc_spi++;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog: frames_ok %0d frames_bad %0d bytes %0d", frames_ok, frames_bad, bytes_to_pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_start;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    t_start = $time;
    wait (frames_ok == 1);
    $display("first frame received after %0d clocks", ($time - t_start) / 10);
    check(($time - t_start) / 10 >= FRAME * 2048, "a frame needs a full bank of samples");
    wait (frames_ok == 2);
    @(posedge clk);
    check(dut.u_tx.u_hdlc.u_ctrl.state == 0, "line idle when the FCS size is switched");
    fcs32_sel = 1'b1; idle_sel = 1'b0;
    wait (frames_ok == 4);
    wait (bytes_to_pc >= 4 * FRAME);
    // frame 5: noise burst in the middle of the frame
    wait (dut.u_tx.u_hdlc.u_ctrl.state == 1);   // opening flag of frame 5
    repeat (20000) @(posedge clk);
    sigma = 3000.0;
    repeat (32 * 12) @(posedge clk);
    sigma = 20.0;
    wait (frames_ok + frames_bad >= 5);
    repeat (2000) @(posedge clk);

    check(frames_ok == 4, $sformatf("four good frames (%0d)", frames_ok));
    check(frames_bad == 1, $sformatf("the noisy frame reported bad (%0d)", frames_bad));
    check(u_pc.rxq.size() >= 4 * FRAME, $sformatf("%0d samples at the PC", u_pc.rxq.size()));
    for (int k = 0; k < 4 * FRAME && k < u_pc.rxq.size(); k++)
      check(u_pc.rxq[k] == codes[k], $sformatf("sample %0d: PC %h, ADC %h", k, u_pc.rxq[k], codes[k]));
    check(tx_underruns == 0 && samples_dropped == 0 && rx_fifo_drops == 0, "no underrun, no drop");

    $display("mechanisms: stuffed %0d destuffed %0d resync %0d phase-flips %0d token-bytes %0d decoded %0d",
             n_stuff, n_destuff, n_resync, n_flips, n_tokens, n_decoded);
    $display("            idle-flag bits %0d idle-ones bits %0d fcs16 ok %0d fcs32 ok %0d adc-spi %0d pc-spi %0d",
             n_idle_flag, n_idle_ones, n_fcs16_ok, n_fcs32_ok, n_adc_spi, n_pc_spi);
    check(n_stuff > 0,     "zero insertion happened");
    check(n_destuff > 0,   "zero deletion happened");
    check(n_resync > 0,    "clock recovery re-aligned");
    check(n_flips > 0,     "BPSK phase changes happened");
    check(n_tokens > 0,    "RLE compression produced tokens");
    check(n_decoded > 0,   "RLE de-compression produced samples");
    check(n_idle_flag > 0, "flag idle used");
    check(n_idle_ones > 0, "mark idle used");
    check(n_fcs16_ok > 0,  "16-bit FCS frames accepted");
    check(n_fcs32_ok > 0,  "32-bit FCS frames accepted");
    check(n_adc_spi > 0 && n_pc_spi > 0, "SPI transfers at both ends");
    check(frames_sent >= 5, "ping-pong bank hand-over happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
