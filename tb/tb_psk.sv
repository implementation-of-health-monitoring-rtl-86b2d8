// tb_psk: test of the DDS, the BPSK modulator and demodulator over the
// noise channel model.
//  - the carrier equals round(127 sin(2 pi k / 16)) sample by sample (values
//    computed here);
//  - the modulator output is the carrier for bit 0 and its negation (180
//    degrees) for bit 1, one clock later;
//  - random bits at 32 samples per bit, recovered by the demodulator and
//    sampled at mid-bit, are error free without noise and with noise of
//    sigma 40 (signal amplitude 127); with very strong noise (sigma 400)
//    errors must appear, which shows the channel model is in the loop.
// The 180-degree phase for bit 1 is the described modulation; carrier period,
// noise levels and bit length are this testbench's choices.
module tb_psk;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int BP = 32;
  logic tx_bit = 1'b0, bit_out;
  logic signed [7:0] s_out, carrier;
  logic signed [9:0] r;
  logic signed [21:0] lpf;
  real sigma = 0.0;

  psk_tx u_tx (.clk, .rst_n, .tx_bit, .s_out, .carrier);
  awgn_channel #(.IN_W(8), .OUT_W(10)) u_ch (.clk, .sigma, .s_in(s_out), .r_out(r));
  psk_rx u_rx (.clk, .rst_n, .r_in(r), .lpf_out(lpf), .bit_out);

  // modulator rule, checked every clock
  logic prev_bit;
  logic signed [7:0] prev_car;
  int rule_checks = 0, rule_fail = 0;
  always_ff @(posedge clk) begin
    prev_bit <= tx_bit;
    prev_car <= carrier;
    if (rst_n && $time > 50) begin
      rule_checks++;
      if (s_out != (prev_bit ? -prev_car : prev_car)) rule_fail++;
    end
  end


  // bit checker: samples the decision at a fixed offset into each bit
  logic exp_q [$];
  int   nbits = 0, nerr = 0, phase_cnt = 0;
  logic checking = 1'b0;
  always_ff @(posedge clk) begin
    if (checking) begin
      phase_cnt <= (phase_cnt == BP - 1) ? 0 : phase_cnt + 1;
      if (phase_cnt == 0) exp_q.push_back(tx_bit);
      if (phase_cnt == BP / 2 + 12 && exp_q.size() > 0) begin
        nbits++;
        if (bit_out != exp_q.pop_front()) nerr++;
      end
    end
  end

  task automatic ber(real s, int n, output int e);
    sigma = s; nbits = 0; nerr = 0; exp_q.delete();
    @(negedge clk);
    checking = 1'b1; phase_cnt = 0;
    for (int i = 0; i < n; i++) begin
      tx_bit = 1'($urandom);
      repeat (BP) @(negedge clk);
    end
    repeat (BP) @(negedge clk);
    checking = 1'b0;
    e = nerr;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    logic signed [7:0] seq [$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // two carrier periods; from the rising zero crossing the samples must be
    // round(127 sin(2 pi k / 16))
    repeat (40) begin @(posedge clk); #1 seq.push_back(carrier); end
    begin
      int j = 2;
      while (j < 20 && !(seq[j] == 0 && seq[j+1] > 0)) j++;
      check(j < 20, "rising zero crossing found");
      for (int k = 0; k < 16; k++) begin
        int expv;
        expv = $rtoi($floor(127.0 * $sin(2.0 * 3.14159265358979 * real'(k) / 16.0) + 0.5));
        check(int'(seq[j+k]) == expv, $sformatf("carrier sample %0d: %0d vs %0d", k, seq[j+k], expv));
      end
    end
    ber(0.0, 200, e);
    check(nbits >= 199 && e == 0, $sformatf("no noise: %0d errors in %0d bits", e, nbits));
    ber(40.0, 300, e);
    check(nbits >= 299 && e == 0, $sformatf("sigma 40: %0d errors in %0d bits", e, nbits));
    ber(400.0, 300, e);
    check(e > 0, $sformatf("sigma 400: %0d errors in %0d bits (errors expected)", e, nbits));
    check(rule_checks > 1000 && rule_fail == 0, $sformatf("modulator rule failed %0d of %0d", rule_fail, rule_checks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
