// tb_adc8: checks the ADC model's conversion and serial read-out. For a set
// of input voltages (below zero, inside the range, above VREF) it selects
// the ADC, clocks out eight bits in SPI mode 0 and compares the code with
// floor(v / 3.3 * 256) clipped to 0..255, worked out here.
// The ADC's SPI interface and reference voltage are this design's choices.
module tb_adc8;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  real  vin = 0.0;
  logic sclk = 1'b0, cs_n = 1'b1, miso;
  adc8 dut (.vin, .sclk, .cs_n, .miso);

  task automatic convert(real v, output logic [7:0] code);
    vin = v; #10;
    cs_n = 1'b0; #10;
    for (int i = 0; i < 8; i++) begin
      sclk = 1'b1; code = {code[6:0], miso}; #10;
      sclk = 1'b0; #10;
    end
    cs_n = 1'b1; #10;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    real vs [] = '{-0.5, 0.0, 0.006, 0.5, 1.0, 1.65, 2.2, 3.0, 3.28, 3.3, 4.0};
    logic [7:0] c;
    foreach (vs[i]) begin
      int e;
      e = $rtoi(vs[i] / 3.3 * 256.0);
      if (vs[i] <= 0.0) e = 0;
      if (e > 255) e = 255;
      convert(vs[i], c);
      check(int'(c) == e, $sformatf("vin %f: code %0d expected %0d", vs[i], c, e));
    end
    for (int i = 0; i < 50; i++) begin
      int e;
      e = $urandom_range(0, 255);
      convert((real'(e) + 0.5) * 3.3 / 256.0, c);
      check(int'(c) == e, $sformatf("random code %0d read %0d", e, c));
    end
    check(miso == 1'b0, "miso low while deselected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
