// tb_rle: tests the run-length compressor and de-compressor.
// 1) The documented example: 11110011 gives runs 2, 2, 4 (bits 1, 0, 1 from
//    the LSB), i.e. tokens 9, 1, B, packed as 19 0B with the pad token.
// 2) Frames of random and run-heavy samples go through the compressor, with
//    random back-pressure; the bytes must equal a reference encoding computed
//    here, and after the de-compressor the samples must come back unchanged.
// 3) Throughput: a sample with k runs occupies the compressor k clocks.
module tb_rle;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic       c_in_valid, c_in_ready, c_in_last, c_out_valid, c_out_last, c_out_ready;
  logic [7:0] c_in_data, c_out_data;
  // sample source: src[0 .. src_len-1], stepped by the handshake
  logic [7:0] src [64];
  int         src_len = 0, src_idx = 0;
  assign c_in_valid = (src_idx < src_len);
  assign c_in_data  = src[src_idx[5:0]];
  assign c_in_last  = (src_idx == src_len - 1);
  always_ff @(posedge clk) if (c_in_valid && c_in_ready) src_idx <= src_idx + 1;
  logic       d_in_ready, d_out_valid, d_err, d_first;
  logic [7:0] d_out_data;
  logic       bp = 0;            // random back-pressure enable
  logic       rnd;

  rle_compressor u_c (.clk, .rst_n, .in_valid(c_in_valid), .in_ready(c_in_ready), .in_data(c_in_data),
    .in_last(c_in_last), .out_valid(c_out_valid), .out_ready(c_out_ready), .out_data(c_out_data), .out_last(c_out_last));
  // the compressed stream goes straight into the de-compressor
  rle_decompressor u_d (.clk, .rst_n, .in_valid(c_out_valid && rnd), .in_ready(d_in_ready), .in_data(c_out_data),
    .in_first(d_first), .out_valid(d_out_valid), .out_ready(1'b1), .out_data(d_out_data), .err(d_err));
  assign c_out_ready = d_in_ready && rnd;

  logic first_q = 1'b1;
  assign d_first = first_q;
  always_ff @(posedge clk) begin
    rnd <= bp ? 1'($urandom) : 1'b1;
    if (c_out_valid && c_out_ready) first_q <= c_out_last;
  end

  logic [7:0] cbytes [$], samples [$];
  int errs = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if (c_out_valid && c_out_ready) cbytes.push_back(c_out_data);
    if (d_out_valid) samples.push_back(d_out_data);
    if (d_err) errs++;
  end

  // reference encoder
  function automatic void ref_enc(logic [7:0] s [$], ref logic [7:0] o [$]);
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
    o.delete();
    for (int i = 0; i < toks.size(); i += 2) o.push_back({toks[i+1], toks[i]});
  endfunction

  task automatic send(logic [7:0] s [$]);
    @(negedge clk);
    foreach (s[i]) src[i] = s[i];
    src_idx = 0; src_len = s.size();
    while (src_idx < src_len) @(posedge clk);
  endtask

  task automatic frame_test(logic [7:0] s [$], string name);
    logic [7:0] e [$];
    cbytes.delete(); samples.delete();
    ref_enc(s, e);
    send(s);
    for (int t = 0; t < 2000 && cbytes.size() < e.size(); t++) @(posedge clk);
    repeat (30) @(posedge clk);
    check(cbytes.size() == e.size(), $sformatf("%s: %0d compressed bytes, expected %0d", name, cbytes.size(), e.size()));
    for (int i = 0; i < e.size() && i < cbytes.size(); i++)
      check(cbytes[i] == e[i], $sformatf("%s: byte %0d %h vs %h", name, i, cbytes[i], e[i]));
    check(samples.size() == s.size(), $sformatf("%s: %0d samples back, expected %0d", name, samples.size(), s.size()));
    for (int i = 0; i < s.size() && i < samples.size(); i++)
      check(samples[i] == s[i], $sformatf("%s: sample %0d %h vs %h", name, i, samples[i], s[i]));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s [$];
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    // documented example
    s = '{8'b11110011};
    frame_test(s, "example");
    check(cbytes.size() == 2 && cbytes[0] == 8'h19 && cbytes[1] == 8'h0B, "11110011 -> runs 2,2,4 -> 19 0B");
    // throughput: 0x00 and 0xFF are one run each, 0x55 eight runs
    begin
      int t0, t1;
      cbytes.delete(); samples.delete();
      s = '{8'h00, 8'hFF, 8'h0F, 8'hF0};   // 1+1+2+2 = 6 tokens
      t0 = $time;
      send(s);
      while (cbytes.size() < 3) @(posedge clk);
      t1 = $time;
      check((t1 - t0) / 10 <= 6 + 4, $sformatf("6 tokens in %0d clocks", (t1 - t0) / 10));
      repeat (20) @(posedge clk);
    end
    s = '{8'h55, 8'hAA, 8'h00, 8'hFF, 8'h80, 8'h01, 8'h7E};
    frame_test(s, "patterns");
    bp = 1;
    for (int f = 0; f < 6; f++) begin
      s.delete();
      for (int i = 0; i < 1 + $urandom_range(0, 30); i++) s.push_back(8'($urandom));
      frame_test(s, $sformatf("random frame %0d", f));
    end
    check(errs == 0, "no format errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
