// tb_spi_unit: self-checking test of the SPI master against a behavioural
// slave. Every CPOL/CPHA/DORD combination and all eight clock divider settings
// exchange random bytes in both directions; the transfer time must be
// 16 half-periods of SCK (8 SCK clocks). Also checked: SPIF and the
// interrupt, clearing by an SPDR access, write collision (WCOL) with the
// transfer left intact, the double-buffered read, and SCK idling at CPOL.
// Slave mode: the testbench acts as master on the slave pins in all four
// modes and both bit orders (data both ways, SPIF, MISO enable); also a byte
// cut short by SS, and a write collision in the middle of a slave byte.
// Register fields, WCOL and the double-buffered read follow the described SPI;
// bit positions and divider table are this design's choices.
module tb_spi_unit;
  import hm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  spi_reg_e   addr;
  logic       wr_en = 1'b0, rd_en = 1'b0, irq, sck, mosi, miso, ss_n;
  logic [7:0] wdata = '0, rdata, slave_tx = '0;
  logic       cpol = 1'b0, cpha = 1'b0, dord = 1'b0;

  logic       m_sck = 1'b0, m_ss_n = 1'b1, m_mosi = 1'b0, s_miso, s_oe;
  spi_unit dut (.clk, .rst_n, .addr, .wr_en, .wdata, .rd_en, .rdata, .irq, .sck, .mosi, .miso, .ss_n,
                .slv_sck(m_sck), .slv_ss_n(m_ss_n), .slv_mosi(m_mosi), .slv_miso(s_miso), .slv_miso_oe(s_oe));
  spi_slave_model u_slave (.cpol, .cpha, .dord, .sck, .mosi, .ss_n, .tx_byte(slave_tx), .miso);

  task automatic wr(spi_reg_e a, logic [7:0] d);
    addr = a; wdata = d; wr_en = 1'b1;
    @(posedge clk); #1 wr_en = 1'b0;
  endtask
  task automatic rd(spi_reg_e a, output logic [7:0] d);
    addr = a; rd_en = 1'b1; #1 d = rdata;
    @(posedge clk); #1 rd_en = 1'b0;
  endtask

  // SCK must stay at CPOL while SS is high
  always @(posedge clk) if (rst_n && ss_n && sck != dut.spcr[SPCR_CPOL]) begin failures++; $display("FAIL: SCK not idle"); end

  function automatic int half_of(logic [2:0] s);
    case (s)
      3'b000: return 2;  3'b001: return 8;  3'b010: return 32; 3'b011: return 64;
      3'b100: return 1;  3'b101: return 4;  3'b110: return 16; default: return 32;
    endcase
  endfunction

  task automatic xfer(logic [2:0] spd, logic pol, logic pha, logic lsb);
    logic [7:0] m, s, r, st;
    int n;
    m = 8'($urandom); s = 8'($urandom);
    cpol = pol; cpha = pha; dord = lsb; slave_tx = s;
    wr(SPI_SPSR, {7'b0, spd[2]});
    wr(SPI_SPCR, {1'b1, 1'b1, lsb, 1'b1, pol, pha, spd[1:0]});
    repeat (2) @(posedge clk); #1;
    wr(SPI_SPDR, m);
    n = 0;
    while (!irq && n < 5000) begin @(posedge clk); #1; n++; end
    check(n == 16 * half_of(spd), $sformatf("transfer time %0d vs %0d (spd %b)", n, 16 * half_of(spd), spd));
    rd(SPI_SPSR, st);
    check(st[SPSR_SPIF] && !st[SPSR_WCOL], "SPIF set, WCOL clear");
    rd(SPI_SPDR, r);
    check(r == s, $sformatf("master received %h expected %h (mode %b%b dord %b)", r, s, pol, pha, lsb));
    check(u_slave.rxq.size() > 0 && u_slave.rxq[$] == m,
          $sformatf("slave received %h expected %h (mode %b%b dord %b)", u_slave.rxq[$], m, pol, pha, lsb));
    check(!irq, "SPIF cleared by reading SPDR");
  endtask

  // slave mode: the testbench is the master, H clocks per SCK half period.
  // nbits < 8 stops early (SS raised mid-byte); collide_at writes SPDR after
  // that many bits.
  localparam int H = 8;
  task automatic master_bits(logic pol, logic pha, logic lsb, logic [7:0] m_tx, int nbits,
                             int collide_at, output logic [7:0] m_rx);
    m_rx = '0;
    m_sck = pol; m_ss_n = 1'b0;
    repeat (H) @(posedge clk); #1;
    for (int i = 0; i < nbits; i++) begin
      int k;
      k = lsb ? i : 7 - i;
      if (i == collide_at) wr(SPI_SPDR, 8'hEE);
      if (!pha) begin
        m_mosi = m_tx[k];
        repeat (H) @(posedge clk); #1;
        m_rx[k] = s_miso; m_sck = ~pol;
        repeat (H) @(posedge clk); #1;
        m_sck = pol;
      end else begin
        m_sck = ~pol; m_mosi = m_tx[k];
        repeat (H) @(posedge clk); #1;
        m_rx[k] = s_miso; m_sck = pol;
        repeat (H) @(posedge clk); #1;
      end
    end
    repeat (H) @(posedge clk); #1;
    m_ss_n = 1'b1;
    repeat (4) @(posedge clk); #1;
  endtask

  task automatic slave_xfer(logic pol, logic pha, logic lsb);
    logic [7:0] m, sl, r, st;
    m = 8'($urandom); sl = 8'($urandom);
    wr(SPI_SPCR, {1'b1, 1'b1, lsb, 1'b0, pol, pha, 2'b00});
    wr(SPI_SPDR, sl);
    check(!s_oe, "slave MISO not driven while deselected");
    fork
      master_bits(pol, pha, lsb, m, 8, -1, r);
      begin repeat (3 * H) @(posedge clk); check(s_oe, "slave MISO driven while selected"); end
    join
    check(r == sl, $sformatf("slave sent %h, master got %h (mode %b%b dord %b)", sl, r, pol, pha, lsb));
    check(irq, "slave: SPIF and interrupt after eight bits");
    rd(SPI_SPDR, r);
    check(r == m, $sformatf("slave received %h expected %h (mode %b%b dord %b)", r, m, pol, pha, lsb));
    check(!irq, "slave: SPIF cleared");
    check(ss_n == 1'b1, "master SS stays high in slave mode");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r, st, first;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int spd = 0; spd < 8; spd++) xfer(3'(spd), 1'b0, 1'b0, 1'b0);
    for (int md = 0; md < 8; md++) begin
      xfer(3'b100, md[2], md[1], md[0]);
      xfer(3'b000, md[2], md[1], md[0]);
      xfer(3'b101, md[2], md[1], md[0]);
    end

    // write collision and double-buffered read
    cpol = 0; cpha = 0; dord = 0;
    wr(SPI_SPSR, 8'h00);
    wr(SPI_SPCR, 8'b0101_0001);            // SPE, MSTR, /16, no interrupt
    slave_tx = 8'h3C;
    wr(SPI_SPDR, 8'hA5);
    while (ss_n == 1'b0) @(posedge clk);
    #1 rd(SPI_SPDR, first);
    check(first == 8'h3C, "first transfer data");
    slave_tx = 8'hC3;
    wr(SPI_SPDR, 8'h5A);
    repeat (20) @(posedge clk); #1;
    rd(SPI_SPDR, r);
    check(r == 8'h3C, "read buffer keeps the previous byte during a transfer");
    wr(SPI_SPDR, 8'hFF);                   // collides
    rd(SPI_SPSR, st);
    check(st[SPSR_WCOL] == 1'b1, "WCOL set by a write during the transfer");
    check(irq == 1'b0, "no interrupt with SPIE clear");
    while (ss_n == 1'b0) @(posedge clk);
    #1 rd(SPI_SPSR, st);
    check(st[SPSR_SPIF], "SPIF after the collided transfer");
    rd(SPI_SPDR, r);
    check(r == 8'hC3, "collided transfer completed with its own data");
    check(u_slave.rxq[$] == 8'h5A, "slave got the original byte, not the colliding one");
    rd(SPI_SPSR, st);
    check(!st[SPSR_SPIF] && !st[SPSR_WCOL], "SPIF and WCOL cleared");

    // slave mode, all modes and bit orders
    for (int md = 0; md < 8; md++) slave_xfer(md[2], md[1], md[0]);
    // slave: SS raised after three bits restarts the byte
    begin
      logic [7:0] m_rx;
      wr(SPI_SPCR, 8'b1100_0000);
      wr(SPI_SPDR, 8'h81);
      master_bits(1'b0, 1'b0, 1'b0, 8'hFF, 3, -1, m_rx);
      check(!irq, "slave: no SPIF for a partial byte");
      wr(SPI_SPDR, 8'h66);
      master_bits(1'b0, 1'b0, 1'b0, 8'h2D, 8, -1, m_rx);
      check(m_rx == 8'h66, $sformatf("slave after partial byte sent %h", m_rx));
      rd(SPI_SPDR, r);
      check(r == 8'h2D, $sformatf("slave after partial byte received %h", r));
      // write collision in the middle of a slave byte
      wr(SPI_SPDR, 8'h99);
      master_bits(1'b0, 1'b0, 1'b0, 8'h4B, 8, 4, m_rx);
      rd(SPI_SPSR, st);
      check(st[SPSR_WCOL], "slave: WCOL for a write mid-byte");
      check(m_rx == 8'h99, "slave: colliding write did not disturb the byte");
      rd(SPI_SPDR, r);
      check(r == 8'h4B, "slave: byte received across the collision");
    end

    // SPE clear: no transfer
    wr(SPI_SPCR, 8'b0001_0000);
    wr(SPI_SPDR, 8'h12);
    repeat (5) @(posedge clk);
    check(ss_n == 1'b1, "no transfer with SPE clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
