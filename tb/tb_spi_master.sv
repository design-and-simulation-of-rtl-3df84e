// tb_spi_master: self-checking test of the SPI master.
// A small mode-0 SPI slave in this file records what it receives and returns
// its own words. Bursts of 1, 3 and 5 words are sent, each word offered as
// soon as the master requests it. Checked: words seen by the slave, words
// returned on do_o, one chip-select period per burst, 16 SCK pulses per
// word, the burst length in clocks (16 bits x 2*CLK_DIV per word plus a
// half-period tail) and the minimum chip-select high time.
module tb_spi_master;
  localparam int unsigned CLK_DIV = 5;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;

  logic [15:0] di = '0, do_w;
  logic wren = 0, wr_ack, di_req, do_valid, sck, ssel, mosi, miso;

  spi_master #(.WORD_W(16), .CLK_DIV(CLK_DIV)) dut (
    .clk_i(clk), .rst_i(rst), .di_i(di), .wren_i(wren), .wr_ack_o(wr_ack), .di_req_o(di_req),
    .do_o(do_w), .do_valid_o(do_valid), .spi_sck_o(sck), .spi_ssel_o(ssel),
    .spi_mosi_o(mosi), .spi_miso_i(miso));

  // ------------------------------------------------------------- SPI slave
  logic [15:0] s_in, s_out;
  int s_bits = 0, s_words = 0, sck_pulses = 0, cs_periods = 0;
  logic [15:0] s_rx [$];
  logic [15:0] s_tx [$];
  initial miso = 0;
  always @(negedge ssel) begin
    s_bits = 0; cs_periods++;
    s_out = s_tx.size() ? s_tx.pop_front() : 16'h0;
    miso = s_out[15];
  end
  always @(posedge sck) if (!ssel) begin
    sck_pulses++;
    s_in = {s_in[14:0], mosi};
    s_bits++;
    if (s_bits == 16) begin s_rx.push_back(s_in); s_bits = 0; end
  end
  always @(negedge sck) if (!ssel) begin
    if (s_bits == 0) s_out = s_tx.size() ? s_tx.pop_front() : 16'h0;
    miso = s_out[15 - s_bits];
  end

  int checks = 0, failures = 0;
  longint cyc = 0, t_fall = 0, t_rise = 0, t_high = 0;
  always @(posedge clk) cyc++;
  always @(negedge ssel) begin t_fall = cyc; t_high = t_fall - t_rise; end
  always @(posedge ssel) t_rise = cyc;

  logic [15:0] m_rx [$];
  always @(posedge clk) if (!rst && do_valid) m_rx.push_back(do_w);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic burst(input int n);
    logic [15:0] mw [$];
    logic [15:0] sw [$];
    int p0 = sck_pulses, c0 = cs_periods;
    s_rx.delete(); m_rx.delete(); s_tx.delete();
    for (int i = 0; i < n; i++) begin
      mw.push_back(16'($urandom));
      sw.push_back(16'($urandom));
      s_tx.push_back(sw[i]);
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (i > 0) while (!di_req) @(negedge clk);
      di = mw[i]; wren = 1;
      @(posedge clk); #1;
      while (!wr_ack) begin @(posedge clk); #1; end
      @(negedge clk) wren = 0;
    end
    while (!ssel) @(posedge clk);
    repeat (2 * CLK_DIV) @(posedge clk);
    check(cs_periods - c0 == 1, $sformatf("%0d-word burst in one chip-select period", n));
    check(sck_pulses - p0 == 16 * n, $sformatf("%0d SCK pulses for %0d words", sck_pulses - p0, n));
    check(t_rise - t_fall == 16 * n * 2 * CLK_DIV + CLK_DIV,
          $sformatf("burst of %0d words lasts %0d clocks", n, t_rise - t_fall));
    check(s_rx.size() == n && m_rx.size() == n, "word counts");
    for (int i = 0; i < n && i < s_rx.size() && i < m_rx.size(); i++) begin
      check(s_rx[i] == mw[i], $sformatf("slave got %h expected %h", s_rx[i], mw[i]));
      check(m_rx[i] == sw[i], $sformatf("master got %h expected %h", m_rx[i], sw[i]));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(ssel && !sck, "idle: chip select high, SCK low");
    burst(1);
    burst(3);
    check(t_high >= CLK_DIV, $sformatf("chip select high for %0d clocks", t_high));
    burst(5);
    burst(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
