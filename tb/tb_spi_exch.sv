// tb_spi_exch: self-checking test of the data exchange block.
// Runs spi_exch_env twice side by side: with a 16-bit SPI master and with an
// 8-bit one (every word as two bytes). Each environment drives spi_exch with
// a real spi_master against the behavioural board model. A requester models
// the worst-case wr_word latency (RAM read plus a register). Checked for
// writes and reads of several lengths: the board memory, the header words,
// the d_ptr index of every read word, one completion pulse per request and
// the transaction length in clocks. The transaction length is the same for
// both word sizes.
module tb_spi_exch;
  logic clk = 0;
  always #10 clk = ~clk;

  int  c16, f16, c8, f8;
  bit  d16, d8;

  spi_exch_env #(.SPI_W(16)) env16 (.clk, .checks(c16), .failures(f16), .done(d16));
  spi_exch_env #(.SPI_W(8))  env8  (.clk, .checks(c8),  .failures(f8),  .done(d8));

  initial begin
    fork
      begin
        wait (d16 && d8);
        $display("TB_RESULT checks=%0d failures=%0d", c16 + c8, f16 + f8);
        $finish;
      end
      begin
        repeat (200000) @(posedge clk);
        $display("FAIL: watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", c16 + c8, f16 + f8 + 1);
        $finish;
      end
    join_none
  end
endmodule
