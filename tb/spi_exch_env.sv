// spi_exch_env: test environment for the data exchange block, used by
// tb_spi_exch once for each SPI word size.
// spi_exch drives a real spi_master, which talks to the behavioural board
// model. The requester side is modelled here: wr_word comes from a table
// through a registered RAM read and one more register (the worst case the
// block allows). Writes and reads of several lengths are checked against the
// board memory, as are the header words, the d_ptr index of every read word,
// one completion pulse per request and the transaction length in clocks.
module spi_exch_env
  import b1553_pkg::*;
#(
  parameter int unsigned SPI_W = 16
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int unsigned CLK_DIV = 5;
  logic reset = 1;
  logic [SPI_W-1:0] spi_do;

  logic        rd_req = 0, wr_req = 0, rd_valid, rd_over, wr_over;
  logic [19:0] start_addr = '0;
  logic [10:0] data_length = '0;
  logic [15:0] wr_word, rd_word, sdata_16b, sdata;
  logic [8:0]  d_ptr;
  logic        swr_en, swr_ack, sdata_req, sdata_valid;
  logic        sck, cs_n, mosi, miso, int_n;

  spi_exch #(.SPI_W(SPI_W)) dut (.clk, .reset, .rd_req, .wr_req, .start_addr, .data_length, .wr_word, .d_ptr,
                .rd_word, .rd_valid, .rd_over, .wr_over, .sdata_16b, .swr_en, .swr_ack,
                .sdata_req, .sdata, .sdata_valid, .spi_ncs(cs_n));
  spi_master #(.WORD_W(SPI_W), .CLK_DIV(CLK_DIV)) u_spi (.clk_i(clk), .rst_i(reset),
                .di_i(sdata_16b[SPI_W-1:0]), .wren_i(swr_en),
                .wr_ack_o(swr_ack), .di_req_o(sdata_req), .do_o(spi_do), .do_valid_o(sdata_valid),
                .spi_sck_o(sck), .spi_ssel_o(cs_n), .spi_mosi_o(mosi), .spi_miso_i(miso));
  assign sdata = 16'(spi_do);
  cav1553b_model board (.sck, .cs_n, .mosi, .miso, .int_n);

  // requester: RAM read (1 clock) followed by an output register
  logic [15:0] src [512];
  logic [15:0] ram_q;
  always_ff @(posedge clk) begin
    ram_q   <= src[d_ptr];
    wr_word <= ram_q;
  end

  int n_rd_over = 0, n_wr_over = 0, n_acks = 0, n_spi_words = 0;
  always @(posedge clk) if (!reset && swr_en && swr_ack) n_acks++;
  always @(posedge clk) if (!reset && sdata_valid) n_spi_words++;
  initial begin checks = 0; failures = 0; done = 0; end
  longint cyc = 0, t_fall = 0, t_rise = 0;
  always @(posedge clk) cyc++;
  always @(negedge cs_n) t_fall = cyc;
  always @(posedge cs_n) t_rise = cyc;
  always @(posedge clk) if (!reset) begin
    if (rd_over) n_rd_over++;
    if (wr_over) n_wr_over++;
  end

  logic [15:0] got [$];
  int          got_idx [$];
  always @(posedge clk) if (!reset && rd_valid) begin
    got.push_back(rd_word);
    got_idx.push_back(int'(d_ptr));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (SPI_W=%0d): %s", SPI_W, what); end
  endtask

  task automatic do_write(input logic [19:0] a, input int n);
    int w0 = n_wr_over, a0 = n_acks, s0 = n_spi_words;
    for (int i = 0; i < n; i++) src[i] = 16'($urandom);
    @(negedge clk) begin wr_req = 1; start_addr = a; data_length = 11'(n); end
    @(negedge clk) wr_req = 0;
    while (n_wr_over == w0) @(posedge clk);
    @(posedge clk);
    check(n_wr_over == w0 + 1, "one wr_over per write");
    check(n_acks - a0 == (n + 2) * (16 / SPI_W) && n_spi_words - s0 == (n + 2) * (16 / SPI_W),
          $sformatf("%0d SPI master words for %0d 16-bit words", n_acks - a0, n + 2));
    check(board.cmd == SPI_CMD_WR, "write command word");
    check(t_rise - t_fall == (n + 2) * 16 * 2 * CLK_DIV + CLK_DIV,
          $sformatf("write of %0d words took %0d clocks", n, t_rise - t_fall));
    for (int i = 0; i < n; i++)
      check(board.mem[13'(a) + 13'(i)] == src[i], $sformatf("board word %0d = %h expected %h",
            i, board.mem[13'(a) + 13'(i)], src[i]));
  endtask

  task automatic do_read(input logic [19:0] a, input int n);
    int r0 = n_rd_over;
    got.delete(); got_idx.delete();
    @(negedge clk) begin rd_req = 1; start_addr = a; data_length = 11'(n); end
    @(negedge clk) rd_req = 0;
    while (n_rd_over == r0) @(posedge clk);
    @(posedge clk);
    check(n_rd_over == r0 + 1, "one rd_over per read");
    check(board.cmd == SPI_CMD_RD, "read command word");
    check(got.size() == n, $sformatf("%0d words read, expected %0d", got.size(), n));
    for (int i = 0; i < n && i < got.size(); i++) begin
      check(got[i] == board.mem[13'(a) + 13'(i)], $sformatf("read word %0d = %h", i, got[i]));
      check(got_idx[i] == i, $sformatf("d_ptr of read word %0d = %0d", i, got_idx[i]));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    do_write(20'h0_0123, 1);
    do_write(20'h0_0200, 5);
    do_read (20'h0_0200, 5);
    do_write(20'h0_1000, 32);
    do_read (20'h0_1000, 32);
    do_read (20'h0_0123, 1);
    // the upper address bits travel in the command word
    do_write(20'h3_0040, 2);
    check(board.addr[19:16] == 4'h3, "address bits 19:16 sent in word 0");
    check(board.bad_frames == 0, "well-formed frames");
    done = 1;
  end

endmodule
