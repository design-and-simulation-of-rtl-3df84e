// tb_b1553_init: self-checking test of the initialisation and control block.
// b1553_init runs with the real initialisation table, send/receive RAMs,
// spi_exch and spi_master against the behavioural board model.
// Checked: the board registers after initialisation for several RT addresses
// (RT address word computed here independently), that a failed RT-mode
// check stops the sequence before anything else is written, and every
// control operation: mailbox poll and clear, head status read and write,
// message send (32-bit RAM words split upper half first) and receive (packed
// into the receive RAM), channel stop and an undefined opcode.
module tb_b1553_init;
  import b1553_pkg::*;
  logic clk = 0, reset = 1;
  always #10 clk = ~clk;

  logic [4:0]  rt_num = '0;
  logic [5:0]  sa_idx = 6'd2;
  logic        rt_init = 0, rt_req = 0, rt_over, rt_succ;
  logic [4:0]  rt_opcode = '0;
  logic [15:0] rt_wdata = '0, rt_rdata;
  logic        rd_reqi, wr_reqi, rd_valid, rd_over, wr_over;
  logic [19:0] start_addr;
  logic [10:0] data_length;
  logic [15:0] wr_word, rd_word, sdata_16b, sdata;
  logic [8:0]  d_ptr;
  logic        swr_en, swr_ack, sdata_req, sdata_valid, sck, cs_n, mosi, miso, int_n;
  logic        prom_rden, rx_wren;
  logic [5:0]  prom_addr;
  logic [31:0] prom_data, tx_q, rx_wdata, rx_q, tx_wdata = '0;
  logic [4:0]  tx_raddr, rx_waddr, tx_waddr = '0, rx_raddr = '0;
  logic        tx_wren = 0;

  b1553_init dut (.clk, .reset, .rt_num, .sa_idx, .rt_init, .rt_req, .rt_opcode, .rt_wdata,
    .rt_rdata, .rt_over, .rt_succ, .rd_reqi, .wr_reqi, .start_addr, .data_length, .wr_word,
    .d_ptr, .rd_word, .rd_valid, .rd_over, .wr_over, .rt_prom_rden(prom_rden),
    .rt_prom_addr(prom_addr), .rt_prom_data(prom_data), .tx_raddr, .ram_rd_data(tx_q),
    .rx_wren, .rx_waddr, .rx_wdata);
  spi_exch u_exch (.clk, .reset, .rd_req(rd_reqi), .wr_req(wr_reqi), .start_addr, .data_length,
    .wr_word, .d_ptr, .rd_word, .rd_valid, .rd_over, .wr_over, .sdata_16b, .swr_en, .swr_ack,
    .sdata_req, .sdata, .sdata_valid, .spi_ncs(cs_n));
  spi_master u_spi (.clk_i(clk), .rst_i(reset), .di_i(sdata_16b), .wren_i(swr_en), .wr_ack_o(swr_ack),
    .di_req_o(sdata_req), .do_o(sdata), .do_valid_o(sdata_valid), .spi_sck_o(sck),
    .spi_ssel_o(cs_n), .spi_mosi_o(mosi), .spi_miso_i(miso));
  init_rom u_rom (.wrclk(clk), .rdclk(clk), .reset, .wren(1'b0), .wraddress(6'd0), .data(32'd0),
    .rden(prom_rden), .raddress(prom_addr), .q(prom_data));
  dp_ram u_tx (.wrclk(clk), .rdclk(clk), .reset, .wren(tx_wren), .wraddress(tx_waddr), .data(tx_wdata),
    .raddress(tx_raddr), .q(tx_q));
  dp_ram u_rx (.wrclk(clk), .rdclk(clk), .reset, .wren(rx_wren), .wraddress(rx_waddr), .data(rx_wdata),
    .raddress(rx_raddr), .q(rx_q));
  cav1553b_model board (.sck, .cs_n, .mosi, .miso, .int_n);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] exp_rt_word(input logic [4:0] rt);
    int ones = 0;
    for (int i = 0; i < 5; i++) ones += rt[i];
    return 16'h0400 | (16'(rt) << 5) | ((ones % 2 == 0) ? 16'h0010 : 16'h0000);
  endfunction

  int n_over = 0;
  always @(posedge clk) if (!reset && rt_over) n_over++;

  // wait for the rt_over of the request issued after n_over was o0
  task automatic wait_over(input int o0, input int limit);
    int n = 0;
    while (n_over == o0 && n < limit) begin @(posedge clk); n++; end
    check(n_over == o0 + 1, "one rt_over per request");
  endtask

  task automatic do_init();
    int o0 = n_over;
    @(negedge clk) rt_init = 1;
    @(negedge clk) rt_init = 0;
    wait_over(o0, 100000);
  endtask

  task automatic do_op(input rt_op_e op, input logic [15:0] wd);
    int o0 = n_over;
    @(negedge clk) begin rt_req = 1; rt_opcode = op; rt_wdata = wd; end
    @(negedge clk) rt_req = 0;
    wait_over(o0, 100000);
  endtask

  task automatic clear_board();
    for (int i = 0; i < 8192; i++) board.mem[i] = 16'h0;
  endtask

  logic [12:0] tx_base, rx_base;
  logic [4:0] rts [4] = '{5'd5, 5'd7, 5'd0, 5'd31};

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    // ------------------------------------------------- initialisation
    foreach (rts[k]) begin
      clear_board();
      rt_num = rts[k];
      do_init();
      check(rt_succ, "initialisation succeeds");
      check(board.mem[0] == MODE_RT, "mode register = RT");
      check(board.mem[4] == exp_rt_word(rts[k]),
            $sformatf("RT %0d: address word %h expected %h", rts[k], board.mem[4], exp_rt_word(rts[k])));
      check(board.mem[13'h100 + 13'(sa_idx)] == 16'h0000 && board.mem[13'h140 + 13'(sa_idx)] == 16'h8000,
            "sub-address memory configured");
      check(board.mem[6] == 16'h0001, "RT started");
    end
    check(exp_rt_word(5'd5) == 16'h04B0 && exp_rt_word(5'd7) == 16'h04E0, "reference formula");
    // ------------------------------------------------- failed RT-mode check
    clear_board();
    board.fail_left = 1;
    rt_num = 5'd9;
    do_init();
    check(!rt_succ, "failed check reported");
    check(board.mem[4] == 16'h0 && board.mem[6] == 16'h0, "sequence stopped after the failed check");
    do_init();
    check(rt_succ && board.mem[4] == exp_rt_word(5'd9), "second attempt succeeds");
    // ------------------------------------------------- mailbox
    board.post_instr(4'h2);
    do_op(OP_POLL, 16'h0);
    check(rt_rdata == 16'h0102, $sformatf("mailbox read %h", rt_rdata));
    do_op(OP_ACK, 16'h0);
    check(board.mem[8] == 16'h0, "mailbox cleared");
    // ------------------------------------------------- head status
    board.mem[13'h100 + 13'(sa_idx)] = 16'h7E57;
    do_op(OP_RD_HEAD, 16'h0);
    check(rt_rdata == 16'h7E57, "head status read");
    do_op(OP_WR_HEAD, 16'h4321);
    check(board.mem[13'h100 + 13'(sa_idx)] == 16'h4321, "head status written");
    // ------------------------------------------------- message send
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin tx_wren = 1; tx_waddr = 5'(i); tx_wdata = $urandom; end
    end
    @(negedge clk) tx_wren = 0;
    do_op(OP_SEND, 16'h0);
    tx_base = 13'h1000 + 13'(sa_idx) * 32;
    for (int i = 0; i < 16; i++) begin
      check(board.mem[tx_base + 13'(2 * i)] == u_tx.mem[i][31:16], $sformatf("sent word %0d upper", i));
      check(board.mem[tx_base + 13'(2 * i + 1)] == u_tx.mem[i][15:0], $sformatf("sent word %0d lower", i));
    end
    // ------------------------------------------------- message receive
    rx_base = 13'h1800 + 13'(sa_idx) * 32;
    for (int i = 0; i < 32; i++) board.mem[rx_base + 13'(i)] = 16'($urandom);
    do_op(OP_RECV, 16'h0);
    for (int i = 0; i < 16; i++)
      check(u_rx.mem[i] == {board.mem[rx_base + 13'(2 * i)], board.mem[rx_base + 13'(2 * i + 1)]},
            $sformatf("received word %0d = %h", i, u_rx.mem[i]));
    // ------------------------------------------------- stop and undefined
    do_op(OP_STOP, 16'h0);
    check(board.mem[6] == 16'h0, "channel closed");
    begin
      int t;
      t = board.trans_cnt;
      do_op(rt_op_e'(5'd20), 16'h0);
      check(board.trans_cnt == t, "undefined opcode does nothing");
    end
    check(board.bad_frames == 0, "well-formed frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
