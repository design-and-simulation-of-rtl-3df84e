// tb_rt_config_sweep: the configuration workloads of the controller, run on
// the whole design at its default parameters.
// For every RT address 0..31 the controller is reset and left to initialise
// the board model; the RT address register must then hold
// 0x0400 | rt << 5 | parity << 4 (computed here), the mode register RT and
// the RT start register 1 ("RT address enabling" and "RT mode start"). Each
// initialisation must take exactly six SPI transactions (five writes and the
// read-back). Finally the initialisation table is rewritten through the
// host port to select BC mode, instruction 3 re-initialises the board, and
// the mode register must read BC. A second controller built for 8-bit SPI
// words runs the same sequence against its own board model.
module tb_rt_config_sweep;
  import b1553_pkg::*;

  logic clk = 0, host_clk = 0, reset = 1;
  always #10 clk = ~clk;
  always #13 host_clk = ~host_clk;

  logic        spi_sck, spi_cs_n, spi_mosi, spi_miso, int_n;
  logic [4:0]  rt_num = '0;
  logic        rom_wren = 0;
  logic [5:0]  rom_waddr = '0;
  logic [31:0] rom_wdata = '0, rx_rdata;
  logic [15:0] head_status;
  fsm_state_e  state;
  logic        init_ok;
  logic [7:0]  init_err_cnt;
  logic [3:0]  last_instr;

  b1553_spi dut (
    .clk, .reset, .spi_sck, .spi_cs_n, .spi_mosi, .spi_miso, .int_n,
    .rt_num, .sa_idx(6'd1),
    .host_clk, .tx_wren(1'b0), .tx_waddr(5'd0), .tx_wdata(32'd0), .rx_raddr(5'd0), .rx_rdata,
    .rom_wren, .rom_waddr, .rom_wdata,
    .head_wdata(16'h0), .head_status, .state, .init_ok, .init_err_cnt, .last_instr
  );

  cav1553b_model board (.sck(spi_sck), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso), .int_n);

  // the same design with an 8-bit SPI module
  logic        sck8, cs8_n, mosi8, miso8, int8_n;
  logic [31:0] rx_rdata8;
  logic [15:0] head_status8;
  fsm_state_e  state8;
  logic        init_ok8;
  logic [7:0]  init_err_cnt8;
  logic [3:0]  last_instr8;

  b1553_spi #(.SPI_W(8)) dut8 (
    .clk, .reset, .spi_sck(sck8), .spi_cs_n(cs8_n), .spi_mosi(mosi8), .spi_miso(miso8), .int_n(int8_n),
    .rt_num, .sa_idx(6'd1),
    .host_clk, .tx_wren(1'b0), .tx_waddr(5'd0), .tx_wdata(32'd0), .rx_raddr(5'd0), .rx_rdata(rx_rdata8),
    .rom_wren, .rom_waddr, .rom_wdata,
    .head_wdata(16'h0), .head_status(head_status8), .state(state8), .init_ok(init_ok8),
    .init_err_cnt(init_err_cnt8), .last_instr(last_instr8)
  );

  cav1553b_model board8 (.sck(sck8), .cs_n(cs8_n), .mosi(mosi8), .miso(miso8), .int_n(int8_n));

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

  task automatic wait_idle(input int limit);
    int n = 0;
    while (!(state == F_IDLE && state8 == F_IDLE) && n < limit) begin @(posedge clk); n++; end
    check(state == F_IDLE && state8 == F_IDLE, "controllers reached idle");
  endtask

  int t0, t8;

  initial begin
    for (int rt = 0; rt < 32; rt++) begin
      reset = 1;
      rt_num = 5'(rt);
      for (int i = 0; i < 16; i++) begin board.mem[i] = 16'h0; board8.mem[i] = 16'h0; end
      repeat (3) @(posedge clk);
      t0 = board.trans_cnt;
      t8 = board8.trans_cnt;
      @(negedge clk) reset = 0;
      wait_idle(100000);
      check(board.trans_cnt - t0 == 6, $sformatf("RT %0d: %0d SPI transactions for initialisation", rt, board.trans_cnt - t0));
      check(board.mem[4] == exp_rt_word(5'(rt)),
            $sformatf("RT %0d: address register %h expected %h", rt, board.mem[4], exp_rt_word(5'(rt))));
      check(board.mem[0] == MODE_RT, $sformatf("RT %0d: RT mode", rt));
      check(board.mem[6] == 16'h0001, $sformatf("RT %0d: RT mode started", rt));
      check(board8.trans_cnt - t8 == 6 && board8.mem[4] == exp_rt_word(5'(rt)) &&
            board8.mem[0] == MODE_RT && board8.mem[6] == 16'h0001,
            $sformatf("RT %0d: same configuration over 8-bit SPI words", rt));
    end
    // select BC mode through the host port of the table and re-initialise
    @(negedge host_clk) begin
      rom_wren = 1; rom_waddr = 6'd0; rom_wdata = {RK_VERIFY, REG_MODE[12:0], MODE_BC};
    end
    @(negedge host_clk) rom_wren = 0;
    board.post_instr(INS_REINIT);
    board8.post_instr(INS_REINIT);
    repeat (200) @(posedge clk);
    wait_idle(100000);
    check(board.mem[0] == MODE_BC, $sformatf("mode register %h after switching the table to BC", board.mem[0]));
    check(board8.mem[0] == MODE_BC, "BC mode over 8-bit SPI words");
    check(board.bad_frames == 0 && board8.bad_frames == 0, "well-formed frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
