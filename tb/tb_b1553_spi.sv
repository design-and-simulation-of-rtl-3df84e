// tb_b1553_spi: end-to-end test of the 1553B board controller at its default
// parameters, against the behavioural board model.
//
// Scenario: the first initialisation is made to fail (the mode register reads
// back wrong once), so the controller must retry. After a good
// initialisation the board registers are checked against values computed
// here. The host then posts each instruction in turn through the board's
// mailbox: 0 (read head status), 1 (write head status), 2 (exchange a
// message: send RAM -> board transmit buffer, board receive buffer ->
// receive RAM), an undefined code, 3 (re-initialise) and f (shut down). A
// poll that finds no instruction is awaited as well. Every mechanism is
// counted and a mechanism that never happened is a failure. The SPI
// transaction that carries a 32-word message is timed: 34 words of 16 SCK
// periods of 2*CLK_DIV clocks each.
module tb_b1553_spi;
  import b1553_pkg::*;

  localparam int unsigned CLK_DIV     = 5;      // defaults of b1553_spi
  localparam int unsigned RST_WAIT    = 5000;
  localparam int unsigned POLL_CYCLES = 50000;
  localparam logic [4:0]  RT  = 5'd5;
  localparam logic [5:0]  SA  = 6'd3;

  logic clk = 0, host_clk = 0, reset = 1;
  always #10 clk = ~clk;        // 50 MHz
  always #17 host_clk = ~host_clk;

  logic        spi_sck, spi_cs_n, spi_mosi, spi_miso, int_n;
  logic        tx_wren = 0, rom_wren = 0;
  logic [4:0]  tx_waddr = '0, rx_raddr = '0;
  logic [31:0] tx_wdata = '0, rx_rdata, rom_wdata = '0;
  logic [5:0]  rom_waddr = '0;
  logic [15:0] head_wdata = 16'h1234, head_status;
  fsm_state_e  state;
  logic        init_ok;
  logic [7:0]  init_err_cnt;
  logic [3:0]  last_instr;

  b1553_spi dut (
    .clk, .reset, .spi_sck, .spi_cs_n, .spi_mosi, .spi_miso, .int_n,
    .rt_num(RT), .sa_idx(SA),
    .host_clk, .tx_wren, .tx_waddr, .tx_wdata, .rx_raddr, .rx_rdata,
    .rom_wren, .rom_waddr, .rom_wdata,
    .head_wdata, .head_status, .state, .init_ok, .init_err_cnt, .last_instr
  );

  cav1553b_model board (.sck(spi_sck), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso), .int_n);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------- event counters
  int n_init_start = 0, n_init_ok = 0, n_null_poll = 0, n_undef = 0, n_off = 0;
  int n_exec[16];
  fsm_state_e prev_state = F_RST_WAIT;
  longint first_cs_cyc = -1;
  longint cs_fall_cyc = 0;
  longint max_cs_low = 0;

  always @(posedge clk) begin
    if (!reset) begin
      if (state != prev_state) begin
        if (prev_state == F_INIT && state == F_IDLE) n_init_ok++;
        if (prev_state == F_POLL && state == F_IDLE) n_null_poll++;
        if (prev_state == F_ACK && state == F_IDLE) n_undef++;
        if (prev_state == F_ACK && state inside {F_EXEC, F_INIT}) n_exec[last_instr]++;
        if (state == F_OFF) n_off++;
      end
      prev_state <= state;
    end
  end

  always @(posedge clk) if (!reset && dut.rt_init) n_init_start++;  // initialisation requests

  always @(negedge spi_cs_n) begin
    cs_fall_cyc = cyc;
    if (first_cs_cyc < 0) first_cs_cyc = cyc;
  end
  always @(posedge spi_cs_n) if (cyc - cs_fall_cyc > max_cs_low) max_cs_low = cyc - cs_fall_cyc;

  // ------------------------------------------------------------------ helpers
  function automatic logic [15:0] exp_rt_word(input logic [4:0] rt);
    int ones = 0;
    for (int i = 0; i < 5; i++) ones += rt[i];
    return 16'h0400 | (16'(rt) << 5) | ((ones % 2 == 0) ? 16'h0010 : 16'h0000);
  endfunction

  task automatic wait_state(input fsm_state_e s, input int limit, input string what);
    int n = 0;
    while (state != s && n < limit) begin
      @(posedge clk);
      n++;
    end
    check(state == s, what);
  endtask

  // Post an instruction and wait until the mailbox is cleared and the
  // controller is back in the given state.
  task automatic run_instr(input logic [3:0] code, input fsm_state_e back, input string what);
    int n = 0;
    board.post_instr(code);
    while (board.mem[REG_CMD[12:0]][CMD_PENDING_BIT] && n < 20000) begin
      @(posedge clk);
      n++;
    end
    repeat (3) @(posedge clk);
    wait_state(back, 40000, what);
  endtask

  function automatic logic [31:0] tx_pat(input int i);
    return 32'hC0DE_0000 ^ (32'(i) * 32'h0101_0107);
  endfunction
  function automatic logic [15:0] rx_pat(input int i);
    return 16'h5A00 + 16'(i * 3);
  endfunction

  logic [31:0] got;
  longint t0;

  initial begin
    board.fail_left = 1;  // the first initialisation fails its check
    // host fills the send RAM, the bus side fills the board's receive buffer
    repeat (4) @(posedge host_clk);
    for (int i = 0; i < 16; i++) begin
      @(negedge host_clk);
      tx_wren = 1; tx_waddr = 5'(i); tx_wdata = tx_pat(i);
    end
    @(negedge host_clk) tx_wren = 0;
    for (int i = 0; i < 32; i++) board.mem[SA_RXBUF_BASE[12:0] + 13'(SA) * 32 + 13'(i)] = rx_pat(i);
    board.mem[SA_HEAD_BASE[12:0] + 13'(SA)] = 16'hBEEF;  // overwritten by init
    repeat (5) @(posedge clk);
    reset = 0;

    // ---------------------------------------------- reset wait + initialisation
    wait_state(F_IDLE, 200000, "controller reaches idle after initialisation");
    check(first_cs_cyc >= RST_WAIT, $sformatf("no SPI access during the reset time (first at %0d)", first_cs_cyc));
    check(init_ok, "init_ok after initialisation");
    check(init_err_cnt == 8'd1, $sformatf("one failed initialisation counted (%0d)", init_err_cnt));
    check(board.mem[REG_MODE[12:0]] == MODE_RT, "mode register = RT");
    check(board.mem[REG_RT_ADDR[12:0]] == exp_rt_word(RT),
          $sformatf("RT address register %h, expected %h", board.mem[REG_RT_ADDR[12:0]], exp_rt_word(RT)));
    check(board.mem[REG_RT_ADDR[12:0]] == 16'h04B0, "RT address register for RT 5 is 0x04B0");
    check(board.mem[SA_HEAD_BASE[12:0] + 13'(SA)] == 16'h0000, "head status of the sub-address cleared");
    check(board.mem[SA_CTRL_BASE[12:0] + 13'(SA)] == 16'h8000, "sub-address control word written");
    check(board.mem[REG_RT_START[12:0]] == 16'h0001, "RT started");
    check(board.bad_frames == 0, "well-formed SPI frames");

    // ---------------------------------------------- a poll with no instruction
    t0 = cyc;
    while (n_null_poll == 0 && cyc - t0 < 2 * POLL_CYCLES) @(posedge clk);
    check(n_null_poll > 0, "timer poll without an instruction returns to idle");

    // ---------------------------------------------- instruction 0: read head
    board.mem[SA_HEAD_BASE[12:0] + 13'(SA)] = 16'hA5C3;
    run_instr(4'h0, F_IDLE, "instruction 0 completes");
    check(head_status == 16'hA5C3, $sformatf("head status read %h", head_status));
    check(last_instr == 4'h0, "last instruction 0");

    // ---------------------------------------------- instruction 1: write head
    run_instr(4'h1, F_IDLE, "instruction 1 completes");
    check(board.mem[SA_HEAD_BASE[12:0] + 13'(SA)] == 16'h1234, "head status written");

    // ---------------------------------------------- instruction 2: communicate
    max_cs_low = 0;
    run_instr(4'h2, F_IDLE, "instruction 2 completes");
    for (int i = 0; i < 16; i++) begin
      check(board.mem[SA_TXBUF_BASE[12:0] + 13'(SA) * 32 + 13'(2 * i)]     == tx_pat(i)[31:16], $sformatf("tx word %0d hi", i));
      check(board.mem[SA_TXBUF_BASE[12:0] + 13'(SA) * 32 + 13'(2 * i + 1)] == tx_pat(i)[15:0],  $sformatf("tx word %0d lo", i));
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge host_clk) rx_raddr = 5'(i);
      @(posedge host_clk); #1 got = rx_rdata;
      check(got == {rx_pat(2 * i), rx_pat(2 * i + 1)}, $sformatf("rx RAM word %0d = %h", i, got));
    end
    // 34 words x 16 bits x 2*CLK_DIV clocks, plus the chip-select tail
    check(max_cs_low >= 34 * 16 * 2 * CLK_DIV && max_cs_low <= 34 * 16 * 2 * CLK_DIV + 2 * CLK_DIV + 4,
          $sformatf("message transaction takes %0d clocks", max_cs_low));

    // ---------------------------------------------- undefined instruction
    run_instr(4'h7, F_IDLE, "undefined instruction leaves the controller idle");

    // ---------------------------------------------- instruction 3: re-initialise
    board.mem[REG_RT_START[12:0]] = 16'h0000;
    run_instr(4'h3, F_IDLE, "instruction 3 re-initialises");
    check(board.mem[REG_RT_START[12:0]] == 16'h0001, "RT started again after re-initialisation");

    // ---------------------------------------------- instruction f: shut down
    run_instr(4'hF, F_OFF, "instruction f shuts the channel down");
    check(board.mem[REG_RT_START[12:0]] == 16'h0000, "RT start register cleared");
    t0 = board.trans_cnt;
    board.post_instr(4'h0);
    repeat (POLL_CYCLES + 1000) @(posedge clk);
    check(state == F_OFF && board.trans_cnt == t0, "off state ignores the board");

    // ---------------------------------------------- every mechanism happened
    check(n_init_start == 3, $sformatf("initialisation started %0d times", n_init_start));
    check(n_init_ok == 2, $sformatf("initialisation succeeded %0d times", n_init_ok));
    check(init_err_cnt == 1, "initialisation failure and retry happened");
    check(n_null_poll > 0, "null poll happened");
    check(n_undef == 1, "undefined instruction happened");
    check(n_exec[0] == 1 && n_exec[1] == 1 && n_exec[2] == 1 && n_exec[3] == 1 && n_exec[15] == 1,
          "each defined instruction executed once");
    check(n_off == 1, "shutdown happened");
    $display("events: init_start=%0d init_ok=%0d init_fail=%0d null_poll=%0d undef=%0d off=%0d ins0=%0d ins1=%0d ins2=%0d ins3=%0d insf=%0d",
             n_init_start, n_init_ok, init_err_cnt, n_null_poll, n_undef, n_off,
             n_exec[0], n_exec[1], n_exec[2], n_exec[3], n_exec[15]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) n_exec[i] = 0;
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
