// b1553_spi: FPGA controller for a MIL-STD-1553B protocol board on SPI.
//
// The controller makes a commercial 1553B board act as a remote terminal (RT)
// of a simulated electric thruster. It reaches the board only through the
// board's SPI slave (SCK, SI, SO, CE#) and its interrupt line INT#:
//
//   send RAM --> b1553_init --> spi_exch <--> spi_master <==SPI==> 1553B board
//                  ^  ^   |
//      b1553_fsm --+  |   +--> receive RAM
//                 init_rom
//
//   * b1553_fsm schedules the tasks: reset wait, initialisation (retried until
//     it succeeds), idle with instruction polling, shutdown.
//   * b1553_init carries out initialisation from init_rom and every board
//     operation the state machine asks for.
//   * spi_exch frames each operation as one SPI transaction of 16-bit words
//     and spi_master shifts them, as 16-bit words or, with SPI_W = 8, as
//     byte pairs.
//   * The send RAM (written by the host logic on host_clk) holds the message
//     to transmit; the receive RAM (read by the host logic on host_clk) holds
//     the last message read from the board. Both hold 32 words of 32 bits.
//     One 1553B message of 32 16-bit words uses RAM words 0..15.
//   * init_rom can be rewritten through the rom_* port, for instance to
//     choose BC or BM mode; at power-up it holds an RT-mode sequence.
//
// The block structure and the RAM/ROM sizes follow the document. The single
// main clock (the document's design also has 10 MHz and 50 MHz clocks whose
// use is not described), the board's SPI framing and register map (see
// b1553_pkg) are this design's choices. The board, the 1553B bus and the
// bus analyser on the far side are outside this design.
module b1553_spi
  import b1553_pkg::*;
#(
  parameter int unsigned SPI_W       = 16,     // SPI word size, 16 or 8
  parameter int unsigned CLK_DIV     = 5,      // SCK = clk / (2*CLK_DIV)
  parameter int unsigned RST_WAIT    = 5000,   // board reset time, clocks
  parameter int unsigned POLL_CYCLES = 50000   // mailbox poll period, clocks
) (
  input  logic        clk,
  input  logic        reset,
  // board
  output logic        spi_sck,
  output logic        spi_cs_n,
  output logic        spi_mosi,
  input  logic        spi_miso,
  input  logic        int_n,
  // terminal settings
  input  logic [4:0]  rt_num,
  input  logic [5:0]  sa_idx,
  // host side of the RAMs and ROM
  input  logic        host_clk,
  input  logic        tx_wren,
  input  logic [4:0]  tx_waddr,
  input  logic [31:0] tx_wdata,
  input  logic [4:0]  rx_raddr,
  output logic [31:0] rx_rdata,
  input  logic        rom_wren,
  input  logic [5:0]  rom_waddr,
  input  logic [31:0] rom_wdata,
  // status
  input  logic [15:0] head_wdata,
  output logic [15:0] head_status,
  output fsm_state_e  state,
  output logic        init_ok,
  output logic [7:0]  init_err_cnt,
  output logic [3:0]  last_instr
);

  // state machine <-> init/control
  logic        rt_init, rt_req, rt_over, rt_succ;
  logic [4:0]  rt_opcode;
  logic [15:0] rt_wdata, rt_rdata;
  // init/control <-> exchange
  logic        rd_reqi, wr_reqi, rd_valid, rd_over, wr_over;
  logic [19:0] start_addr;
  logic [10:0] data_length;
  logic [15:0] wr_word, rd_word;
  logic [8:0]  d_ptr;
  // exchange <-> SPI master
  logic [15:0] sdata_16b, sdata;
  logic        swr_en, swr_ack, sdata_req, sdata_valid;
  logic [SPI_W-1:0] spi_do;
  // memories
  logic        prom_rden;
  logic [5:0]  prom_addr;
  logic [31:0] prom_data, tx_rdata, rx_wdata;
  logic [4:0]  tx_raddr, rx_waddr;
  logic        rx_wren;

  b1553_fsm #(
    .RST_WAIT   (RST_WAIT),
    .POLL_CYCLES(POLL_CYCLES)
  ) u_fsm (
    .clk, .reset, .int_n,
    .rt_init, .rt_req, .rt_opcode, .rt_wdata, .rt_rdata, .rt_over, .rt_succ,
    .head_wdata, .head_status, .state, .init_ok, .init_err_cnt, .last_instr
  );

  b1553_init #(.ROM_AW(6), .RAM_AW(5)) u_init (
    .clk, .reset, .rt_num, .sa_idx,
    .rt_init, .rt_req, .rt_opcode, .rt_wdata, .rt_rdata, .rt_over, .rt_succ,
    .rd_reqi, .wr_reqi, .start_addr, .data_length, .wr_word, .d_ptr,
    .rd_word, .rd_valid, .rd_over, .wr_over,
    .rt_prom_rden(prom_rden), .rt_prom_addr(prom_addr), .rt_prom_data(prom_data),
    .tx_raddr, .ram_rd_data(tx_rdata),
    .rx_wren, .rx_waddr, .rx_wdata
  );

  spi_exch #(.SPI_W(SPI_W)) u_exch (
    .clk, .reset,
    .rd_req(rd_reqi), .wr_req(wr_reqi), .start_addr, .data_length,
    .wr_word, .d_ptr, .rd_word, .rd_valid, .rd_over, .wr_over,
    .sdata_16b, .swr_en, .swr_ack, .sdata_req, .sdata, .sdata_valid,
    .spi_ncs(spi_cs_n)
  );

  spi_master #(.WORD_W(SPI_W), .CLK_DIV(CLK_DIV)) u_spi (
    .clk_i(clk), .rst_i(reset),
    .di_i(sdata_16b[SPI_W-1:0]), .wren_i(swr_en), .wr_ack_o(swr_ack), .di_req_o(sdata_req),
    .do_o(spi_do), .do_valid_o(sdata_valid),
    .spi_sck_o(spi_sck), .spi_ssel_o(spi_cs_n), .spi_mosi_o(spi_mosi),
    .spi_miso_i(spi_miso)
  );

  assign sdata = 16'(spi_do);

  dp_ram #(.ADDR_W(5), .DATA_W(32)) u_send_ram (
    .wrclk(host_clk), .rdclk(clk), .reset,
    .wren(tx_wren), .wraddress(tx_waddr), .data(tx_wdata),
    .raddress(tx_raddr), .q(tx_rdata)
  );

  dp_ram #(.ADDR_W(5), .DATA_W(32)) u_recv_ram (
    .wrclk(clk), .rdclk(host_clk), .reset,
    .wren(rx_wren), .wraddress(rx_waddr), .data(rx_wdata),
    .raddress(rx_raddr), .q(rx_rdata)
  );

  init_rom #(.ADDR_W(6), .DATA_W(32)) u_rom (
    .wrclk(host_clk), .rdclk(clk), .reset,
    .wren(rom_wren), .wraddress(rom_waddr), .data(rom_wdata),
    .rden(prom_rden), .raddress(prom_addr), .q(prom_data)
  );

endmodule
