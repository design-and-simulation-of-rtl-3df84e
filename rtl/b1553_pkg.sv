// b1553_pkg: types and constants shared by the FPGA-side 1553B board controller.
//
// The controller talks to a 1553B protocol board through an SPI slave. The
// board's own SPI framing and register map are not public, so the framing and
// the map below are this design's choice, with one exception: the RT address
// register sits at board address 0x0004 and is written with
//   0x0400 | rt_addr << 5 | parity << 4
// which follows the document. Everything here is plain constants and small
// functions; nothing is clocked.
//
// SPI transaction (16-bit words, MSB first, SPI mode 0, chip select low for
// the whole transaction):
//   word 0 : {command[7:0], 4'h0, address[19:16]}
//   word 1 : address[15:0]
//   word 2.. : data words (written by the master, or returned by the board)
// Addresses are 16-bit word addresses and increment after each data word.
package b1553_pkg;

  // ---------------------------------------------------------------- framing
  localparam logic [7:0] SPI_CMD_WR = 8'h02;  // write data words
  localparam logic [7:0] SPI_CMD_RD = 8'h03;  // read data words
  localparam int unsigned HDR_WORDS = 2;      // command + address words

  // ----------------------------------------------------------- board memory
  localparam logic [19:0] REG_MODE     = 20'h0_0000;  // 1 = RT, 2 = BC, 3 = BM
  localparam logic [19:0] REG_RT_ADDR  = 20'h0_0004;  // RT address register
  localparam logic [19:0] REG_RT_START = 20'h0_0006;  // 1 = RT running, 0 = off
  localparam logic [19:0] REG_CMD      = 20'h0_0008;  // instruction mailbox
  localparam logic [19:0] SA_HEAD_BASE = 20'h0_0100;  // message-buffer head status, one per sub-address
  localparam logic [19:0] SA_CTRL_BASE = 20'h0_0140;  // sub-address control word, one per sub-address
  localparam logic [19:0] SA_TXBUF_BASE = 20'h0_1000; // messages the RT transmits, 32 words per sub-address
  localparam logic [19:0] SA_RXBUF_BASE = 20'h0_1800; // messages the RT received, 32 words per sub-address

  localparam logic [15:0] MODE_RT = 16'h0001;
  localparam logic [15:0] MODE_BC = 16'h0002;
  localparam logic [15:0] MODE_BM = 16'h0003;

  localparam logic [15:0] RT_ADDR_BASE = 16'h0400;   // "data" term of the RT address formula

  // A 1553B message carries at most 32 data words of 16 bits.
  localparam int unsigned MSG_WORDS = 32;

  // Instruction mailbox word: bit 8 flags a new instruction, bits 3:0 carry it.
  localparam int unsigned CMD_PENDING_BIT = 8;

  typedef enum logic [3:0] {
    INS_RD_HEAD = 4'h0,  // read message-buffer head status
    INS_WR_HEAD = 4'h1,  // write message-buffer head status
    INS_COMM    = 4'h2,  // initiate communication (send then receive a message)
    INS_REINIT  = 4'h3,  // re-initialise the board
    INS_OFF     = 4'hF   // shut the 1553B channel down
  } instr_e;

  // Operations the init/control block performs on request (rt_opcode).
  typedef enum logic [4:0] {
    OP_NONE    = 5'd0,
    OP_POLL    = 5'd1,  // read the instruction mailbox
    OP_ACK     = 5'd2,  // clear the instruction mailbox
    OP_RD_HEAD = 5'd3,  // read head status of sub-address sa_idx
    OP_WR_HEAD = 5'd4,  // write head status of sub-address sa_idx
    OP_SEND    = 5'd5,  // send RAM -> message buffer of sa_idx
    OP_RECV    = 5'd6,  // message buffer of sa_idx -> receive RAM
    OP_STOP    = 5'd7   // close the channel: RT start register <- 0
  } rt_op_e;

  // Task-scheduling states of the controller.
  typedef enum logic [2:0] {
    F_RST_WAIT = 3'd0,  // waiting for the board's reset time
    F_INIT     = 3'd1,  // initialising the board
    F_IDLE     = 3'd2,  // idle, ready to receive or send
    F_POLL     = 3'd3,  // reading the instruction mailbox
    F_ACK      = 3'd4,  // clearing the instruction mailbox
    F_EXEC     = 3'd5,  // executing an instruction
    F_OFF      = 3'd6   // 1553B channel shut down
  } fsm_state_e;

  // ------------------------------------------------- initialisation ROM word
  //   [31:29] kind, [28:16] board address, [15:0] data
  typedef enum logic [2:0] {
    RK_WR     = 3'd0,  // write data to address
    RK_VERIFY = 3'd1,  // write data, read it back, fail initialisation if it differs
    RK_RTADDR = 3'd2,  // write data | rt_num << 5 | parity << 4
    RK_SA     = 3'd3,  // write data to address + sa_idx
    RK_END    = 3'd7   // end of sequence
  } rom_kind_e;

  typedef struct packed {
    rom_kind_e   kind;
    logic [12:0] addr;
    logic [15:0] data;
  } rom_word_t;

  // Parity bit of the RT address word: 0 when rt_addr has an odd number of
  // ones, 1 otherwise, so that the five address bits plus this bit are odd.
  function automatic logic rt_parity(input logic [4:0] rt_addr);
    return ~(^rt_addr);
  endfunction

  function automatic logic [15:0] rt_addr_word(input logic [15:0] base, input logic [4:0] rt_addr);
    return base | (16'(rt_addr) << 5) | (16'(rt_parity(rt_addr)) << 4);
  endfunction

  // Default initialisation sequence: RT mode (verified), RT address,
  // sub-address head status and control word, then start the RT.
  function automatic rom_word_t default_rom(input int unsigned idx);
    case (idx)
      0: return '{RK_VERIFY, REG_MODE[12:0],     MODE_RT};
      1: return '{RK_RTADDR, REG_RT_ADDR[12:0],  RT_ADDR_BASE};
      2: return '{RK_SA,     SA_HEAD_BASE[12:0], 16'h0000};
      3: return '{RK_SA,     SA_CTRL_BASE[12:0], 16'h8000};
      4: return '{RK_WR,     REG_RT_START[12:0], 16'h0001};
      default: return '{RK_END, 13'h0, 16'h0000};
    endcase
  endfunction

endpackage
