// cav1553b_model: behavioural model of the 1553B protocol board's SPI slave,
// for simulation only (not synthesizable logic).
//
// It decodes the controller's SPI framing (b1553_pkg): a command word, an
// address word, then data words written to or read from a 16-bit word memory
// with an auto-incrementing address. SPI mode 0: MOSI is sampled on rising
// SCK, MISO changes on falling SCK and when chip select falls. Words returned
// during the two header slots are zero.
//
// Test hooks:
//   fail_left    - the next fail_left reads of the mode register return a
//                  corrupted value (a configuration that did not take)
//   post_instr() - the host puts an instruction into the mailbox; int_n is low
//                  while the mailbox holds a pending instruction
//   wr_cnt/rd_cnt, trans_cnt - data words written/read, transactions seen
module cav1553b_model
  import b1553_pkg::*;
#(
  parameter int unsigned MEM_AW = 13
) (
  input  logic sck,
  input  logic cs_n,
  input  logic mosi,
  output logic miso,
  output logic int_n
);

  logic [15:0] mem [2**MEM_AW];
  logic [15:0] sh_in, sh_out, next_word;
  logic [7:0]  cmd;
  logic [19:0] addr;
  int          bitcnt, wordcnt;
  int          fail_left = 0;
  int          wr_cnt = 0, rd_cnt = 0, trans_cnt = 0, bad_frames = 0;

  initial begin
    for (int i = 0; i < 2**MEM_AW; i++) mem[i] = 16'h0000;
    miso = 1'b0;
    bitcnt = 0;
    wordcnt = 0;
    sh_in = '0;
    sh_out = '0;
    next_word = '0;
    cmd = '0;
    addr = '0;
  end

  assign int_n = ~mem[REG_CMD[MEM_AW-1:0]][CMD_PENDING_BIT];

  task automatic post_instr(input logic [3:0] code);
    mem[REG_CMD[MEM_AW-1:0]] = 16'(1 << CMD_PENDING_BIT) | 16'(code);
  endtask

  function automatic logic [15:0] read_word(input logic [19:0] a);
    logic [15:0] v = mem[a[MEM_AW-1:0]];
    if (a == REG_MODE && fail_left > 0) begin
      fail_left--;
      v = v ^ 16'h00FF;
    end
    return v;
  endfunction

  always @(negedge cs_n) begin
    bitcnt    = 0;
    wordcnt   = 0;
    next_word = '0;
    sh_out    = '0;
    miso      = 1'b0;
    trans_cnt++;
  end

  always @(posedge cs_n) begin
    if (bitcnt != 0) bad_frames++;
  end

  always @(posedge sck) begin
    if (!cs_n) begin
      sh_in = {sh_in[14:0], mosi};
      bitcnt++;
      if (bitcnt == 16) begin
        bitcnt = 0;
        case (wordcnt)
          0: begin
            cmd  = sh_in[15:8];
            addr = {sh_in[3:0], 16'h0000};
            if (cmd != SPI_CMD_WR && cmd != SPI_CMD_RD) bad_frames++;
          end
          1: addr = {addr[19:16], sh_in};
          default: begin
            if (cmd == SPI_CMD_WR) begin
              mem[addr[MEM_AW-1:0]] = sh_in;
              wr_cnt++;
              addr = addr + 1;
            end
          end
        endcase
        wordcnt++;
        if (cmd == SPI_CMD_RD && wordcnt >= 2) begin
          next_word = read_word(addr);
          rd_cnt++;
          addr = addr + 1;
        end else begin
          next_word = '0;
        end
      end
    end
  end

  always @(negedge sck) begin
    if (!cs_n) begin
      if (bitcnt == 0) sh_out = next_word;
      miso = sh_out[15 - bitcnt];
    end
  end

endmodule
