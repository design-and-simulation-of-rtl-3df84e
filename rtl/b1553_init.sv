// b1553_init: initialisation and control of the 1553B board.
//
// Initialisation (rt_init pulse): the block walks the initialisation ROM one
// entry at a time and turns each entry into a one-word board write through
// spi_exch. The first entries put the board in RT mode; an entry of kind
// RK_VERIFY is read back after it is written, and a mismatch stops the
// sequence at once with rt_succ low ("configuration failed"). Then comes the
// RT address register, written with 0x0400 | rt_num << 5 | parity << 4, the
// sub-address memory of sub-address sa_idx (entries of kind RK_SA are offset
// by sa_idx) and finally the RT start register, which opens the channel. On
// reaching an RK_END entry rt_succ goes high. rt_over pulses when the
// sequence ends either way.
//
// Control (rt_req pulse with rt_opcode, a b1553_pkg::rt_op_e): one board
// operation - poll or clear the instruction mailbox, read or write the
// message-buffer head status of sa_idx, move one 32-word message from the
// send RAM to the board (OP_SEND) or from the board to the receive RAM
// (OP_RECV), or close the channel (OP_STOP). Single-word reads return on
// rt_rdata. rt_over pulses when the operation is finished; an undefined
// opcode finishes at once.
//
// The 32-bit RAMs and the 16-bit board words meet here: a 32-bit RAM word is
// sent upper half first, and two received words are packed into one RAM word,
// the first in the upper half. The ROM entry format, the operation set and
// the board address map are this design's choices; the step-by-step ROM walk,
// the RT-mode check that stops initialisation, and the RT address formula
// follow the document. The parity reading of the formula's even/odd term is
// explained in b1553_pkg.
//
// Timing: the ROM and the send RAM are read with one clock of latency; the
// block keeps wr_word registered so that spi_exch's three-clock fetch window
// is met.
module b1553_init
  import b1553_pkg::*;
#(
  parameter int unsigned ROM_AW = 6,
  parameter int unsigned RAM_AW = 5
) (
  input  logic              clk,
  input  logic              reset,
  // settings
  input  logic [4:0]        rt_num,
  input  logic [5:0]        sa_idx,
  // commands from the state machine
  input  logic              rt_init,
  input  logic              rt_req,
  input  logic [4:0]        rt_opcode,
  input  logic [15:0]       rt_wdata,
  output logic [15:0]       rt_rdata,
  output logic              rt_over,
  output logic              rt_succ,
  // spi_exch
  output logic              rd_reqi,
  output logic              wr_reqi,
  output logic [19:0]       start_addr,
  output logic [10:0]       data_length,
  output logic [15:0]       wr_word,
  input  logic [8:0]        d_ptr,
  input  logic [15:0]       rd_word,
  input  logic              rd_valid,
  input  logic              rd_over,
  input  logic              wr_over,
  // initialisation ROM
  output logic              rt_prom_rden,
  output logic [ROM_AW-1:0] rt_prom_addr,
  input  logic [31:0]       rt_prom_data,
  // send RAM read port
  output logic [RAM_AW-1:0] tx_raddr,
  input  logic [31:0]       ram_rd_data,
  // receive RAM write port
  output logic              rx_wren,
  output logic [RAM_AW-1:0] rx_waddr,
  output logic [31:0]       rx_wdata
);

  typedef enum logic [2:0] {
    C_IDLE, C_ROM_RD, C_ROM_WAIT, C_ROM_EXEC, C_WR_WAIT, C_RD_WAIT, C_OP_WAIT
  } cstate_e;

  cstate_e           state;
  logic [ROM_AW-1:0] rom_addr;
  rom_kind_e         kind_q;
  logic [15:0]       wdata_q;
  logic              blk;        // block transfer: data words from/to the RAMs
  logic              half_lo;    // word index of the RAM read in flight is odd
  logic [15:0]       hi_q;
  rom_word_t         entry;
  logic [19:0]       sa_off;

  assign entry        = rom_word_t'(rt_prom_data);
  assign rt_prom_addr = rom_addr;
  assign tx_raddr     = RAM_AW'(d_ptr[8:1]);
  assign sa_off       = 20'(sa_idx);

  always_ff @(posedge clk) begin
    if (reset) begin
      state        <= C_IDLE;
      rom_addr     <= '0;
      kind_q       <= RK_WR;
      wdata_q      <= '0;
      blk          <= 1'b0;
      half_lo      <= 1'b0;
      hi_q         <= '0;
      rt_rdata     <= '0;
      rt_over      <= 1'b0;
      rt_succ      <= 1'b0;
      rd_reqi      <= 1'b0;
      wr_reqi      <= 1'b0;
      start_addr   <= '0;
      data_length  <= '0;
      wr_word      <= '0;
      rt_prom_rden <= 1'b0;
      rx_wren      <= 1'b0;
      rx_waddr     <= '0;
      rx_wdata     <= '0;
    end else begin
      rd_reqi      <= 1'b0;
      wr_reqi      <= 1'b0;
      rt_over      <= 1'b0;
      rt_prom_rden <= 1'b0;
      rx_wren      <= 1'b0;

      // write data path: register or half of the send RAM word
      half_lo <= d_ptr[0];
      wr_word <= blk ? (half_lo ? ram_rd_data[15:0] : ram_rd_data[31:16]) : wdata_q;

      // read data path
      if (rd_valid) begin
        if (!blk) begin
          rt_rdata <= rd_word;
        end else if (!d_ptr[0]) begin
          hi_q <= rd_word;
        end else begin
          rx_wren  <= 1'b1;
          rx_waddr <= RAM_AW'(d_ptr[8:1]);
          rx_wdata <= {hi_q, rd_word};
        end
      end

      case (state)
        C_IDLE: begin
          if (rt_init) begin
            rt_succ  <= 1'b0;
            blk      <= 1'b0;
            rom_addr <= '0;
            state    <= C_ROM_RD;
          end else if (rt_req) begin
            blk         <= 1'b0;
            data_length <= 11'd1;
            state       <= C_OP_WAIT;
            case (rt_opcode)
              OP_POLL: begin
                start_addr <= REG_CMD;
                rd_reqi    <= 1'b1;
              end
              OP_ACK: begin
                start_addr <= REG_CMD;
                wdata_q    <= 16'h0000;
                wr_reqi    <= 1'b1;
              end
              OP_RD_HEAD: begin
                start_addr <= SA_HEAD_BASE + sa_off;
                rd_reqi    <= 1'b1;
              end
              OP_WR_HEAD: begin
                start_addr <= SA_HEAD_BASE + sa_off;
                wdata_q    <= rt_wdata;
                wr_reqi    <= 1'b1;
              end
              OP_SEND: begin
                start_addr  <= SA_TXBUF_BASE + (sa_off << 5);
                data_length <= 11'(MSG_WORDS);
                blk         <= 1'b1;
                wr_reqi     <= 1'b1;
              end
              OP_RECV: begin
                start_addr  <= SA_RXBUF_BASE + (sa_off << 5);
                data_length <= 11'(MSG_WORDS);
                blk         <= 1'b1;
                rd_reqi     <= 1'b1;
              end
              OP_STOP: begin
                start_addr <= REG_RT_START;
                wdata_q    <= 16'h0000;
                wr_reqi    <= 1'b1;
              end
              default: begin
                rt_over <= 1'b1;
                state   <= C_IDLE;
              end
            endcase
          end
        end

        C_ROM_RD: begin
          rt_prom_rden <= 1'b1;
          state        <= C_ROM_WAIT;
        end

        C_ROM_WAIT: state <= C_ROM_EXEC;

        C_ROM_EXEC: begin
          kind_q      <= entry.kind;
          data_length <= 11'd1;
          case (entry.kind)
            RK_WR, RK_VERIFY: begin
              start_addr <= 20'(entry.addr);
              wdata_q    <= entry.data;
              wr_reqi    <= 1'b1;
              state      <= C_WR_WAIT;
            end
            RK_RTADDR: begin
              start_addr <= 20'(entry.addr);
              wdata_q    <= rt_addr_word(entry.data, rt_num);
              wr_reqi    <= 1'b1;
              state      <= C_WR_WAIT;
            end
            RK_SA: begin
              start_addr <= 20'(entry.addr) + sa_off;
              wdata_q    <= entry.data;
              wr_reqi    <= 1'b1;
              state      <= C_WR_WAIT;
            end
            default: begin  // RK_END and unused kinds end the sequence
              rt_succ <= 1'b1;
              rt_over <= 1'b1;
              state   <= C_IDLE;
            end
          endcase
        end

        C_WR_WAIT: begin
          if (wr_over) begin
            if (kind_q == RK_VERIFY) begin
              rd_reqi <= 1'b1;
              state   <= C_RD_WAIT;
            end else if (rom_addr == '1) begin
              rt_succ <= 1'b1;
              rt_over <= 1'b1;
              state   <= C_IDLE;
            end else begin
              rom_addr <= rom_addr + 1'b1;
              state    <= C_ROM_RD;
            end
          end
        end

        C_RD_WAIT: begin
          if (rd_over) begin
            if (rt_rdata != wdata_q) begin  // configuration failed: stop
              rt_over <= 1'b1;
              state   <= C_IDLE;
            end else if (rom_addr == '1) begin
              rt_succ <= 1'b1;
              rt_over <= 1'b1;
              state   <= C_IDLE;
            end else begin
              rom_addr <= rom_addr + 1'b1;
              state    <= C_ROM_RD;
            end
          end
        end

        C_OP_WAIT: begin
          if (rd_over || wr_over) begin
            rt_over <= 1'b1;
            state   <= C_IDLE;
          end
        end

        default: state <= C_IDLE;
      endcase
    end
  end

  property p_cmd_when_idle;
    @(posedge clk) disable iff (reset) (rt_init || rt_req) |-> state == C_IDLE;
  endproperty
  assert property (p_cmd_when_idle);

endmodule
