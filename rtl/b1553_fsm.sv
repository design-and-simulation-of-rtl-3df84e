// b1553_fsm: task-scheduling state machine of the 1553B board controller.
//
// After reset the machine first waits RST_WAIT cycles so that the board's own
// reset time is met. It then starts the initialisation sequence in
// b1553_init; when that reports a failed configuration it starts it again,
// counting the failures on init_err_cnt, and when it succeeds it enters idle.
// In idle it reads the instruction mailbox on the board whenever the board
// raises its interrupt (int_n low) or every POLL_CYCLES cycles. A mailbox
// word with bit 8 set carries an instruction in bits 3:0; the mailbox is then
// cleared and the instruction executed:
//   0  read the message-buffer head status of the sub-address (head_status)
//   1  write the message-buffer head status (value from head_wdata)
//   2  initiate communication: send the send RAM's message to the board,
//      then read the board's message into the receive RAM
//   3  initialise the board again
//   f  close the channel and stop in the off state until reset
// Any other code, or a mailbox without bit 8, leaves the machine idle.
//
// The three task states (initialisation, idle, shutdown), the reset-time
// check, the retry after a failed initialisation and the instruction codes
// follow the document. The mailbox, its pending flag, the polling and the
// head_wdata source are this design's choices.
//
// Each board operation is a one-cycle rt_req (or rt_init) pulse to
// b1553_init, answered by an rt_over pulse; only one is outstanding at a time.
module b1553_fsm
  import b1553_pkg::*;
#(
  parameter int unsigned RST_WAIT    = 5000,   // clocks (100 us at 50 MHz)
  parameter int unsigned POLL_CYCLES = 50000   // clocks (1 ms at 50 MHz)
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        int_n,
  // to / from b1553_init
  output logic        rt_init,
  output logic        rt_req,
  output logic [4:0]  rt_opcode,
  output logic [15:0] rt_wdata,
  input  logic [15:0] rt_rdata,
  input  logic        rt_over,
  input  logic        rt_succ,
  // host side
  input  logic [15:0] head_wdata,
  output logic [15:0] head_status,
  output fsm_state_e  state,
  output logic        init_ok,
  output logic [7:0]  init_err_cnt,
  output logic [3:0]  last_instr
);

  localparam int unsigned RW_W = $clog2(RST_WAIT + 1);
  localparam int unsigned PW_W = $clog2(POLL_CYCLES + 1);

  logic [RW_W-1:0] rst_cnt;
  logic [PW_W-1:0] poll_cnt;
  logic            busy;       // a request to b1553_init is outstanding
  rt_op_e          op_q;

  // Issue one request unless one is already outstanding.
  task automatic issue(input rt_op_e op);
    if (!busy) begin
      rt_req    <= 1'b1;
      rt_opcode <= op;
      op_q      <= op;
      busy      <= 1'b1;
    end
  endtask

  always_ff @(posedge clk) begin
    if (reset) begin
      state        <= F_RST_WAIT;
      rst_cnt      <= '0;
      poll_cnt     <= '0;
      busy         <= 1'b0;
      op_q         <= OP_NONE;
      rt_init      <= 1'b0;
      rt_req       <= 1'b0;
      rt_opcode    <= OP_NONE;
      rt_wdata     <= '0;
      head_status  <= '0;
      init_ok      <= 1'b0;
      init_err_cnt <= '0;
      last_instr   <= '0;
    end else begin
      rt_init <= 1'b0;
      rt_req  <= 1'b0;
      if (rt_over) busy <= 1'b0;

      case (state)
        F_RST_WAIT: begin
          if (rst_cnt == RW_W'(RST_WAIT)) state <= F_INIT;
          else rst_cnt <= rst_cnt + 1'b1;
        end

        F_INIT: begin
          if (!busy) begin
            rt_init <= 1'b1;
            init_ok <= 1'b0;
            busy    <= 1'b1;
          end else if (rt_over) begin
            if (rt_succ) begin
              init_ok  <= 1'b1;
              poll_cnt <= '0;
              state    <= F_IDLE;
            end else begin
              init_err_cnt <= init_err_cnt + 1'b1;  // try again
            end
          end
        end

        F_IDLE: begin
          if (!int_n || poll_cnt == PW_W'(POLL_CYCLES)) begin
            poll_cnt <= '0;
            state    <= F_POLL;
          end else begin
            poll_cnt <= poll_cnt + 1'b1;
          end
        end

        F_POLL: begin
          issue(OP_POLL);
          if (busy && rt_over) begin
            if (rt_rdata[CMD_PENDING_BIT]) begin
              last_instr <= rt_rdata[3:0];
              state      <= F_ACK;
            end else begin
              state <= F_IDLE;  // no instruction
            end
          end
        end

        F_ACK: begin
          issue(OP_ACK);
          if (busy && rt_over) begin
            case (instr_e'(last_instr))
              INS_RD_HEAD: state <= F_EXEC;
              INS_WR_HEAD: begin
                rt_wdata <= head_wdata;
                state    <= F_EXEC;
              end
              INS_COMM:    state <= F_EXEC;
              INS_REINIT:  state <= F_INIT;
              INS_OFF:     state <= F_EXEC;
              default:     state <= F_IDLE;  // undefined instruction
            endcase
          end
        end

        F_EXEC: begin
          if (!busy) begin
            case (instr_e'(last_instr))
              INS_RD_HEAD: issue(OP_RD_HEAD);
              INS_WR_HEAD: issue(OP_WR_HEAD);
              INS_COMM:    issue(OP_SEND);
              default:     issue(OP_STOP);
            endcase
          end else if (rt_over) begin
            case (op_q)
              OP_RD_HEAD: begin
                head_status <= rt_rdata;
                state       <= F_IDLE;
              end
              OP_SEND: begin
                op_q <= OP_RECV;  // second half of the exchange
                rt_req    <= 1'b1;
                rt_opcode <= OP_RECV;
                busy      <= 1'b1;
              end
              OP_STOP: state <= F_OFF;
              default: state <= F_IDLE;
            endcase
          end
        end

        F_OFF: ;  // stays here until reset

        default: state <= F_IDLE;
      endcase
    end
  end

  property p_one_outstanding;
    @(posedge clk) disable iff (reset) (rt_req || rt_init) |=> busy;
  endproperty
  assert property (p_one_outstanding);

endmodule
