// tb_b1553_fsm: self-checking test of the task-scheduling state machine.
// The init/control block is replaced by a responder that answers every
// request after a few clocks and logs it. Checked: nothing happens during
// the reset wait; a failed initialisation is retried; idle polls on its timer
// and at once on int_n; the exact request sequence for instructions 0, 1, 2,
// 3, f, an undefined code and an empty mailbox; head status capture; the off
// state is final.
module tb_b1553_fsm;
  import b1553_pkg::*;
  localparam int unsigned RST_WAIT = 20, POLL_CYCLES = 200;
  logic clk = 0, reset = 1;
  always #10 clk = ~clk;

  logic        int_n = 1, rt_init, rt_req, rt_over = 0, rt_succ = 0;
  logic [4:0]  rt_opcode;
  logic [15:0] rt_wdata, rt_rdata = '0, head_wdata = 16'hCAFE, head_status;
  fsm_state_e  state;
  logic        init_ok;
  logic [7:0]  init_err_cnt;
  logic [3:0]  last_instr;

  b1553_fsm #(.RST_WAIT(RST_WAIT), .POLL_CYCLES(POLL_CYCLES)) dut (.clk, .reset, .int_n,
    .rt_init, .rt_req, .rt_opcode, .rt_wdata, .rt_rdata, .rt_over, .rt_succ,
    .head_wdata, .head_status, .state, .init_ok, .init_err_cnt, .last_instr);

  // ---------------------------------------------------------------- responder
  int   fail_inits = 1;
  logic [15:0] mailbox = '0;
  int   log_q [$];          // opcodes requested; 99 = rt_init
  longint cyc = 0, first_req_cyc = -1, reset_release = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (!reset && (rt_init || rt_req)) begin
      int op;
      logic [15:0] wd;
      op = rt_init ? 99 : int'(rt_opcode);
      wd = rt_wdata;
      if (first_req_cyc < 0) first_req_cyc = cyc;
      log_q.push_back(op);
      fork
        begin
          repeat (4) @(posedge clk);
          #1;
          case (op)
            99: begin rt_succ = (fail_inits == 0); if (fail_inits > 0) fail_inits--; end
            int'(OP_POLL):    rt_rdata = mailbox;
            int'(OP_ACK):     mailbox = '0;
            int'(OP_RD_HEAD): rt_rdata = 16'h9876;
            int'(OP_WR_HEAD): if (wd != 16'hCAFE) begin failures++; $display("FAIL: head write data %h", wd); end
            default: ;
          endcase
          rt_over = 1;
          @(posedge clk); #1 rt_over = 0;
        end
      join_none
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_seq(input int exp [$], input string what);
    string s = "";
    foreach (log_q[i]) s = {s, $sformatf(" %0d", log_q[i])};
    check(log_q == exp, {what, ": requests", s});
    log_q.delete();
  endtask

  task automatic wait_idle(input int limit);
    int n = 0;
    repeat (2) @(posedge clk);
    while (!(state == F_IDLE && !dut.busy) && n < limit) begin @(posedge clk); n++; end
  endtask

  task automatic instr(input logic [3:0] code);
    mailbox = 16'h0100 | 16'(code);
    @(negedge clk) int_n = 0;
    @(negedge clk) int_n = 1;
    repeat (40) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) begin reset = 0; reset_release = cyc; end
    wait_idle(500);
    check(first_req_cyc - reset_release >= RST_WAIT, "reset wait respected");
    check(init_ok && init_err_cnt == 1, "one failed initialisation, then success");
    expect_seq('{99, 99}, "initialisation retried");
    // timer poll with an empty mailbox
    repeat (POLL_CYCLES + 20) @(posedge clk);
    expect_seq('{int'(OP_POLL)}, "timer poll");
    instr(4'h0);
    expect_seq('{int'(OP_POLL), int'(OP_ACK), int'(OP_RD_HEAD)}, "instruction 0");
    check(head_status == 16'h9876 && state == F_IDLE, "head status captured");
    instr(4'h1);
    expect_seq('{int'(OP_POLL), int'(OP_ACK), int'(OP_WR_HEAD)}, "instruction 1");
    instr(4'h2);
    repeat (20) @(posedge clk);
    expect_seq('{int'(OP_POLL), int'(OP_ACK), int'(OP_SEND), int'(OP_RECV)}, "instruction 2");
    instr(4'h9);
    expect_seq('{int'(OP_POLL), int'(OP_ACK)}, "undefined instruction");
    check(state == F_IDLE && last_instr == 4'h9, "idle after undefined instruction");
    instr(4'h3);
    expect_seq('{int'(OP_POLL), int'(OP_ACK), 99}, "instruction 3");
    check(state == F_IDLE && init_ok, "idle after re-initialisation");
    instr(4'hF);
    expect_seq('{int'(OP_POLL), int'(OP_ACK), int'(OP_STOP)}, "instruction f");
    check(state == F_OFF, "off state");
    repeat (3 * POLL_CYCLES) @(posedge clk);
    check(log_q.size() == 0 && state == F_OFF, "off state is final");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
