// tb_dp_ram: self-checking test of the dual-clock RAM.
// Writes random words on one clock, reads them back on another unrelated
// clock and compares with a reference array; checks the one-clock read
// latency and that reset clears the read register.
module tb_dp_ram;
  logic wrclk = 0, rdclk = 0, reset = 1, wren = 0;
  logic [4:0]  wraddress = '0, raddress = '0;
  logic [31:0] data = '0, q;
  logic [31:0] ref_mem [32];
  int checks = 0, failures = 0;

  always #5 wrclk = ~wrclk;
  always #7 rdclk = ~rdclk;

  dp_ram dut (.wrclk, .rdclk, .reset, .wren, .wraddress, .data, .raddress, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge rdclk);
    @(negedge rdclk);
    check(q == 32'h0, "q cleared by reset");
    reset = 0;
    // two rounds of writes over every address
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 32; i++) begin
        @(negedge wrclk);
        wren = 1; wraddress = 5'(i); data = $urandom;
        ref_mem[i] = data;
      end
    @(negedge wrclk) wren = 0;
    // a write with wren low must not land
    @(negedge wrclk) begin wraddress = 5'd7; data = ~ref_mem[7]; end
    @(negedge wrclk);
    for (int k = 0; k < 64; k++) begin
      int a = (k < 32) ? k : int'($urandom_range(0, 31));
      @(negedge rdclk) raddress = 5'(a);
      @(posedge rdclk); #1;
      check(q == ref_mem[a], $sformatf("read %0d got %h expected %h", a, q, ref_mem[a]));
    end
    // latency: q changes on the first rdclk edge after the address changes
    @(negedge rdclk) raddress = 5'd3;
    @(posedge rdclk); #1;
    @(negedge rdclk) raddress = 5'd4;
    #1 check(q == ref_mem[3], "q holds until the next rdclk edge");
    @(posedge rdclk); #1 check(q == ref_mem[4], "q updated after one rdclk edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge wrclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
