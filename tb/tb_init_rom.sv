// tb_init_rom: self-checking test of the initialisation table.
// Checks the power-up sequence against words assembled here by hand
// ({kind, address, data}), that a word can be rewritten through the write
// port, that q holds while rden is low, and the one-clock read latency.
module tb_init_rom;
  logic clk = 0, reset = 1, wren = 0, rden = 0;
  logic [5:0]  wraddress = '0, raddress = '0;
  logic [31:0] data = '0, q;
  logic [31:0] expv [6];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  init_rom dut (.wrclk(clk), .rdclk(clk), .reset, .wren, .wraddress, .data, .rden, .raddress, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(input int a);
    @(negedge clk) begin rden = 1; raddress = 6'(a); end
    @(negedge clk) rden = 0;
  endtask

  initial begin
    expv[0] = 32'h2000_0001;  // verify: mode register <- RT
    expv[1] = 32'h4004_0400;  // RT address register <- 0x0400 | ...
    expv[2] = 32'h6100_0000;  // sub-address head status <- 0
    expv[3] = 32'h6140_8000;  // sub-address control <- 0x8000
    expv[4] = 32'h0006_0001;  // RT start register <- 1
    expv[5] = 32'hE000_0000;  // end
    repeat (2) @(posedge clk);
    reset = 0;
    for (int i = 0; i < 6; i++) begin
      rd(i);
      check(q == expv[i], $sformatf("entry %0d = %h expected %h", i, q, expv[i]));
    end
    for (int i = 6; i < 64; i += 7) begin
      rd(i);
      check(q == 32'hE000_0000, $sformatf("entry %0d is an end marker", i));
    end
    // rewrite entry 0 to BC mode
    @(negedge clk) begin wren = 1; wraddress = 6'd0; data = 32'h2000_0002; end
    @(negedge clk) wren = 0;
    rd(0);
    check(q == 32'h2000_0002, "entry 0 rewritten");
    // rden low: q holds
    @(negedge clk) begin rden = 0; raddress = 6'd1; end
    @(negedge clk) check(q == 32'h2000_0002, "q holds while rden is low");
    // latency
    @(negedge clk) begin rden = 1; raddress = 6'd4; end
    #1 check(q == 32'h2000_0002, "q not yet updated before the clock edge");
    @(negedge clk) check(q == expv[4], "q updated one clock later");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
