// init_rom: initialisation table for the 1553B board.
//
// Holds the sequence of board register writes that puts the board in RT mode,
// sets its RT address, configures the sub-address memory and starts the RT.
// It has the same interface as the send and receive RAMs (dp_ram), so the
// table can also be rewritten at run time, for instance to select BC or BM
// mode instead of RT. Each 32-bit word is a b1553_pkg::rom_word_t:
// {kind[2:0], board address[12:0], data[15:0]}. At power-up the table holds
// b1553_pkg::default_rom(); the entry format and the default sequence are
// this design's own.
//
// Timing: registered read, q is valid one rdclk edge after raddress while
// rden is high (q holds its value while rden is low).
module init_rom
  import b1553_pkg::*;
#(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 32
) (
  input  logic              wrclk,
  input  logic              rdclk,
  input  logic              reset,
  input  logic              wren,
  input  logic [ADDR_W-1:0] wraddress,
  input  logic [DATA_W-1:0] data,
  input  logic              rden,
  input  logic [ADDR_W-1:0] raddress,
  output logic [DATA_W-1:0] q
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = DATA_W'(default_rom(i));
  end

  always_ff @(posedge wrclk) begin
    if (wren) mem[wraddress] <= data;
  end

  always_ff @(posedge rdclk) begin
    if (reset)     q <= '0;
    else if (rden) q <= mem[raddress];
  end

endmodule
