// dp_ram: simple dual-port RAM with independent write and read clocks.
//
// Used twice in the controller: as the send RAM (filled by the host side,
// read by the init/control block when a message goes to the board) and as the
// receive RAM (written by the init/control block with message data read from
// the board, read by the host side). The port names and the default size,
// 32 words of 32 bits (5-bit addresses), are those of the RAM instance the
// controller uses; the single-cycle registered read and the reset behaviour
// are this design's choice.
//
// Timing: a write with wren high is stored on the rising edge of wrclk. The
// word at raddress appears on q one rdclk edge later. reset clears q only;
// memory contents are not cleared.
module dp_ram #(
  parameter int unsigned ADDR_W = 5,
  parameter int unsigned DATA_W = 32
) (
  input  logic              wrclk,
  input  logic              rdclk,
  input  logic              reset,
  input  logic              wren,
  input  logic [ADDR_W-1:0] wraddress,
  input  logic [DATA_W-1:0] data,
  input  logic [ADDR_W-1:0] raddress,
  output logic [DATA_W-1:0] q
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge wrclk) begin
    if (wren) mem[wraddress] <= data;
  end

  always_ff @(posedge rdclk) begin
    if (reset) q <= '0;
    else       q <= mem[raddress];
  end

endmodule
