// spi_exch: data exchange between the controller and the SPI master.
//
// One request (wr_req or rd_req, a one-cycle pulse) becomes one SPI
// transaction with the board: a command word, an address word and then
// data_length data words, all within a single chip-select period (framing in
// b1553_pkg). For a write the data words come from the requester: spi_exch
// puts the index of the word it needs on d_ptr and samples wr_word at the
// end of the third clock in which that index is shown, which leaves room for
// a registered RAM read followed by a register in the requester. For a read,
// every data word the board returns appears on rd_word with a one-cycle
// rd_valid pulse and its index on d_ptr.
// wr_over or rd_over pulses once chip select has risen again.
//
// The SPI module can be built for 16-bit or 8-bit words (SPI_W). With 8-bit
// words every 16-bit word goes out as two bytes, high byte first, and two
// received bytes are joined back into one word; the bit stream on the wires
// is the same either way, only the master's word boundaries differ.
//
// Towards the SPI master, sdata_16b/swr_en offer a word and swr_ack takes it;
// after the first word a word is offered only while the master requests one
// (sdata_req). sdata/sdata_valid are the words the master received and
// spi_ncs is the chip select it drives.
//
// The port set and the 8-/16-bit choice follow the controller's data
// conversion module. The byte order, the framing, the d_ptr timing and the
// restriction to one transaction at a time are this design's choices. d_ptr is 9 bits wide, so at most 512 data words can be
// addressed through it; the controller never asks for more than 32.
module spi_exch
  import b1553_pkg::*;
#(
  parameter int unsigned SPI_W = 16   // SPI word size: 16, or 8 (each word as two bytes)
) (
  input  logic        clk,
  input  logic        reset,
  // request side
  input  logic        rd_req,
  input  logic        wr_req,
  input  logic [19:0] start_addr,
  input  logic [10:0] data_length,
  input  logic [15:0] wr_word,
  output logic [8:0]  d_ptr,
  output logic [15:0] rd_word,
  output logic        rd_valid,
  output logic        rd_over,
  output logic        wr_over,
  // SPI master side
  output logic [15:0] sdata_16b,
  output logic        swr_en,
  input  logic        swr_ack,
  input  logic        sdata_req,
  input  logic [15:0] sdata,
  input  logic        sdata_valid,
  input  logic        spi_ncs
);

  typedef enum logic [1:0] {X_IDLE, X_SEND, X_FETCH, X_DRAIN} xstate_e;

  xstate_e     state;
  logic        op_rd;
  logic [15:0] addr_q;     // low address word; the high bits go out in word 0
  logic [11:0] total;      // words in the transaction: header + data
  logic [11:0] wcnt;       // words handed to the SPI master so far
  logic [11:0] rxcnt;      // words received so far
  logic [15:0] word_q;     // word being handed to the SPI master
  logic        have_word;  // word_q (or its second byte) not yet taken
  logic        beat;       // 8-bit SPI: high byte taken, low byte next
  logic        rx_beat;    // 8-bit SPI: high byte of a received word held
  logic [7:0]  rx_hi;
  logic        rx_valid;   // a whole 16-bit word has been received
  logic [15:0] rx_word;
  logic [1:0]  fetch_cnt;
  logic [11:0] wnext;

  assign wnext  = wcnt + 12'd1;
  assign swr_en   = have_word && ((wcnt == '0 && !beat) || sdata_req);
  assign sdata_16b = (SPI_W == 8) ? {8'h00, (beat ? word_q[7:0] : word_q[15:8])} : word_q;
  assign rx_valid  = sdata_valid && (SPI_W != 8 || rx_beat);
  assign rx_word   = (SPI_W == 8) ? {rx_hi, sdata[7:0]} : sdata;

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= X_IDLE;
      op_rd     <= 1'b0;
      addr_q    <= '0;
      total     <= '0;
      wcnt      <= '0;
      rxcnt     <= '0;
      have_word <= 1'b0;
      fetch_cnt <= '0;
      word_q    <= '0;
      beat      <= 1'b0;
      rx_beat   <= 1'b0;
      rx_hi     <= '0;
      d_ptr     <= '0;
      rd_word   <= '0;
      rd_valid  <= 1'b0;
      rd_over   <= 1'b0;
      wr_over   <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      rd_over  <= 1'b0;
      wr_over  <= 1'b0;

      // received words; the two header slots carry nothing
      if (SPI_W == 8 && sdata_valid && state != X_IDLE) begin
        rx_beat <= !rx_beat;
        if (!rx_beat) rx_hi <= sdata[7:0];
      end
      if (rx_valid && state != X_IDLE) begin
        rxcnt <= rxcnt + 12'd1;
        if (op_rd && rxcnt >= 12'(HDR_WORDS)) begin
          rd_word  <= rx_word;
          rd_valid <= 1'b1;
          d_ptr    <= 9'(rxcnt - 12'(HDR_WORDS));
        end
      end

      case (state)
        X_IDLE: begin
          if (rd_req || wr_req) begin
            op_rd     <= rd_req;
            addr_q    <= start_addr[15:0];
            total     <= 12'(data_length) + 12'(HDR_WORDS);
            wcnt      <= '0;
            rxcnt     <= '0;
            d_ptr     <= '0;
            beat      <= 1'b0;
            rx_beat   <= 1'b0;
            word_q    <= {rd_req ? SPI_CMD_RD : SPI_CMD_WR, 4'h0, start_addr[19:16]};
            have_word <= 1'b1;
            state     <= X_SEND;
          end
        end
        X_SEND: begin
          if (swr_en && swr_ack && SPI_W == 8 && !beat) begin
            beat <= 1'b1;          // high byte taken; the low byte follows
          end else if (swr_en && swr_ack) begin
            beat      <= 1'b0;
            have_word <= 1'b0;
            wcnt      <= wnext;
            if (wnext == total) begin
              state <= X_DRAIN;
            end else if (wnext == 12'd1) begin
              word_q    <= addr_q;
              have_word <= 1'b1;
            end else if (op_rd) begin
              word_q    <= 16'h0000;
              have_word <= 1'b1;
            end else begin
              d_ptr     <= 9'(wnext - 12'(HDR_WORDS));
              fetch_cnt <= 2'd0;
              state     <= X_FETCH;
            end
          end
        end
        X_FETCH: begin
          fetch_cnt <= fetch_cnt + 2'd1;
          if (fetch_cnt == 2'd2) begin
            word_q    <= wr_word;
            have_word <= 1'b1;
            state     <= X_SEND;
          end
        end
        X_DRAIN: begin
          if (spi_ncs) begin
            rd_over <= op_rd;
            wr_over <= !op_rd;
            state   <= X_IDLE;
          end
        end
        default: state <= X_IDLE;
      endcase
    end
  end

  initial assert (SPI_W == 8 || SPI_W == 16) else $error("spi_exch: SPI_W must be 8 or 16");

  // Requests arrive only while no transaction is in progress.
  property p_req_when_idle;
    @(posedge clk) disable iff (reset) (rd_req || wr_req) |-> state == X_IDLE;
  endproperty
  assert property (p_req_when_idle);

  property p_one_req;
    @(posedge clk) disable iff (reset) !(rd_req && wr_req);
  endproperty
  assert property (p_one_req);

endmodule
