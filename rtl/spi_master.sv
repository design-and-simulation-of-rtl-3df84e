// spi_master: word-oriented SPI master (mode 0, MSB first) for the board link.
//
// The controller drives the 1553B board's SPI slave (SCK, SI, SO, CE#) with
// this block. A word offered on di_i with wren_i high is taken when wr_ack_o
// is high (same cycle; wr_ack_o is combinational). From idle, taking a word
// pulls spi_ssel_o low and starts shifting. While a word shifts, di_req_o
// asks for the next one; a word taken before the current one ends continues
// the same transaction without releasing chip select. When no word is
// waiting at the end of a word, chip select rises after half an SCK period
// and stays high for at least another half period. Each received word
// appears on do_o with a one-cycle do_valid_o pulse at the end of its last
// SCK period.
//
// The port names follow the controller's SPI module; its two clock inputs
// are both fed from the main clock there, so this version has the single
// clock clk_i. The word is 16 bits as in that module, or 8 bits (WORD_W),
// the two sizes the controller's SPI module is described with. The divider
// and the one-word input buffer are this design's choices. SCK runs at
// clk_i / (2*CLK_DIV).
module spi_master #(
  parameter int unsigned WORD_W  = 16,
  parameter int unsigned CLK_DIV = 5     // clk_i cycles per SCK half period
) (
  input  logic              clk_i,
  input  logic              rst_i,
  // word interface
  input  logic [WORD_W-1:0] di_i,
  input  logic              wren_i,
  output logic              wr_ack_o,
  output logic              di_req_o,
  output logic [WORD_W-1:0] do_o,
  output logic              do_valid_o,
  // SPI pins
  output logic              spi_sck_o,
  output logic              spi_ssel_o,
  output logic              spi_mosi_o,
  input  logic              spi_miso_i
);

  typedef enum logic [2:0] {S_IDLE, S_LOW, S_HIGH, S_TAIL, S_CSH} state_e;

  localparam int unsigned DIV_W = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam int unsigned BIT_W = $clog2(WORD_W);

  state_e             state;
  logic [DIV_W-1:0]   div_cnt;
  logic [BIT_W-1:0]   bit_cnt;
  logic [WORD_W-1:0]  sh_tx, sh_rx, buf_q;
  logic               buf_valid;
  logic               div_end;

  assign div_end  = (div_cnt == DIV_W'(CLK_DIV - 1));

  // A word is taken when idle, or into the empty buffer while shifting.
  always_comb begin
    wr_ack_o = 1'b0;
    if (wren_i) begin
      if (state == S_IDLE) wr_ack_o = 1'b1;
      else if ((state == S_LOW || state == S_HIGH) && !buf_valid) wr_ack_o = 1'b1;
    end
  end

  assign di_req_o   = (state == S_LOW || state == S_HIGH) && !buf_valid;
  assign spi_mosi_o = sh_tx[WORD_W-1];

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      state      <= S_IDLE;
      div_cnt    <= '0;
      bit_cnt    <= '0;
      sh_tx      <= '0;
      sh_rx      <= '0;
      buf_q      <= '0;
      buf_valid  <= 1'b0;
      do_o       <= '0;
      do_valid_o <= 1'b0;
      spi_sck_o  <= 1'b0;
      spi_ssel_o <= 1'b1;
    end else begin
      do_valid_o <= 1'b0;
      div_cnt    <= div_end ? '0 : div_cnt + 1'b1;
      case (state)
        S_IDLE: begin
          div_cnt <= '0;
          if (wren_i) begin
            sh_tx      <= di_i;
            bit_cnt    <= BIT_W'(WORD_W - 1);
            spi_ssel_o <= 1'b0;
            state      <= S_LOW;
          end
        end
        S_LOW: begin
          if (wr_ack_o) begin
            buf_q     <= di_i;
            buf_valid <= 1'b1;
          end
          if (div_end) begin
            sh_rx     <= {sh_rx[WORD_W-2:0], spi_miso_i};
            spi_sck_o <= 1'b1;
            state     <= S_HIGH;
          end
        end
        S_HIGH: begin
          if (div_end) begin
            spi_sck_o <= 1'b0;
            if (bit_cnt == '0) begin
              do_o       <= sh_rx;
              do_valid_o <= 1'b1;
              bit_cnt    <= BIT_W'(WORD_W - 1);
              if (buf_valid) begin
                sh_tx     <= buf_q;
                buf_valid <= 1'b0;
                state     <= S_LOW;
              end else if (wr_ack_o) begin
                sh_tx <= di_i;
                state <= S_LOW;
              end else begin
                state <= S_TAIL;
              end
            end else begin
              sh_tx   <= {sh_tx[WORD_W-2:0], 1'b0};
              bit_cnt <= bit_cnt - 1'b1;
              state   <= S_LOW;
            end
          end else if (wr_ack_o) begin
            buf_q     <= di_i;
            buf_valid <= 1'b1;
          end
        end
        S_TAIL: begin  // SCK low, chip select still asserted
          if (div_end) begin
            spi_ssel_o <= 1'b1;
            state      <= S_CSH;
          end
        end
        S_CSH: begin   // minimum chip-select high time
          if (div_end) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The buffer is never written while it holds a word.
  property p_no_overwrite;
    @(posedge clk_i) disable iff (rst_i) wr_ack_o && state != S_IDLE |-> !buf_valid;
  endproperty
  assert property (p_no_overwrite);

endmodule
