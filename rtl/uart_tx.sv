// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop
// bit, least significant bit first, line idle high.
//
// A one-cycle i_start while o_busy is 0 loads i_data; the frame (start bit,
// eight data bits, stop bit) then leaves on o_tx, each bit held for
// CLKS_PER_BIT clock cycles. o_busy is 1 from the cycle after i_start until
// the stop bit has been sent in full, 10 * CLKS_PER_BIT cycles; i_start
// while busy is ignored. The frame format and baud rate (default 434 cycles
// per bit, 115200 baud at 50 MHz) are this design's choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434,
  localparam int unsigned CW          = $clog2(CLKS_PER_BIT + 1)
) (
  input  logic       i_clock,
  input  logic       i_reset,
  input  logic       i_start,
  input  logic [7:0] i_data,
  output logic       o_tx,
  output logic       o_busy
);

  localparam logic [CW-1:0] FULL = CW'(CLKS_PER_BIT - 1);

  logic [8:0]    frame;     // data and stop bit still to send, LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  assign o_busy = (bits_left != 4'd0);

  always_ff @(posedge i_clock) begin
    if (i_reset) begin
      bits_left <= '0;
      cnt       <= '0;
      o_tx      <= 1'b1;
    end else if (!o_busy) begin
      o_tx <= 1'b1;
      if (i_start) begin
        frame     <= {1'b1, i_data};
        bits_left <= 4'd10;
        cnt       <= '0;
        o_tx      <= 1'b0;     // start bit
      end
    end else if (cnt == FULL) begin
      cnt       <= '0;
      bits_left <= bits_left - 4'd1;
      frame     <= {1'b1, frame[8:1]};
      o_tx      <= (bits_left == 4'd1) ? 1'b1 : frame[0];
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
