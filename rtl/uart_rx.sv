// uart_rx: asynchronous serial receiver, 8 data bits, no parity, 1 stop bit,
// least significant bit first, line idle high.
//
// The serial input is brought into the clock domain through two flip-flops.
// A falling edge on the idle line starts a frame; the start bit is checked
// again half a bit later, then every data bit and the stop bit are sampled
// in the middle of their bit period (CLKS_PER_BIT clock cycles each). A
// frame whose stop bit reads 1 delivers its byte on o_data with a one-cycle
// o_valid pulse, about half a bit after the middle of the stop bit has been
// sampled; a frame with a bad stop bit is dropped and the receiver waits for
// the line to return high before looking for the next start bit. Receiving one byte takes
// about 10 * CLKS_PER_BIT cycles, so o_valid pulses are at least that far
// apart. The default, 434 cycles per bit, is 115200 baud from a 50 MHz
// clock. The frame format and baud rate are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434,
  localparam int unsigned CW          = $clog2(CLKS_PER_BIT + 1)
) (
  input  logic       i_clock,
  input  logic       i_reset,
  input  logic       i_rx,
  output logic [7:0] o_data,
  output logic       o_valid
);

  typedef enum logic [2:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP, RX_WAIT_HIGH} rx_state_t;

  localparam logic [CW-1:0] FULL = CW'(CLKS_PER_BIT - 1);
  localparam logic [CW-1:0] HALF = CW'((CLKS_PER_BIT - 1) / 2);

  rx_state_t   state;
  logic [1:0]  sync;
  logic [CW-1:0] cnt;
  logic [2:0]  bit_idx;
  logic [7:0]  shreg;
  logic        rx;

  assign rx = sync[1];

  always_ff @(posedge i_clock) begin
    if (i_reset) sync <= 2'b11;
    else         sync <= {sync[0], i_rx};
  end

  always_ff @(posedge i_clock) begin
    o_valid <= 1'b0;
    if (i_reset) begin
      state   <= RX_IDLE;
      cnt     <= '0;
      bit_idx <= '0;
    end else begin
      unique case (state)
        RX_IDLE: begin
          cnt <= '0;
          if (!rx) state <= RX_START;
        end
        RX_START: begin
          if (cnt == HALF) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rx ? RX_IDLE : RX_DATA;   // glitch: back to idle
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        RX_DATA: begin
          if (cnt == FULL) begin
            cnt   <= '0;
            shreg <= {rx, shreg[7:1]};
            if (bit_idx == 3'd7) state <= RX_STOP;
            bit_idx <= bit_idx + 3'd1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        RX_STOP: begin
          if (cnt == FULL) begin
            cnt <= '0;
            if (rx) begin
              o_data  <= shreg;
              o_valid <= 1'b1;
              state   <= RX_IDLE;
            end else begin
              state   <= RX_WAIT_HIGH;   // framing error: wait for the line to idle
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        RX_WAIT_HIGH: if (rx) state <= RX_IDLE;
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
