// uw_uart: serial link between the PC and the edge detector.
//
// Receive side: bytes arriving on i_rx (8N1, see uart_rx) are handed to the
// detector as pixels, o_pixel with a one-cycle o_pixel_valid, one per byte.
// Transmit side: every detector result (i_result_valid with i_edge, i_dir)
// becomes one byte {4'b0000, edge, dir[2:0]} sent on o_tx. Results wait in a
// FIFO_DEPTH-entry first-in first-out buffer while the transmitter is busy,
// because a result can arrive before the previous byte has left; results
// never outnumber received pixels, so the buffer drains at the same average
// rate it fills. o_overflow pulses if a result arrives with the buffer full
// (the result is then dropped); an assertion flags it in simulation.
// The existence of this controller is the design's; its frame format, result
// byte layout and buffer are this design's choices.
module uw_uart #(
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter int unsigned FIFO_DEPTH   = 4,
  localparam int unsigned PW          = $clog2(FIFO_DEPTH)
) (
  input  logic       i_clock,
  input  logic       i_reset,
  input  logic       i_rx,
  output logic       o_tx,
  output logic [7:0] o_pixel,
  output logic       o_pixel_valid,
  input  logic       i_result_valid,
  input  logic       i_edge,
  input  logic [2:0] i_dir,
  output logic       o_overflow
);

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .i_clock (i_clock),
    .i_reset (i_reset),
    .i_rx    (i_rx),
    .o_data  (o_pixel),
    .o_valid (o_pixel_valid)
  );

  logic [7:0] fifo [FIFO_DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic [PW:0]   count;
  logic          push, pop, tx_busy;

  assign push       = i_result_valid && (count != (PW+1)'(FIFO_DEPTH));
  assign pop        = !tx_busy && (count != '0);
  assign o_overflow = i_result_valid && (count == (PW+1)'(FIFO_DEPTH));

  always_ff @(posedge i_clock) begin
    if (i_reset) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) begin
        fifo[wr_ptr] <= {4'b0000, i_edge, i_dir};
        wr_ptr <= (wr_ptr == PW'(FIFO_DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= (rd_ptr == PW'(FIFO_DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .i_clock (i_clock),
    .i_reset (i_reset),
    .i_start (pop),
    .i_data  (fifo[rd_ptr]),
    .o_tx    (o_tx),
    .o_busy  (tx_busy)
  );

  a_no_overflow: assert property (@(posedge i_clock) disable iff (i_reset) !o_overflow)
    else $error("uw_uart: result buffer overflow");

endmodule
