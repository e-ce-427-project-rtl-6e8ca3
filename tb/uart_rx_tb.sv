// uart_rx_tb: testbench of the serial receiver.
//
// Sends 300 random bytes as 8N1 frames at 8 clock cycles per bit, with
// random idle time between frames, and checks each received byte and that o_valid pulses
// once per frame, within two bit times after the stop bit began. Also sends
// frames with a bad stop bit and short glitches on the idle line, which
// must produce no byte.
module uart_rx_tb;
  localparam int C = 8;
  int checks = 0, failures = 0, n_bad_stop = 0, n_glitch = 0;
  logic clk = 1'b0, rst = 1'b1, rx = 1'b1;
  logic [7:0] data;
  logic valid;
  logic [7:0] exp_q [$];
  int pulses = 0;
  longint cyc = 0, stop_start = 0;

  uart_rx #(.CLKS_PER_BIT(C)) dut (.i_clock(clk), .i_reset(rst), .i_rx(rx), .o_data(data), .o_valid(valid));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (valid) begin
      pulses++;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL byte %h received, none expected", data);
      end else begin
        logic [7:0] e;
        e = exp_q.pop_front();
        if (data !== e) begin failures++; $display("FAIL got %h expected %h", data, e); end
      end
      if (cyc - stop_start > 2 * C) begin
        failures++;
        $display("FAIL byte late: %0d cycles after stop bit", cyc - stop_start);
      end
    end
  end

  task automatic send(input logic [7:0] b, input bit good_stop, input int per_bit);
    logic [9:0] f;
    f = {good_stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      if (i == 9) stop_start = cyc;
      rx = f[i];
      repeat (per_bit) @(negedge clk);
    end
    rx = 1'b1;
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 300; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      if (k % 25 == 7) begin
        send(b, 1'b0, C);            // bad stop bit: dropped
        n_bad_stop++;
        rx = 1'b1;
        repeat (2 * C) @(negedge clk);
      end else if (k % 25 == 13) begin
        rx = 1'b0;                   // glitch shorter than half a bit
        repeat (C / 2 - 2) @(negedge clk);
        rx = 1'b1;
        n_glitch++;
        repeat (2 * C) @(negedge clk);
      end else begin
        exp_q.push_back(b);
        send(b, 1'b1, C);
      end
      repeat ($urandom_range(5, 0)) @(negedge clk);
    end
    repeat (3 * C) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d bytes missing", exp_q.size()); end
    checks++;
    if (n_bad_stop == 0 || n_glitch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
