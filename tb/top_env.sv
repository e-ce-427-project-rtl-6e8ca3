// top_env: self-checking environment for the board-level top_kirsch,
// shared by the small and the full-size testbench. It drives the clock, the
// reset button and the serial receive line, and watches the serial transmit
// line and the display bus of a top_kirsch instance owned by the testbench.
//
// It streams N_IMAGES random IMG_SIZE x IMG_SIZE images as 8N1 bytes at
// CLKS_PER_BIT cycles per bit and decodes the returned bytes; each must
// equal {0000, edge, dir} of the reference model, in order, with
// (IMG_SIZE-2)^2 bytes per image, and each must start within one bit time
// and a few cycles after the stop bit of the pixel that completed its table.
// The display must show the latest row in hex and the mode on the LEDs:
// reset while the button is held, idle after release, busy during an image
// and idle again after the last result. With RESET_TEST = 1 an image is
// first abandoned half way by pressing the button. Edge directions, no-edge
// results, mode changes and the mid-image reset are counted and must occur.
module top_env #(
  parameter int unsigned IMG_SIZE     = 16,
  parameter int unsigned CLKS_PER_BIT = 4,
  parameter int unsigned N_IMAGES     = 2,
  parameter bit          RESET_TEST   = 1'b1,
  parameter longint      MAX_CYCLES   = 10_000_000
) (
  output logic  CLK,
  output logic  nRST,
  output logic  RXFLEX,
  input  logic  TXFLEX,
  input  logic [15:0] o_sevenseg,
  output int    checks,
  output int    failures,
  output bit    done
);
  import kirsch_ref_pkg::*;
  import seg_ref_pkg::*;

  localparam int C = int'(CLKS_PER_BIT);

  px_t img [256][256];
  result_t exp_q [$];
  longint  due_q [$];
  longint  cyc = 0;
  int n_bytes = 0, n_dir [8], n_noedge = 0, n_reset_mid = 0, n_busy = 0, n_idle = 0;

  initial begin CLK = 1'b0; nRST = 1'b0; RXFLEX = 1'b1; end
  always #5 CLK = ~CLK;
  always @(posedge CLK) cyc++;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s (cycle %0d)", msg, cyc);
  endtask

  task automatic check_leds(input logic [1:0] m, input string what);
    checks++;
    if (o_sevenseg[15:14] !== m) fail($sformatf("LEDs %s: %b expected %b", what, o_sevenseg[15:14], m));
  endtask

  // One pixel as a serial frame; queues the result its table gives.
  task automatic send_pixel(input int r, input int c);
    logic [9:0] f;
    f = {1'b1, img[r][c], 1'b0};
    for (int i = 0; i < 10; i++) begin
      if (i == 9 && r >= 2 && c >= 2) begin
        exp_q.push_back(kirsch_ref(table_at(img, r - 1, c - 1)));
        due_q.push_back(cyc + longint'(C) + 16);
      end
      RXFLEX = f[i];
      repeat (C) @(negedge CLK);
    end
    RXFLEX = 1'b1;
    repeat (4) @(negedge CLK);
    checks++;
    if (o_sevenseg[13:0] !== {seg_ref(4'(r >> 4)), seg_ref(4'(r))})
      fail($sformatf("display shows %b for row %0d", o_sevenseg[13:0], r));
    // after the last pixel the image may already be finished
    if (!(r == int'(IMG_SIZE) - 1 && c == int'(IMG_SIZE) - 1)) check_leds(2'b11, "busy");
  endtask

  task automatic press_reset();
    @(negedge CLK);
    nRST = 1'b1;
    repeat (8) @(negedge CLK);
    check_leds(2'b01, "reset");
    nRST = 1'b0;
    repeat (6) @(negedge CLK);
    check_leds(2'b10, "idle after reset");
    checks++;
    if (o_sevenseg[13:0] !== {seg_ref(4'h0), seg_ref(4'h0)}) fail("row display not 00 after reset");
    exp_q.delete();
    due_q.delete();
  endtask

  // transmit-line decoder
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge TXFLEX);
      checks++;
      if (due_q.size() == 0) fail("result byte with no result due");
      else if (cyc > due_q[0]) fail($sformatf("result byte late by %0d cycles", cyc - due_q[0]));
      repeat (C / 2) @(posedge CLK);
      for (int i = 0; i < 8; i++) begin
        repeat (C) @(posedge CLK);
        b[i] = TXFLEX;
      end
      repeat (C) @(posedge CLK);
      n_bytes++;
      checks += 2;
      if (TXFLEX !== 1'b1) fail("stop bit");
      if (exp_q.size() == 0) fail($sformatf("unexpected byte %h", b));
      else begin
        result_t e;
        e = exp_q.pop_front();
        void'(due_q.pop_front());
        if (b !== {4'b0000, e.edge_bit, e.dir}) fail($sformatf("byte %h expected %h", b, {4'b0000, e}));
        if (e.edge_bit) n_dir[e.dir]++;
        else            n_noedge++;
      end
    end
  end

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    foreach (n_dir[i]) n_dir[i] = 0;
    repeat (3) @(negedge CLK);
    press_reset();
    if (RESET_TEST) begin
      make_image(img, int'(IMG_SIZE));
      for (int k = 0; k < IMG_SIZE * IMG_SIZE / 2 + 5; k++) send_pixel(k / IMG_SIZE, k % IMG_SIZE);
      repeat (12 * C) @(negedge CLK);    // let the results in flight drain
      n_reset_mid++;
      press_reset();
      n_bytes = 0;
    end
    for (int im = 0; im < N_IMAGES; im++) begin
      make_image(img, int'(IMG_SIZE));
      for (int r = 0; r < IMG_SIZE; r++)
        for (int c = 0; c < IMG_SIZE; c++) begin
          send_pixel(r, c);
          if (r == 0 && c == 0) n_busy++;
          if (!RESET_TEST) repeat ($urandom_range(3, 0)) @(negedge CLK);
        end
      repeat (12 * C) @(negedge CLK);
      check_leds(2'b10, "idle after image");
      n_idle++;
    end
    checks += 2;
    if (n_bytes != N_IMAGES * (IMG_SIZE - 2) * (IMG_SIZE - 2)) fail($sformatf("%0d result bytes", n_bytes));
    if (exp_q.size() != 0) fail($sformatf("%0d results missing", exp_q.size()));
    for (int d = 0; d < 8; d++) begin
      checks++;
      if (n_dir[d] == 0) fail($sformatf("direction %0d never seen", d));
    end
    checks += 3;
    if (n_noedge == 0) fail("no no-edge result");
    if (n_busy == 0 || n_idle == 0) fail("mode change missing");
    if (RESET_TEST && n_reset_mid == 0) fail("no reset during an image");
    $display("bytes=%0d per-dir E,W,N,S,NW,SE,NE,SW=%0d,%0d,%0d,%0d,%0d,%0d,%0d,%0d no-edge=%0d",
             n_bytes, n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_dir[4], n_dir[5], n_dir[6], n_dir[7], n_noedge);
    done = 1'b1;
  end

  initial begin
    while (cyc < MAX_CYCLES) @(posedge CLK);
    fail("watchdog expired");
    done = 1'b1;
  end

endmodule
