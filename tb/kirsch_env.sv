// kirsch_env: self-checking environment for the kirsch core, shared by the
// small and the full-size testbench.
//
// It generates N_IMAGES random test images of IMG_SIZE x IMG_SIZE pixels,
// streams them into the detector with gaps of 7 to 200 idle cycles between
// pixels (mostly 7), and compares every result, in order, with the
// reference model in kirsch_ref_pkg. It also checks that each result comes
// exactly LATENCY cycles after the pixel that completed its table, that
// there are (IMG_SIZE-2)^2 results per image, that o_row follows the row of
// the latest pixel, and that o_mode goes reset -> idle -> busy -> idle at
// the required cycles. With RESET_TEST = 1 an image is first abandoned half
// way by a reset pulse, so the detector must recover. Every mechanism (each
// edge direction, no-edge results, short and long gaps, mode changes,
// reset during an image, row-memory reuse) is counted and must occur.
module kirsch_env #(
  parameter int unsigned IMG_SIZE   = 16,
  parameter int unsigned N_IMAGES   = 2,
  parameter bit          RESET_TEST = 1'b1,
  parameter int unsigned MAX_CYCLES = 2_000_000
) (
  output int checks,
  output int failures,
  output bit done
);
  import kirsch_ref_pkg::*;

  localparam int LATENCY = 4;

  logic       clk = 1'b0;
  logic       i_valid = 1'b0, i_reset = 1'b0;
  logic [7:0] i_pixel = '0;
  logic       o_edge, o_valid;
  logic [2:0] o_dir;
  logic [1:0] o_mode;
  logic [7:0] o_row;

  kirsch #(.IMG_SIZE(IMG_SIZE)) dut (
    .i_clock (clk),
    .i_valid (i_valid),
    .i_pixel (i_pixel),
    .i_reset (i_reset),
    .o_edge  (o_edge),
    .o_dir   (o_dir),
    .o_valid (o_valid),
    .o_mode  (o_mode),
    .o_row   (o_row)
  );

  always #5 clk = ~clk;

  px_t img [256][256];

  typedef struct {
    result_t res;
    longint  due;
    bit      last;
  } expect_t;
  expect_t exp_q [$];

  longint edge_no = 0;
  int     n_results = 0, n_dir [8], n_noedge = 0, n_short_gap = 0, n_long_gap = 0;
  int     n_to_busy = 0, n_to_idle = 0, n_reset_mid = 0, n_reuse = 0;
  int     n_images_done = 0;

  // ---------------------------------------------------------------- monitor
  // Independent position tracking and mode model, sampled at each edge.
  int   mr = 0, mc = 0;
  logic prev_valid = 1'b0, prev_reset = 1'b0;
  int   prev_row = 0;
  typedef enum {M_IDLE, M_BUSY, M_RESET} mstate_t;
  mstate_t mstate = M_IDLE;
  bit   mode_known = 1'b0;

  function automatic logic [1:0] mode_code(mstate_t s);
    case (s)
      M_BUSY:  return 2'b11;
      M_RESET: return 2'b01;
      default: return 2'b10;
    endcase
  endfunction

  always @(posedge clk) begin
    bit last_out;
    edge_no++;
    last_out = 1'b0;
    // mode follows the model state of the previous edge
    if (mode_known) begin
      checks++;
      if (o_mode !== mode_code(mstate)) begin
        failures++;
        $display("FAIL mode at edge %0d: got %b expected %b", edge_no, o_mode, mode_code(mstate));
      end
    end
    // o_row shows the row of the latest pixel
    if (prev_valid && !prev_reset) begin
      checks++;
      if (int'(o_row) != prev_row) begin
        failures++;
        $display("FAIL o_row %0d expected %0d", o_row, prev_row);
      end
    end
    if (prev_reset) begin
      checks++;
      if (o_row != 8'd0) begin failures++; $display("FAIL o_row not 0 after reset"); end
    end
    // results (outputs mean nothing before the first reset)
    if (o_valid && mode_known) begin
      n_results++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result at edge %0d", edge_no);
      end else begin
        expect_t e;
        e = exp_q.pop_front();
        last_out = e.last;
        if (o_edge !== e.res.edge_bit || o_dir !== e.res.dir) begin
          failures++;
          $display("FAIL result: got edge=%b dir=%b expected edge=%b dir=%b",
                   o_edge, o_dir, e.res.edge_bit, e.res.dir);
        end
        checks++;
        if (edge_no != e.due) begin
          failures++;
          $display("FAIL latency: result at edge %0d, due %0d", edge_no, e.due);
        end
        if (e.res.edge_bit) n_dir[e.res.dir]++;
        else                n_noedge++;
        if (e.last) n_images_done++;
      end
    end
    // pixel accepted now: queue the result its table will give
    if (i_reset) begin
      if (mr != 0 || mc != 0) n_reset_mid++;
      mr = 0; mc = 0;
      exp_q.delete();
    end else if (i_valid) begin
      if (mr >= 2 && mc >= 2) begin
        expect_t e;
        e.res  = kirsch_ref(table_at(img, mr - 1, mc - 1));
        e.due  = edge_no + longint'(LATENCY);
        e.last = (mr == IMG_SIZE - 1) && (mc == IMG_SIZE - 1);
        exp_q.push_back(e);
      end
      if (mr >= 3 && mc == 0) n_reuse++;
      prev_row = mr;
      if (++mc == IMG_SIZE) begin
        mc = 0;
        if (++mr == IMG_SIZE) mr = 0;
      end
    end
    // mode model for the next edge
    if (i_reset) begin
      mstate = M_RESET;
      mode_known = 1'b1;
    end else begin
      case (mstate)
        M_RESET: mstate = i_valid ? M_BUSY : M_IDLE;
        M_IDLE:  if (i_valid) begin mstate = M_BUSY; n_to_busy++; end
        M_BUSY:  if (last_out) begin mstate = M_IDLE; n_to_idle++; end
        default: ;
      endcase
    end
    prev_valid = i_valid;
    prev_reset = i_reset;
  end

  // ----------------------------------------------------------------- driver
  task automatic send_pixel(input px_t p);
    int gap;
    @(negedge clk);
    i_valid = 1'b1;
    i_pixel = p;
    @(negedge clk);
    i_valid = 1'b0;
    i_pixel = px_t'($urandom);
    gap = ($urandom_range(7, 0) == 0) ? int'($urandom_range(200, 7)) : 7;
    if (gap == 7)   n_short_gap++;
    if (gap >= 150) n_long_gap++;
    repeat (gap - 1) @(negedge clk);
  endtask

  task automatic do_reset(input int cycles);
    @(negedge clk);
    i_reset = 1'b1;
    repeat (cycles) @(negedge clk);
    i_reset = 1'b0;
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    foreach (n_dir[i]) n_dir[i] = 0;
    do_reset(6);
    repeat (3) @(negedge clk);
    if (RESET_TEST) begin
      make_image(img, int'(IMG_SIZE));
      for (int k = 0; k < IMG_SIZE * IMG_SIZE / 2 + 3; k++)
        send_pixel(img[k / IMG_SIZE][k % IMG_SIZE]);
      do_reset(5);
      repeat (2) @(negedge clk);
    end
    for (int im = 0; im < N_IMAGES; im++) begin
      make_image(img, int'(IMG_SIZE));
      for (int r = 0; r < IMG_SIZE; r++)
        for (int c = 0; c < IMG_SIZE; c++)
          send_pixel(img[r][c]);
      repeat (12) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (n_results != N_IMAGES * (IMG_SIZE - 2) * (IMG_SIZE - 2)
                     + (RESET_TEST ? (IMG_SIZE / 2 - 2) * (IMG_SIZE - 2) + 1 : 0)) begin
      failures++;
      $display("FAIL result count %0d", n_results);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    checks++;
    if (n_images_done != N_IMAGES) begin failures++; $display("FAIL images finished %0d", n_images_done); end
    // every mechanism must have happened
    for (int d = 0; d < 8; d++) begin
      checks++;
      if (n_dir[d] == 0) begin failures++; $display("FAIL direction %0d never seen", d); end
    end
    checks++; if (n_noedge == 0)    begin failures++; $display("FAIL no no-edge result"); end
    checks++; if (n_short_gap == 0) begin failures++; $display("FAIL no 7-cycle gap"); end
    checks++; if (n_long_gap == 0)  begin failures++; $display("FAIL no long gap"); end
    checks++; if (n_to_busy == 0)   begin failures++; $display("FAIL never busy"); end
    checks++; if (n_to_idle != N_IMAGES) begin failures++; $display("FAIL busy->idle %0d", n_to_idle); end
    checks++; if (n_reuse == 0)     begin failures++; $display("FAIL row memory never reused"); end
    if (RESET_TEST) begin
      checks++; if (n_reset_mid == 0) begin failures++; $display("FAIL no reset during image"); end
    end
    $display("results=%0d per-dir E,W,N,S,NW,SE,NE,SW=%0d,%0d,%0d,%0d,%0d,%0d,%0d,%0d no-edge=%0d long-gaps=%0d",
             n_results, n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_dir[4], n_dir[5], n_dir[6], n_dir[7],
             n_noedge, n_long_gap);
    done = 1'b1;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    done = 1'b1;
  end

endmodule
