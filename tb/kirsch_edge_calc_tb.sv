// kirsch_edge_calc_tb: testbench of the derivative, maximum and threshold
// unit.
//
// Directed tables: for each direction a table that is bright on exactly
// that side; flat tables (no edge); tables whose maximum derivative is just
// at and just above 400; and tables where two directions tie, to check the
// priority order. Then random tables, one per cycle, all compared with the
// reference model two cycles after they are presented.
module kirsch_edge_calc_tb;
  import kirsch_pkg::*;
  import kirsch_ref_pkg::*;
  int checks = 0, failures = 0, n_tie = 0, n_thresh = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, in_last = 1'b0;
  table_t tbl = '0;
  logic o_valid, o_last, o_edge;
  dir_t o_dir;

  kirsch_edge_calc dut (.i_clock(clk), .i_reset(rst), .i_valid(in_valid), .i_last(in_last),
    .i_table(tbl), .o_valid(o_valid), .o_last(o_last), .o_edge(o_edge), .o_dir(o_dir));

  always #5 clk = ~clk;

  typedef struct { result_t r; bit last; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    if (o_valid) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        exp_t e;
        e = q.pop_front();
        if (o_edge !== e.r.edge_bit || o_dir !== e.r.dir || o_last !== e.last) begin
          failures++;
          $display("FAIL got edge=%b dir=%b last=%b expected %b %b %b", o_edge, o_dir, o_last,
                   e.r.edge_bit, e.r.dir, e.last);
        end
      end
    end
  end

  // Present one table; expected result from the reference model.
  task automatic present(input tbl_t t, input result_t expv);
    exp_t e;
    @(negedge clk);
    for (int m = 0; m < 3; m++) for (int n = 0; n < 3; n++) tbl[m][n] = t[m][n];
    in_valid = 1'b1;
    in_last = 1'(($urandom_range(3, 0)) == 0);
    e.r = expv; e.last = in_last;
    q.push_back(e);
  endtask

  function automatic tbl_t bright_side(input int d, input px_t hi, input px_t lo);
    tbl_t t;
    int ring_r [8] = '{0, 0, 0, 1, 2, 2, 2, 1};
    int ring_c [8] = '{0, 1, 2, 2, 2, 1, 0, 0};
    // start position on the ring of each direction's bright side, order
    // E W N S NW SE NE SW (the direction codes 0..7)
    int start [8] = '{2, 6, 0, 4, 7, 3, 1, 5};
    for (int m = 0; m < 3; m++) for (int n = 0; n < 3; n++) t[m][n] = lo;
    for (int k = 0; k < 3; k++) t[ring_r[(start[d] + k) % 8]][ring_c[(start[d] + k) % 8]] = hi;
    t[1][1] = px_t'($urandom);
    return t;
  endfunction

  initial begin
    tbl_t t;
    result_t r;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // each direction on its own: expected code is the direction itself
    for (int d = 0; d < 8; d++) begin
      r.edge_bit = 1'b1; r.dir = 3'(d);
      present(bright_side(d, 200, 10), r);
    end
    // flat: no edge, direction 000
    for (int k = 0; k < 4; k++) begin
      px_t v;
      v = px_t'($urandom);
      foreach (t[m, n]) t[m][n] = v;
      r = '0;
      present(t, r);
    end
    // threshold: bright side 3*h, rest 0 -> deriv 15*h; h=26 gives 390, 27 gives 405
    r.edge_bit = 1'b0; r.dir = 3'b000;
    present(bright_side(2, 26, 0), r); n_thresh++;
    r.edge_bit = 1'b1; r.dir = 3'b010;
    present(bright_side(2, 27, 0), r); n_thresh++;
    // a maximum of exactly 400 is not an edge: N side sums to 80, the rest to 0
    foreach (t[m, n]) t[m][n] = 0;
    t[0][0] = 27; t[0][1] = 27; t[0][2] = 26; t[1][1] = 99;  // N: 5*80 = 400
    r = kirsch_ref(t);
    checks++;
    if (r.edge_bit !== 1'b0) begin failures++; $display("FAIL reference: 400 counted as edge"); end
    present(t, r); n_thresh++;
    // ties: equal derivatives, the direction earlier in the tie order must win
    foreach (t[m, n]) t[m][n] = 0;
    t[0][0] = 200; t[0][1] = 200; t[0][2] = 200; t[1][2] = 200; t[2][2] = 200;  // N, NE and E compete
    r = kirsch_ref(t); present(t, r); n_tie++;
    for (int k = 0; k < 200; k++) begin
      // symmetric tables produce ties between mirror directions
      foreach (t[m, n]) t[m][n] = px_t'($urandom_range(255, 0));
      if (k % 2 == 0) for (int m = 0; m < 3; m++) t[m][2] = t[m][0];
      else            for (int n = 0; n < 3; n++) t[2][n] = t[0][n];
      r = kirsch_ref(t); present(t, r); n_tie++;
    end
    for (int k = 0; k < 2000; k++) begin
      foreach (t[m, n]) t[m][n] = ($urandom_range(1, 0) == 1) ? px_t'($urandom_range(255, 150))
                                                               : px_t'($urandom_range(80, 0));
      r = kirsch_ref(t); present(t, r);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    checks++;
    if (n_tie == 0 || n_thresh == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
