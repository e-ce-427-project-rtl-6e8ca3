// kirsch_edge_calc: edge decision for one 3x3 convolution table.
//
// The eight Kirsch derivatives are Deriv_d = 5*A_d - 3*B_d, where A_d is the
// sum of the three neighbours on the bright side of direction d and B_d the
// sum of the other five. With T the sum of all eight neighbours,
// B_d = T - A_d, so Deriv_d = 8*A_d - 3*T: the largest derivative belongs to
// the largest three-pixel sum A_d, and the threshold test
// EdgeMax > THRESHOLD becomes 8*A_max > 3*T + THRESHOLD, all unsigned.
// Ties between equal derivatives go to the first direction in the order
// W, NW, N, NE, E, SE, S, SW. Without an edge the direction output is 000.
// The equations, tie order, threshold and direction codes follow the
// algorithm's definition; the 8*A - 3*T rewriting and the two-stage split
// are this design's choices.
//
// Pipeline: stage 1 forms the eight sums, the maximum and T; stage 2 does
// the threshold test. A table presented with i_valid = 1 in cycle t gives
// o_valid = 1 with o_edge/o_dir in cycle t+2. i_last travels alongside as
// o_last. Only the valid flags are reset.
module kirsch_edge_calc
  import kirsch_pkg::*;
#(
  parameter int unsigned THRESHOLD = kirsch_pkg::DEF_THRESHOLD
) (
  input  logic   i_clock,
  input  logic   i_reset,
  input  logic   i_valid,
  input  logic   i_last,
  input  table_t i_table,
  output logic   o_valid,
  output logic   o_last,
  output logic   o_edge,
  output dir_t   o_dir
);

  // Neighbours clockwise from the top-left corner.
  pixel_t ring [8];
  assign ring[0] = i_table[0][0];
  assign ring[1] = i_table[0][1];
  assign ring[2] = i_table[0][2];
  assign ring[3] = i_table[1][2];
  assign ring[4] = i_table[2][2];
  assign ring[5] = i_table[2][1];
  assign ring[6] = i_table[2][0];
  assign ring[7] = i_table[1][0];

  // Sum of three ring pixels starting at position s.
  function automatic sum3_t ring_sum(input int s);
    return sum3_t'(ring[s % 8]) + sum3_t'(ring[(s + 1) % 8])
         + sum3_t'(ring[(s + 2) % 8]);
  endfunction

  // Candidates in tie-break priority order, each with its bright-side sum.
  sum3_t cand_sum [8];
  dir_t  cand_dir [8];
  always_comb begin
    cand_sum[0] = ring_sum(6); cand_dir[0] = DIR_W;   // [2,0] [1,0] [0,0]
    cand_sum[1] = ring_sum(7); cand_dir[1] = DIR_NW;  // [1,0] [0,0] [0,1]
    cand_sum[2] = ring_sum(0); cand_dir[2] = DIR_N;   // [0,0] [0,1] [0,2]
    cand_sum[3] = ring_sum(1); cand_dir[3] = DIR_NE;  // [0,1] [0,2] [1,2]
    cand_sum[4] = ring_sum(2); cand_dir[4] = DIR_E;   // [0,2] [1,2] [2,2]
    cand_sum[5] = ring_sum(3); cand_dir[5] = DIR_SE;  // [1,2] [2,2] [2,1]
    cand_sum[6] = ring_sum(4); cand_dir[6] = DIR_S;   // [2,2] [2,1] [2,0]
    cand_sum[7] = ring_sum(5); cand_dir[7] = DIR_SW;  // [2,1] [2,0] [1,0]
  end

  sum3_t max_sum;
  dir_t  max_dir;
  sum8_t total;
  always_comb begin
    max_sum = cand_sum[0];
    max_dir = cand_dir[0];
    // strictly greater: an equal later candidate never displaces an earlier one
    for (int i = 1; i < 8; i++) begin
      if (cand_sum[i] > max_sum) begin
        max_sum = cand_sum[i];
        max_dir = cand_dir[i];
      end
    end
    total = '0;
    for (int i = 0; i < 8; i++) total += sum8_t'(ring[i]);
  end

  // Stage 1 registers
  logic  s1_valid, s1_last;
  sum3_t s1_max;
  dir_t  s1_dir;
  sum8_t s1_total;

  always_ff @(posedge i_clock) begin
    if (i_reset) s1_valid <= 1'b0;
    else         s1_valid <= i_valid;
    s1_last  <= i_last;
    s1_max   <= max_sum;
    s1_dir   <= max_dir;
    s1_total <= total;
  end

  // Stage 2: 8*A_max > 3*T + THRESHOLD  (both sides below 2^14)
  logic [13:0] lhs, rhs;
  logic        is_edge;
  assign lhs     = {1'b0, s1_max, 3'b000};
  assign rhs     = 14'(s1_total) * 14'd3 + 14'(THRESHOLD);
  assign is_edge = lhs > rhs;

  always_ff @(posedge i_clock) begin
    if (i_reset) o_valid <= 1'b0;
    else         o_valid <= s1_valid;
    o_last <= s1_last;
    o_edge <= is_edge;
    o_dir  <= is_edge ? s1_dir : DIR_E;
  end

endmodule
