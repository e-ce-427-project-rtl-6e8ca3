// kirsch_ref_pkg: reference model of the Kirsch edge decision for the
// testbenches, written straight from the derivative definitions: for each
// direction, 5 x (three pixels on the bright side) - 3 x (the other five),
// the largest derivative wins with ties going to W, NW, N, NE, E, SE, S, SW
// in that order, and an edge needs a maximum above 400. It also provides a
// test-image generator and the 3x3 table of an image position.
package kirsch_ref_pkg;

  typedef logic [7:0] px_t;
  typedef px_t tbl_t [3][3];

  typedef struct packed {
    logic       edge_bit;
    logic [2:0] dir;
  } result_t;

  // Derivative of one direction from the position lists of its bright side.
  function automatic int deriv(input tbl_t t, input int b0r, b0c, b1r, b1c, b2r, b2c);
    int bright, all;
    all = 0;
    for (int m = 0; m < 3; m++)
      for (int n = 0; n < 3; n++)
        if (!(m == 1 && n == 1)) all += int'(t[m][n]);
    bright = int'(t[b0r][b0c]) + int'(t[b1r][b1c]) + int'(t[b2r][b2c]);
    return 5 * bright - 3 * (all - bright);
  endfunction

  function automatic result_t kirsch_ref(input tbl_t t, input int threshold = 400);
    int d [8];
    logic [2:0] code [8];
    int best;
    result_t res;
    // priority order W, NW, N, NE, E, SE, S, SW
    d[0] = deriv(t, 2,0, 1,0, 0,0); code[0] = 3'b001;  // W
    d[1] = deriv(t, 1,0, 0,0, 0,1); code[1] = 3'b100;  // NW
    d[2] = deriv(t, 0,0, 0,1, 0,2); code[2] = 3'b010;  // N
    d[3] = deriv(t, 0,1, 0,2, 1,2); code[3] = 3'b110;  // NE
    d[4] = deriv(t, 0,2, 1,2, 2,2); code[4] = 3'b000;  // E
    d[5] = deriv(t, 1,2, 2,2, 2,1); code[5] = 3'b101;  // SE
    d[6] = deriv(t, 2,2, 2,1, 2,0); code[6] = 3'b011;  // S
    d[7] = deriv(t, 2,1, 2,0, 1,0); code[7] = 3'b111;  // SW
    best = 0;
    for (int i = 1; i < 8; i++) if (d[i] > d[best]) best = i;
    res.edge_bit = d[best] > threshold;
    res.dir      = res.edge_bit ? code[best] : 3'b000;
    return res;
  endfunction

  // Test image of n x n pixels made of 4x4 blocks, each flat, noisy, a
  // sharp step of random orientation, or faint noise, so that edges of
  // every direction and plain areas both occur.
  function automatic void make_image(ref px_t img [256][256], input int n);
    for (int br = 0; br < n; br += 4) begin
      for (int bc = 0; bc < n; bc += 4) begin
        int kind, a, b, lo, hi, base;
        kind = int'($urandom_range(3, 0));
        a    = int'($urandom_range(2, 0)) - 1;
        b    = int'($urandom_range(2, 0)) - 1;
        if (a == 0 && b == 0) a = 1;
        lo   = int'($urandom_range(60, 0));
        hi   = int'($urandom_range(255, 160));
        base = int'($urandom_range(200, 20));
        for (int r = br; r < br + 4 && r < n; r++) begin
          for (int c = bc; c < bc + 4 && c < n; c++) begin
            int v;
            case (kind)
              0:       v = base;
              1:       v = int'($urandom_range(255, 0));
              2:       v = (a * (r - br) * 2 + b * (c - bc) * 2 - 3 * (a + b) > 0) ? hi : lo;
              default: v = base + int'($urandom_range(8, 0)) - 4;
            endcase
            img[r][c] = px_t'(v);
          end
        end
      end
    end
  endfunction

  function automatic tbl_t table_at(ref px_t img [256][256], input int r, input int c);
    tbl_t t;
    for (int m = 0; m < 3; m++)
      for (int n = 0; n < 3; n++)
        t[m][n] = img[r + m - 1][c + n - 1];
    return t;
  endfunction

endpackage
