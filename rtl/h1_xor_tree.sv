// h1_xor_tree: first encoding step, q = H1 * s over GF(2), for the four codes of one codeword
// length, followed by the code-rate multiplexer.
//
// The four H1 matrices of a length share the input vector s, so they are built side by side as
// constant XOR trees: bit t of block row r is the XOR of s[j*Z + (t + sigma(r,j)) mod Z] over the
// nonzero blocks j of that row. Row sums are shared where rows intersect: for two rows ra < rb
// (taken over the 30 rows of all four rates of this length), the columns on which their shift
// factors differ by the same d form an intersection group. Its sum T, computed once in the
// alignment of row rb, serves row rb directly and row ra after a further cyclic shift by d,
// since P^(sigma_b + d) = P^sigma_a. Groups are claimed greedily, pair by pair, and a column of a
// row is covered by at most one group; what is left of a row is summed directly. The group search
// follows the pairwise intersection search of the design method; the greedy claiming (no
// splitting of nested groups) is this design's own simplification of the ensemble update.
//
// Interface: s holds the kb*Z information bits of the selected code from bit 0 upward (unused
// high bits are ignored); rate selects one of the four codes; q carries mb*Z bits from bit 0,
// higher bits are zero. Purely combinational.
module h1_xor_tree
  import ldpc_pkg::*;
#(
  parameter int unsigned LEN_IDX = 2  // 0: n = 648, 1: n = 1296, 2: n = 1944
) (
  input  logic [20*z_of(LEN_IDX)-1:0]     s,
  input  code_rate_e                      rate,
  output logic [MB_MAX*z_of(LEN_IDX)-1:0] q
);

  localparam int unsigned Z    = z_of(LEN_IDX);
  localparam int unsigned NROW = 30;            // 12 + 8 + 6 + 4 rows of the four rates
  localparam int unsigned KMAX = 20;            // information block columns of rate 5/6

  // ---------------------------------------------------------------------------------------
  // Sharing plan, worked out at elaboration time.
  // ---------------------------------------------------------------------------------------
  typedef int shift_row_t [KMAX];

  // Row g of the combined matrix: rate and local row.
  function automatic int unsigned rate_of_row(input int unsigned g);
    if (g < 12) return 0;
    if (g < 20) return 1;
    if (g < 26) return 2;
    return 3;
  endfunction

  function automatic int unsigned local_row(input int unsigned g);
    if (g < 12) return g;
    if (g < 20) return g - 12;
    if (g < 26) return g - 20;
    return g - 26;
  endfunction

  // Shift of combined row g, column j (-1 where the code has no such column or a zero block).
  function automatic int shift_at(input int unsigned g, input int unsigned j);
    if (j >= kb_of(rate_of_row(g))) return -1;
    return h1_shift(LEN_IDX, rate_of_row(g), local_row(g), j);
  endfunction

  // A shared term: its source row (whose alignment it has) and its column set.
  localparam int unsigned MAX_TERMS = 256;

  typedef struct packed {
    logic [KMAX-1:0] cols;
    logic [4:0]      src;    // row rb the term is aligned to
  } term_t;

  typedef struct packed {
    logic [MAX_TERMS-1:0][KMAX-1:0] cols;
    logic [MAX_TERMS-1:0][4:0]      src;
    logic [MAX_TERMS-1:0][4:0]      user;   // row ra that reuses it with an extra shift
    logic [8:0]                     n;
  } plan_t;

  function automatic plan_t make_plan();
    plan_t                       p;
    logic [NROW*KMAX-1:0]        covered;   // bit g*KMAX + j: column j of row g is taken
    logic [KMAX*KMAX-1:0]        groups;    // bit k*KMAX + j: column j is in group k
    logic [KMAX-1:0]             grp;
    int                          diffs [KMAX];
    logic [MAX_TERMS*KMAX-1:0]   cols_v;
    logic [MAX_TERMS*5-1:0]      src_v;
    logic [MAX_TERMS*5-1:0]      user_v;
    int unsigned                 n;
    int unsigned                 ng;
    int                          d;
    int                          found;
    covered = '0;
    cols_v  = '0;
    src_v   = '0;
    user_v  = '0;
    n       = 0;
    for (int unsigned ra = 0; ra < NROW; ra++) begin
      for (int unsigned rb = ra + 1; rb < NROW; rb++) begin
        // Intersection groups of rows ra and rb: columns with equal shift difference.
        ng     = 0;
        groups = '0;
        for (int unsigned i = 0; i < KMAX; i++) diffs[i] = -1;
        for (int unsigned i = 0; i < KMAX; i++) begin
          if (shift_at(ra, i) >= 0 && shift_at(rb, i) >= 0 &&
              !covered[ra*KMAX + i] && !covered[rb*KMAX + i]) begin
            d = (shift_at(ra, i) - shift_at(rb, i) + int'(Z)) % int'(Z);
            found = -1;
            for (int unsigned k = 0; k < ng; k++)
              if (diffs[k] == d) found = int'(k);
            if (found < 0) begin
              found = int'(ng);
              diffs[ng] = d;
              ng++;
            end
            groups[found*KMAX + i] = 1'b1;
          end
        end
        // Claim every group of two or more columns.
        for (int unsigned k = 0; k < ng; k++) begin
          grp = groups[k*KMAX +: KMAX];
          if ($countones(grp) >= 2 && n < MAX_TERMS) begin
            cols_v[n*KMAX +: KMAX] = grp;
            src_v[n*5 +: 5]        = 5'(rb);
            user_v[n*5 +: 5]       = 5'(ra);
            n++;
            covered[ra*KMAX +: KMAX] = covered[ra*KMAX +: KMAX] | grp;
            covered[rb*KMAX +: KMAX] = covered[rb*KMAX +: KMAX] | grp;
          end
        end
      end
    end
    p.cols = cols_v;
    p.src  = src_v;
    p.user = user_v;
    p.n    = 9'(n);
    return p;
  endfunction

  localparam plan_t PLAN = make_plan();
  localparam int unsigned NTERMS = int'(PLAN.n);

  // Columns of row g left to be summed directly.
  function automatic logic [KMAX-1:0] rest_of(input int unsigned g);
    logic [KMAX-1:0] m;
    m = '0;
    for (int unsigned j = 0; j < KMAX; j++) m[j] = (shift_at(g, j) >= 0);
    for (int unsigned k = 0; k < NTERMS; k++)
      if (int'(PLAN.src[k]) == int'(g) || int'(PLAN.user[k]) == int'(g)) m &= ~PLAN.cols[k];
    return m;
  endfunction

  // Cyclic shift of a Z-bit block by the identity shifted by sh: y[t] = x[(t + sh) mod Z].
  function automatic logic [Z-1:0] circ(input logic [Z-1:0] x, input int sh);
    logic [Z-1:0] y;
    for (int unsigned t = 0; t < Z; t++) y[t] = x[(t + sh) % Z];
    return y;
  endfunction

  // ---------------------------------------------------------------------------------------
  // Shared terms.
  // ---------------------------------------------------------------------------------------
  logic [Z-1:0] term      [NTERMS];   // aligned to its source row
  logic [Z-1:0] term_user [NTERMS];   // the same sum aligned to its user row

  // Shift difference between the user and the source row of term k.
  function automatic int user_shift(input int unsigned k);
    for (int unsigned j = 0; j < KMAX; j++)
      if (PLAN.cols[k][j])
        return (shift_at(int'(PLAN.user[k]), j) - shift_at(int'(PLAN.src[k]), j) + int'(Z)) % int'(Z);
    return 0;
  endfunction

  for (genvar k = 0; k < NTERMS; k++) begin : g_term
    localparam int unsigned SRC = int'(PLAN.src[k]);
    localparam int          USH = user_shift(k);
    always_comb begin
      term[k] = '0;
      for (int unsigned j = 0; j < KMAX; j++)
        if (PLAN.cols[k][j]) term[k] ^= circ(s[j*Z +: Z], shift_at(SRC, j));
    end
    assign term_user[k] = circ(term[k], USH);
  end

  // ---------------------------------------------------------------------------------------
  // Row sums of the 30 rows.
  // ---------------------------------------------------------------------------------------
  logic [Z-1:0] row_sum [NROW];

  for (genvar g = 0; g < NROW; g++) begin : g_row
    localparam logic [KMAX-1:0] REST = rest_of(g);
    always_comb begin
      row_sum[g] = '0;
      for (int unsigned j = 0; j < KMAX; j++)
        if (REST[j]) row_sum[g] ^= circ(s[j*Z +: Z], shift_at(g, j));
      for (int unsigned k = 0; k < NTERMS; k++) begin
        if (int'(PLAN.src[k]) == g) row_sum[g] ^= term[k];
        if (int'(PLAN.user[k]) == g) row_sum[g] ^= term_user[k];
      end
    end
  end

  // ---------------------------------------------------------------------------------------
  // Code-rate multiplexer.
  // ---------------------------------------------------------------------------------------
  always_comb begin
    q = '0;
    case (rate)
      RATE_1_2: for (int unsigned r = 0; r < 12; r++) q[r*Z +: Z] = row_sum[r];
      RATE_2_3: for (int unsigned r = 0; r < 8;  r++) q[r*Z +: Z] = row_sum[12 + r];
      RATE_3_4: for (int unsigned r = 0; r < 6;  r++) q[r*Z +: Z] = row_sum[20 + r];
      default:  for (int unsigned r = 0; r < 4;  r++) q[r*Z +: Z] = row_sum[26 + r];
    endcase
  end

endmodule
