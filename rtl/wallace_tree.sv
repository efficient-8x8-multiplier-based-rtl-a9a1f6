// wallace_tree - compressor-based Wallace reduction of an N x N partial-
// product matrix to two rows.
//
// Column j of the matrix holds every pp[r][c] with r + c = j. Each stage
// reduces all columns at once with 7-input compressors (compressor_5_2),
// 5-input compressors (compressor_4_2), GDI full adders and GDI half adders,
// following the schedule table PLAN, built at elaboration from the per-column
// rule in wallace_pkg. A counter in
// column j leaves its sum in column j, its carry in column j+1 and, for the
// two compressors, its cout in column j+2. Outputs that would land at or
// above column 2N are left open: their weight is at least 2^(2N), and since
// the tree preserves the exact arithmetic sum of its inputs and that sum is
// below 2^(2N), these outputs are always 0.
//
// For N = 8 the reduction takes NSTAGES = 3 stages and uses 3 seven-input
// compressors, 9 five-input compressors, 11 full adders and 7 half adders.
//
// Storage: g_lvl[s].bits[j][k] is bit k of column j before stage s; slots above a
// column's height are tied to 0. row_a + row_b equals the sum of all partial
// products, weighted by column. Purely combinational.
module wallace_tree #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   pp [N],   // pp[r][c] has weight 2^(r+c)
  output logic [2*N-1:0] row_a,
  output logic [2*N-1:0] row_b
);
  import wallace_pkg::*;

  localparam int W    = 2 * N;
  localparam int MAXS = N + 2;  // more stages than any N x N tree needs

  // PLAN[s][j]: how column j is reduced in stage s. Columns W and W+1 stay
  // empty so that j+1 and j+2 can be looked up without range checks.
  typedef col_plan_t [W+1:0]    stage_plan_t;
  typedef stage_plan_t [MAXS:0] plan_t;

  function automatic plan_t build_plan();
    plan_t     t;
    int        h  [W];
    int        nh [W];
    int        c1 [W];
    int        c2 [W];
    int        cin;
    col_plan_t cp;
    for (int s = 0; s <= MAXS; s++)
      for (int j = 0; j < W + 2; j++) t[s][j] = '0;
    for (int j = 0; j < W; j++) h[j] = initial_height(N, j);
    for (int s = 0; s <= MAXS; s++) begin
      for (int j = 0; j < W; j++) begin
        cin     = ((j >= 1) ? c1[j-1] : 0) + ((j >= 2) ? c2[j-2] : 0);
        cp      = allocate(h[j], cin);
        t[s][j] = cp;
        c1[j]   = n_counters(cp);
        c2[j]   = n_couts(cp);
        nh[j]   = int'(cp.pass) + c1[j] + cin;
      end
      for (int j = 0; j < W; j++) h[j] = nh[j];
    end
    return t;
  endfunction

  function automatic int count_stages(plan_t t);
    for (int s = 0; s <= MAXS; s++) begin
      int hmax = 0;
      for (int j = 0; j < W; j++)
        if (int'(t[s][j].height) > hmax) hmax = int'(t[s][j].height);
      if (hmax <= 2) return s;
    end
    return MAXS;
  endfunction

  function automatic int tallest(plan_t t);
    int hmax = 2;
    for (int s = 0; s <= MAXS; s++)
      for (int j = 0; j < W; j++)
        if (int'(t[s][j].height) > hmax) hmax = int'(t[s][j].height);
    return hmax;
  endfunction

  // kind: 0 = 7-input compressors, 1 = 5-input compressors,
  // 2 = full adders, 3 = half adders (used stages only)
  function automatic int count_cells(plan_t t, int ns, int kind);
    int total = 0;
    for (int s = 0; s < ns; s++)
      for (int j = 0; j < W; j++)
        case (kind)
          0:       total += int'(t[s][j].n73);
          1:       total += int'(t[s][j].n53);
          2:       total += int'(t[s][j].nfa);
          default: total += int'(t[s][j].nha);
        endcase
    return total;
  endfunction

  localparam plan_t PLAN    = build_plan();
  localparam int    NSTAGES = count_stages(PLAN);
  localparam int    HMAX    = tallest(PLAN);
  localparam int    NUM_C73 = count_cells(PLAN, NSTAGES, 0);
  localparam int    NUM_C53 = count_cells(PLAN, NSTAGES, 1);
  localparam int    NUM_FA  = count_cells(PLAN, NSTAGES, 2);
  localparam int    NUM_HA  = count_cells(PLAN, NSTAGES, 3);

  // The rule must reach two rows within MAXS stages.
  if (NSTAGES >= MAXS) begin : g_no_convergence
    $error("wallace_tree: reduction schedule did not converge for N = %0d", N);
  end

  // One array per level: g_lvl[s].bits[j][k] is bit k of column j before
  // stage s (level NSTAGES holds the two final rows).
  for (genvar s = 0; s <= NSTAGES; s++) begin : g_lvl
    logic bits [W][HMAX];
  end

  // ---- stage 0: partial products sorted into columns ----
  for (genvar j = 0; j < W; j++) begin : g_in
    localparam int H0 = int'(PLAN[0][j].height);
    localparam int LO = (j > N - 1) ? j - (N - 1) : 0;
    for (genvar k = 0; k < HMAX; k++) begin : g_slot
      if (k < H0) begin : g_pp
        assign g_lvl[0].bits[j][k] = pp[j-LO-k][LO+k];
      end else begin : g_zero
        assign g_lvl[0].bits[j][k] = 1'b0;
      end
    end
  end

  // ---- reduction stages ----
  for (genvar s = 0; s < NSTAGES; s++) begin : g_stage
    for (genvar j = 0; j < W; j++) begin : g_col
      localparam col_plan_t P   = PLAN[s][j];
      localparam col_plan_t P1  = PLAN[s][j+1];
      localparam col_plan_t P2  = PLAN[s][j+2];
      localparam col_plan_t NXT = PLAN[s+1][j];
      // first slot in column j+1 / j+2 (next stage) taken by this column's outputs
      localparam int CARRY_BASE = int'(P1.pass) + n_counters(P1);
      localparam int COUT_BASE  = int'(P2.pass) + n_counters(P2) + n_counters(P1);
      localparam int FA_BASE    = 7 * int'(P.n73) + int'(P.in53);
      localparam int HA_BASE    = FA_BASE + 3 * int'(P.nfa);

      // 7-input compressors
      for (genvar k = 0; k < int'(P.n73); k++) begin : g_c73
        logic sum, carry, cout;
        compressor_5_2 u_c (
          .i1  (g_lvl[s].bits[j][7*k+0]), .i2(g_lvl[s].bits[j][7*k+1]), .i3(g_lvl[s].bits[j][7*k+2]),
          .i4  (g_lvl[s].bits[j][7*k+3]), .i5(g_lvl[s].bits[j][7*k+4]),
          .cin1(g_lvl[s].bits[j][7*k+5]), .cin2(g_lvl[s].bits[j][7*k+6]),
          .sum (sum), .carry(carry), .cout(cout)
        );
        assign g_lvl[s+1].bits[j][int'(P.pass) + k] = sum;
        if (j + 1 < W) begin : g_carry
          assign g_lvl[s+1].bits[j+1][CARRY_BASE + k] = carry;
        end
        if (j + 2 < W) begin : g_cout
          assign g_lvl[s+1].bits[j+2][COUT_BASE + k] = cout;
        end
      end

      // 5-input compressor (fifth input tied low when only four bits remain)
      if (P.n53 != 0) begin : g_c53
        localparam int B = 7 * int'(P.n73);
        localparam int K = int'(P.n73);
        logic sum, carry, cout, cin;
        if (int'(P.in53) == 5) begin : g_cin
          assign cin = g_lvl[s].bits[j][B+4];
        end else begin : g_cin0
          assign cin = 1'b0;
        end
        compressor_4_2 u_c (
          .i1 (g_lvl[s].bits[j][B+0]), .i2(g_lvl[s].bits[j][B+1]), .i3(g_lvl[s].bits[j][B+2]),
          .i4 (g_lvl[s].bits[j][B+3]), .cin(cin),
          .sum(sum), .carry(carry), .cout(cout)
        );
        assign g_lvl[s+1].bits[j][int'(P.pass) + K] = sum;
        if (j + 1 < W) begin : g_carry
          assign g_lvl[s+1].bits[j+1][CARRY_BASE + K] = carry;
        end
        if (j + 2 < W) begin : g_cout
          assign g_lvl[s+1].bits[j+2][COUT_BASE + K] = cout;
        end
      end

      // full adder
      if (P.nfa != 0) begin : g_fa
        localparam int K = int'(P.n73) + int'(P.n53);
        logic sum, carry;
        gdi_full_adder u_fa (
          .a(g_lvl[s].bits[j][FA_BASE+0]), .b(g_lvl[s].bits[j][FA_BASE+1]), .cin(g_lvl[s].bits[j][FA_BASE+2]),
          .sum(sum), .carry(carry)
        );
        assign g_lvl[s+1].bits[j][int'(P.pass) + K] = sum;
        if (j + 1 < W) begin : g_carry
          assign g_lvl[s+1].bits[j+1][CARRY_BASE + K] = carry;
        end
      end

      // half adder
      if (P.nha != 0) begin : g_ha
        localparam int K = int'(P.n73) + int'(P.n53) + int'(P.nfa);
        logic sum, carry;
        gdi_half_adder u_ha (
          .a(g_lvl[s].bits[j][HA_BASE+0]), .b(g_lvl[s].bits[j][HA_BASE+1]),
          .sum(sum), .carry(carry)
        );
        assign g_lvl[s+1].bits[j][int'(P.pass) + K] = sum;
        if (j + 1 < W) begin : g_carry
          assign g_lvl[s+1].bits[j+1][CARRY_BASE + K] = carry;
        end
      end

      // bits passed through, then unused slots of the next stage
      for (genvar q = 0; q < int'(P.pass); q++) begin : g_pass
        assign g_lvl[s+1].bits[j][q] = g_lvl[s].bits[j][n_used(P) + q];
      end
      for (genvar q = int'(NXT.height); q < HMAX; q++) begin : g_zero
        assign g_lvl[s+1].bits[j][q] = 1'b0;
      end
    end
  end

  // ---- the two remaining rows ----
  for (genvar j = 0; j < W; j++) begin : g_out
    assign row_a[j] = g_lvl[NSTAGES].bits[j][0];
    assign row_b[j] = g_lvl[NSTAGES].bits[j][1];
  end
endmodule
