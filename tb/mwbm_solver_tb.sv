// mwbm_solver_tb: self-checking test of the assignment solver.
//
// Two solvers are driven with random cost matrices:
//   * a 16 x 16 one (the bus width), checked with an LP certificate: the
//     result must be a permutation, the returned dual prices must satisfy
//     u(i) + v(j) <= c(i,j) for every edge and u(i) + v(j) = c(i,j) on every
//     matched edge, which proves the matching has minimum cost;
//   * a 6 x 6 one, whose cost is compared with an exhaustive search over all
//     720 permutations.
// Special matrices (all zero, identity-favouring, anti-diagonal) are included.
// The number of clocks from start to done must not exceed N * (2N + 1).
module mwbm_solver_tb;
  localparam int N1 = 16, N2 = 6, CW = 6;
  localparam int IW1 = $clog2(N1 + 1), IW2 = $clog2(N2 + 1);
  localparam int PW1 = CW + $clog2(N1) + 4, PW2 = CW + $clog2(N2) + 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- 16 x 16 ----
  logic [CW-1:0] c1 [N1][N1];
  logic start1, busy1, done1;
  logic [IW1-1:0] row1;
  logic [N1-1:0][CW-1:0] cost1;
  logic [N1-1:0][IW1-1:0] ord1;
  logic signed [N1-1:0][PW1-1:0] u1, v1;
  always_comb for (int j = 0; j < N1; j++) cost1[j] = (row1 < N1) ? c1[row1[3:0]][j] : '0;
  mwbm_solver #(.N(N1), .CW(CW)) dut1 (.clk, .rst_n, .start(start1), .busy(busy1), .done(done1),
    .rd_row(row1), .rd_cost(cost1), .order(ord1), .u_dual(u1), .v_dual(v1));

  // ---- 6 x 6 ----
  logic [CW-1:0] c2 [N2][N2];
  logic start2, busy2, done2;
  logic [IW2-1:0] row2;
  logic [N2-1:0][CW-1:0] cost2;
  logic [N2-1:0][IW2-1:0] ord2;
  logic signed [N2-1:0][PW2-1:0] u2, v2;
  always_comb for (int j = 0; j < N2; j++) cost2[j] = (row2 < N2) ? c2[row2][j] : '0;
  mwbm_solver #(.N(N2), .CW(CW)) dut2 (.clk, .rst_n, .start(start2), .busy(busy2), .done(done2),
    .rd_row(row2), .rd_cost(cost2), .order(ord2), .u_dual(u2), .v_dual(v2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // exhaustive minimum over permutations of 6
  int best;
  task automatic perm_search(int k, bit [N2-1:0] taken, int acc);
    if (k == N2) begin
      if (acc < best) best = acc;
      return;
    end
    for (int r = 0; r < N2; r++)
      if (!taken[r]) begin
        bit [N2-1:0] t2 = taken;
        t2[r] = 1'b1;
        perm_search(k + 1, t2, acc + int'(c2[r][k]));
      end
  endtask

  task automatic run1(int kind);
    int cyc;
    bit [N1-1:0] seen;
    for (int i = 0; i < N1; i++)
      for (int j = 0; j < N1; j++)
        case (kind)
          0: c1[i][j] = CW'($urandom_range(0, 50));
          1: c1[i][j] = '0;
          2: c1[i][j] = (i == j) ? CW'(0) : CW'($urandom_range(1, 50));
          default: c1[i][j] = (i + j == N1 - 1) ? CW'(3) : CW'($urandom_range(4, 63));
        endcase
    @(negedge clk); start1 = 1; @(negedge clk); start1 = 0;
    cyc = 1;
    while (!done1) begin @(negedge clk); cyc++; end
    check(cyc <= N1 * (2 * N1 + 1) + 2, $sformatf("16x16 latency %0d", cyc));
    seen = '0;
    for (int j = 0; j < N1; j++) if (ord1[j] < N1) seen[ord1[j][3:0]] = 1'b1;
    check(seen == '1, "16x16 result is a permutation");
    begin
      bit feas = 1, tight = 1;
      for (int i = 0; i < N1; i++)
        for (int j = 0; j < N1; j++)
          if (int'($signed(u1[i])) + int'($signed(v1[j])) > int'(c1[i][j])) feas = 0;
      for (int j = 0; j < N1; j++)
        if (ord1[j] < N1 && int'($signed(u1[ord1[j][3:0]])) + int'($signed(v1[j])) != int'(c1[ord1[j][3:0]][j])) tight = 0;
      check(feas, "16x16 duals feasible");
      check(tight, "16x16 matched edges tight (optimal)");
    end
    if (kind == 1 || kind == 2) begin
      int tot = 0;
      for (int j = 0; j < N1; j++) tot += int'(c1[ord1[j][3:0]][j]);
      check(tot == 0, "16x16 zero-cost matching found");
    end
    if (kind == 3) begin
      bit anti = 1;
      for (int j = 0; j < N1; j++) if (ord1[j] != IW1'(N1 - 1 - j)) anti = 0;
      check(anti, "16x16 anti-diagonal found");
    end
  endtask

  task automatic run2();
    int tot = 0;
    bit [N2-1:0] seen = '0;
    for (int i = 0; i < N2; i++)
      for (int j = 0; j < N2; j++) c2[i][j] = CW'($urandom_range(0, 50));
    @(negedge clk); start2 = 1; @(negedge clk); start2 = 0;
    while (!done2) @(negedge clk);
    for (int j = 0; j < N2; j++) begin
      if (ord2[j] < N2) begin
        seen[ord2[j]] = 1'b1;
        tot += int'(c2[ord2[j]][j]);
      end
    end
    best = 1 << 30;
    perm_search(0, '0, 0);
    check(seen == '1, "6x6 permutation");
    check(tot == best, $sformatf("6x6 cost %0d vs exhaustive %0d", tot, best));
  endtask

  initial begin
    start1 = 0; start2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run1(1); run1(2); run1(3);
    for (int t = 0; t < 40; t++) run1(0);
    for (int t = 0; t < 60; t++) run2();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
