// mwbm_solver: minimum weight perfect bipartite matching of an N x N cost
// matrix (the linear assignment problem).
//
// Left nodes are the N bits of the earlier variable on a bus (matrix rows),
// right nodes the N bits of the later one (columns); the cost of edge (i, j)
// is the short-term switching activity between left bit i and right bit j.
// A perfect matching of minimum total cost is the bit ordering that makes the
// fewest bus wires toggle.
//
// Method: the shortest augmenting path algorithm with row and column dual
// prices u, v, which is the augmentation phase of the Jonker-Volgenant
// assignment algorithm. Rows are added one by one; for each row a
// Dijkstra-like search over reduced costs c(i,j) - u(i) - v(j) grows a tree of
// columns until it reaches a free column, the prices are raised/lowered by the
// step lengths, and the matching is flipped along the path found. The result
// is optimal for any start; starting from zero prices without the
// Jonker-Volgenant initialisation heuristics (column reduction, reduction
// transfer, augmenting row reduction), which only shorten the search, is this
// design's simplification.
//
// Hardware: one search step per clock. In that cycle all N reduced costs of
// the row just added to the tree are formed in parallel, the minimum over the
// columns still outside the tree is found, and all prices are updated. The
// flip along the path takes one clock per column. Per row: 1 + k + k clocks
// for a path of k columns, so at most N * (2N + 1) clocks (528 for N = 16).
//
// Interface: pulse `start` while idle. The solver reads the cost matrix row by
// row: it presents rd_row and expects that row (one cost per column) on
// rd_cost in the same cycle; the matrix must stay stable until `done`.
// `done` pulses for one cycle when the matching is ready; order[j] is then the
// row matched to column j, u_dual / v_dual are the final dual prices (they
// certify optimality: u(i) + v(j) <= c(i,j) everywhere, with equality on the
// matched edges). Outputs hold until the next start.
module mwbm_solver #(
  parameter int unsigned N  = 16,
  parameter int unsigned CW = 6,
  localparam int unsigned IW = $clog2(N + 1),     // holds 0..N (N = none/dummy)
  localparam int unsigned PW = CW + $clog2(N) + 4 // signed price width
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic [IW-1:0]            rd_row,
  input  logic [N-1:0][CW-1:0]     rd_cost,
  output logic [N-1:0][IW-1:0]     order,
  output logic signed [N-1:0][PW-1:0] u_dual,
  output logic signed [N-1:0][PW-1:0] v_dual
);

  typedef logic [IW-1:0]        idx_t;
  typedef logic signed [PW-1:0] price_t;

  localparam idx_t   NONE = idx_t'(N);   // free column / dummy column
  localparam price_t INF  = {1'b0, {(PW-1){1'b1}}};

  typedef enum logic [2:0] {S_IDLE, S_ROW, S_STEP, S_AUG, S_DONE} state_e;
  state_e state_q;

  idx_t   p_q   [N+1];   // row matched to column j; entry N is the dummy column
  idx_t   way_q [N];     // previous column on the shortest path
  price_t u_q   [N];
  price_t v_q   [N];
  price_t minv_q[N];
  logic [N:0]   used_q;  // columns in the tree (bit N: dummy)
  logic [N-1:0] rused_q; // rows in the tree
  idx_t   row_q;         // row being added
  idx_t   j0_q;          // current column of the search / the flip

  // ---- one search step, combinational ----
  idx_t          i0;
  logic [N:0]    used_n;
  logic [N-1:0]  rused_n;
  price_t        cur    [N];
  price_t        minv_n [N];
  idx_t          way_n  [N];
  price_t        delta;
  idx_t          j1;

  assign i0     = p_q[j0_q];
  assign rd_row = i0;

  always_comb begin
    used_n  = used_q;
    used_n[j0_q] = 1'b1;
    rused_n = rused_q;
    if (i0 < NONE) rused_n[i0[$clog2(N)-1:0]] = 1'b1;
    delta = INF;
    j1    = NONE;
    for (int j = 0; j < int'(N); j++) begin
      cur[j]    = price_t'(rd_cost[j]) - u_q[i0[$clog2(N)-1:0]] - v_q[j];
      minv_n[j] = minv_q[j];
      way_n[j]  = way_q[j];
      if (!used_n[j]) begin
        if (cur[j] < minv_q[j]) begin
          minv_n[j] = cur[j];
          way_n[j]  = j0_q;
        end
        if (minv_n[j] < delta) begin
          delta = minv_n[j];
          j1    = idx_t'(j);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      for (int j = 0; j <= int'(N); j++) p_q[j] <= NONE;
      for (int j = 0; j < int'(N); j++) begin
        way_q[j] <= NONE; u_q[j] <= '0; v_q[j] <= '0; minv_q[j] <= INF;
      end
      used_q  <= '0;
      rused_q <= '0;
      row_q   <= '0;
      j0_q    <= NONE;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE: begin
          if (start) begin
            for (int j = 0; j <= int'(N); j++) p_q[j] <= NONE;
            for (int j = 0; j < int'(N); j++) begin
              u_q[j] <= '0; v_q[j] <= '0;
            end
            row_q   <= '0;
            state_q <= S_ROW;
          end else begin
            state_q <= S_IDLE;
          end
        end
        S_ROW: begin
          p_q[N]  <= row_q;
          j0_q    <= NONE;
          used_q  <= '0;
          rused_q <= '0;
          for (int j = 0; j < int'(N); j++) minv_q[j] <= INF;
          state_q <= S_STEP;
        end
        S_STEP: begin
          used_q  <= used_n;
          rused_q <= rused_n;
          for (int r = 0; r < int'(N); r++)
            if (rused_n[r]) u_q[r] <= u_q[r] + delta;
          for (int j = 0; j < int'(N); j++) begin
            way_q[j] <= way_n[j];
            if (used_n[j]) v_q[j]    <= v_q[j] - delta;
            else           minv_q[j] <= minv_n[j] - delta;
          end
          j0_q <= j1;
          if (p_q[j1] == NONE) state_q <= S_AUG;
        end
        S_AUG: begin
          // flip the matching along the path, one column per clock
          p_q[j0_q] <= p_q[way_q[j0_q[$clog2(N)-1:0]]];
          j0_q      <= way_q[j0_q[$clog2(N)-1:0]];
          if (way_q[j0_q[$clog2(N)-1:0]] == NONE) begin
            if (row_q == idx_t'(N - 1)) state_q <= S_DONE;
            else begin
              row_q   <= row_q + 1'b1;
              state_q <= S_ROW;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE) && (state_q != S_DONE);

  // done pulses in the first cycle of S_DONE
  logic done_seen_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_seen_q <= 1'b0;
    else        done_seen_q <= (state_q == S_DONE);
  end
  assign done = (state_q == S_DONE) && !done_seen_q;

  always_comb begin
    for (int j = 0; j < int'(N); j++) begin
      order[j]  = p_q[j];
      u_dual[j] = u_q[j];
      v_dual[j] = v_q[j];
    end
  end

endmodule
