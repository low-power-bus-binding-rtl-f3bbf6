// bit_order_finder_tb: checks the optimal bit ordering finder over several
// windows.
//
// Random iteration records with skewed bit statistics (some variables change
// only in a few bits, some are bit-rotated copies of others) are offered
// while in_ready is high. The test keeps its own short-term switching
// activity counts and, after every `done`, checks for each slot:
//   * slots that need an ordering get a permutation whose cost (sum of the
//     counts of the matched bit pairs) equals the optimum found by a software
//     Hungarian method here, and is never above the cost of the fixed ordering;
//   * slots that repeat a value keep the identity ordering.
// It also checks that exactly window_len records are taken per window, that
// no record is taken while solving, that `done` waits for hand_ok, and that
// the solve time stays within 17 pairs x (528 + 2) + 24 clocks.
module bit_order_finder_tb;
  import dbr_pkg::*;
  localparam int MAXW = 50;
  localparam int CNT_W = $clog2(MAXW + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [CNT_W-1:0] window_len;
  logic rec_valid, in_ready, hand_ok, done, solving;
  record_t rec;
  order_t new_order [N_SLOT];
  logic [CNT_W-1:0] win_size;
  int checks = 0, failures = 0;

  bit_order_finder #(.MAX_WINDOW(MAXW)) dut (.clk, .rst_n, .window_len, .rec_valid, .rec,
    .in_ready, .hand_ok, .done, .new_order, .solving, .win_size);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int cnt [N_SLOT][WIDTH][WIDTH];
  record_t prev = '0;

  function automatic int pred_s(int b, int s);
    for (int d = 1; d <= int'(N_STEP); d++)
      if (BINDING[b][(s - d + N_STEP) % N_STEP] != V_NONE) return (s - d + N_STEP) % N_STEP;
    return s;
  endfunction

  function automatic bit needs(int sl);
    int b = sl / N_STEP, s = sl % N_STEP, ps;
    if (BINDING[b][s] == V_NONE) return 0;
    ps = pred_s(b, s);
    return !(ps < s && BINDING[b][ps] == BINDING[b][s]);
  endfunction

  task automatic count(record_t r);
    for (int sl = 0; sl < int'(N_SLOT); sl++) if (needs(sl)) begin
      int b, s, ps;
      word_t lw, rw;
      b = sl / N_STEP; s = sl % N_STEP; ps = pred_s(b, s);
      rw = r[BINDING[b][s]];
      lw = (ps >= s) ? prev[BINDING[b][ps]] : r[BINDING[b][ps]];
      for (int i = 0; i < int'(WIDTH); i++)
        for (int j = 0; j < int'(WIDTH); j++) cnt[sl][i][j] += int'(lw[i] != rw[j]);
    end
    prev = r;
  endtask

  // software Hungarian method (rows 1..n, columns 1..n, 0 = dummy)
  function automatic int optimum(int sl);
    localparam int n = WIDTH;
    int u[n+1], v[n+1], p[n+1], way[n+1], minv[n+1];
    bit used[n+1];
    int res;
    for (int k = 0; k <= n; k++) begin u[k] = 0; v[k] = 0; p[k] = 0; way[k] = 0; end
    for (int i = 1; i <= n; i++) begin
      int j0;
      p[0] = i; j0 = 0;
      for (int k = 0; k <= n; k++) begin minv[k] = 1 << 29; used[k] = 0; end
      do begin
        int i0, delta, j1;
        used[j0] = 1; i0 = p[j0]; delta = 1 << 29; j1 = 0;
        for (int j = 1; j <= n; j++) if (!used[j]) begin
          int c = cnt[sl][i0-1][j-1] - u[i0] - v[j];
          if (c < minv[j]) begin minv[j] = c; way[j] = j0; end
          if (minv[j] < delta) begin delta = minv[j]; j1 = j; end
        end
        for (int j = 0; j <= n; j++)
          if (used[j]) begin u[p[j]] += delta; v[j] -= delta; end
          else minv[j] -= delta;
        j0 = j1;
      end while (p[j0] != 0);
      do begin
        int j1 = way[j0];
        p[j0] = p[j1]; j0 = j1;
      end while (j0 != 0);
    end
    res = 0;
    for (int j = 1; j <= n; j++) res += cnt[sl][p[j]-1][j-1];
    return res;
  endfunction

  task automatic check_orders(int w);
    int n_opt = 0, gain = 0;
    for (int sl = 0; sl < int'(N_SLOT); sl++) begin
      if (needs(sl)) begin
        bit [WIDTH-1:0] seen = '0;
        int c = 0, id = 0, opt;
        for (int j = 0; j < int'(WIDTH); j++) begin
          seen[new_order[sl][j]] = 1'b1;
          c  += cnt[sl][new_order[sl][j]][j];
          id += cnt[sl][j][j];
        end
        opt = optimum(sl);
        check(seen == '1, $sformatf("w%0d slot %0d permutation", w, sl));
        check(c == opt, $sformatf("w%0d slot %0d cost %0d optimum %0d", w, sl, c, opt));
        check(c <= id, $sformatf("w%0d slot %0d not worse than fixed ordering", w, sl));
        gain += id - c;
        n_opt++;
      end else begin
        check(new_order[sl] == identity_order(), $sformatf("w%0d slot %0d identity", w, sl));
      end
    end
    $display("window %0d: %0d pairs solved, %0d fewer toggles than the fixed ordering", w, n_opt, gain);
  endtask

  function automatic record_t gen_rec();
    record_t r;
    for (int v = 0; v < int'(N_VAR); v++) begin
      word_t x = word_t'($urandom);
      case (v % 4)
        0: r[v] = x & 16'h0f0f;                       // half the bits stuck at 0
        1: r[v] = {x[7:0], x[7:0]};                   // duplicated byte
        2: r[v] = x;
        default: r[v] = x | 16'hf000;
      endcase
    end
    // a bit-rotated copy makes a non-identity ordering clearly better
    r[V_T2] = {r[V_U][10:0], r[V_U][15:11]};
    return r;
  endfunction

  int taken, solve_start, solve_len;
  bit in_solve;
  always @(posedge clk) if (rst_n) begin
    if (rec_valid && in_ready) taken++;
    check(!(rec_valid && in_ready && solving), "no record taken while solving");
    if (solving && !in_solve) begin in_solve = 1; solve_len = 0; end
    if (in_solve) solve_len++;
    if (!solving) in_solve = 0;
  end

  initial begin
    int wl [4];
    wl = '{30, 10, 50, 20};
    window_len = CNT_W'(30); rec_valid = 0; hand_ok = 0; rec = '0; taken = 0;
    for (int sl = 0; sl < int'(N_SLOT); sl++)
      for (int i = 0; i < int'(WIDTH); i++)
        for (int j = 0; j < int'(WIDTH); j++) cnt[sl][i][j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 4; w++) begin
      int hold;
      window_len = CNT_W'(wl[w]);
      taken = 0;
      // offer records until the finder stops taking them
      while (!solving) begin
        rec = gen_rec();
        rec_valid = ($urandom_range(0, 4) != 0);
        @(posedge clk);
        if (rec_valid && in_ready) count(rec);
        @(negedge clk);
      end
      rec_valid = 0;
      check(taken == wl[w], $sformatf("window %0d took %0d records", w, taken));
      while (solving) @(negedge clk);
      check(solve_len <= 17 * 530 + 24, $sformatf("solve time %0d clocks", solve_len));
      // hold hand_ok low for a while: no done may appear
      hold = $urandom_range(1, 30);
      for (int k = 0; k < hold; k++) begin
        check(!done && !in_ready, "done waits for hand_ok");
        @(negedge clk);
      end
      hand_ok = 1;
      #1;
      check(done, "done with hand_ok");
      check(int'(win_size) == wl[w], "win_size reports the window");
      check_orders(w);
      @(negedge clk);
      hand_ok = 0;
      for (int sl = 0; sl < int'(N_SLOT); sl++)
        for (int i = 0; i < int'(WIDTH); i++)
          for (int j = 0; j < int'(WIDTH); j++) cnt[sl][i][j] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
