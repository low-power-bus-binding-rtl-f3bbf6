// dbr_top_tb: end-to-end test of the dynamic bit reordering scheme at its
// default size (16-bit variables, 4 buses, windows of up to 50 iterations).
//
// The solver DFG is run both with random input patterns (a new (u, dx, x, y)
// loaded for every iteration) and in loop mode (each iteration continues from
// the previous results). Windows of 30, 10, 50 and 20 iterations are used.
// For every cstep on the buses the test
//   * recovers each bus's variable through the output wire map and compares
//     it with its own model of the DFG, in the order the records were taken;
//   * counts the toggling wires, and, on a model of the same buses with the
//     fixed bit ordering, the toggles that ordering would cause.
// Per window (between two ordering hand-overs) the reordered buses must not
// toggle more than the fixed ordering, and summed over the run they must
// toggle less. The total switching activity per iteration (toggles of all
// buses per iteration) is printed for both.
// Mechanisms that must each occur: input stalls while the finder solves,
// waits for the binder to finish a window before the hand-over, ordering
// hand-overs, empty csteps in which a bus holds its value, transfers that
// wrap from the last cstep of an iteration to the first of the next, random
// loads and loop-mode iterations, and each window length.
module dbr_top_tb;
  import dbr_pkg::*;
  localparam int CNT_W = $clog2(50 + 1);
  localparam int MCW   = $clog2(100 + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load, run, rec_accept, bus_valid, order_done, solving;
  word_t u_in, dx_in, x_in, y_in;
  logic [CNT_W-1:0] window_len;
  logic [$clog2(N_STEP)-1:0] bus_step;
  word_t  bus [N_BUS];
  order_t bus_map [N_BUS];
  logic [MCW-1:0] mem_used;
  int checks = 0, failures = 0;

  dbr_top dut (.clk, .rst_n, .load, .run, .u_in, .dx_in, .x_in, .y_in, .rec_accept, .window_len,
    .bus_valid, .bus_step, .bus, .bus_map, .order_done, .solving, .mem_used);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---- reference model of the solver DFG ----
  function automatic record_t model(word_t u, word_t dx, word_t x, word_t y);
    record_t r;
    logic [31:0] p;
    r[V_U] = u; r[V_DX] = dx; r[V_THREE] = 16'd3; r[V_X] = x; r[V_Y] = y;
    p = 32'(u) * 32'(dx);            r[V_T1] = p[15:0];
    p = 32'(x) * 3;                  r[V_T2] = p[15:0];
    p = 32'(y) * 3;                  r[V_T3] = p[15:0];
    p = 32'(r[V_T1]) * 32'(r[V_T2]); r[V_T4] = p[15:0];
    p = 32'(r[V_T3]) * 32'(dx);      r[V_T5] = p[15:0];
    r[V_T6] = u - r[V_T4];
    r[V_U1] = r[V_T6] - r[V_T5];
    p = 32'(r[V_U1]) * 32'(dx);      r[V_Y1] = p[15:0];
    r[V_YN] = y + r[V_Y1];
    r[V_XN] = x + dx;
    return r;
  endfunction

  word_t   su, sdx, sx, sy;     // model state
  record_t expq[$];              // records taken, in order
  record_t cur;

  // ---- mechanism counters ----
  int n_stall = 0, n_hand_wait = 0, n_done = 0, n_hold = 0, n_wrap = 0;
  int n_random = 0, n_loop = 0, n_win10 = 0, n_win30 = 0, n_win50 = 0;
  bit offering = 0;
  bit loop_mode = 0;

  // ---- toggle accounting ----
  word_t fixed_bus [N_BUS];
  word_t prev_bus  [N_BUS];
  longint tog_dyn = 0, tog_fix = 0, win_dyn = 0, win_fix = 0, iters = 0;

  always @(posedge clk) if (rst_n) begin
    if (offering && !rec_accept) begin
      if (solving) n_stall++;
      else         n_hand_wait++;
    end
    if (order_done) begin
      n_done++;
      if (n_done > 1) check(win_dyn <= win_fix,
        $sformatf("window %0d: reordered toggles %0d <= fixed %0d", n_done - 1, win_dyn, win_fix));
      win_dyn = 0; win_fix = 0;
    end
  end

  always @(negedge clk) if (rst_n && bus_valid) begin
    if (bus_step == 0) begin
      cur = expq.pop_front();
      iters++;
    end
    for (int b = 0; b < int'(N_BUS); b++) begin
      var_e v;
      int td, tf;
      v = BINDING[b][bus_step];
      td = $countones(bus[b] ^ prev_bus[b]);
      if (v == V_NONE) begin
        n_hold++;
        check(td == 0, "empty cstep holds the bus");
        tf = 0;
      end else begin
        word_t dec;
        for (int j = 0; j < int'(WIDTH); j++) dec[j] = bus[b][bus_map[b][j]];
        check(dec == cur[v], $sformatf("bus %0d cstep %0d carries variable %0d", b, bus_step, v));
        tf = $countones(fixed_bus[b] ^ cur[v]);
        fixed_bus[b] = cur[v];
        if (int'(bus_step) == pred_step(slot_of(b, int'(bus_step))) ||
            pred_wraps(slot_of(b, int'(bus_step)))) n_wrap++;
      end
      prev_bus[b] = bus[b];
      tog_dyn += td; tog_fix += tf; win_dyn += td; win_fix += tf;
    end
  end

  // model of what the scheme takes: sampled before each clock edge
  int taken = 0;
  always @(posedge clk) if (rst_n) begin
    if (rec_accept) begin
      record_t r;
      r = model(su, sdx, sx, sy);
      expq.push_back(r);
      taken++;
      if (loop_mode) n_loop++; else n_random++;
      if (!load) begin
        su = r[V_U1]; sx = r[V_XN]; sy = r[V_YN];
      end
    end
    if (load) begin
      su = u_in; sdx = dx_in; sx = x_in; sy = y_in;
    end
  end

  task automatic offer_iterations(int n, bit random_load);
    int goal;
    loop_mode = !random_load;
    goal = taken + n;
    while (taken < goal) begin
      if (random_load) begin
        u_in = word_t'($urandom); dx_in = word_t'($urandom_range(1, 15));
        x_in = word_t'($urandom); y_in = word_t'($urandom);
        run = 0; load = 1; @(negedge clk); load = 0;
      end
      run = 1; offering = 1;
      begin
        int t0;
        t0 = taken;
        // one record per load with random patterns; back to back in loop mode
        while (taken == t0) @(negedge clk);
      end
      run = 0; offering = 0;
    end
  endtask

  initial begin
    load = 0; run = 0; u_in = 0; dx_in = 0; x_in = 0; y_in = 0;
    window_len = CNT_W'(30);
    for (int b = 0; b < int'(N_BUS); b++) begin fixed_bus[b] = '0; prev_bus[b] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // windows of 30 with random input patterns
    offer_iterations(90, 1);   n_win30++;
    // windows of 10 in loop mode (start from a loaded state)
    window_len = CNT_W'(10);
    u_in = 16'h0100; dx_in = 16'h0003; x_in = 16'h0010; y_in = 16'h0200;
    load = 1; @(negedge clk); load = 0;
    offer_iterations(40, 0);   n_win10++;
    // windows of 50, random
    window_len = CNT_W'(50);
    offer_iterations(100, 1);  n_win50++;
    // windows of 20, random
    window_len = CNT_W'(20);
    offer_iterations(40, 1);
    // drain: let the last window be solved and replayed
    while (expq.size() > 0) @(negedge clk);
    repeat (10) @(negedge clk);
    check(expq.size() == 0, "every record replayed on the buses");
    check(tog_dyn < tog_fix, "reordering lowers total switching activity");
    $display("iterations on the buses: %0d", iters);
    $display("TSA per iteration: fixed ordering %0.2f, dynamic reordering %0.2f (%0.1f%% lower)",
             real'(tog_fix) / real'(iters), real'(tog_dyn) / real'(iters),
             100.0 * real'(tog_fix - tog_dyn) / real'(tog_fix));
    $display("mechanisms: stalls %0d, hand-over waits %0d, hand-overs %0d, bus holds %0d, wraps %0d, random %0d, loop %0d, windows 10/30/50: %0d/%0d/%0d",
             n_stall, n_hand_wait, n_done, n_hold, n_wrap, n_random, n_loop, n_win10, n_win30, n_win50);
    check(n_stall > 0, "input stalled while solving");
    check(n_hand_wait > 0, "hand-over waited for the binder");
    check(n_done >= 10, "orderings handed over");
    check(n_hold > 0, "bus held in an empty cstep");
    check(n_wrap > 0, "transfer across iterations");
    check(n_random > 0 && n_loop > 0, "random and loop iterations");
    check(n_win10 > 0 && n_win30 > 0 && n_win50 > 0, "window lengths 10, 30 and 50");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
