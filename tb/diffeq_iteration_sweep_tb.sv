// diffeq_iteration_sweep_tb: switching activity of the DIFF_EQ buses against
// the short-term window length.
//
// The differential equation solver is run with random input patterns (a new
// (u, dx, x, y) per iteration) through the full scheme at its default size.
// The window length is swept over 10, 20, 30, 40 and 50 iterations, 600
// iterations each. For every replayed cstep the test recovers each variable
// through the wire map and checks it, counts the toggles of the reordered
// buses and of a model of the same buses with the fixed bit ordering, and
// prints the total switching activity per iteration (TSA) for both and the
// reduction per window length. Checks: every transfer is lossless, each
// window length lowers the TSA, and the reduction with 10-iteration windows
// is larger than with 50-iteration windows (short windows see less uniform
// statistics).
module diffeq_iteration_sweep_tb;
  import dbr_pkg::*;
  localparam int CNT_W = $clog2(50 + 1);
  localparam int MCW   = $clog2(100 + 1);
  localparam int PER   = 600;
  localparam int NPH   = 5;

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

  word_t   su, sdx, sx, sy;
  record_t expq[$];
  int      phq[$];
  record_t cur;
  int      cur_ph;
  int      phase = 0;
  int      taken = 0;

  word_t  fixed_bus [N_BUS];
  word_t  prev_bus  [N_BUS];
  longint tog_dyn [NPH], tog_fix [NPH], iters [NPH];

  always @(posedge clk) if (rst_n) begin
    if (rec_accept) begin
      expq.push_back(model(su, sdx, sx, sy));
      phq.push_back(phase);
      taken++;
    end
    if (load) begin
      su = u_in; sdx = dx_in; sx = x_in; sy = y_in;
    end
  end

  always @(negedge clk) if (rst_n && bus_valid) begin
    if (bus_step == 0) begin
      cur = expq.pop_front();
      cur_ph = phq.pop_front();
      iters[cur_ph]++;
    end
    for (int b = 0; b < int'(N_BUS); b++) begin
      var_e v;
      v = BINDING[b][bus_step];
      tog_dyn[cur_ph] += $countones(bus[b] ^ prev_bus[b]);
      if (v != V_NONE) begin
        word_t dec;
        for (int j = 0; j < int'(WIDTH); j++) dec[j] = bus[b][bus_map[b][j]];
        check(dec == cur[v], "lossless transfer");
        tog_fix[cur_ph] += $countones(fixed_bus[b] ^ cur[v]);
        fixed_bus[b] = cur[v];
      end
      prev_bus[b] = bus[b];
    end
  end

  initial begin
    real red [NPH];
    load = 0; run = 0; u_in = 0; dx_in = 0; x_in = 0; y_in = 0;
    window_len = CNT_W'(10);
    for (int b = 0; b < int'(N_BUS); b++) begin fixed_bus[b] = '0; prev_bus[b] = '0; end
    for (int p = 0; p < NPH; p++) begin tog_dyn[p] = 0; tog_fix[p] = 0; iters[p] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPH; p++) begin
      phase = p;
      window_len = CNT_W'(10 * (p + 1));
      for (int k = 0; k < PER; k++) begin
        int t0;
        u_in = word_t'($urandom); dx_in = word_t'($urandom);
        x_in = word_t'($urandom); y_in = word_t'($urandom);
        load = 1; @(negedge clk); load = 0;
        run = 1; t0 = taken;
        while (taken == t0) @(negedge clk);
        run = 0;
      end
    end
    while (expq.size() > 0) @(negedge clk);
    repeat (10) @(negedge clk);
    for (int p = 0; p < NPH; p++) begin
      red[p] = 100.0 * real'(tog_fix[p] - tog_dyn[p]) / real'(tog_fix[p]);
      $display("window %0d iterations: TSA fixed %0.2f, reordered %0.2f, reduction %0.1f%%",
               10 * (p + 1), real'(tog_fix[p]) / real'(iters[p]), real'(tog_dyn[p]) / real'(iters[p]), red[p]);
      check(iters[p] == PER, "all iterations replayed");
      check(tog_dyn[p] < tog_fix[p], "reordering lowers TSA");
    end
    check(red[0] > red[NPH-1], "shorter windows give a larger reduction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
