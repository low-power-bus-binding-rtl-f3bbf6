// bus_binder_tb: checks the bus binder with random bit orderings.
//
// A random permutation is loaded as the ordering of every slot, then random
// records are streamed in back to back. For every cstep the test checks, with
// its own model of the wire maps:
//   * each bus carries its bound variable: bus[b][map[b][j]] == value[j];
//   * the wire map follows the chaining rule map_new[j] = map_old[order[j]];
//   * a bus with no variable in that cstep is unchanged;
//   * the number of toggling wires equals the number of matched bit pairs
//     (earlier bit order[j], later bit j) that differ;
//   * the cstep number counts 0..5 and one record takes exactly 6 clocks.
// New orderings are loaded again between bursts, while the binder is idle.
module bus_binder_tb;
  import dbr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load_order, rec_valid, rec_ready, idle, bus_valid;
  logic [$clog2(N_STEP)-1:0] bus_step;
  order_t  new_order [N_SLOT];
  record_t rec;
  word_t   bus [N_BUS];
  order_t  bus_map [N_BUS];
  int checks = 0, failures = 0;

  bus_binder dut (.clk, .rst_n, .load_order, .new_order, .rec_valid, .rec_ready, .rec,
    .idle, .bus_valid, .bus_step, .bus, .bus_map);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  order_t  act [N_SLOT];
  order_t  mmap [N_BUS];
  word_t   mbus [N_BUS];
  record_t sent[$];
  record_t cur;
  int      step_exp = 0;
  int      first_valid = -1, last_valid = -1, n_steps = 0;
  int      cyc = 0;

  always @(posedge clk) cyc++;

  function automatic order_t rand_perm();
    order_t o = identity_order();
    for (int k = int'(WIDTH) - 1; k > 0; k--) begin
      int r = $urandom_range(0, k);
      bitidx_t t = o[k];
      o[k] = o[r]; o[r] = t;
    end
    return o;
  endfunction

  // check every emitted cstep against the model
  always @(negedge clk) if (rst_n && bus_valid) begin
    if (bus_step == 0) cur = sent.pop_front();
    check(int'(bus_step) == step_exp, "cstep sequence");
    step_exp = (step_exp + 1) % N_STEP;
    if (first_valid < 0) first_valid = cyc;
    last_valid = cyc;
    n_steps++;
    for (int b = 0; b < int'(N_BUS); b++) begin
      var_e v;
      v = BINDING[b][bus_step];
      if (v == V_NONE) begin
        check(bus[b] == mbus[b] && bus_map[b] == mmap[b], "idle bus holds");
      end else begin
        order_t o;
        order_t nm;
        word_t  nb;
        int toggles, mism;
        o = act[b * N_STEP + int'(bus_step)];
        toggles = 0; mism = 0;
        nb = mbus[b];
        for (int j = 0; j < int'(WIDTH); j++) begin
          nm[j] = mmap[b][o[j]];
          nb[nm[j]] = cur[v][j];
        end
        for (int w = 0; w < int'(WIDTH); w++) toggles += int'(bus[b][w] != mbus[b][w]);
        // matched pair (earlier bit o[j], later bit j) share wire nm[j]
        for (int j = 0; j < int'(WIDTH); j++) mism += int'(mbus[b][mmap[b][o[j]]] != cur[v][j]);
        check(bus_map[b] == nm, "wire map chaining");
        check(bus[b] == nb, "bus value");
        begin
          bit dec_ok;
          dec_ok = 1;
          for (int j = 0; j < int'(WIDTH); j++) if (bus[b][bus_map[b][j]] != cur[v][j]) dec_ok = 0;
          check(dec_ok, "variable recovered through the wire map");
        end
        check(toggles == mism, "toggles equal mismatched matched pairs");
        mmap[b] = nm;
        mbus[b] = nb;
      end
    end
  end

  task automatic load_random_orders();
    for (int sl = 0; sl < int'(N_SLOT); sl++) begin
      new_order[sl] = rand_perm();
    end
    @(negedge clk);
    while (!idle) @(negedge clk);
    load_order = 1;
    for (int sl = 0; sl < int'(N_SLOT); sl++) act[sl] = new_order[sl];
    @(negedge clk);
    load_order = 0;
  endtask

  initial begin
    load_order = 0; rec_valid = 0; rec = '0;
    for (int sl = 0; sl < int'(N_SLOT); sl++) new_order[sl] = identity_order();
    for (int b = 0; b < int'(N_BUS); b++) begin mmap[b] = identity_order(); mbus[b] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int burst = 0; burst < 5; burst++) begin
      int n;
      n = 20;
      load_random_orders();
      first_valid = -1; n_steps = 0;
      for (int k = 0; k < n; k++) begin
        record_t r;
        for (int v = 0; v < int'(N_VAR); v++) r[v] = word_t'($urandom);
        rec = r; rec_valid = 1;
        @(posedge clk);
        while (!rec_ready) @(posedge clk);
        sent.push_back(r);
        @(negedge clk);
      end
      rec_valid = 0;
      repeat (N_STEP + 3) @(negedge clk);
      check(n_steps == n * int'(N_STEP), "all csteps emitted");
      check(last_valid - first_valid + 1 == n * int'(N_STEP), "back-to-back: 6 clocks per record");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
