// sam_accumulator_tb: checks the short-term switching activity counters.
//
// Random iteration records are fed in windows of several lengths. A reference
// model here keeps its own counts: for every slot of the binding that needs
// an ordering, the earlier transfer on the bus (from the previous record when
// the pair wraps across iterations) and the slot's variable are compared bit
// by bit. After each window every row of every matrix is read back and
// compared; then `clear` must zero the counts. Records are also presented
// with rec_valid low, which must not count.
module sam_accumulator_tb;
  import dbr_pkg::*;
  localparam int MAXW = 50;
  localparam int CNT_W = $clog2(MAXW + 1);
  localparam int SLOT_W = $clog2(N_SLOT);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, rec_valid;
  record_t rec;
  logic [SLOT_W-1:0] rd_slot;
  bitidx_t rd_row;
  logic [WIDTH-1:0][CNT_W-1:0] rd_cost;
  int checks = 0, failures = 0;

  sam_accumulator #(.MAX_WINDOW(MAXW)) dut (.clk, .rst_n, .clear, .rec_valid, .rec,
    .rd_slot, .rd_row, .rd_cost);

  int ref_cnt [N_SLOT][WIDTH][WIDTH];
  record_t prev;

  task automatic ref_add(record_t r);
    for (int sl = 0; sl < int'(N_SLOT); sl++) begin
      int b, s, ps;
      word_t lw, rw;
      b = sl / N_STEP; s = sl % N_STEP;
      if (BINDING[b][s] == V_NONE) continue;
      // find the earlier transfer on this bus by walking back
      ps = -1;
      for (int d = 1; d <= int'(N_STEP); d++)
        if (ps < 0 && BINDING[b][(s - d + N_STEP) % N_STEP] != V_NONE) ps = (s - d + N_STEP) % N_STEP;
      if (ps < s && BINDING[b][ps] == BINDING[b][s]) continue;  // same value repeated
      rw = r[BINDING[b][s]];
      lw = (ps >= s) ? prev[BINDING[b][ps]] : r[BINDING[b][ps]];
      for (int i = 0; i < int'(WIDTH); i++)
        for (int j = 0; j < int'(WIDTH); j++)
          if (lw[i] != rw[j]) ref_cnt[sl][i][j]++;
    end
    prev = r;
  endtask

  task automatic compare(string tag);
    int bad = 0;
    for (int sl = 0; sl < int'(N_SLOT); sl++)
      for (int i = 0; i < int'(WIDTH); i++) begin
        rd_slot = SLOT_W'(sl); rd_row = bitidx_t'(i);
        #1;
        for (int j = 0; j < int'(WIDTH); j++)
          if (int'(rd_cost[j]) != ref_cnt[sl][i][j]) bad++;
      end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: %0d counts differ", tag, bad);
    end
  endtask

  task automatic ref_clear();
    for (int sl = 0; sl < int'(N_SLOT); sl++)
      for (int i = 0; i < int'(WIDTH); i++)
        for (int j = 0; j < int'(WIDTH); j++) ref_cnt[sl][i][j] = 0;
  endtask

  initial begin
    int lens [4];
    lens = '{30, 10, 50, 1};
    clear = 0; rec_valid = 0; rec = '0; rd_slot = '0; rd_row = '0;
    prev = '0;
    ref_clear();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 4; w++) begin
      for (int k = 0; k < lens[w]; k++) begin
        record_t r;
        for (int v = 0; v < int'(N_VAR); v++)
          // biased data: some variables have slowly changing upper bits
          r[v] = (v % 3 == 0) ? word_t'({4'h0, 12'($urandom)}) : word_t'($urandom);
        if ($urandom_range(0, 4) == 0) begin
          rec = ~r; rec_valid = 0; @(negedge clk);   // not counted
        end
        rec = r; rec_valid = 1;
        ref_add(r);
        @(negedge clk);
        rec_valid = 0;
      end
      compare($sformatf("window %0d", w));
      clear = 1; @(negedge clk); clear = 0;
      ref_clear();
      compare($sformatf("clear %0d", w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
