// window_memory_tb: checks the window memory against a queue model.
//
// Records are written with random gaps; `done` releases windows of random
// length. The test checks that reads only happen for released records, that
// they come out in write order with the written data, that `released` and
// `used` track the model, and that the memory refuses writes when all DEPTH
// entries are taken (the memory is filled to the brim once).
module window_memory_tb;
  import dbr_pkg::*;
  localparam int DEPTH = 100;
  localparam int CW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_valid, wr_ready, done, rd_valid, rd_ready;
  record_t wr_data, rd_data;
  logic [CW-1:0] release_len, released, used;
  int checks = 0, failures = 0;
  int full_seen = 0;

  window_memory #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_valid, .wr_ready, .wr_data,
    .done, .release_len, .rd_valid, .rd_ready, .rd_data, .released, .used);

  record_t q[$];
  int rel;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic record_t rnd_rec();
    record_t r;
    for (int v = 0; v < int'(N_VAR); v++) r[v] = word_t'($urandom);
    return r;
  endfunction

  // model update on each clock edge, checks just before it
  always @(posedge clk) if (rst_n) begin
    bit wf, rf;
    wf = wr_valid && wr_ready;
    rf = rd_valid && rd_ready;
    check(rd_valid == (rel > 0), "rd_valid iff released records");
    check(int'(released) == rel && int'(used) == q.size(), "released/used counts");
    check(wr_ready == (q.size() < DEPTH), "wr_ready iff not full");
    if (!wr_ready) full_seen++;
    if (rf) begin
      check(q.size() > 0 && rd_data == q[0], "read data in order");
      void'(q.pop_front());
      rel--;
    end
    if (wf) q.push_back(wr_data);
    if (done) rel = (rel + int'(release_len) > q.size()) ? q.size() : rel + int'(release_len);
  end

  initial begin
    wr_valid = 0; rd_ready = 0; done = 0; release_len = '0; wr_data = '0;
    rel = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // phase 1: fill completely, nothing released
    while (wr_ready) begin
      wr_valid = 1; wr_data = rnd_rec(); rd_ready = 1; @(negedge clk);
    end
    wr_valid = 1; wr_data = rnd_rec(); @(negedge clk);   // refused
    wr_valid = 0;
    // phase 2: release in windows, random traffic
    for (int t = 0; t < 3000; t++) begin
      wr_valid = ($urandom_range(0, 2) != 0);
      wr_data  = rnd_rec();
      rd_ready = ($urandom_range(0, 3) != 0);
      done     = ($urandom_range(0, 40) == 0);
      release_len = CW'($urandom_range(1, 50));
      @(negedge clk);
      done = 0;
    end
    check(full_seen > 0, "full condition reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
