// diffeq_dfg_tb: checks the solver DFG against a reference model.
//
// Loads random (u, dx, x, y), compares all 15 variables of the record with
// values computed here from the operator list, then lets the solver run for
// several iterations on its own results (x <- x', y <- y', u <- u1) and checks
// every record again. Stalling (out_ready low) must hold the state.
module diffeq_dfg_tb;
  import dbr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    load, run, out_valid, out_ready;
  word_t   u_in, dx_in, x_in, y_in;
  record_t out_rec;
  int checks = 0, failures = 0;

  diffeq_dfg dut (.clk, .rst_n, .load, .run, .u_in, .dx_in, .x_in, .y_in,
                  .out_valid, .out_ready, .out_rec);

  word_t mu, mdx, mx, my;   // reference state

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

  task automatic check_rec(string tag);
    record_t e;
    e = model(mu, mdx, mx, my);
    checks++;
    if (out_rec !== e || !out_valid) begin
      failures++;
      $display("FAIL %s: got %h exp %h", tag, out_rec, e);
    end
  endtask

  initial begin
    load = 0; run = 1; out_ready = 0; u_in = 0; dx_in = 0; x_in = 0; y_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (out_valid) begin failures++; $display("FAIL valid before load"); end
    for (int t = 0; t < 50; t++) begin
      u_in = word_t'($urandom); dx_in = word_t'($urandom);
      x_in = word_t'($urandom); y_in = word_t'($urandom);
      load = 1; @(negedge clk); load = 0;
      mu = u_in; mdx = dx_in; mx = x_in; my = y_in;
      check_rec("loaded");
      for (int k = 0; k < 8; k++) begin
        record_t e;
        e = model(mu, mdx, mx, my);
        out_ready = ($urandom_range(0, 3) != 0);
        run = ($urandom_range(0, 5) != 0);
        @(negedge clk);
        if (out_ready && run) begin
          mu = e[V_U1]; mx = e[V_XN]; my = e[V_YN];
        end
        run = 1; #1;
        check_rec(out_ready ? "advance" : "stall");
      end
      out_ready = 0;
      run = 0; #1;
      checks++; if (out_valid) begin failures++; $display("FAIL valid while not running"); end
      run = 1;
    end
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
