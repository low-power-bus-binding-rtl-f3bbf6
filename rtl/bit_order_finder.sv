// bit_order_finder: the optimal bit ordering finder of the dynamic bit
// reordering scheme.
//
// It watches the iteration records (all variables of one DFG iteration) as
// they enter the scheme and, periodically, finds for every pair of
// consecutive transfers on a bus the bit ordering with the fewest toggles in
// the data just seen:
//   1. ACCUMULATE: for window_len iterations, the sam_accumulator counts, per
//      transfer pair, how often each (earlier bit i, later bit j) differs:
//      the short-term switching activity matrix.
//   2. SOLVE: input is paused; for every slot of the binding that needs an
//      ordering, the mwbm_solver computes the minimum weight perfect matching
//      of that 16 x 16 matrix; the matching is stored as order[j] = i.
//      Pairs that repeat the same value (same variable of the same
//      iteration) keep the identity ordering without solving.
//   3. HAND OVER: when the bus binder has replayed the previous window
//      (hand_ok), `done` is raised for one cycle: the memory releases the
//      window just measured, and the binder takes new_order. Counting for
//      the next window starts at once.
// The steps repeat for every window, so the orderings follow the statistics
// of the real input data.
//
// Interface: rec / rec_valid is one record accepted by the scheme (the caller
// only asserts rec_valid while in_ready is high); window_len (1..MAX_WINDOW,
// sampled at each window start) is the number of iterations per window;
// win_size tells the memory how many records `done` releases.
// Timing: up to N * (2N + 1) clocks per solved pair (at most 528 with 16-bit
// words), plus one clock per slot of the binding.
// The sequencing and the pausing of input during SOLVE are this design's
// choices; the three steps and the `done` / new ordering outputs follow the
// scheme's block diagram and algorithm.
module bit_order_finder
  import dbr_pkg::*;
#(
  parameter int unsigned MAX_WINDOW = 50,
  localparam int unsigned CNT_W     = $clog2(MAX_WINDOW + 1),
  localparam int unsigned SLOT_W    = $clog2(N_SLOT)
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] window_len,
  input  logic             rec_valid,
  input  record_t          rec,
  output logic             in_ready,
  input  logic             hand_ok,
  output logic             done,
  output order_t           new_order [N_SLOT],
  output logic             solving,
  output logic [CNT_W-1:0] win_size
);

  localparam int unsigned IW = $clog2(WIDTH + 1);

  // which slots get a solved ordering
  function automatic logic [N_SLOT-1:0] match_mask();
    logic [N_SLOT-1:0] m;
    for (int unsigned sl = 0; sl < N_SLOT; sl++) m[sl] = slot_needs_match(sl);
    return m;
  endfunction
  localparam logic [N_SLOT-1:0] MATCH = match_mask();

  typedef enum logic [2:0] {S_ACC, S_PICK, S_WAIT, S_HAND} state_e;
  state_e state_q;

  logic [CNT_W-1:0]  cnt_q, win_q;
  logic [SLOT_W:0]   sl_q;
  logic              sam_clear, sol_start, sol_busy, sol_done;
  logic [IW-1:0]     sol_row;
  logic [WIDTH-1:0][CNT_W-1:0] sam_row;
  logic [WIDTH-1:0][IW-1:0]    sol_order;
  logic signed [WIDTH-1:0][CNT_W+BIT_W+3:0] sol_u, sol_v;

  // window length clamped to 1..MAX_WINDOW, sampled with the first record
  logic [CNT_W-1:0] win_len, win_eff;
  assign win_len = (window_len == '0) ? CNT_W'(1)
                 : (window_len > CNT_W'(MAX_WINDOW)) ? CNT_W'(MAX_WINDOW) : window_len;
  assign win_eff = (cnt_q == '0) ? win_len : win_q;

  assign win_size  = win_q;   // length of the window being measured / handed over
  assign in_ready  = (state_q == S_ACC);
  assign done      = (state_q == S_HAND) && hand_ok;
  assign sam_clear = done;
  assign solving   = (state_q == S_PICK) || (state_q == S_WAIT);
  assign sol_start = (state_q == S_PICK) && (sl_q < (SLOT_W+1)'(N_SLOT)) && MATCH[sl_q[SLOT_W-1:0]];

  sam_accumulator #(.MAX_WINDOW(MAX_WINDOW)) u_sam (
    .clk, .rst_n,
    .clear     (sam_clear),
    .rec_valid (rec_valid && in_ready),
    .rec,
    .rd_slot   (sl_q[SLOT_W-1:0]),
    .rd_row    (bitidx_t'(sol_row)),
    .rd_cost   (sam_row)
  );

  mwbm_solver #(.N(WIDTH), .CW(CNT_W)) u_solver (
    .clk, .rst_n,
    .start   (sol_start),
    .busy    (sol_busy),
    .done    (sol_done),
    .rd_row  (sol_row),
    .rd_cost (sam_row),
    .order   (sol_order),
    .u_dual  (sol_u),
    .v_dual  (sol_v)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_ACC;
      cnt_q   <= '0;
      win_q   <= CNT_W'(1);
      sl_q    <= '0;
      for (int sl = 0; sl < int'(N_SLOT); sl++) new_order[sl] <= identity_order();
    end else begin
      unique case (state_q)
        S_ACC: begin
          if (cnt_q == '0) win_q <= win_len;
          if (rec_valid) begin
            if (cnt_q + 1'b1 >= win_eff) begin
              cnt_q   <= '0;
              sl_q    <= '0;
              state_q <= S_PICK;
            end else begin
              cnt_q <= cnt_q + 1'b1;
            end
          end
        end
        S_PICK: begin
          if (sl_q >= (SLOT_W+1)'(N_SLOT)) state_q <= S_HAND;
          else if (sol_start)              state_q <= S_WAIT;
          else                             sl_q    <= sl_q + 1'b1;
        end
        S_WAIT: begin
          if (sol_done) begin
            for (int j = 0; j < int'(WIDTH); j++)
              new_order[sl_q[SLOT_W-1:0]][j] <= bitidx_t'(sol_order[j]);
            sl_q    <= sl_q + 1'b1;
            state_q <= S_PICK;
          end
        end
        S_HAND: begin
          if (hand_ok) state_q <= S_ACC;
        end
        default: state_q <= S_ACC;
      endcase
    end
  end

endmodule
