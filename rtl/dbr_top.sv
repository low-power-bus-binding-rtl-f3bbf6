// dbr_top: low power bus transfer of the differential equation solver with
// dynamic bit reordering.
//
// The solver's DFG (diffeq_dfg) produces the 15 variables of each loop
// iteration. Every record goes both to the optimal bit ordering finder and
// to the memory. The finder measures the short-term switching activity of
// each transfer pair of the fixed bus binding over a window of window_len
// iterations, solves one minimum weight bipartite matching per pair and
// raises `done`; the memory then releases that same window to the bus binder,
// which drives the four 16-bit buses cstep by cstep with the new bit
// orderings. While the binder replays a window, the next window is measured.
// The DFG is stalled (its out_ready is low) while the finder solves or the
// memory is full.
//
// Interface:
//   load, u_in, dx_in, x_in, y_in  load the solver state (u, dx, x, y); without
//                                   load the solver runs on its own results
//   run                             let the solver offer iterations
//   rec_accept                      a record entered the scheme this cycle
//   window_len                      iterations per short-term window (1..50)
//   bus, bus_map, bus_valid, bus_step  buses, their wire maps (bit j of the
//                                   value on bus b is bus[b][bus_map[b][j]]),
//                                   new-cstep strobe and cstep number
//   order_done, solving, mem_used   status: new ordering handed over, finder
//                                   solving, records held in the memory
// Timing: a window of W iterations is replayed W * 6 clocks after it was
// measured plus the solve time (at most 17 pairs x 528 clocks).
// The block structure (finder, memory, binder; `done` and new bit ordering
// between them) follows the scheme's block diagram; the flow control is this
// design's choice.
module dbr_top
  import dbr_pkg::*;
#(
  parameter int unsigned MAX_WINDOW = 50,
  localparam int unsigned CNT_W     = $clog2(MAX_WINDOW + 1),
  localparam int unsigned DEPTH     = 2 * MAX_WINDOW,
  localparam int unsigned MCW       = $clog2(DEPTH + 1)
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             run,
  input  word_t            u_in,
  input  word_t            dx_in,
  input  word_t            x_in,
  input  word_t            y_in,
  output logic             rec_accept,
  input  logic [CNT_W-1:0] window_len,
  output logic             bus_valid,
  output logic [$clog2(N_STEP)-1:0] bus_step,
  output word_t            bus     [N_BUS],
  output order_t           bus_map [N_BUS],
  output logic             order_done,
  output logic             solving,
  output logic [MCW-1:0]   mem_used
);

  record_t rec, mem_rec;
  logic    dfg_valid, fin_ready, mem_wr_ready, mem_rd_valid, bind_ready, bind_idle;
  logic    done, hand_ok;
  logic [CNT_W-1:0] win_size;
  logic [MCW-1:0]   released;
  order_t  new_order [N_SLOT];

  assign rec_accept = dfg_valid && fin_ready && mem_wr_ready;
  assign hand_ok    = (released == '0) && bind_idle;
  assign order_done = done;

  diffeq_dfg u_dfg (
    .clk, .rst_n, .load, .run, .u_in, .dx_in, .x_in, .y_in,
    .out_valid (dfg_valid),
    .out_ready (fin_ready && mem_wr_ready),
    .out_rec   (rec)
  );

  bit_order_finder #(.MAX_WINDOW(MAX_WINDOW)) u_finder (
    .clk, .rst_n, .window_len,
    .rec_valid (rec_accept),
    .rec,
    .in_ready  (fin_ready),
    .hand_ok,
    .done,
    .new_order,
    .solving,
    .win_size
  );

  window_memory #(.DEPTH(DEPTH)) u_mem (
    .clk, .rst_n,
    .wr_valid    (dfg_valid && fin_ready),
    .wr_ready    (mem_wr_ready),
    .wr_data     (rec),
    .done,
    .release_len (MCW'(win_size)),
    .rd_valid    (mem_rd_valid),
    .rd_ready    (bind_ready),
    .rd_data     (mem_rec),
    .released,
    .used        (mem_used)
  );

  bus_binder u_binder (
    .clk, .rst_n,
    .load_order (done),
    .new_order,
    .rec_valid  (mem_rd_valid),
    .rec_ready  (bind_ready),
    .rec        (mem_rec),
    .idle       (bind_idle),
    .bus_valid,
    .bus_step,
    .bus,
    .bus_map
  );

endmodule
