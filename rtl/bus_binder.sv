// bus_binder: fixed bus binding with dynamic bit ordering.
//
// For each iteration record it plays the N_STEP csteps of the schedule: in
// cstep s, bus b carries the variable that the fixed binding table (dbr_pkg)
// assigns to (b, s); a bus with no variable in that cstep keeps its value.
// Which wire carries which bit is not fixed. Each bus keeps a wire map
// (map[b][j] = wire that carries bit j of the variable now on bus b). When a
// new variable is driven, the ordering of that slot, order[j] = bit i of the
// previous variable on the bus, places bit j on the wire that bit i occupied:
//   map_new[j] = map_old[order[j]],   bus[map_new[j]] = value[j].
// A wire then toggles exactly when the two matched bits differ, so the bus
// toggles as often as the matching's cost. The map carries over between
// slots and between iterations, so every transfer pair, including the one
// from the last cstep of an iteration to the first of the next, gets its own
// optimal ordering. A receiver recovers bit j as bus[map[j]]; the maps are
// output for that purpose.
//
// Interface: load_order (the finder's done) copies new_order into the active
// ordering set; it must come while the binder is idle (between windows).
// Records arrive by rec_valid / rec_ready. bus / bus_map / bus_step are
// registered; bus_valid marks a cycle with a new cstep, bus_step its cstep
// (0-based). One record takes N_STEP clocks; records can follow back to back.
// The binding table and the idea of reordering bits per transfer pair follow
// the published method; the wire-map chaining, the hold of idle buses and the
// registered outputs are this design's choices.
module bus_binder
  import dbr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load_order,
  input  order_t  new_order [N_SLOT],
  input  logic    rec_valid,
  output logic    rec_ready,
  input  record_t rec,
  output logic    idle,
  output logic    bus_valid,
  output logic [$clog2(N_STEP)-1:0] bus_step,
  output word_t   bus     [N_BUS],
  output order_t  bus_map [N_BUS]
);

  localparam int unsigned SW = $clog2(N_STEP);

  order_t  act_q [N_SLOT];
  record_t rec_q;
  logic    active_q;
  logic [SW-1:0] step_q;
  word_t   bus_q [N_BUS];
  order_t  map_q [N_BUS];
  logic    fire;

  assign rec_ready = !active_q || (step_q == SW'(N_STEP - 1));
  assign fire      = rec_valid && rec_ready;
  assign idle      = !active_q;
  assign bus       = bus_q;
  assign bus_map   = map_q;

  // next bus value and wire map of every bus for the current cstep
  word_t  bus_n [N_BUS];
  order_t map_n [N_BUS];
  always_comb begin
    for (int b = 0; b < int'(N_BUS); b++) begin
      logic [$clog2(N_SLOT)-1:0] sl;
      var_e v;
      order_t o;
      sl = $clog2(N_SLOT)'(slot_of(b, int'(step_q)));
      v  = BINDING[b][step_q];
      o  = act_q[sl];
      bus_n[b] = bus_q[b];
      map_n[b] = map_q[b];
      if (v != V_NONE) begin
        for (int j = 0; j < int'(WIDTH); j++) begin
          map_n[b][j] = map_q[b][o[j]];
          bus_n[b][map_n[b][j]] = rec_q[v][j];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int sl = 0; sl < int'(N_SLOT); sl++) act_q[sl] <= identity_order();
      for (int b = 0; b < int'(N_BUS); b++) begin
        bus_q[b] <= '0;
        map_q[b] <= identity_order();
      end
      rec_q     <= '0;
      active_q  <= 1'b0;
      step_q    <= '0;
      bus_valid <= 1'b0;
      bus_step  <= '0;
    end else begin
      if (load_order) act_q <= new_order;
      bus_valid <= active_q;
      if (active_q) begin
        bus_q    <= bus_n;
        map_q    <= map_n;
        bus_step <= step_q;
        step_q   <= (step_q == SW'(N_STEP - 1)) ? '0 : step_q + 1'b1;
        if (step_q == SW'(N_STEP - 1)) active_q <= 1'b0;
      end
      if (fire) begin
        rec_q    <= rec;
        active_q <= 1'b1;
        step_q   <= '0;
      end
    end
  end

  // new orderings may only arrive between windows
  assert property (@(posedge clk) disable iff (!rst_n) load_order |-> !active_q);

endmodule
