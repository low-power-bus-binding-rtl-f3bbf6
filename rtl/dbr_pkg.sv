// dbr_pkg: shared types and constants of the dynamic bit reordering bus scheme.
//
// The scheme drives the variables of a scheduled data flow graph (DFG) onto a
// fixed set of buses. Which variable travels on which bus in which control
// step (cstep) is fixed by a bus binding computed offline; what changes at run
// time is the bit ordering: which bus wire carries which bit of a variable.
//
// This package holds
//   * the word width (16 bits per variable, as in the DIFF_EQ example),
//   * the variable numbering of the differential equation solver DFG,
//   * the fixed bus binding table (4 buses x 6 csteps) of the example binding
//     with the lower total switching activity,
//   * helper functions that derive, from the binding table, the "transfer
//     pairs": for every occupied (bus, cstep) slot, the slot that drove the
//     same bus just before it (empty slots leave the bus unchanged, and the
//     last occupied cstep of an iteration precedes the first one of the next).
// Everything that depends on the binding is computed from the table by these
// functions at elaboration time, so another binding only needs a new table.
package dbr_pkg;

  localparam int unsigned WIDTH    = 16;  // bits per variable
  localparam int unsigned N_VAR    = 15;  // variables of the DIFF_EQ DFG
  localparam int unsigned N_BUS    = 4;   // bus groups
  localparam int unsigned N_STEP   = 6;   // csteps per iteration (cstep 7 = cstep 1 of the next)
  localparam int unsigned N_SLOT   = N_BUS * N_STEP;
  localparam int unsigned BIT_W    = $clog2(WIDTH);
  localparam int unsigned VAR_W    = $clog2(N_VAR + 1);

  typedef logic [WIDTH-1:0]  word_t;
  typedef logic [BIT_W-1:0]  bitidx_t;
  // A bit ordering between two consecutive transfers: for every bit j of the
  // later variable, the bit of the earlier variable that shares its wire.
  typedef bitidx_t [WIDTH-1:0] order_t;
  // One iteration's worth of variable values.
  typedef word_t [N_VAR-1:0] record_t;

  // Variable numbering (order of the long-term switching activity matrix).
  typedef enum logic [VAR_W-1:0] {
    V_U = 0, V_DX = 1, V_THREE = 2, V_X = 3, V_Y = 4,
    V_T1 = 5, V_T2 = 6, V_T3 = 7, V_T4 = 8, V_T5 = 9, V_T6 = 10,
    V_U1 = 11, V_Y1 = 12, V_XN = 13, V_YN = 14,
    V_NONE = 15
  } var_e;

  // Fixed bus binding, [bus][cstep-1]. V_NONE marks a cstep in which the bus
  // carries no variable and keeps its previous value.
  typedef var_e binding_t [N_BUS][N_STEP];
  localparam binding_t BINDING = '{
    '{V_THREE, V_THREE, V_T3, V_T6, V_NONE, V_Y  },   // bus 1
    '{V_U,     V_T1,    V_T4, V_T5, V_NONE, V_Y1 },   // bus 2
    '{V_X,     V_T2,    V_U,  V_NONE, V_U1, V_X  },   // bus 3
    '{V_DX,    V_Y,     V_DX, V_NONE, V_DX, V_DX }    // bus 4
  };

  // Flat slot number of (bus, cstep).
  function automatic int unsigned slot_of(int unsigned b, int unsigned s);
    return b * N_STEP + s;
  endfunction

  function automatic bit slot_used(int unsigned sl);
    return BINDING[sl / N_STEP][sl % N_STEP] != V_NONE;
  endfunction

  function automatic var_e slot_var(int unsigned sl);
    return BINDING[sl / N_STEP][sl % N_STEP];
  endfunction

  // cstep (0-based) of the occupied slot that drove the bus before slot sl,
  // searching backwards and wrapping into the previous iteration.
  function automatic int unsigned pred_step(int unsigned sl);
    int unsigned s = sl % N_STEP;
    int unsigned k;
    for (int d = 1; d <= int'(N_STEP); d++) begin
      k = (s + N_STEP - d) % N_STEP;
      if (BINDING[sl / N_STEP][k] != V_NONE) return k;
    end
    return s;
  endfunction

  // The predecessor belongs to the previous iteration.
  function automatic bit pred_wraps(int unsigned sl);
    return pred_step(sl) >= (sl % N_STEP);
  endfunction

  function automatic var_e pred_var(int unsigned sl);
    return BINDING[sl / N_STEP][pred_step(sl)];
  endfunction

  // A pair needs a matching unless it is the same value sent twice: the same
  // variable of the same iteration, for which the identity ordering already
  // gives zero toggles.
  function automatic bit slot_needs_match(int unsigned sl);
    return slot_used(sl) && !(!pred_wraps(sl) && pred_var(sl) == slot_var(sl));
  endfunction

  function automatic int unsigned num_matched_slots();
    int unsigned n = 0;
    for (int unsigned sl = 0; sl < N_SLOT; sl++) if (slot_needs_match(sl)) n++;
    return n;
  endfunction

  function automatic order_t identity_order();
    order_t o;
    for (int unsigned j = 0; j < WIDTH; j++) o[j] = bitidx_t'(j);
    return o;
  endfunction

endpackage
