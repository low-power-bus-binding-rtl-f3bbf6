// sam_accumulator: short-term switching activity matrices (SAM) between the
// bits of consecutive bus transfers.
//
// For every bus slot that needs a bit ordering (see dbr_pkg), the earlier
// transfer on that bus is the "left" variable and the slot's own variable is
// the "right" one. For each pair (left bit i, right bit j) the block counts in
// how many iterations of the current window the two bits differ, i.e. how
// often a wire carrying left bit i and then right bit j would toggle. Dividing
// by the window length gives the average switching activity of the short-term
// SAM; the matching only needs the counts, so no division is done.
// When the left transfer belongs to the previous iteration (the bus wraps
// from the last cstep to the first), its bits are taken from the record of the
// previous iteration, which is kept in a register.
//
// Interface: `clear` zeroes all counters (start of a window). Each cycle with
// rec_valid adds one iteration record. rd_slot / rd_row select one row of one
// matrix; rd_cost returns that row (one count per right bit j) combinationally.
// Counters saturate at their maximum; with windows up to MAX_WINDOW
// iterations they never reach it.
// Counting only the pairs that the fixed binding places next to each other
// (rather than every pair of variables) is this design's choice: no other pair
// ever meets on a bus.
module sam_accumulator
  import dbr_pkg::*;
#(
  parameter int unsigned MAX_WINDOW = 50,
  localparam int unsigned CNT_W     = $clog2(MAX_WINDOW + 1),
  localparam int unsigned SLOT_W    = $clog2(N_SLOT)
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              rec_valid,
  input  record_t           rec,
  input  logic [SLOT_W-1:0] rd_slot,
  input  bitidx_t           rd_row,
  output logic [WIDTH-1:0][CNT_W-1:0] rd_cost
);

  typedef logic [CNT_W-1:0] cnt_t;
  typedef cnt_t [WIDTH-1:0][WIDTH-1:0] mat_t;

  record_t prev_q;
  mat_t    cnt_w [N_SLOT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         prev_q <= '0;
    else if (rec_valid) prev_q <= rec;
  end

  for (genvar sl = 0; sl < int'(N_SLOT); sl++) begin : g_slot
    if (slot_needs_match(sl)) begin : g_cnt
      localparam var_e RV = slot_var(sl);
      localparam var_e LV = pred_var(sl);
      localparam bit   WR = pred_wraps(sl);
      word_t lw, rw;
      mat_t  m_q;
      assign cnt_w[sl] = m_q;
      assign rw = rec[RV];
      assign lw = WR ? prev_q[LV] : rec[LV];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          m_q <= '0;
        end else if (clear) begin
          m_q <= '0;
        end else if (rec_valid) begin
          for (int i = 0; i < int'(WIDTH); i++)
            for (int j = 0; j < int'(WIDTH); j++)
              if ((lw[i] ^ rw[j]) && m_q[i][j] != '1)
                m_q[i][j] <= m_q[i][j] + 1'b1;
        end
      end
    end else begin : g_none
      assign cnt_w[sl] = '0;
    end
  end

  always_comb begin
    rd_cost = '0;
    if (rd_slot < SLOT_W'(N_SLOT)) rd_cost = cnt_w[rd_slot][rd_row];
  end

endmodule
