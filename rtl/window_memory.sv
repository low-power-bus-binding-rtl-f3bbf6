// window_memory: the memory of the dynamic bit reordering scheme.
//
// The bus binder may only drive a window of iterations once the ordering
// computed from that very window is known. This memory therefore saves every
// incoming iteration record and holds it back until the optimal bit ordering
// finder signals `done`; each `done` releases the next release_len records
// (one window) to the bus binder, which then replays them in arrival order.
// While a released window is being replayed, the next window can already be
// written, so the memory holds up to two windows.
//
// Implementation: a circular buffer of DEPTH records (an array, which maps to
// a RAM) with a write pointer, a read pointer and a count of released but not
// yet read records.
// Interface: write side wr_valid / wr_ready / wr_data (wr_ready low when
// full); `done` with release_len releases records; read side rd_valid /
// rd_ready / rd_data, rd_valid high only for released records. `released`
// is the number of released records not yet read, `used` the occupancy.
// Reads and writes take one clock; rd_data is valid in the cycle rd_valid is
// high (combinational read of the head entry).
// The buffer structure, its size and the release count are this design's
// choices; the published scheme gives only the memory's purpose and its `done` input.
module window_memory
  import dbr_pkg::*;
#(
  parameter int unsigned DEPTH = 100,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_valid,
  output logic          wr_ready,
  input  record_t       wr_data,
  input  logic          done,
  input  logic [CW-1:0] release_len,
  output logic          rd_valid,
  input  logic          rd_ready,
  output record_t       rd_data,
  output logic [CW-1:0] released,
  output logic [CW-1:0] used
);

  record_t mem [DEPTH];
  logic [AW-1:0] wp_q, rp_q;
  logic [CW-1:0] used_q, rel_q;
  logic          wr_fire, rd_fire;

  assign wr_ready = (used_q < CW'(DEPTH));
  assign rd_valid = (rel_q != '0);
  assign wr_fire  = wr_valid && wr_ready;
  assign rd_fire  = rd_valid && rd_ready;
  assign rd_data  = mem[rp_q];
  assign released = rel_q;
  assign used     = used_q;

  // released count after this cycle; a release never exceeds what is stored
  logic [CW:0]   rel_sum, stored_n;
  logic [CW-1:0] rel_n;
  always_comb begin
    stored_n = {1'b0, used_q} + (CW+1)'(wr_fire) - (CW+1)'(rd_fire);
    rel_sum  = {1'b0, rel_q} - (CW+1)'(rd_fire) + (done ? {1'b0, release_len} : '0);
    rel_n    = (rel_sum > stored_n) ? stored_n[CW-1:0] : rel_sum[CW-1:0];
  end

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_fire) mem[wp_q] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q   <= '0;
      rp_q   <= '0;
      used_q <= '0;
      rel_q  <= '0;
    end else begin
      if (wr_fire) wp_q <= inc(wp_q);
      if (rd_fire) rp_q <= inc(rp_q);
      used_q <= used_q + CW'(wr_fire) - CW'(rd_fire);
      rel_q  <= rel_n;
    end
  end

  // reading never runs ahead of writing
  assert property (@(posedge clk) disable iff (!rst_n) rd_fire |-> used_q != '0);

endmodule
