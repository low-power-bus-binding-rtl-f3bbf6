// diffeq_dfg: the differential equation solver data flow graph whose
// variables travel over the buses.
//
// One loop iteration of the solver evaluates ten operators on 16-bit words:
//   OP1 t1 = u * dx      OP2 t2 = 3 * x       OP3 x' = x + dx
//   OP4 t4 = t1 * t2     OP5 t3 = 3 * y       OP6 t6 = u - t4
//   OP7 t5 = t3 * dx     OP8 u1 = t6 - t5     OP9 y1 = u1 * dx
//   OP10 y' = y + y1
// x', y' and u1 are the loop-carried values: they become x, y and u of the
// next iteration. The operator list and the data dependences follow the
// solver's DFG; the arithmetic (two's complement, products and sums kept to
// their low 16 bits) is this design's choice.
//
// Interface: the state (u, dx, x, y) is loaded by `load` with the *_in values.
// While `run` is high (and a state has been loaded) the module offers the
// record of all 15 variables of the current iteration on out_rec with
// out_valid high; every accepted record (out_valid &&
// out_ready) advances the state to the next iteration. A load in the same
// cycle wins over the advance. The operators are evaluated combinationally
// from the state registers, so a new record can be taken every clock.
module diffeq_dfg
  import dbr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  logic    run,
  input  word_t   u_in,
  input  word_t   dx_in,
  input  word_t   x_in,
  input  word_t   y_in,
  output logic    out_valid,
  input  logic    out_ready,
  output record_t out_rec
);

  word_t u_q, dx_q, x_q, y_q;
  logic  loaded_q;

  word_t t1, t2, t3, t4, t5, t6, u1, y1, xn, yn;
  localparam word_t THREE = word_t'(3);

  always_comb begin
    t1 = u_q * dx_q;
    t2 = THREE * x_q;
    t3 = THREE * y_q;
    t4 = t1 * t2;
    t5 = t3 * dx_q;
    t6 = u_q - t4;
    u1 = t6 - t5;
    y1 = u1 * dx_q;
    yn = y_q + y1;
    xn = x_q + dx_q;
  end

  always_comb begin
    out_rec          = '0;
    out_rec[V_U]     = u_q;
    out_rec[V_DX]    = dx_q;
    out_rec[V_THREE] = THREE;
    out_rec[V_X]     = x_q;
    out_rec[V_Y]     = y_q;
    out_rec[V_T1]    = t1;
    out_rec[V_T2]    = t2;
    out_rec[V_T3]    = t3;
    out_rec[V_T4]    = t4;
    out_rec[V_T5]    = t5;
    out_rec[V_T6]    = t6;
    out_rec[V_U1]    = u1;
    out_rec[V_Y1]    = y1;
    out_rec[V_XN]    = xn;
    out_rec[V_YN]    = yn;
  end

  assign out_valid = loaded_q && run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_q <= '0; dx_q <= '0; x_q <= '0; y_q <= '0;
      loaded_q <= 1'b0;
    end else if (load) begin
      u_q <= u_in; dx_q <= dx_in; x_q <= x_in; y_q <= y_in;
      loaded_q <= 1'b1;
    end else if (out_valid && out_ready) begin
      u_q <= u1;
      x_q <= xn;
      y_q <= yn;
    end
  end

endmodule
