// sc_act_top: activation-function unit with a stochastic-computing tanh and
// sigmoid side by side.
//
// Both units receive the same signed operand and start strobe and run in
// lock step, so one evaluation yields tanh(x) and sigmoid(x) together after
// STREAM_LEN + 1 cycles. Each unit is a complete SC-PWL circuit with its own
// ROMs, generators and counter, as the document reports the two functions
// as separate circuits; putting them under one handshake is this design's
// choice.
//
// Interface: x is sign-magnitude with 8 fraction bits (sm_t). start is taken
// when busy is low. done pulses for one cycle when y_tanh and y_sigmoid are
// valid; both hold their values until the next done. The sign bit of
// y_sigmoid is always 0 (the sigmoid is positive); it is kept so that both
// results have the same sm_t type.
module sc_act_top
  import sc_pwl_pkg::*;
#(
  parameter int unsigned      STREAM_LEN = 256,
  parameter logic [MAG_W-1:0] SEED_X     = 8'hC1,
  parameter logic [MAG_W-1:0] SEED_A     = 8'h5A
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  sm_t  x,
  output logic busy,
  output logic done,
  output sm_t  y_tanh,
  output sm_t  y_sigmoid
);

  logic busy_t, busy_s, done_t, done_s;

  sc_pwl_act #(
    .FUNC(FUNC_TANH), .STREAM_LEN(STREAM_LEN), .SEED_X(SEED_X), .SEED_A(SEED_A)
  ) u_tanh (
    .clk, .rst_n, .start, .x, .busy(busy_t), .done(done_t), .y(y_tanh)
  );

  sc_pwl_act #(
    .FUNC(FUNC_SIGMOID), .STREAM_LEN(STREAM_LEN), .SEED_X(SEED_X), .SEED_A(SEED_A)
  ) u_sigmoid (
    .clk, .rst_n, .start, .x, .busy(busy_s), .done(done_s), .y(y_sigmoid)
  );

  assign busy = busy_t | busy_s;
  assign done = done_t & done_s;

  // The two units share start, reset and timing, so they agree every cycle.
  a_lockstep: assert property (@(posedge clk) busy_t == busy_s && done_t == done_s)
    else $error("sc_act_top: tanh and sigmoid units out of step");

endmodule
