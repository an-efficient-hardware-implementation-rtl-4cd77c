// sc_pwl_pkg: types and constants shared by the stochastic-computing
// piecewise-linear (SC-PWL) activation units.
//
// Numbers are sign-magnitude with 8 fraction bits: a magnitude m stands for
// m * 2^-8, so |x| covers [0, 255/256]. The interval [0,1) is cut into eight
// equal segments; the segment of |x| is its three most significant bits.
// The coefficient tables below are the optimised slopes a_i and offsets b_i
// of the published design (all in units of 2^-8); f(x) ~= a_i*|x| + b_i on
// segment i. Negative operands are handled by symmetry, see pwl_out_adder.
package sc_pwl_pkg;

  // Which activation function a unit computes.
  typedef enum logic [0:0] {
    FUNC_TANH    = 1'b0,
    FUNC_SIGMOID = 1'b1
  } func_e;

  localparam int unsigned MAG_W = 8;   // magnitude / coefficient width
  localparam int unsigned SEG_W = 3;   // 8 segments
  localparam int unsigned NSEG  = 1 << SEG_W;

  // Sign-magnitude operand or result: value = (sign ? -1 : 1) * mag * 2^-8.
  typedef struct packed {
    logic              sign;
    logic [MAG_W-1:0]  mag;
  } sm_t;

  // A whole coefficient table, entry i = segment i.
  typedef logic [NSEG-1:0][MAG_W-1:0] coef_tab_t;

  // Slope a_i of segment seg (units of 2^-8).
  function automatic logic [MAG_W-1:0] coef_a(func_e f, logic [SEG_W-1:0] seg);
    logic [MAG_W-1:0] r;
    if (f == FUNC_TANH) begin
      case (seg)
        3'd0: r = 8'd255;
        3'd1: r = 8'd247;
        3'd2: r = 8'd232;
        3'd3: r = 8'd213;
        3'd4: r = 8'd189;
        3'd5: r = 8'd165;
        3'd6: r = 8'd141;
        default: r = 8'd117;
      endcase
    end else begin
      case (seg)
        3'd0, 3'd1: r = 8'd64;
        3'd2, 3'd3: r = 8'd63;
        3'd4, 3'd5: r = 8'd57;
        3'd6: r = 8'd52;
        default: r = 8'd50;
      endcase
    end
    return r;
  endfunction

  // Offset b_i of segment seg (units of 2^-8).
  function automatic logic [MAG_W-1:0] coef_b(func_e f, logic [SEG_W-1:0] seg);
    logic [MAG_W-1:0] r;
    if (f == FUNC_TANH) begin
      case (seg)
        3'd0: r = 8'd0;
        3'd1: r = 8'd2;
        3'd2: r = 8'd5;
        3'd3: r = 8'd12;
        3'd4: r = 8'd24;
        3'd5: r = 8'd39;
        3'd6: r = 8'd57;
        default: r = 8'd78;
      endcase
    end else begin
      case (seg)
        3'd0, 3'd1, 3'd2, 3'd3: r = 8'd128;
        3'd4, 3'd5: r = 8'd131;
        3'd6: r = 8'd135;
        default: r = 8'd137;
      endcase
    end
    return r;
  endfunction

  // The default offset table of a function, as one value (used as the default
  // of rom_b's B_TABLE parameter so that the offsets can be re-tuned).
  function automatic coef_tab_t b_table(func_e f);
    coef_tab_t t;
    for (int i = 0; i < NSEG; i++) t[i] = coef_b(f, SEG_W'(i));
    return t;
  endfunction

endpackage
