// pwl_out_adder: binary offset adder and sign extension of the SC-PWL unit.
//
// Adds the offset b_i to the product a_i*|x| (both in units of 2^-8) in
// plain binary, giving f(|x|), and saturates at 255/256. The document
// approximates each function on [0,1) and extends it to [-1,1]; this design
// does the extension by symmetry:
//   tanh:    f(-|x|) = -f(|x|)     (sign bit follows x)
//   sigmoid: f(-|x|) = 1 - f(|x|)  (magnitude 256 - f(|x|), never negative)
// The result is sign-magnitude (sc_pwl_pkg::sm_t). Purely combinational.
module pwl_out_adder
  import sc_pwl_pkg::*;
#(
  parameter func_e FUNC = FUNC_TANH
) (
  input  logic [MAG_W:0]   prod,
  input  logic [MAG_W-1:0] b,
  input  logic             x_neg,
  output sm_t              y
);

  localparam int unsigned WIDTH = MAG_W;
  localparam logic [WIDTH+1:0] ONE = (WIDTH + 2)'(1) << WIDTH;   // 1.0
  localparam logic [WIDTH+1:0] MAX = ONE - 1'b1;                  // 255/256

  logic [WIDTH+1:0] sum;    // f(|x|) before saturation
  logic [WIDTH+1:0] pos;    // f(|x|), saturated
  logic [WIDTH+1:0] neg;    // 1 - f(|x|) for the sigmoid

  always_comb begin
    sum = (WIDTH + 2)'(prod) + (WIDTH + 2)'(b);
    pos = (sum > MAX) ? MAX : sum;
    neg = ONE - pos;
    if (FUNC == FUNC_TANH) begin
      y.sign = x_neg && (pos != '0);
      y.mag  = WIDTH'(pos);
    end else begin
      y.sign = 1'b0;
      y.mag  = x_neg ? WIDTH'((neg > MAX) ? MAX : neg) : WIDTH'(pos);
    end
  end

endmodule
