// lfsr: Fibonacci linear feedback shift register, the random source of a
// stochastic number generator.
//
// The register shifts towards its MSB each enabled cycle; the new LSB is the
// XOR of the bits selected by TAPS (bit k of TAPS set = stage k+1 tapped).
// The default TAPS, 8'hB8, is the maximal-length polynomial
// x^8+x^6+x^5+x^4+1, so from any non-zero seed the register visits all 255
// non-zero states before repeating. The 8-bit width is the document's; the
// polynomial and the Fibonacci form are this design's choice.
//
// Interface: load (priority over en) puts SEED back in the register on the
// next edge; en advances it one state. rst_n resets asynchronously to SEED.
// state is the register contents L[WIDTH-1:0], valid every cycle.
module lfsr #(
  parameter int unsigned      WIDTH = 8,
  parameter logic [WIDTH-1:0] TAPS  = 8'hB8,
  parameter logic [WIDTH-1:0] SEED  = 8'h01
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  logic fb;
  assign fb = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= {state[WIDTH-2:0], fb};
  end

  initial begin
    assert (SEED != '0) else $error("lfsr: an all-zero SEED locks the register");
  end

endmodule
