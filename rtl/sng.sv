// sng: stochastic number generator (LFSR + weight network + selection).
//
// Turns a binary value v (units of 2^-WIDTH) into a bit stream whose density
// of 1s is v / (2^WIDTH - 1). Each cycle the weight network marks one bit
// position k of the LFSR state (the highest set bit); the output is v[k].
// Because position k is marked in exactly 2^k of the 255 LFSR states, any
// 255 consecutive output bits hold exactly v ones. The output is the OR of
// (v[k] AND W[k]), as in the document's generator.
//
// Interface: load reseeds the LFSR, en advances it; bit_o is the
// combinational stream bit of the current LFSR state and the current v.
module sng #(
  parameter int unsigned      WIDTH = 8,
  parameter logic [WIDTH-1:0] TAPS  = 8'hB8,
  parameter logic [WIDTH-1:0] SEED  = 8'h01
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  input  logic [WIDTH-1:0] v,
  output logic             bit_o
);

  logic [WIDTH-1:0] l;
  logic [WIDTH-1:0] w;

  lfsr #(.WIDTH(WIDTH), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .load, .en, .state(l)
  );

  sng_weights #(.WIDTH(WIDTH)) u_weights (.l, .w);

  assign bit_o = |(v & w);

endmodule
