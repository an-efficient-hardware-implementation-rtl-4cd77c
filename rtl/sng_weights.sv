// sng_weights: AND-gate network of the weighted-binary stochastic number
// generator.
//
// From the LFSR state L it forms WIDTH streams W[k] = L[k] & ~L[k+1] & ...
// & ~L[WIDTH-1]. At most one W is 1 in any cycle (the 1s do not overlap) and,
// over the 2^WIDTH-1 states of a maximal-length LFSR, W[k] is 1 in exactly
// 2^k states: W[7] carries weight 1/2, W[6] 1/4, ... W[0] 1/256 for the
// default 8 bits. The structure follows the document's generator; the
// document shows ten streams for a 10-bit register, this design builds one
// stream per LFSR bit. W[WIDTH-1] is L[WIDTH-1] itself, with no gate.
// Purely combinational.
module sng_weights #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] l,
  output logic [WIDTH-1:0] w
);

  always_comb begin
    logic higher_zero;  // all of L[WIDTH-1:k+1] are 0
    higher_zero = 1'b1;
    for (int k = WIDTH - 1; k >= 0; k--) begin
      w[k]        = l[k] & higher_zero;
      higher_zero = higher_zero & ~l[k];
    end
  end

endmodule
