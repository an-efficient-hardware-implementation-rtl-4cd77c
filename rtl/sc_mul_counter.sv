// sc_mul_counter: stochastic multiplier and stochastic-to-binary counter.
//
// Two independent unipolar streams are multiplied by a single AND gate: the
// product bit is 1 with probability p_a * p_x. An up-counter adds up the
// product bits over the stream window, giving the product back in binary.
// The AND-gate multiplier is the document's; the counter is this design's
// way of returning to binary before the binary addition of b_i.
//
// Interface: clr (priority) zeroes the count on the next edge; when en is
// high the current product bit sa & sx is added. count is registered and
// wide enough (CNT_W) for a window of 2^(CNT_W-1) bits.
module sc_mul_counter #(
  parameter int unsigned CNT_W = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic             sa,
  input  logic             sx,
  output logic [CNT_W-1:0] count
);

  logic prod;
  assign prod = sa & sx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (en)  count <= count + CNT_W'(prod);
  end

endmodule
