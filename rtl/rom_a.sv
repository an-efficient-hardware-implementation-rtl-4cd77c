// rom_a: ROM-A, the slope table of the piecewise-linear approximation.
//
// Eight 8-bit entries, one per segment of [0,1), holding a_i in units of
// 2^-8 for tanh or sigmoid (parameter FUNC). The values are the document's
// optimised coefficients (kept in sc_pwl_pkg). The read is combinational:
// a follows seg in the same cycle.
module rom_a
  import sc_pwl_pkg::*;
#(
  parameter func_e FUNC = FUNC_TANH
) (
  input  logic [SEG_W-1:0] seg,
  output logic [MAG_W-1:0] a
);

  logic [MAG_W-1:0] table_q [NSEG];

  always_comb begin
    for (int i = 0; i < NSEG; i++) table_q[i] = coef_a(FUNC, SEG_W'(i));
  end

  assign a = table_q[seg];

endmodule
