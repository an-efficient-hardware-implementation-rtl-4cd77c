// rom_b: ROM-B, the offset table of the piecewise-linear approximation.
//
// Eight 8-bit entries, one per segment of [0,1), holding b_i in units of
// 2^-8 for tanh or sigmoid (parameter FUNC). The offset is added in binary,
// after the stochastic multiply, so tuning these words trims the error of
// the whole unit without touching the stochastic part. B_TABLE holds the
// eight words; its default is the published table of FUNC (sc_pwl_pkg), and
// an instance may override it with re-tuned offsets. The read is
// combinational.
module rom_b
  import sc_pwl_pkg::*;
#(
  parameter func_e     FUNC    = FUNC_TANH,
  parameter coef_tab_t B_TABLE = b_table(FUNC)
) (
  input  logic [SEG_W-1:0] seg,
  output logic [MAG_W-1:0] b
);

  assign b = B_TABLE[seg];

endmodule
