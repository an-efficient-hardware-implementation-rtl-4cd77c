// tb_pwl_out_adder: exhaustive check of the binary offset adder and the
// extension to negative operands, for the tanh and sigmoid variants, over
// products 0..300 (saturation included), several offsets and both signs.
module tb_pwl_out_adder;
  import tb_ref_pkg::*;
  import sc_pwl_pkg::*;

  logic [8:0] prod;
  logic [7:0] b;
  logic       x_neg;
  sm_t        y_t, y_s;
  int checks = 0, failures = 0;

  pwl_out_adder #(.FUNC(FUNC_TANH))    dut_t (.prod, .b, .x_neg, .y(y_t));
  pwl_out_adder #(.FUNC(FUNC_SIGMOID)) dut_s (.prod, .b, .x_neg, .y(y_s));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int bs [$] = '{0, 2, 78, 128, 137, 255};
    foreach (bs[j])
      for (int p = 0; p <= 300; p += 3)
        for (int n = 0; n < 2; n++) begin
          prod = 9'(p); b = 8'(bs[j]); x_neg = n[0];
          #1;
          check(y_t == ref_out(TANH, p, bs[j], n[0]),
                $sformatf("tanh p=%0d b=%0d neg=%0d y=%h", p, bs[j], n, y_t));
          check(y_s == ref_out(SIGM, p, bs[j], n[0]),
                $sformatf("sigmoid p=%0d b=%0d neg=%0d y=%h", p, bs[j], n, y_s));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
