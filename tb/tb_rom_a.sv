// tb_rom_a: reads all eight slopes of the tanh and sigmoid ROM-A and
// compares them with the published coefficient table.
module tb_rom_a;
  import tb_ref_pkg::*;
  import sc_pwl_pkg::*;

  logic [2:0] seg;
  logic [7:0] a_t, a_s;
  int checks = 0, failures = 0;

  rom_a #(.FUNC(FUNC_TANH))    dut_t (.seg, .a(a_t));
  rom_a #(.FUNC(FUNC_SIGMOID)) dut_s (.seg, .a(a_s));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      seg = 3'(i);
      #1;
      check(a_t == 8'(A_TAB[TANH][i]), $sformatf("tanh a%0d=%0d", i, a_t));
      check(a_s == 8'(A_TAB[SIGM][i]), $sformatf("sigmoid a%0d=%0d", i, a_s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
