// tb_rom_b: reads all eight offsets of the tanh and sigmoid ROM-B and
// compares them with the published coefficient table; a third instance
// with a re-tuned B_TABLE checks that the override takes effect.
module tb_rom_b;
  import tb_ref_pkg::*;
  import sc_pwl_pkg::*;

  logic [2:0] seg;
  logic [7:0] b_t, b_s, b_r;
  localparam coef_tab_t RETUNED = {8'd80, 8'd60, 8'd40, 8'd20, 8'd10, 8'd6, 8'd3, 8'd1};
  int checks = 0, failures = 0;

  rom_b #(.FUNC(FUNC_TANH))    dut_t (.seg, .b(b_t));
  rom_b #(.FUNC(FUNC_SIGMOID)) dut_s (.seg, .b(b_s));
  rom_b #(.FUNC(FUNC_TANH), .B_TABLE(RETUNED)) dut_r (.seg, .b(b_r));

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
      check(b_t == 8'(B_TAB[TANH][i]), $sformatf("tanh b%0d=%0d", i, b_t));
      check(b_s == 8'(B_TAB[SIGM][i]), $sformatf("sigmoid b%0d=%0d", i, b_s));
      check(b_r == RETUNED[i], $sformatf("re-tuned b%0d=%0d", i, b_r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
