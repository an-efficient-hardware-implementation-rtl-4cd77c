// tb_lfsr: checks the 8-bit LFSR against the reference sequence.
// It checks reset to SEED, every state of a full period against the reference
// next-state function, that the period is 255 with all states distinct and
// non-zero, that en low holds the state and that load returns to SEED.
module tb_lfsr;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 1, load = 0, en = 0;
  logic [7:0] state;
  int checks = 0, failures = 0;
  bit seen [256];

  lfsr #(.SEED(8'hC1)) dut (.clk, .rst_n, .load, .en, .state);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_s;
    #1 rst_n = 0;
    #1 check(state == 8'hC1, "reset value");
    @(negedge clk) rst_n = 1;
    exp_s = 'hC1;
    en = 1;
    for (int i = 0; i < 255; i++) begin
      check(state == 8'(exp_s), $sformatf("state %0d: got %h exp %h", i, state, exp_s));
      check(!seen[state] && state != 0, $sformatf("state %h repeated or zero", state));
      seen[state] = 1;
      exp_s = lfsr_next(exp_s);
      @(negedge clk);
    end
    check(state == 8'hC1, "period of 255");
    @(negedge clk);
    en = 0;
    exp_s = int'(state);
    repeat (3) @(negedge clk);
    check(state == 8'(exp_s), "hold when en is low");
    en = 1; load = 1;
    @(negedge clk);
    check(state == 8'hC1, "load has priority and restores SEED");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
