// tb_sc_mul_counter: drives random stream pairs of chosen densities into the
// AND-gate multiplier and counter and compares the count with the number of
// cycles in which both bits were 1; also checks clr and en.
module tb_sc_mul_counter;
  logic clk = 0, rst_n = 1, clr = 0, en = 0, sa = 0, sx = 0;
  logic [8:0] count;
  int checks = 0, failures = 0;

  sc_mul_counter dut (.clk, .rst_n, .clr, .en, .sa, .sx, .count);

  always #5 clk = ~clk;

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
    #1 rst_n = 0;
    #1 check(count == 0, "reset");
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      int pa, px, n;
      pa = $urandom_range(0, 100); px = $urandom_range(0, 100);
      clr = 1; en = 0;
      @(negedge clk);
      check(count == 0, "clear");
      clr = 0; n = 0;
      for (int i = 0; i < 256; i++) begin
        sa = ($urandom_range(0, 99) < pa);
        sx = ($urandom_range(0, 99) < px);
        en = ($urandom_range(0, 9) != 0);
        if (en && sa && sx) n++;
        @(negedge clk);
      end
      en = 0;
      check(count == 9'(n), $sformatf("count %0d exp %0d", count, n));
    end
    // all-ones window reaches 256
    clr = 1; @(negedge clk); clr = 0;
    sa = 1; sx = 1; en = 1;
    repeat (256) @(negedge clk);
    en = 0;
    check(count == 256, $sformatf("full window count %0d", count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
