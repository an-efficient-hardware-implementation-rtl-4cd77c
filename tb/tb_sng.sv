// tb_sng: checks the stochastic number generator.
// For a set of values it compares every output bit with the reference model
// and checks that 255 consecutive bits hold exactly v ones (the generator's
// exactness over one LFSR period), also when started mid-sequence. A second,
// 10-bit instance (x^10+x^7+1, seed 1100000111) is the ten-stream W0..W9
// form of the same generator: 1023 consecutive bits must hold exactly v ones.
module tb_sng;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 1, load = 0, en = 0;
  logic [7:0] v;
  logic bit_o;
  int checks = 0, failures = 0;

  sng #(.SEED(8'h5A)) dut (.clk, .rst_n, .load, .en, .v, .bit_o);

  logic [9:0] v10;
  logic       bit10;
  sng #(.WIDTH(10), .TAPS(10'h240), .SEED(10'b1100000111)) dut10 (
    .clk, .rst_n, .load, .en, .v(v10), .bit_o(bit10)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int vals [$] = '{0, 1, 2, 128, 127, 255, 170, 85, 64, 200};
    repeat (5) vals.push_back(int'($urandom_range(0, 255)));
    v = 0;
    v10 = 0;
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    foreach (vals[j]) begin
      int s, ones, mism;
      // reseed, then run one period
      load = 1; en = 0;
      @(negedge clk);
      load = 0; en = 1;
      v = 8'(vals[j]);
      s = 'h5A; ones = 0; mism = 0;
      for (int i = 0; i < 255; i++) begin
        #1;
        if (int'(bit_o) != sng_bit(s, vals[j])) mism++;
        ones += bit_o;
        s = lfsr_next(s);
        @(negedge clk);
      end
      check(mism == 0, $sformatf("v=%0d: %0d bits differ from the model", vals[j], mism));
      check(ones == vals[j], $sformatf("v=%0d: %0d ones in 255 bits", vals[j], ones));
      // a window starting elsewhere in the sequence
      repeat (int'($urandom_range(1, 100))) @(negedge clk);
      ones = 0;
      for (int i = 0; i < 255; i++) begin
        #1 ones += bit_o;
        @(negedge clk);
      end
      check(ones == vals[j], $sformatf("v=%0d: %0d ones in a shifted window", vals[j], ones));
    end
    // 10-bit generator, Table II style: value 755/1024 and a few others
    begin
      automatic int vals10 [$] = '{755, 1, 512, 1023, 300};
      foreach (vals10[j]) begin
        int ones;
        v10 = 10'(vals10[j]);
        ones = 0;
        for (int i = 0; i < 1023; i++) begin
          #1 ones += bit10;
          @(negedge clk);
        end
        check(ones == vals10[j], $sformatf("10-bit v=%0d: %0d ones in 1023 bits", vals10[j], ones));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
