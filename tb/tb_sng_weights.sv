// tb_sng_weights: exhaustive check of the weight network.
// For every 8-bit state it checks that at most one stream is 1 and that the
// marked position is the highest set bit; over the 255 non-zero states stream
// k must be 1 exactly 2^k times (weights 1/2 .. 1/256).
module tb_sng_weights;
  logic [7:0] l, w;
  int checks = 0, failures = 0;
  int hits [8];

  sng_weights dut (.l, .w);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 256; s++) begin
      logic [7:0] exp_w;
      exp_w = '0;
      for (int k = 7; k >= 0; k--) if (s[k]) begin exp_w[k] = 1'b1; break; end
      l = 8'(s);
      #1;
      check(w == exp_w, $sformatf("l=%h w=%h exp %h", l, w, exp_w));
      check($countones(w) <= 1, $sformatf("overlap at l=%h", l));
      for (int k = 0; k < 8; k++) hits[k] += w[k];
    end
    for (int k = 0; k < 8; k++)
      check(hits[k] == (1 << k), $sformatf("W%0d weight %0d/255", k, hits[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
