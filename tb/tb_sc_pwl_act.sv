// tb_sc_pwl_act: checks a tanh and a sigmoid SC-PWL unit over every operand.
// For all 512 sign-magnitude operands it compares the result bit for bit with
// the reference model, checks the start -> done latency of STREAM_LEN + 1
// cycles, that a start while busy is ignored, and measures the mean absolute
// error against the exact functions (published figures: 0.0029 for tanh and
// 0.0024 for sigmoid; the check allows 0.004).
module tb_sc_pwl_act;
  import tb_ref_pkg::*;
  import sc_pwl_pkg::*;

  localparam int LEN = 256;

  logic clk = 0, rst_n = 1, start = 0;
  sm_t  x;
  logic busy_t, done_t, busy_s, done_s;
  sm_t  y_t, y_s;
  int checks = 0, failures = 0;

  sc_pwl_act #(.FUNC(FUNC_TANH))    dut_t (.clk, .rst_n, .start, .x, .busy(busy_t), .done(done_t), .y(y_t));
  sc_pwl_act #(.FUNC(FUNC_SIGMOID)) dut_s (.clk, .rst_n, .start, .x, .busy(busy_s), .done(done_s), .y(y_s));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(10 * 600 * (LEN + 4));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real err_t, err_s;
    int  n;
    x = '0;
    #1 rst_n = 0;
    err_t = 0.0; err_s = 0.0; n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy_t && !done_t && !busy_s && !done_s, "idle after reset");
    for (int s = 0; s < 2; s++)
      for (int m = 0; m < 256; m++) begin
        int lat;
        logic [8:0] et, es;
        x.sign = s[0]; x.mag = 8'(m);
        start = 1;
        @(negedge clk);
        start = 0;
        lat = 1;
        check(busy_t && busy_s, "busy after start");
        // a start while busy, with another operand, must change nothing
        if (m % 37 == 5) begin
          x.mag = ~x.mag; start = 1;
          @(negedge clk);
          start = 0; lat++;
        end
        while (!done_t) begin
          @(negedge clk);
          lat++;
          if (lat > LEN + 10) break;
        end
        check(lat == LEN + 1, $sformatf("latency %0d", lat));
        check(done_s && !busy_t, "done together, not busy");
        et = ref_unit(TANH, s[0], m, 'hC1, 'h5A, LEN);
        es = ref_unit(SIGM, s[0], m, 'hC1, 'h5A, LEN);
        check(y_t == et, $sformatf("tanh x=%0d.%0d y=%h exp %h", s, m, y_t, et));
        check(y_s == es, $sformatf("sigmoid x=%0d.%0d y=%h exp %h", s, m, y_s, es));
        begin
          real xr;
          xr = (s != 0 ? -1.0 : 1.0) * real'(m) / 256.0;
          err_t += ((sm_to_real(y_t) - exact(TANH, xr)) < 0) ? exact(TANH, xr) - sm_to_real(y_t)
                                                               : sm_to_real(y_t) - exact(TANH, xr);
          err_s += ((sm_to_real(y_s) - exact(SIGM, xr)) < 0) ? exact(SIGM, xr) - sm_to_real(y_s)
                                                               : sm_to_real(y_s) - exact(SIGM, xr);
          n++;
        end
        @(negedge clk);
        check(y_t == et && !done_t, "result held after done");
      end
    $display("MAE tanh %f sigmoid %f over %0d operands", err_t / n, err_s / n, n);
    check(err_t / n < 0.004, "tanh MAE");
    check(err_s / n < 0.004, "sigmoid MAE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
