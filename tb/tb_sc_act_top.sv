// tb_sc_act_top: end-to-end test of the activation unit at its default size.
// It evaluates every one of the 512 sign-magnitude operands (in a shuffled
// order) through the tanh and sigmoid paths and compares both results bit for
// bit with the reference model, checks the STREAM_LEN + 1 cycle latency and
// the mean absolute error against the exact functions. Along the way it makes
// each mechanism happen and counts it: every one of the eight segments with
// both signs, a start while busy (ignored), a new start in the done cycle
// (back to back) and a reset in the middle of an evaluation. A mechanism
// that never happened counts as a failure.
module tb_sc_act_top;
  import tb_ref_pkg::*;
  import sc_pwl_pkg::*;

  localparam int LEN = 256;

  logic clk = 0, rst_n = 1, start = 0;
  sm_t  x;
  logic busy, done;
  sm_t  y_tanh, y_sigmoid;
  int checks = 0, failures = 0;

  int seg_hits [2][8];
  int n_ignored = 0, n_back_to_back = 0, n_aborted = 0;

  sc_act_top dut (.clk, .rst_n, .start, .x, .busy, .done, .y_tanh, .y_sigmoid);

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

  real err_t = 0.0, err_s = 0.0;
  int  n_eval = 0;

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // Wait for done, counting cycles since the start edge, and check the result.
  task automatic finish_eval(int s, int m, int lat0);
    int lat;
    logic [8:0] et, es;
    real xr;
    lat = lat0;
    while (!done && lat <= LEN + 10) begin
      @(negedge clk);
      lat++;
    end
    check(lat == LEN + 1, $sformatf("latency %0d", lat));
    et = ref_unit(TANH, s[0], m, 'hC1, 'h5A, LEN);
    es = ref_unit(SIGM, s[0], m, 'hC1, 'h5A, LEN);
    check(y_tanh == et, $sformatf("tanh x=%0d.%0d y=%h exp %h", s, m, y_tanh, et));
    check(y_sigmoid == es, $sformatf("sigmoid x=%0d.%0d y=%h exp %h", s, m, y_sigmoid, es));
    xr = (s != 0 ? -1.0 : 1.0) * real'(m) / 256.0;
    err_t += absr(sm_to_real(y_tanh) - exact(TANH, xr));
    err_s += absr(sm_to_real(y_sigmoid) - exact(SIGM, xr));
    n_eval++;
    seg_hits[s][m >> 5]++;
  endtask

  initial begin
    int order [512];
    int k;
    bit chained;
    for (int i = 0; i < 512; i++) order[i] = i;
    order.shuffle();
    x = '0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // reset in the middle of an evaluation: the unit must go idle at once and
    // the next evaluation must be unaffected
    x = '{sign: 1'b0, mag: 8'd200};
    start = 1; @(negedge clk); start = 0;
    repeat (100) @(negedge clk);
    rst_n = 0; #1;
    check(!busy && !done && y_tanh == '0, "reset aborts an evaluation");
    n_aborted++;
    @(negedge clk) rst_n = 1;
    @(negedge clk);

    k = 0;
    chained = 0;
    while (k < 512) begin
      int s, m, lat;
      s = order[k] >> 8; m = order[k] & 255;
      x.sign = s[0]; x.mag = 8'(m);
      if (!chained) begin
        start = 1;
        @(negedge clk);
      end
      start = 0;
      lat = 1;
      check(busy, "busy after start");
      if (k % 29 == 3) begin
        x.sign = ~x.sign; x.mag = 8'($urandom_range(0, 255)); start = 1;
        @(negedge clk);
        start = 0; lat++;
        n_ignored++;
      end
      while (!done && lat <= LEN + 10) begin
        @(negedge clk);
        lat++;
      end
      // in the done cycle, sometimes present the next operand straight away
      chained = (k % 5 == 1) && (k + 1 < 512);
      if (chained) begin
        int s2, m2;
        s2 = order[k + 1] >> 8; m2 = order[k + 1] & 255;
        finish_eval(s, m, lat);
        x.sign = s2[0]; x.mag = 8'(m2); start = 1;
        @(negedge clk);
        check(busy, "back-to-back start accepted in the done cycle");
        n_back_to_back++;
      end else begin
        finish_eval(s, m, lat);
        @(negedge clk);
        check(!busy && !done, "idle after done");
      end
      k++;
    end

    $display("MAE tanh %f sigmoid %f over %0d operands", err_t / n_eval, err_s / n_eval, n_eval);
    check(n_eval == 512, "all operands evaluated");
    check(err_t / n_eval < 0.004, "tanh MAE");
    check(err_s / n_eval < 0.004, "sigmoid MAE");
    for (int s = 0; s < 2; s++)
      for (int g = 0; g < 8; g++)
        check(seg_hits[s][g] > 0, $sformatf("segment %0d sign %0d never used", g, s));
    $display("mechanisms: ignored starts %0d, back-to-back %0d, aborted %0d",
             n_ignored, n_back_to_back, n_aborted);
    check(n_ignored > 0, "start while busy never happened");
    check(n_back_to_back > 0, "back-to-back start never happened");
    check(n_aborted > 0, "reset mid-evaluation never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
