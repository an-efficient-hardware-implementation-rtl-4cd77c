// tb_sc_pwl_act_short: checks the shortened-stream option of the SC-PWL unit.
// A sigmoid and a tanh unit with STREAM_LEN = 64 evaluate all 512 operands;
// results are compared bit for bit with the reference model (count scaled by
// 256/64) and the start -> done latency must be 65 cycles.
module tb_sc_pwl_act_short;
  import tb_ref_pkg::*;
  import sc_pwl_pkg::*;

  localparam int LEN = 64;

  logic clk = 0, rst_n = 1, start = 0;
  sm_t  x;
  logic busy_t, done_t, busy_s, done_s;
  sm_t  y_t, y_s;
  int checks = 0, failures = 0;

  sc_pwl_act #(.FUNC(FUNC_TANH),    .STREAM_LEN(LEN)) dut_t (.clk, .rst_n, .start, .x, .busy(busy_t), .done(done_t), .y(y_t));
  sc_pwl_act #(.FUNC(FUNC_SIGMOID), .STREAM_LEN(LEN)) dut_s (.clk, .rst_n, .start, .x, .busy(busy_s), .done(done_s), .y(y_s));

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
    x = '0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 2; s++)
      for (int m = 0; m < 256; m++) begin
        int lat;
        logic [8:0] et, es;
        x.sign = s[0]; x.mag = 8'(m);
        start = 1;
        @(negedge clk);
        start = 0;
        lat = 1;
        while (!done_t && lat <= LEN + 10) begin
          @(negedge clk);
          lat++;
        end
        check(lat == LEN + 1, $sformatf("latency %0d", lat));
        et = ref_unit(TANH, s[0], m, 'hC1, 'h5A, LEN);
        es = ref_unit(SIGM, s[0], m, 'hC1, 'h5A, LEN);
        check(y_t == et, $sformatf("tanh x=%0d.%0d y=%h exp %h", s, m, y_t, et));
        check(y_s == es, $sformatf("sigmoid x=%0d.%0d y=%h exp %h", s, m, y_s, es));
        @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
