// sc_pwl_act: one stochastic-computing piecewise-linear activation unit
// (tanh or sigmoid, chosen by FUNC).
//
// f(x) ~= a_i*|x| + b_i on segment i = |x|[7:5] of [0,1), then extended to
// negative x by symmetry. The three MSBs of |x| address ROM-A and ROM-B. Two
// stochastic number generators turn a_i and |x| into bit streams, an AND gate
// multiplies them, and a counter collects the product over STREAM_LEN cycles.
// The count (a_i*|x| in units of 2^-8) is added to b_i in binary and the sign
// is applied. That split (stochastic multiply, binary add) and the tables are
// the document's; the counter, the handshake, the reseeding of both LFSRs at
// every start and the seeds are this design's choices.
//
// Interface: start is taken when busy is low; x is sampled with it. busy
// stays high for STREAM_LEN cycles; then done pulses for one cycle and y
// holds the result until the next done. Latency start -> done is
// STREAM_LEN + 1 clock edges; a new start may be given in the done cycle.
// B_TABLE is the ROM-B contents (default: the published offsets of FUNC);
// overriding it re-tunes the offsets, the accuracy knob of this method.
// The two generators use the same polynomial with different seeds; SEED_A
// and SEED_X must differ, or the streams are fully correlated.
module sc_pwl_act
  import sc_pwl_pkg::*;
#(
  parameter func_e            FUNC       = FUNC_TANH,
  parameter coef_tab_t        B_TABLE    = b_table(FUNC),
  parameter int unsigned      STREAM_LEN = 256,
  parameter logic [MAG_W-1:0] TAPS       = 8'hB8,
  parameter logic [MAG_W-1:0] SEED_X     = 8'hC1,
  parameter logic [MAG_W-1:0] SEED_A     = 8'h5A
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  sm_t  x,
  output logic busy,
  output logic done,
  output sm_t  y
);

  // The count is rescaled to units of 2^-8 by a shift, so the window must be
  // a power of two no longer than 256.
  localparam int unsigned LEN_LOG2 = $clog2(STREAM_LEN);
  localparam int unsigned CNT_W    = MAG_W + 1;
  localparam int unsigned SHIFT    = MAG_W - LEN_LOG2;

  initial begin
    assert (STREAM_LEN == (1 << LEN_LOG2) && LEN_LOG2 >= 1 && LEN_LOG2 <= MAG_W)
      else $error("sc_pwl_act: STREAM_LEN must be a power of two in 2..256");
    assert (SEED_A != SEED_X)
      else $error("sc_pwl_act: equal seeds give correlated streams");
  end

  // ---------------------------------------------------------------- control
  logic                accept;     // start taken this cycle
  logic                last;       // final bit of the window this cycle
  logic [LEN_LOG2:0]   bit_cnt;    // stream bits counted so far
  sm_t                 x_q;        // operand held for the whole window

  assign accept = start && !busy;
  assign last   = busy && (bit_cnt == (LEN_LOG2 + 1)'(STREAM_LEN - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      bit_cnt <= '0;
      x_q     <= '0;
    end else begin
      done <= last;
      if (accept) begin
        busy    <= 1'b1;
        bit_cnt <= '0;
        x_q     <= x;
      end else if (busy) begin
        bit_cnt <= bit_cnt + 1'b1;
        if (last) busy <= 1'b0;
      end
    end
  end

  // -------------------------------------------------------- coefficient ROMs
  logic [SEG_W-1:0] seg;
  logic [MAG_W-1:0] a_i, b_i;

  assign seg = x_q.mag[MAG_W-1 -: SEG_W];

  rom_a #(.FUNC(FUNC)) u_rom_a (.seg, .a(a_i));
  rom_b #(.FUNC(FUNC), .B_TABLE(B_TABLE)) u_rom_b (.seg, .b(b_i));

  // ------------------------------------------- stochastic multiply a_i * |x|
  logic sa, sx;

  sng #(.WIDTH(MAG_W), .TAPS(TAPS), .SEED(SEED_A)) u_sng_a (
    .clk, .rst_n, .load(accept), .en(busy), .v(a_i), .bit_o(sa)
  );

  sng #(.WIDTH(MAG_W), .TAPS(TAPS), .SEED(SEED_X)) u_sng_x (
    .clk, .rst_n, .load(accept), .en(busy), .v(x_q.mag), .bit_o(sx)
  );

  logic [CNT_W-1:0] count;

  sc_mul_counter #(.CNT_W(CNT_W)) u_mul (
    .clk, .rst_n, .clr(accept), .en(busy), .sa, .sx, .count
  );

  // ---------------------------------------------- binary add, sign, output
  logic [CNT_W-1:0] prod_final;   // count including this cycle's bit
  sm_t              y_next;

  assign prod_final = CNT_W'((count + CNT_W'(sa & sx)) << SHIFT);

  pwl_out_adder #(.FUNC(FUNC)) u_add (
    .prod(prod_final), .b(b_i), .x_neg(x_q.sign), .y(y_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    y <= '0;
    else if (last) y <= y_next;
  end

endmodule
