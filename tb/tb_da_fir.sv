// tb_da_fir: end-to-end test of the bit-serial DA filter.  An impulse
// (which reads the coefficients out one by one), the extreme inputs and
// 200 random samples are sent at random spacing; every output is compared
// with the reference model and must arrive 13 clock edges after its
// sample.  din_valid while din_ready is low must not take a sample.  A
// second instance built with an all-nonzero coefficient set is run on the
// same samples;
// its sums are large enough for the round-off unit to saturate.
module tb_da_fir;
  import fir_pkg::*;
  import fir_ref_pkg::*;
  localparam coef_vec_t H2 = {
    16'sd32767, 16'sd32767, 16'sd1, -16'sd1, 16'sd31234, 16'sd24321, 16'sd30077, 16'sd29999,
    16'sd20000, 16'sd25000, 16'sd3, -16'sd300, 16'sd30000, 16'sd30000, 16'sd28191, -16'sd2
  };
  logic clk = 0;
  always #5 clk = ~clk;

  logic    reset, din_valid, rdy_a, rdy_b, vld_a, vld_b, sat_a, sat_b;
  sample_t din;
  out_t    y_a, y_b;
  int checks = 0, failures = 0, sat_seen = 0;
  hist_t hist = '{default: 0};
  taps_t c_a, c_b;
  longint cycle = 0;

  da_fir #(.TAPS(32), .LUT_IN(8))          dut_a (.clk, .reset, .din, .din_valid,
    .din_ready(rdy_a), .dout(y_a), .dout_valid(vld_a), .dout_sat(sat_a));
  da_fir #(.TAPS(32), .LUT_IN(8), .H(H2))  dut_b (.clk, .reset, .din, .din_valid,
    .din_ready(rdy_b), .dout(y_b), .dout_valid(vld_b), .dout_sat(sat_b));

  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_and_check(int v);
    longint t0;
    int ya, yb; bit sa, sb;
    din = sample_t'($urandom);
    din_valid = 1'($urandom);
    while (!(rdy_a && rdy_b)) @(negedge clk);
    din = sample_t'(v);
    din_valid = 1;
    @(negedge clk);
    t0 = cycle;
    din_valid = 1'($urandom);          // while busy: must be ignored
    din = sample_t'($urandom);
    push(hist, v);
    filter(hist, c_a, ya, sa);
    filter(hist, c_b, yb, sb);
    repeat (5) @(negedge clk);         // still busy: LOAD and SERIAL
    din_valid = 0;
    while (!vld_a) @(negedge clk);
    checks += 3;
    if (cycle - t0 != 13) begin
      failures++;
      $display("FAIL latency %0d edges, expected 13", cycle - t0);
    end
    if (int'(y_a) != ya || sat_a != sa) begin
      failures++;
      $display("FAIL default set: x=%0d dout=%0d expected %0d", v, y_a, ya);
    end
    if (!vld_b || int'(y_b) != yb || sat_b != sb) begin
      failures++;
      $display("FAIL second set: x=%0d dout=%0d sat=%b expected %0d sat=%b", v, y_b, sat_b, yb, sb);
    end
    if (sb) sat_seen++;
    @(negedge clk);
  endtask

  initial begin
    reset = 1; din_valid = 0; din = 0;
    c_a = sym_taps(H_DEFAULT);
    c_b = sym_taps(H2);
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    send_and_check(256);               // impulse
    for (int i = 0; i < 32; i++) send_and_check(0);
    for (int i = 0; i < 40; i++) send_and_check((i % 4 < 2) ? 511 : -512);
    for (int i = 0; i < 40; i++) send_and_check(511);   // saturates the second set
    for (int i = 0; i < 200; i++) send_and_check(int'(signed'(10'($urandom))));
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("saturated outputs (second set): %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
