// tb_sd_fir: end-to-end test of the parallel signed-digit filter.  An
// impulse, full-scale steps and 300 random samples are offered, mostly in
// consecutive cycles with random gaps; every output is compared with the
// reference model and must arrive exactly 1 clock edge after its sample.
// A second instance with large, all-nonzero coefficients is run on the
// same samples and is driven into saturation.
module tb_sd_fir;
  import fir_pkg::*;
  import fir_ref_pkg::*;
  localparam coef_vec_t H2 = {
    16'sd32767, 16'sd32767, 16'sd1, -16'sd1, 16'sd31234, 16'sd24321, 16'sd30077, 16'sd29999,
    16'sd20000, 16'sd25000, 16'sd3, -16'sd300, 16'sd30000, 16'sd30000, 16'sd28191, -16'sh5556
  };
  logic clk = 0;
  always #5 clk = ~clk;

  logic    reset, din_valid, vld_a, vld_b, sat_a, sat_b;
  sample_t din;
  out_t    y_a, y_b;
  hist_t hist = '{default: 0};
  taps_t c_a, c_b;
  typedef struct { int ya; bit sa; int yb; bit sb; } exp_t;
  exp_t q [$];
  int checks = 0, failures = 0, sat_seen = 0, sent = 0;

  sd_fir #(.TAPS(32))          dut_a (.clk, .reset, .din, .din_valid,
    .dout(y_a), .dout_valid(vld_a), .dout_sat(sat_a));
  sd_fir #(.TAPS(32), .H(H2))  dut_b (.clk, .reset, .din, .din_valid,
    .dout(y_b), .dout_valid(vld_b), .dout_sat(sat_b));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor at the falling edge: a result must be present exactly one
  // edge after each sample edge, and only then.
  bit pending = 0;
  always @(negedge clk) if (!reset) begin
    checks++;
    if (vld_a !== pending || vld_b !== pending) begin
      failures++;
      $display("FAIL dout_valid=%b expected %b at %0t", vld_a, pending, $time);
    end
    if (pending) begin
      automatic exp_t e = q.pop_front();
      checks += 2;
      if (int'(y_a) != e.ya || sat_a != e.sa) begin
        failures++;
        $display("FAIL default set dout=%0d expected %0d", y_a, e.ya);
      end
      if (int'(y_b) != e.yb || sat_b != e.sb) begin
        failures++;
        $display("FAIL second set dout=%0d sat=%b expected %0d sat=%b", y_b, sat_b, e.yb, e.sb);
      end
      if (e.sb) sat_seen++;
    end
    pending = din_valid;              // taken at the rising edge just past
    if (din_valid) begin
      automatic exp_t e;
      push(hist, int'(din));
      filter(hist, c_a, e.ya, e.sa);
      filter(hist, c_b, e.yb, e.sb);
      q.push_back(e);
    end
  end

  task automatic send(int v);
    din = sample_t'(v);
    din_valid = 1;
    @(negedge clk);
    #1;
    din_valid = 0;
    din = sample_t'($urandom);
    if ($urandom_range(3) == 0) begin
      @(negedge clk);
      #1;
    end
  endtask

  initial begin
    reset = 1; din_valid = 0; din = 0;
    c_a = sym_taps(H_DEFAULT);
    c_b = sym_taps(H2);
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    #1;
    send(256);
    for (int i = 0; i < 32; i++) send(0);
    for (int i = 0; i < 40; i++) send(511);
    for (int i = 0; i < 40; i++) send(-512);
    for (int i = 0; i < 300; i++) send(int'(signed'(10'($urandom))));
    repeat (3) @(negedge clk);
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
