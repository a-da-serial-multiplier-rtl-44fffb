// tb_mac_fir: end-to-end test of the single-MAC direct-form filter.
//   * 150 samples (impulse, extremes, random) at random spacing, with
//     default coefficients; every output is compared with the reference
//     model and must arrive exactly 34 clock edges after its sample;
//   * din_valid held while din_ready is low must not take a sample;
//   * 60 samples with a random tap count (1..32) each, whose outputs must
//     match the filter truncated to that many taps, N + 2 edges later;
//   * then all 32 coefficients are rewritten through the coefficient port
//     with large values so that the round-off unit saturates, and 40 more
//     samples are checked, the saturation flag included.
module tb_mac_fir;
  import fir_pkg::*;
  import fir_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        reset, din_valid, din_ready, coef_we, dout_valid, dout_sat;
  sample_t     din;
  logic [5:0]  coef_addr, num_taps;
  coef_t       coef_wdata;
  out_t        dout;
  int checks = 0, failures = 0, sat_seen = 0;
  hist_t hist = '{default: 0};
  taps_t c;
  longint cycle = 0;

  mac_fir dut (.*);

  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_and_check(int v, int n = 32);
    longint t0;
    int y; bit s;
    taps_t cn;
    // wait for ready, keeping din_valid high only when ready (some of the
    // time also while not ready, which must be ignored)
    din = sample_t'($urandom);
    din_valid = 1'($urandom);
    while (!din_ready) @(negedge clk);
    din = sample_t'(v);
    num_taps = (n == 32 && v % 2 == 0) ? 6'd0 : 6'(n);
    din_valid = 1;
    @(negedge clk);
    t0 = cycle;                        // counts the edge that took the sample
    din_valid = 0;
    push(hist, v);
    cn = c;
    for (int i = n; i < 32; i++) cn[i] = 0;
    filter(hist, cn, y, s);
    while (!dout_valid) @(negedge clk);
    checks += 3;
    if (cycle - t0 != n + 2) begin
      failures++;
      $display("FAIL latency %0d edges, expected %0d", cycle - t0, n + 2);
    end
    if (int'(dout) != y || dout_sat != s) begin
      failures++;
      $display("FAIL x=%0d dout=%0d sat=%b expected %0d sat=%b", v, dout, dout_sat, y, s);
    end
    if (s) sat_seen++;
    @(negedge clk);
    if (dout_valid) begin
      failures++;
      $display("FAIL dout_valid longer than one cycle");
    end
  endtask

  initial begin
    reset = 1; din_valid = 0; din = 0; num_taps = 0; coef_we = 0; coef_addr = 0; coef_wdata = 0;
    c = sym_taps(H_DEFAULT);
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    send_and_check(1 <<< 8);           // impulse
    for (int i = 0; i < 33; i++) send_and_check(0);
    send_and_check(511);
    send_and_check(-512);
    for (int i = 0; i < 150; i++) send_and_check(int'(signed'(10'($urandom))));
    for (int i = 0; i < 60; i++)
      send_and_check(int'(signed'(10'($urandom))), (i < 2) ? i + 1 : int'($urandom_range(1, 32)));
    for (int i = 0; i < 33; i++) send_and_check(int'(signed'(10'($urandom))));

    // reprogram the coefficients
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      coef_we = 1;
      coef_addr = 6'(i);
      coef_wdata = 16'sd32767 - coef_t'($urandom_range(4095));
      c[i] = int'(coef_wdata);
    end
    @(negedge clk) coef_we = 0;
    for (int i = 0; i < 40; i++) send_and_check((i < 34) ? 511 : (i < 37) ? -512 : int'(signed'(10'($urandom))));
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("saturated outputs: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
