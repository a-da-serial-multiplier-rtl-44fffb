// tb_frty: end-to-end test of the filter top at its default parameters.
//
// Phases:
//   1. reset: din_ready must stay low for the 64-cycle clearing pass of
//      the sample memory;
//   2. an impulse, full-scale steps and 300 samples of a synthetic noisy
//      audio signal (two tones plus noise, as if sampled at 40 kHz,
//      quantized to 10 bits), sent as fast as din_ready allows, with
//      din_valid also raised while din_ready is low (stalls);
//   3. 40 samples with the single-MAC filter shortened to a random tap
//      count (num_taps 1..31), checked against the truncated filter and
//      its shorter latency, then back to 32 taps;
//   4. the single-MAC filter's coefficients are rewritten through the
//      coefficient port with large values and driven into saturation.
// A monitor compares every DA output (dout, 13 edges after the sample),
// every MAC output (dout_bw, 34 edges after the sample) and every SD
// output (dout_sd, 1 edge after the sample) with the reference model, and
// checks that the filters agree with each other while they share
// coefficients.  Each mechanism (clearing pass, stall, coefficient
// rewrite, shortened tap count, saturation, each filter's output) is counted and must occur.
module tb_frty;
  import fir_pkg::*;
  import fir_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        reset, din_valid, din_ready, coef_we;
  logic        dout_valid, dout_sat, dout_bw_valid, dout_bw_sat, dout_sd_valid, dout_sd_sat;
  sample_t     din;
  logic [5:0]  coef_addr, num_taps;
  coef_t       coef_wdata;
  out_t        dout, dout_bw, dout_sd;

  frty dut (.*);

  typedef struct { int y; bit sat; longint t; int lat; } exp_t;
  exp_t q_da [$], q_bw [$], q_sd [$];
  hist_t hist = '{default: 0};
  taps_t c_da, c_bw;
  longint cycle = 0;
  int checks = 0, failures = 0;
  int n_clear = 0, n_stall = 0, n_coef = 0, n_sat = 0, n_da = 0, n_bw = 0, n_sd = 0, n_agree = 0, n_short = 0;
  bit shared = 1;   // all filters use the same coefficients

  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s (cycle %0d)", msg, cycle);
  endtask

  // Output monitor, sampling at the falling edge.
  always @(negedge clk) if (!reset) begin
    if (dout_valid) begin
      checks += 2;
      if (q_da.size() == 0) fail("DA output without a sample");
      else begin
        automatic exp_t e = q_da.pop_front();
        if (cycle - e.t != 13) fail($sformatf("DA latency %0d", cycle - e.t));
        if (int'(dout) != e.y || dout_sat != e.sat)
          fail($sformatf("DA dout=%0d expected %0d", dout, e.y));
        // the SD result of the same sample is still in its register
        checks++;
        if (dout_sd != dout) fail("DA and SD outputs differ");
        n_da++;
      end
    end
    if (dout_sd_valid) begin
      checks += 2;
      if (q_sd.size() == 0) fail("SD output without a sample");
      else begin
        automatic exp_t e = q_sd.pop_front();
        if (cycle - e.t != 1) fail($sformatf("SD latency %0d", cycle - e.t));
        if (int'(dout_sd) != e.y || dout_sd_sat != e.sat)
          fail($sformatf("SD dout_sd=%0d expected %0d", dout_sd, e.y));
        n_sd++;
      end
    end
    if (dout_bw_valid) begin
      checks += 2;
      if (q_bw.size() == 0) fail("MAC output without a sample");
      else begin
        automatic exp_t e = q_bw.pop_front();
        if (cycle - e.t != e.lat) fail($sformatf("MAC latency %0d, expected %0d", cycle - e.t, e.lat));
        if (int'(dout_bw) != e.y || dout_bw_sat != e.sat)
          fail($sformatf("MAC dout_bw=%0d sat=%b expected %0d sat=%b", dout_bw, dout_bw_sat, e.y, e.sat));
        if (e.sat) n_sat++;
        n_bw++;
        if (shared && e.lat == 34) begin
          checks++;
          // the DA result of the same sample is still in its register
          if (dout_bw != dout) fail("DA and MAC outputs differ");
          else n_agree++;
        end
      end
    end
  end

  task automatic send(int v, bit stall, int n = 32);
    exp_t e;
    taps_t cn;
    // optionally hold din_valid high while the filters are busy
    din_valid = stall;
    din = sample_t'($urandom);
    while (!din_ready) begin
      if (stall) n_stall++;
      @(negedge clk);
    end
    din = sample_t'(v);
    num_taps = 6'(n % 32);             // 0 selects all 32 taps
    din_valid = 1;
    @(negedge clk);                    // the rising edge in between took it
    din_valid = 0;
    num_taps = 6'($urandom);           // only taken with a sample
    push(hist, v);
    e.t = cycle;
    filter(hist, c_da, e.y, e.sat);
    q_da.push_back(e);
    q_sd.push_back(e);
    cn = c_bw;
    for (int i = n; i < 32; i++) cn[i] = 0;
    filter(hist, cn, e.y, e.sat);
    e.lat = n + 2;
    if (n < 32) n_short++;
    q_bw.push_back(e);
  endtask

  task automatic drain();
    while (q_da.size() != 0 || q_bw.size() != 0 || q_sd.size() != 0) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    real ph1 = 0.0, ph2 = 0.0;
    reset = 1; din_valid = 0; din = 0; num_taps = 0; coef_we = 0; coef_addr = 0; coef_wdata = 0;
    c_da = sym_taps(H_DEFAULT);
    c_bw = c_da;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    // 1. clearing pass
    while (!din_ready && n_clear < 1000) begin
      n_clear++;
      @(negedge clk);
    end
    checks++;
    if (n_clear != 64) fail($sformatf("clearing pass took %0d cycles, expected 64", n_clear));

    // 2. impulse, steps, noisy audio
    send(256, 0);
    for (int i = 0; i < 32; i++) send(0, i % 2);
    for (int i = 0; i < 40; i++) send((i < 20) ? 511 : -512, 1);
    for (int i = 0; i < 300; i++) begin
      // 440 Hz and 3 kHz tones at 40 kHz sampling plus uniform noise
      automatic real s = 220.0 * $sin(ph1) + 120.0 * $sin(ph2)
                       + real'(int'($urandom_range(240)) - 120);
      ph1 += 2.0 * 3.14159265358979 * 440.0 / 40000.0;
      ph2 += 2.0 * 3.14159265358979 * 3000.0 / 40000.0;
      send(int'(s), i % 3 == 0);
    end
    drain();

    // 3. shortened tap count on the single-MAC filter
    for (int i = 0; i < 40; i++)
      send(int'(signed'(10'($urandom))), i % 2, (i < 2) ? i + 1 : int'($urandom_range(1, 31)));
    for (int i = 0; i < 32; i++) send(int'(signed'(10'($urandom))), 0);
    drain();

    // 4. rewrite the MAC filter's coefficients, drive it into saturation
    shared = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      coef_we = 1;
      coef_addr = 6'(i);
      coef_wdata = 16'sd32767 - coef_t'($urandom_range(2047));
      c_bw[i] = int'(coef_wdata);
      n_coef++;
    end
    @(negedge clk) coef_we = 0;
    for (int i = 0; i < 40; i++) send((i < 36) ? 511 : int'(signed'(10'($urandom))), 0);
    drain();

    checks += 9;
    if (n_short == 0) fail("no shortened tap count");
    if (n_sd == 0)    fail("no SD output");
    if (n_clear == 0) fail("clearing pass never seen");
    if (n_stall == 0) fail("no stall");
    if (n_coef == 0)  fail("no coefficient rewrite");
    if (n_sat == 0)   fail("no saturation");
    if (n_da == 0)    fail("no DA output");
    if (n_bw == 0)    fail("no MAC output");
    if (n_agree == 0) fail("DA and MAC outputs never compared");
    $display("clear=%0d stall_cycles=%0d coef_writes=%0d short_taps=%0d saturated=%0d da_out=%0d mac_out=%0d sd_out=%0d agree=%0d",
             n_clear, n_stall, n_coef, n_short, n_sat, n_da, n_bw, n_sd, n_agree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
