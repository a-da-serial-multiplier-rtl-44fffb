// tb_speech: runs a longer audio workload through the filter top at its
// default parameters.  A synthetic noisy speech-like signal is generated
// here: voiced bursts (a 150 Hz fundamental with four harmonics under a
// slow syllable envelope) separated by pauses, plus uniform noise, as if
// sampled at 40 kHz, quantized to 10 bits.  4000 samples (0.1 s) are sent
// back to back; every output of the three filters is compared with the
// reference model, and the three must agree.  The input and output
// powers are printed.
module tb_speech;
  import fir_pkg::*;
  import fir_ref_pkg::*;
  localparam int  NSAMP = 4000;
  localparam real PI    = 3.14159265358979;
  localparam real FS    = 40000.0;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        reset, din_valid, din_ready, coef_we;
  logic        dout_valid, dout_sat, dout_bw_valid, dout_bw_sat, dout_sd_valid, dout_sd_sat;
  sample_t     din;
  logic [5:0]  coef_addr, num_taps;
  coef_t       coef_wdata;
  out_t        dout, dout_bw, dout_sd;

  frty dut (.*);

  int expected [$];
  int got_da [$], got_bw [$], got_sd [$];
  hist_t hist = '{default: 0};
  taps_t c;
  int checks = 0, failures = 0;
  real p_in = 0.0, p_out = 0.0;

  initial begin
    repeat (NSAMP * 40 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (dout_valid)    got_da.push_back(int'(dout));
    if (dout_bw_valid) got_bw.push_back(int'(dout_bw));
    if (dout_sd_valid) got_sd.push_back(int'(dout_sd));
  end

  function automatic int speech_sample(int n);
    real t = real'(n) / FS;
    // syllables of 25 ms every 40 ms, raised-cosine envelope
    real ph = (t - 0.04 * $floor(t / 0.04)) / 0.025;
    real env = (ph < 1.0) ? 0.5 - 0.5 * $cos(2.0 * PI * ph) : 0.0;
    real v = 0.0;
    for (int h = 1; h <= 5; h++) v += $sin(2.0 * PI * 150.0 * h * t) / real'(h);
    v = 260.0 * env * v + real'(int'($urandom_range(160)) - 80);
    if (v > 511.0) v = 511.0;
    if (v < -512.0) v = -512.0;
    return int'(v);
  endfunction

  initial begin
    reset = 1; din_valid = 0; din = 0; num_taps = 0;
    coef_we = 0; coef_addr = 0; coef_wdata = 0;
    c = sym_taps(H_DEFAULT);
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 0; n < NSAMP; n++) begin
      automatic int v = speech_sample(n);
      automatic int y; automatic bit s;
      while (!din_ready) @(negedge clk);
      din = sample_t'(v);
      din_valid = 1;
      @(negedge clk);                    // taken at the rising edge in between
      din_valid = 0;
      push(hist, v);
      filter(hist, c, y, s);
      expected.push_back(y);
      p_in += real'(v) * real'(v);
      p_out += real'(y) * real'(y);
    end
    repeat (40) @(negedge clk);
    checks++;
    if (got_da.size() != NSAMP || got_bw.size() != NSAMP || got_sd.size() != NSAMP) begin
      failures++;
      $display("FAIL output counts da=%0d bw=%0d sd=%0d, expected %0d",
               got_da.size(), got_bw.size(), got_sd.size(), NSAMP);
    end else begin
      for (int i = 0; i < NSAMP; i++) begin
        checks += 3;
        if (got_da[i] != expected[i] || got_bw[i] != expected[i] || got_sd[i] != expected[i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL sample %0d: da=%0d bw=%0d sd=%0d expected %0d",
                     i, got_da[i], got_bw[i], got_sd[i], expected[i]);
        end
      end
    end
    $display("speech workload: %0d samples, mean input power %.1f, mean output power %.1f",
             NSAMP, p_in / NSAMP, p_out / NSAMP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
