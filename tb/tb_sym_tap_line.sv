// tb_sym_tap_line: shifts 100 random samples (extremes included) into the
// delay line, with random idle cycles, and after every shift compares all
// 16 pre-added pairs u[k] = x(n-k) + x(n-31+k) with a shadow history.
// Idle cycles must not move the line; reset must clear it.
module tb_sym_tap_line;
  import fir_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic    reset, shift;
  sample_t din;
  logic [15:0][10:0] u;
  int hist [32];
  int checks = 0, failures = 0;

  sym_tap_line #(.TAPS(32)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string when);
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (int'(signed'(u[k])) != hist[k] + hist[31-k]) begin
        failures++;
        $display("FAIL %s u[%0d]=%0d expected %0d", when, k, signed'(u[k]), hist[k] + hist[31-k]);
      end
    end
  endtask

  initial begin
    reset = 1; shift = 0; din = 0;
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    compare("after reset");
    for (int n = 0; n < 100; n++) begin
      automatic int v = (n < 32) ? ((n % 2) ? 511 : -512) : int'(signed'(10'($urandom)));
      din = sample_t'(v);
      shift = 1;
      @(negedge clk);
      for (int i = 31; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = v;
      shift = 0;
      din = sample_t'($urandom);
      compare("after shift");
      repeat ($urandom_range(2)) @(negedge clk);
      compare("idle");
    end
    reset = 1;
    @(negedge clk) reset = 0;
    foreach (hist[i]) hist[i] = 0;
    compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
