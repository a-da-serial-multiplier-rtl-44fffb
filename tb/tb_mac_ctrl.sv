// tb_mac_ctrl: checks the control unit's sequencing.
//   * after reset: 64 clearing writes of zero to XRAM addresses 0..63,
//     ready low throughout;
//   * per sample, with a random tap count N (num_taps 1..32; 0 and values
//     above 32 must act as 32): the write goes to the next circular
//     address; then N cycles with ld high reading XRAM[newest-k] and
//     BRAM[k], k = 0..N-1; acc_en follows ld by one cycle with acc_clr on
//     the first; out_en comes exactly N + 1 clock edges after the sample
//     edge, so the output register is written at edge N + 2 (34 for 32);
//   * din_valid while busy is ignored; the write pointer wraps after 64
//     samples.
module tb_mac_ctrl;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [5:0] num_taps;
  logic reset, din_valid, ready, x_we, x_wzero, ld, acc_en, acc_clr, out_en;
  logic [5:0] x_waddr, x_raddr, b_raddr;
  int checks = 0, failures = 0;

  mac_ctrl #(.TAPS(32), .DEPTH(64)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    reset = 1; din_valid = 0; num_taps = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    // clearing pass
    for (int i = 0; i < 64; i++) begin
      expect_true(x_we && x_wzero && x_waddr == 6'(i) && !ready, "clearing write");
      @(negedge clk);
    end
    expect_true(ready && !x_we, "ready after clearing");

    for (int s = 0; s < 70; s++) begin
      automatic int wait_cycles = int'($urandom_range(3));
      automatic int n;
      repeat (wait_cycles) @(negedge clk);
      num_taps = (s < 4) ? 6'(32 * (s % 2)) : (s == 4) ? 6'd63 : 6'($urandom_range(1, 32));
      n = (num_taps == 0 || num_taps > 32) ? 32 : int'(num_taps);
      din_valid = 1;
      #1;
      expect_true(ready && x_we && !x_wzero && x_waddr == 6'(s), "sample write address");
      @(negedge clk);
      // keep din_valid high while busy: must be ignored; the tap count
      // is only taken with the sample
      din_valid = (s % 2 == 0);
      num_taps = 6'($urandom_range(1, 32));
      for (int k = 0; k < n; k++) begin
        expect_true(ld && !ready && !x_we, "busy with ld");
        expect_true(x_raddr == 6'(s - k) && b_raddr == 6'(k), "read addresses");
        expect_true(acc_en == (k > 0) && acc_clr == (k == 1), "accumulate strobes");
        expect_true(!out_en, "no early out_en");
        @(negedge clk);
      end
      // cycle N + 1 after the sample: last accumulate
      din_valid = 0;
      expect_true(!ld && acc_en && acc_clr == (n == 1) && !out_en && ready, "last accumulate");
      @(negedge clk);
      // cycle N + 2: out_en
      expect_true(out_en && !acc_en, "out_en N + 1 edges after the sample");
      @(negedge clk);
      expect_true(!out_en, "out_en one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
