// tb_mac_datapath: drives the XREG / BREG load and accumulate strobes the
// way the control unit does and checks the accumulator.  For each of 200
// random sums of random length (1..32 products) with random 10-bit samples
// and 16-bit coefficients, including the extreme values, acc must equal
// the sum of products computed here with plain integer arithmetic; holding
// acc_en low must leave acc unchanged.
module tb_mac_datapath;
  import fir_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic    reset, ld, acc_en, acc_clr;
  sample_t xin;
  coef_t   bin;
  acc_t    acc;
  int checks = 0, failures = 0;

  mac_datapath dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expected;
    reset = 1; ld = 0; acc_en = 0; acc_clr = 0; xin = 0; bin = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    checks++;
    if (acc !== 0) begin failures++; $display("FAIL acc not cleared by reset"); end
    for (int s = 0; s < 200; s++) begin
      automatic int len = 1 + int'($urandom_range(31));
      expected = 0;
      for (int k = 0; k <= len; k++) begin
        @(negedge clk);
        // products enter XREG/BREG with ld, are accumulated one cycle later
        ld = (k < len);
        acc_en = (k > 0);
        acc_clr = (k == 1);
        if (s == 0) begin xin = -10'sd512; bin = -16'sd32768; end
        else if (s == 1) begin xin = 10'sd511; bin = -16'sd32768; end
        else begin xin = sample_t'($urandom); bin = coef_t'($urandom); end
        if (ld) expected += longint'(xin) * longint'(bin);
      end
      @(negedge clk);
      ld = 0; acc_en = 0;
      checks++;
      if (longint'(acc) !== expected) begin
        failures++;
        $display("FAIL sum %0d (len %0d): acc=%0d expected %0d", s, len, acc, expected);
      end
      repeat (2) @(negedge clk);
      checks++;
      if (longint'(acc) !== expected) begin
        failures++;
        $display("FAIL acc changed while acc_en low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
