// tb_da_lut: reads every entry of both 256-entry tables of the default
// coefficient set, and of a table built from a second, all-nonzero
// coefficient set, and compares each with the sum of the selected
// coefficients computed here.
module tb_da_lut;
  import fir_pkg::*;
  localparam coef_vec_t H2 = {
    16'sd32767, -16'sd32768, 16'sd1, -16'sd1, 16'sd1234, -16'sd4321, 16'sd77, 16'sd9999,
    -16'sd20000, 16'sd15000, 16'sd3, -16'sd300, 16'sd3000, -16'sd30000, 16'sd8191, 16'sd2
  };
  logic [7:0] addr;
  logic signed [18:0] d0, d1, d2, d3;
  int checks = 0, failures = 0;

  da_lut #(.LUT_IN(8), .GROUP(0))          u0 (.addr, .data(d0));
  da_lut #(.LUT_IN(8), .GROUP(1))          u1 (.addr, .data(d1));
  da_lut #(.LUT_IN(8), .GROUP(0), .H(H2))  u2 (.addr, .data(d2));
  da_lut #(.LUT_IN(8), .GROUP(1), .H(H2))  u3 (.addr, .data(d3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(coef_vec_t h, int group, int a);
    int s = 0;
    for (int i = 0; i < 8; i++)
      if ((a >> i) & 1) s += int'(signed'(h[group*8 + i]));
    return s;
  endfunction

  task automatic cmp(int got, int exp_v, string name, int a);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s[%0d] = %0d, expected %0d", name, a, got, exp_v);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #1;
      cmp(int'(d0), expected(H_DEFAULT, 0, a), "lut0", a);
      cmp(int'(d1), expected(H_DEFAULT, 1, a), "lut1", a);
      cmp(int'(d2), expected(H2, 0, a), "lut2", a);
      cmp(int'(d3), expected(H2, 1, a), "lut3", a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
