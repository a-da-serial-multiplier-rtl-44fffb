// tb_round_sat: checks the round-off unit (32 -> 16 bits, 13 fraction
// bits dropped, round half up, saturation) on hand-picked values around
// the rounding points and the saturation limits, then on random inputs
// against a model written with integer division.
module tb_round_sat;
  logic signed [31:0] din;
  logic signed [15:0] dout;
  logic               sat;
  int checks = 0, failures = 0;

  round_sat #(.IN_W(32), .OUT_W(16), .SHIFT(13)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint v, int exp_out, bit exp_sat);
    din = 32'(v);
    #1;
    checks++;
    if (dout !== 16'(exp_out) || sat !== exp_sat) begin
      failures++;
      $display("FAIL din=%0d -> %0d sat=%b, expected %0d sat=%b", v, dout, sat, exp_out, exp_sat);
    end
  endtask

  // floor((v + 4096) / 8192), then clip
  function automatic void model(longint v, output int o, output bit s);
    longint t = v + 4096;
    longint q = (t >= 0) ? t / 8192 : -((-t + 8191) / 8192);
    s = (q > 32767) || (q < -32768);
    o = (q > 32767) ? 32767 : (q < -32768) ? -32768 : int'(q);
  endfunction

  initial begin
    check(0, 0, 0);
    check(4095, 0, 0);
    check(4096, 1, 0);
    check(8192, 1, 0);
    check(-4096, 0, 0);
    check(-4097, -1, 0);
    check(-8192, -1, 0);
    check(longint'(32767) * 8192, 32767, 0);
    check(longint'(32767) * 8192 + 4096, 32767, 1);
    check(longint'(-32768) * 8192, -32768, 0);
    check(longint'(-32768) * 8192 - 4097, -32768, 1);
    check(32'h7FFF_FFFF, 32767, 1);
    check(-longint'(32'h8000_0000), -32768, 1);
    for (int n = 0; n < 5000; n++) begin
      automatic longint v = longint'(signed'(32'($urandom)));
      int o; bit s;
      if (n % 2 == 0) v = v >>> 6;     // half of them inside the range
      model(v, o, s);
      check(v, o, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
