// tb_csd_mult: for eight fixed coefficients (several of the filter's own,
// plus 0, +32767, -32768 and an alternating bit pattern) every one of the
// 2048 possible 11-bit inputs is multiplied and compared with the
// simulator's own signed product.
module tb_csd_mult;
  localparam int NC = 8;
  localparam logic signed [15:0] CS [NC] = '{16'sd803, -16'sd6644, 16'sd12651, -16'sd8658,
                                            16'sd0, 16'sd32767, -16'sd32768, 16'sh5555};
  logic signed [10:0] x;
  logic signed [26:0] y [NC];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    csd_mult #(.IN_W(11), .C_W(16), .C(CS[i])) dut (.x, .y(y[i]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -1024; v < 1024; v++) begin
      x = 11'(v);
      #1;
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (longint'(y[i]) != longint'(v) * longint'(CS[i])) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", v, CS[i], longint'(v) * longint'(CS[i]), y[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
