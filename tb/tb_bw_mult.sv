// tb_bw_mult: checks the 16 x 16 Baugh-Wooley multiplier in both
// precisions against the simulator's own signed multiplication.
//   * full precision: corner operands (0, 1, -1, extremes) and 20000
//     random pairs, p must equal a * b as 32-bit signed numbers;
//   * half precision: all 65536 pairs of 8-bit operands, with random
//     garbage in the unused upper operand bits, p must equal the 8 x 8
//     signed product sign-extended to 32 bits.
module tb_bw_mult;
  localparam int N = 16;
  logic [N-1:0]   a, b;
  logic           half;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  bw_mult #(.N(N)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_full(logic [N-1:0] x, logic [N-1:0] y);
    logic signed [2*N-1:0] exp_p;
    a = x; b = y; half = 1'b0;
    #1;
    exp_p = (2*N)'(signed'(x)) * (2*N)'(signed'(y));
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL full %0d * %0d = %0d, got %0d",
                                  signed'(x), signed'(y), exp_p, signed'(p));
    end
  endtask

  initial begin
    logic [N-1:0] corners [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000, 16'h8001};
    foreach (corners[i]) foreach (corners[j]) check_full(corners[i], corners[j]);
    for (int n = 0; n < 20000; n++) check_full(N'($urandom), N'($urandom));

    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        logic signed [2*N-1:0] exp_p;
        a = {8'($urandom), 8'(x)};
        b = {8'($urandom), 8'(y)};
        half = 1'b1;
        #1;
        exp_p = (2*N)'(signed'(8'(x))) * (2*N)'(signed'(8'(y)));
        checks++;
        if (p !== exp_p) begin
          failures++;
          if (failures < 10) $display("FAIL half %0d * %0d = %0d, got %0d",
                                      signed'(8'(x)), signed'(8'(y)), exp_p, signed'(p));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
