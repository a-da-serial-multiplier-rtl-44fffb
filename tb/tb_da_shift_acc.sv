// tb_da_shift_acc: feeds 500 random words of 11 bit slices, most
// significant first, into the shift-accumulator.  Each slice's value is a
// random 20-bit signed number d_b; after the 11 slices the accumulator
// must hold -2^10 d_10 + sum_{b<10} 2^b d_b, computed here directly.
// Gaps with en low must hold the accumulator.
module tb_da_shift_acc;
  logic clk = 0;
  always #5 clk = ~clk;

  logic reset, en, first;
  logic signed [19:0] din;
  logic signed [31:0] acc;
  int checks = 0, failures = 0;

  da_shift_acc #(.IN_W(20), .ACC_W(32)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; en = 0; first = 0; din = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int w = 0; w < 500; w++) begin
      automatic longint expected = 0;
      for (int b = 10; b >= 0; b--) begin
        automatic longint d = (w == 0) ? -524288 : (w == 1) ? 524287 : longint'(signed'(20'($urandom)));
        din = 20'(d);
        en = 1;
        first = (b == 10);
        expected += (b == 10) ? -(d <<< b) : (d <<< b);
        @(negedge clk);
        en = (w % 3 == 0) ? 0 : en;
        first = 0;
        if (w % 3 == 0) begin
          din = 20'($urandom);
          @(negedge clk);                // idle gap
        end
      end
      en = 0;
      checks++;
      if (longint'(acc) != expected) begin
        failures++;
        $display("FAIL word %0d: acc=%0d expected %0d", w, acc, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
