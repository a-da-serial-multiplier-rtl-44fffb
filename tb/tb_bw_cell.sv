// tb_bw_cell: exhaustive test of the Baugh-Wooley array cell.  All 32
// input combinations are applied and the sum / carry outputs are compared
// with the arithmetic sum of the (optionally complemented) partial product
// and the two incoming bits.
module tb_bw_cell;
  logic a, b, inv, si, ci, so, co;
  int checks = 0, failures = 0;

  bw_cell dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int total;
      {a, b, inv, si, ci} = 5'(v);
      #1;
      total = ((a && b) != inv ? 1 : 0) + int'(si) + int'(ci);
      checks++;
      if ({co, so} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%b b=%b inv=%b si=%b ci=%b -> co=%b so=%b, expected %0d",
                 a, b, inv, si, ci, co, so, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
