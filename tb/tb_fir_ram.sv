// tb_fir_ram: checks both uses of the memory: a coefficient memory that
// starts out holding the 32 symmetric taps (tap k and tap 31-k equal,
// unused entries zero), and a sample memory that starts out cleared.
// Then random writes are made to both and every entry is read back and
// compared with a shadow copy kept by the testbench.
module tb_fir_ram;
  import fir_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       cwe, xwe;
  logic [5:0] cwaddr, craddr, xwaddr, xraddr;
  logic [15:0] cwdata, crdata;
  logic [9:0]  xwdata, xrdata;
  logic [15:0] cshadow [64];
  logic [9:0]  xshadow [64];
  int checks = 0, failures = 0;

  fir_ram #(.W(16), .DEPTH(64), .INIT_COEF(1'b1)) u_b (
    .clk, .we(cwe), .waddr(cwaddr), .wdata(cwdata), .raddr(craddr), .rdata(crdata));
  fir_ram #(.W(10), .DEPTH(64), .INIT_COEF(1'b0)) u_x (
    .clk, .we(xwe), .waddr(xwaddr), .wdata(xwdata), .raddr(xraddr), .rdata(xrdata));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int i = 0; i < 64; i++) begin
      craddr = 6'(i); xraddr = 6'(i);
      #1;
      checks += 2;
      if (crdata !== cshadow[i]) begin
        failures++;
        $display("FAIL BRAM[%0d] = %0d, expected %0d", i, signed'(crdata), signed'(cshadow[i]));
      end
      if (xrdata !== xshadow[i]) begin
        failures++;
        $display("FAIL XRAM[%0d] = %0d, expected %0d", i, xrdata, xshadow[i]);
      end
    end
  endtask

  initial begin
    cwe = 0; xwe = 0; cwaddr = 0; xwaddr = 0; cwdata = 0; xwdata = 0;
    craddr = 0; xraddr = 0;
    // expected power-up contents, from the printed table
    for (int i = 0; i < 64; i++) begin
      automatic int k = (i < 16) ? i : 31 - i;
      cshadow[i] = (i < 32) ? H_DEFAULT[k] : 16'h0;
      xshadow[i] = '0;
    end
    checks++;
    if (cshadow[0] !== 16'sd803 || cshadow[31] !== 16'sd803 || cshadow[9] !== 16'sd12651) begin
      failures++;
      $display("FAIL coefficient table");
    end
    @(negedge clk);
    read_all();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      cwe = 1'($urandom); xwe = 1'($urandom);
      cwaddr = 6'($urandom); xwaddr = 6'($urandom);
      cwdata = 16'($urandom); xwdata = 10'($urandom);
      @(posedge clk);
      if (cwe) cshadow[cwaddr] = cwdata;
      if (xwe) xshadow[xwaddr] = xwdata;
    end
    @(negedge clk);
    cwe = 0; xwe = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
