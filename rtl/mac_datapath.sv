// mac_datapath: operand registers and the single multiply-accumulate unit
// of the direct-form filter.
//
// XREG and BREG capture a sample and a coefficient from the two memories
// when ld is high.  On the next cycle, with acc_en high, their product,
// formed by the 16 x 16 Baugh-Wooley multiplier (bw_mult) in full
// precision, is added to the accumulator; acc_clr starts a new sum instead
// of adding to the old one.  After TAPS accumulate cycles acc holds
// sum(h[k] * x[n-k]).  The XREG / BREG / single MAC arrangement and the
// 32-bit MAC result follow the source design; feeding the 10-bit sample
// sign-extended into the 16-bit multiplier is this design's choice.  With
// 10-bit samples and 16-bit coefficients each product fits in 26 bits, so
// 32 of them cannot overflow the 32-bit accumulator.
// Synchronous active-high reset clears the registers.
module mac_datapath
  import fir_pkg::*;
(
  input  logic    clk,
  input  logic    reset,
  input  logic    ld,        // load XREG / BREG
  input  sample_t xin,       // from XRAM
  input  coef_t   bin,       // from BRAM
  input  logic    acc_en,    // accumulate XREG * BREG
  input  logic    acc_clr,   // with acc_en: this product starts a new sum
  output acc_t    acc
);
  sample_t xreg;
  coef_t   breg;
  logic [2*COEF_W-1:0] prod;

  always_ff @(posedge clk) begin
    if (reset) begin
      xreg <= '0;
      breg <= '0;
    end else if (ld) begin
      xreg <= xin;
      breg <= bin;
    end
  end

  bw_mult #(.N(COEF_W)) u_mult (
    .a   (COEF_W'(xreg)),   // sign-extended sample
    .b   (breg),
    .half(1'b0),
    .p   (prod)
  );

  always_ff @(posedge clk) begin
    if (reset)
      acc <= '0;
    else if (acc_en)
      acc <= (acc_clr ? acc_t'(0) : acc) + acc_t'(signed'(prod));
  end
endmodule
