// da_shift_acc: bit-serial shift-accumulator of the DA filter.
//
// The bit slices of the pre-added samples arrive most significant bit
// first.  The first slice is the two's-complement sign bit, whose weight
// is -2^(B-1), so on first the accumulator is loaded with -din; on every
// later slice it is doubled and din is added.  After B slices
// acc = sum_b w_b 2^b din_b with w = -1 for the sign bit, i.e. the filter
// output.  Handling the sign bit by subtraction follows the source
// design's two's-complement (Baugh-Wooley) treatment; the MSB-first order
// is this design's choice.  Synchronous active-high reset.
module da_shift_acc #(
  parameter int IN_W  = 20,
  parameter int ACC_W = fir_pkg::ACC_W
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    en,     // a bit slice is present
  input  logic                    first,  // with en: the sign-bit slice
  input  logic signed [IN_W-1:0]  din,    // LUT sum for this slice
  output logic signed [ACC_W-1:0] acc
);
  always_ff @(posedge clk) begin
    if (reset)
      acc <= '0;
    else if (en) begin
      if (first)
        acc <= -ACC_W'(din);
      else
        acc <= (acc <<< 1) + ACC_W'(din);
    end
  end
endmodule
