// round_sat: round-off unit that turns the 32-bit accumulator result into
// the 16-bit filter output.
//
// The accumulator holds sum(h * x) with Q2.13 coefficients, so the output
// in input-sample units is acc / 2^SHIFT.  The unit adds half an output
// LSB (round half up), drops SHIFT fraction bits and saturates the result
// to OUT_W bits.  Rounding the 32-bit MAC result to 16 bits follows the
// source design; the shift, the rounding rule and the saturation are this
// design's choices.  Combinational.
module round_sat #(
  parameter int IN_W  = 32,
  parameter int OUT_W = 16,
  parameter int SHIFT = 13
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    sat    // 1 when the result was clipped
);
  localparam logic signed [IN_W:0] MAXV = (IN_W+1)'(2**(OUT_W-1) - 1);
  localparam logic signed [IN_W:0] MINV = -(IN_W+1)'(2**(OUT_W-1));

  logic signed [IN_W:0] rnd;   // one guard bit so the rounding add cannot wrap

  always_comb begin
    rnd = ($signed({din[IN_W-1], din}) + (IN_W+1)'(2**(SHIFT-1))) >>> SHIFT;
    if (rnd > MAXV) begin
      dout = MAXV[OUT_W-1:0];
      sat  = 1'b1;
    end else if (rnd < MINV) begin
      dout = MINV[OUT_W-1:0];
      sat  = 1'b1;
    end else begin
      dout = rnd[OUT_W-1:0];
      sat  = 1'b0;
    end
  end
endmodule
