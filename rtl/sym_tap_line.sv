// sym_tap_line: tapped delay line of the DA filter with symmetric
// pre-adders.
//
// The delay line holds x(n), x(n-1), ..., x(n-TAPS+1) (the z^-1 chain of
// the direct-form filter); shift moves a new sample in.  Because the
// coefficients are even-symmetric, h[k] = h[TAPS-1-k], the taps sharing a
// coefficient are added first: u[k] = x(n-k) + x(n-TAPS+1+k) for
// k = 0..TAPS/2-1, each one bit wider than a sample so the sum is exact.
// Adding the symmetric taps before weighting follows the source design;
// the registers clear on the synchronous active-high reset.  The sums are
// combinational from the registers.
module sym_tap_line
  import fir_pkg::sample_t, fir_pkg::DATA_W;
#(
  parameter int TAPS = fir_pkg::TAPS   // even
) (
  input  logic                             clk,
  input  logic                             reset,
  input  logic                             shift,
  input  sample_t                          din,
  output logic [TAPS/2-1:0][DATA_W:0]      u       // pre-added tap pairs
);
  sample_t x [TAPS];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < TAPS; i++) x[i] <= '0;
    end else if (shift) begin
      x[0] <= din;
      for (int i = 1; i < TAPS; i++) x[i] <= x[i-1];
    end
  end

  always_comb begin
    for (int k = 0; k < TAPS/2; k++)
      u[k] = (DATA_W+1)'(x[k]) + (DATA_W+1)'(x[TAPS-1-k]);
  end
endmodule
