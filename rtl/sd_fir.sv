// sd_fir: fully parallel symmetric 32-tap FIR filter with signed-digit
// shift-and-add coefficient multipliers.
//
// A sample taken with din_valid shifts into the delay line; the 16
// symmetric pre-adders (sym_tap_line) form u[k] = x(n-k) + x(n-31+k); each
// u[k] is multiplied by its fixed coefficient h[k] in a CSD shift-and-add
// multiplier (csd_mult); an adder sums the 16 products, the round-off unit
// (round_sat) reduces the sum to 16 bits, and the output register takes
// it at the end of the first clock cycle after the sample entered the
// line: dout_valid pulses 1 clock edge after the sample edge.  A sample
// may be offered every cycle.  Pre-adding symmetric taps, SD-coded
// constant multipliers and a one-cycle output follow the source design;
// the adder arrangement and the interface are this design's.  Synchronous
// active-high reset.
module sd_fir
  import fir_pkg::sample_t, fir_pkg::out_t, fir_pkg::acc_t, fir_pkg::coef_vec_t,
                 fir_pkg::DATA_W, fir_pkg::COEF_W, fir_pkg::ACC_W, fir_pkg::OUT_W,
                 fir_pkg::COEF_FRAC;
#(
  parameter int        TAPS = fir_pkg::TAPS,
  parameter coef_vec_t H    = fir_pkg::H_DEFAULT
) (
  input  logic    clk,
  input  logic    reset,
  input  sample_t din,
  input  logic    din_valid,
  output out_t    dout,
  output logic    dout_valid,
  output logic    dout_sat
);
  localparam int NH = TAPS / 2;
  localparam int PW = DATA_W + 1 + COEF_W;   // product width

  logic [NH-1:0][DATA_W:0] u;
  logic signed [PW-1:0] prod [NH];
  acc_t sum;
  out_t rounded;
  logic sat, taken;

  sym_tap_line #(.TAPS(TAPS)) u_taps (
    .clk, .reset, .shift(din_valid), .din, .u
  );

  for (genvar k = 0; k < NH; k++) begin : g_mult
    csd_mult #(.IN_W(DATA_W+1), .C_W(COEF_W), .C(COEF_W'(H[k]))) u_mult (
      .x(signed'(u[k])), .y(prod[k])
    );
  end

  always_comb begin
    sum = '0;
    for (int k = 0; k < NH; k++) sum += ACC_W'(prod[k]);
  end

  round_sat #(.IN_W(ACC_W), .OUT_W(OUT_W), .SHIFT(COEF_FRAC)) u_round (
    .din(sum), .dout(rounded), .sat
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      taken      <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
      dout_sat   <= 1'b0;
    end else begin
      taken      <= din_valid;
      dout_valid <= taken;
      if (taken) begin
        dout     <= rounded;
        dout_sat <= sat;
      end
    end
  end
endmodule
