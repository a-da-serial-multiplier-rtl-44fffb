// csd_mult: multiplier by a fixed coefficient built only from shifts and
// adders, with the coefficient written in canonical signed-digit (CSD)
// form.
//
// The coefficient C is recoded when the design is elaborated into digits
// d_i in {-1, 0, +1} with no two adjacent digits non-zero, which minimises
// the number of non-zero digits; the product is then
// y = sum_i d_i * (x << i), one adder or subtractor per non-zero digit and
// no multiplier.  Recoding: while C is not zero, if C is odd the digit is
// 2 - (C mod 4) (i.e. +1 or -1) and is subtracted from C; then C is halved.
// Using signed-digit coefficients to cut the number of non-zero digits,
// and shift-and-add multipliers, follows the source design; the CSD
// recoding rule is the standard one.  Combinational.
module csd_mult #(
  parameter int                 IN_W = 11,
  parameter int                 C_W  = 16,
  parameter logic signed [C_W-1:0] C = 16'sd803
) (
  input  logic signed [IN_W-1:0]     x,
  output logic signed [IN_W+C_W-1:0] y
);
  localparam int YW = IN_W + C_W;

  typedef logic signed [1:0] digit_t;
  typedef digit_t digits_t [C_W+1];

  function automatic digits_t recode(int c);
    digits_t d;
    for (int i = 0; i <= C_W; i++) begin
      if (c % 2 != 0) begin
        d[i] = (((c % 4) + 4) % 4 == 1) ? 2'sd1 : -2'sd1;
        c    = c - int'(d[i]);
      end else begin
        d[i] = 2'sd0;
      end
      c = c / 2;
    end
    return d;
  endfunction

  localparam digits_t D = recode(int'(C));

  always_comb begin
    y = '0;
    for (int i = 0; i <= C_W; i++) begin
      if (D[i] == 2'sd1)       y = y + (YW'(x) <<< i);
      else if (D[i] == -2'sd1) y = y - (YW'(x) <<< i);
    end
  end
endmodule
