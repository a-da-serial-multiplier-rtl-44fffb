// da_lut: distributed-arithmetic look-up table for one group of LUT_IN
// coefficients.
//
// Entry a holds the sum of the coefficients h[GROUP*LUT_IN + i] whose
// address bit a[i] is 1, i.e. the inner sum of sum_k h[k] * x_b[k] for one
// bit slice.  The table is precomputed from the fixed coefficients when
// the design is elaborated and read combinationally, like a ROM.  Storing
// precomputed coefficient sums in LUTs is the source design's method;
// splitting the 16 coefficients into groups, so that two 256-entry tables
// and an adder replace one 65536-entry table, is this design's choice.
module da_lut
  import fir_pkg::*;
#(
  parameter int        LUT_IN = 8,                  // address bits
  parameter int        GROUP  = 0,                  // which coefficient group
  parameter coef_vec_t H      = fir_pkg::H_DEFAULT,
  localparam int       LW     = COEF_W + $clog2(LUT_IN)  // entry width
) (
  input  logic [LUT_IN-1:0]    addr,
  output logic signed [LW-1:0] data
);
  typedef logic signed [LW-1:0] entry_t;
  typedef entry_t table_t [2**LUT_IN];

  function automatic table_t build();
    table_t t;
    for (int a = 0; a < 2**LUT_IN; a++) begin
      t[a] = '0;
      for (int i = 0; i < LUT_IN; i++)
        if (a[i]) t[a] += entry_t'(signed'(H[GROUP*LUT_IN + i]));
    end
    return t;
  endfunction

  localparam table_t ROM = build();

  assign data = ROM[addr];

  initial assert ((GROUP + 1) * LUT_IN <= HALF);
endmodule
