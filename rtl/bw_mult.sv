// bw_mult: scalable N x N two's-complement Baugh-Wooley array multiplier.
//
// Full precision (half = 0): p = a * b with a, b signed N-bit, p signed
// 2N-bit.  Half precision (half = 1): only a[N/2-1:0] and b[N/2-1:0] are
// used, as signed N/2-bit numbers; the upper operand bits are gated to
// zero so that the upper part of the array does not switch, and p is
// their N-bit product sign-extended to 2N bits.
//
// Structure: an N x N array of bw_cell (AND gate plus full adder) in
// carry-save form.  Cell (i, j) has weight 2^(i+j); its sum goes to cell
// (i-1, j+1) and its carry to cell (i, j+1).  Row j yields product bit j;
// the last row's sums and carries are merged by a ripple-carry row that
// yields bits N..2N-1.  Following the modified Baugh-Wooley form, the
// partial products of the sign row and column (but not the corner) are
// complemented and the constants 2^(s+1) and 2^(2s+1) are added, where s
// is the sign bit index (N-1, or N/2-1 in half precision).  In half
// precision those constants enter through the free carry inputs of row 0;
// in full precision through the carry input of the merge row and the
// top bit.  A row of multiplexers after the merge row selects the upper N
// output bits: the array result or the sign extension of the N/2-bit
// product.
//
// The 16-bit width and the 8-bit precision mode with output multiplexers
// follow the source design; the exact cell placement and how the
// constants are injected are this design's own.  Combinational.
module bw_mult #(
  parameter int N = 16  // operand width, even
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           half,  // 1: N/2-bit precision
  output logic [2*N-1:0] p
);
  localparam int H = N / 2;

  logic [N-1:0]   ag, bg;       // operands after precision gating
  logic [2*N-1:0] raw;          // array result before the output muxes
  logic [N-1:0]   mx, my;       // merge-row operands
  logic [N-1:0]   lo;           // product bits 0..N-1, one per row

  always_comb begin
    for (int i = 0; i < N; i++) begin
      ag[i] = a[i] & ~(half && i >= H);
      bg[i] = b[i] & ~(half && i >= H);
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_row
    logic [N-1:0] s, c;         // sums and carries of this row's cells
    logic [N-1:0] si, ci, iv;   // their sum / carry inputs and complement flags

    for (genvar i = 0; i < N; i++) begin : g_col
      // complemented partial products: sign row and column, not the corner
      assign iv[i] = half ? (((i == H-1) && (j < H-1)) || ((j == H-1) && (i < H-1)))
                          : (((i == N-1) && (j < N-1)) || ((j == N-1) && (i < N-1)));
      if (j == 0) begin : g_first
        assign si[i] = 1'b0;
        // half precision constants 2^H and 2^(N-1) enter here
        assign ci[i] = half && (i == H || i == N-1);
      end else begin : g_next
        if (i < N-1) begin : g_sum
          assign si[i] = g_row[j-1].s[i+1];
        end else begin : g_edge
          assign si[i] = 1'b0;
        end
        assign ci[i] = g_row[j-1].c[i];
      end

      bw_cell u_cell (
        .a  (ag[i]),
        .b  (bg[j]),
        .inv(iv[i]),
        .si (si[i]),
        .ci (ci[i]),
        .so (s[i]),
        .co (c[i])
      );
    end

    assign lo[j] = s[0];
  end

  // Merge row and output multiplexers.
  always_comb begin
    logic cy;                           // merge-row ripple carry
    for (int k = 0; k < N; k++) begin
      mx[k] = (k < N-1) ? g_row[N-1].s[k+1] : 1'b0;
      my[k] = g_row[N-1].c[k];
    end
    cy = ~half;                         // full precision constant 2^N
    raw[N-1:0] = lo;
    for (int k = 0; k < N; k++) begin
      // the top bit also takes the full precision constant 2^(2N-1)
      raw[N+k] = mx[k] ^ my[k] ^ cy ^ ((k == N-1) && !half);
      cy       = (mx[k] & my[k]) | (mx[k] & cy) | (my[k] & cy);
    end
    p[N-1:0]   = raw[N-1:0];
    p[2*N-1:N] = half ? {N{raw[N-1]}} : raw[2*N-1:N];
  end
endmodule
