// da_fir: bit-serial distributed-arithmetic (DA) 32-tap symmetric FIR
// filter with fixed coefficients.
//
// For a sample taken with din_valid (and ready high) the filter
//   1. shifts it into the delay line; the symmetric pre-adders
//      (sym_tap_line) form the TAPS/2 sums u[k] = x(n-k) + x(n-31+k),
//   2. loads the sums into parallel-to-serial shift registers (LOAD),
//   3. for DATA_W+1 cycles (SERIAL) presents one bit slice, most
//      significant bit first: bit b of every u[k] forms a TAPS/2-bit
//      address, split over TAPS/2/LUT_IN tables (da_lut) whose outputs an
//      adder combines into sum_k h[k] * u_k,b,
//   4. accumulates the slices with the sign weight (da_shift_acc),
//   5. rounds the 32-bit result to 16 bits (round_sat) into the output
//      register.
// dout_valid pulses 13 clock edges after the sample was taken; a new
// sample may be accepted every 13 cycles.  Symmetric pre-addition,
// bit-serial DA with precomputed coefficient-sum tables and no multiplier
// follow the source design; the table split, the MSB-first order, the
// sequencing and the handshake are this design's choices.  Synchronous
// active-high reset.
module da_fir
  import fir_pkg::sample_t, fir_pkg::out_t, fir_pkg::acc_t, fir_pkg::coef_vec_t,
                 fir_pkg::DATA_W, fir_pkg::COEF_W, fir_pkg::ACC_W, fir_pkg::OUT_W,
                 fir_pkg::COEF_FRAC;
#(
  parameter int        TAPS   = fir_pkg::TAPS,
  parameter int        LUT_IN = 8,
  parameter coef_vec_t H      = fir_pkg::H_DEFAULT
) (
  input  logic    clk,
  input  logic    reset,
  input  sample_t din,
  input  logic    din_valid,
  output logic    din_ready,
  output out_t    dout,
  output logic    dout_valid,
  output logic    dout_sat
);
  localparam int NH    = TAPS / 2;            // pre-added pairs
  localparam int NLUT  = NH / LUT_IN;         // tables
  localparam int B     = DATA_W + 1;          // bits of a pre-added sum
  localparam int LW    = COEF_W + $clog2(LUT_IN);
  localparam int SW    = LW + $clog2(NLUT) + 1;   // width of the table sum
  localparam int CW    = $clog2(B);

  typedef enum logic [1:0] {IDLE, LOAD, SERIAL} state_t;
  state_t state;
  logic [CW-1:0] bitc;                        // slice counter
  logic [NH-1:0][DATA_W:0] u;                 // from the pre-adders
  logic [NH-1:0][DATA_W:0] piso;              // serialising registers
  logic [NH-1:0] slice;                       // current bit slice
  logic signed [LW-1:0] lut_q [NLUT];
  logic signed [SW-1:0] lut_sum;
  acc_t acc;
  out_t rounded;
  logic sat, out_en;

  assign din_ready = (state == IDLE);

  sym_tap_line #(.TAPS(TAPS)) u_taps (
    .clk, .reset, .shift(din_ready && din_valid), .din, .u
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= IDLE;
      bitc   <= '0;
      piso   <= '0;
      out_en <= 1'b0;
    end else begin
      out_en <= 1'b0;
      unique case (state)
        IDLE:   if (din_valid) state <= LOAD;
        LOAD: begin
          piso  <= u;
          bitc  <= '0;
          state <= SERIAL;
        end
        SERIAL: begin
          for (int k = 0; k < NH; k++) piso[k] <= piso[k] << 1;
          bitc <= bitc + 1'b1;
          if (bitc == CW'(B-1)) begin
            state  <= IDLE;
            out_en <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    for (int k = 0; k < NH; k++) slice[k] = piso[k][DATA_W];
  end

  for (genvar g = 0; g < NLUT; g++) begin : g_lut
    da_lut #(.LUT_IN(LUT_IN), .GROUP(g), .H(H)) u_lut (
      .addr(slice[g*LUT_IN +: LUT_IN]),
      .data(lut_q[g])
    );
  end

  // Adder combining the partial tables.
  always_comb begin
    lut_sum = '0;
    for (int g = 0; g < NLUT; g++) lut_sum += SW'(lut_q[g]);
  end

  da_shift_acc #(.IN_W(SW), .ACC_W(ACC_W)) u_acc (
    .clk, .reset, .en(state == SERIAL), .first(bitc == '0),
    .din(lut_sum), .acc
  );

  round_sat #(.IN_W(ACC_W), .OUT_W(OUT_W), .SHIFT(COEF_FRAC)) u_round (
    .din(acc), .dout(rounded), .sat
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      dout       <= '0;
      dout_valid <= 1'b0;
      dout_sat   <= 1'b0;
    end else begin
      dout_valid <= out_en;
      if (out_en) begin
        dout     <= rounded;
        dout_sat <= sat;
      end
    end
  end

  initial assert (TAPS % 2 == 0 && NH % LUT_IN == 0);
endmodule
