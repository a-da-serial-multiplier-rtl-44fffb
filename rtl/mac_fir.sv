// mac_fir: direct-form programmable FIR filter with a single MAC unit.
//
// Samples are stored in XRAM (circular, 64 x 10 bit) and coefficients in
// BRAM (64 x 16 bit, preloaded with the symmetric coefficient set and
// writable at run time through the coef_* port).  For each accepted
// sample the control unit (mac_ctrl) streams the present and N-1 previous
// samples (N = num_taps, set at run time, at most TAPS = 32) through XREG,
// and the matching coefficients through BREG, into the multiply-
// accumulate datapath (mac_datapath, using the Baugh-Wooley multiplier);
// the round-off unit (round_sat) turns the 32-bit sum into 16 bits, and
// the output register (Out Reg) holds it.  dout_valid pulses for one
// cycle, N + 2 clock edges after the sample was taken (34 for 32 taps).
// This block structure, the run-time programmability and the 32-tap
// limit follow the source design; widths beyond 10-bit data and 16-bit
// output, the coefficient port and the handshake are this design's
// choices.  A coefficient written while a sample is being processed takes
// effect from that point of the sum onward.
module mac_fir
  import fir_pkg::sample_t, fir_pkg::coef_t, fir_pkg::out_t, fir_pkg::acc_t,
                 fir_pkg::coef_vec_t, fir_pkg::DATA_W, fir_pkg::COEF_W, fir_pkg::ACC_W,
                 fir_pkg::OUT_W, fir_pkg::COEF_FRAC;
#(
  parameter int        TAPS  = fir_pkg::TAPS,
  parameter int        DEPTH = fir_pkg::MEM_DEPTH,
  parameter coef_vec_t H     = fir_pkg::H_DEFAULT
) (
  input  logic                     clk,
  input  logic                     reset,
  input  sample_t                  din,
  input  logic                     din_valid,
  input  logic [$clog2(TAPS):0]    num_taps,    // 1..TAPS; 0 means TAPS
  output logic                     din_ready,
  input  logic                     coef_we,
  input  logic [$clog2(DEPTH)-1:0] coef_addr,
  input  coef_t                    coef_wdata,
  output out_t                     dout,
  output logic                     dout_valid,
  output logic                     dout_sat     // dout was clipped
);
  localparam int AW = $clog2(DEPTH);

  logic          x_we, x_wzero, ld, acc_en, acc_clr, out_en;
  logic [AW-1:0] x_waddr, x_raddr, b_raddr;
  logic [DATA_W-1:0] x_rdata;
  logic [COEF_W-1:0] b_rdata;
  acc_t          acc;
  out_t          rounded;
  logic          sat;

  mac_ctrl #(.TAPS(TAPS), .DEPTH(DEPTH)) u_ctrl (
    .clk, .reset, .din_valid, .num_taps,
    .ready(din_ready), .x_we, .x_wzero, .x_waddr, .x_raddr, .b_raddr,
    .ld, .acc_en, .acc_clr, .out_en
  );

  fir_ram #(.W(DATA_W), .DEPTH(DEPTH), .INIT_COEF(1'b0)) u_xram (
    .clk, .we(x_we), .waddr(x_waddr), .wdata(x_wzero ? '0 : din),
    .raddr(x_raddr), .rdata(x_rdata)
  );

  fir_ram #(.W(COEF_W), .DEPTH(DEPTH), .INIT_COEF(1'b1), .INIT_H(H)) u_bram (
    .clk, .we(coef_we), .waddr(coef_addr), .wdata(coef_wdata),
    .raddr(b_raddr), .rdata(b_rdata)
  );

  mac_datapath u_dp (
    .clk, .reset, .ld, .xin(x_rdata), .bin(b_rdata), .acc_en, .acc_clr, .acc
  );

  round_sat #(.IN_W(ACC_W), .OUT_W(OUT_W), .SHIFT(COEF_FRAC)) u_round (
    .din(acc), .dout(rounded), .sat
  );

  // Out Reg
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
endmodule
