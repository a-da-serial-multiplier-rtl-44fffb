// frty: 32-tap FIR filter for audio, top level.
//
// Three implementations of the same symmetric 32-tap filter (10-bit
// samples in, 16-bit samples out) run side by side on the same input
// stream:
//   * da_fir  - the bit-serial distributed-arithmetic filter: symmetric
//               pre-adders, coefficient-sum tables and a shift-accumulator,
//               no multiplier.  Its result is dout.
//   * mac_fir - the direct-form programmable filter: XRAM / BRAM memories,
//               a control unit and a single MAC built on the Baugh-Wooley
//               array multiplier, 34 cycles from sample to output.  Its
//               result is dout_bw.
//   * sd_fir  - the fully parallel filter with signed-digit shift-and-add
//               coefficient multipliers, output one clock after the
//               sample.  Its result is dout_sd.
// A sample is taken when din_valid and din_ready are both high; din_ready
// is high when all filters can take a sample (the MAC filter sets the
// rate: one sample per num_taps + 1 cycles, 33 at full length).  With the
// default coefficients the three outputs are equal.  The MAC filter's
// coefficients can be rewritten through coef_we / coef_addr / coef_wdata
// (tap k at address k), and it can be run with fewer taps (num_taps, 1..32,
// 0 meaning 32, taken with each sample; latency num_taps + 2); the DA and
// SD filters are fixed at elaboration.  The clk, reset, din[9:0] and
// dout[15:0] ports follow the source design; the rest of the interface is
// this design's.  Reset is synchronous and active high; after it the MAC
// filter spends 64 cycles clearing its sample memory (din_ready low).
module frty
  import fir_pkg::*;
#(
  parameter coef_vec_t H = fir_pkg::H_DEFAULT
) (
  input  logic                 clk,
  input  logic                 reset,
  input  sample_t              din,
  input  logic                 din_valid,
  output logic                 din_ready,
  input  logic [$clog2(TAPS):0] num_taps,      // MAC filter tap count, 1..32; 0 means 32
  input  logic                 coef_we,
  input  logic [MEM_AW-1:0]    coef_addr,
  input  coef_t                coef_wdata,
  output out_t                 dout,          // DA filter output
  output logic                 dout_valid,
  output logic                 dout_sat,
  output out_t                 dout_bw,       // single-MAC (BW) filter output
  output logic                 dout_bw_valid,
  output logic                 dout_bw_sat,
  output out_t                 dout_sd,       // parallel signed-digit filter output
  output logic                 dout_sd_valid,
  output logic                 dout_sd_sat
);
  logic da_ready, mac_ready, take;

  assign din_ready = da_ready && mac_ready;
  assign take      = din_valid && din_ready;

  da_fir #(.TAPS(TAPS), .H(H)) u_da (
    .clk, .reset, .din, .din_valid(take), .din_ready(da_ready),
    .dout, .dout_valid, .dout_sat
  );

  mac_fir #(.TAPS(TAPS), .DEPTH(MEM_DEPTH), .H(H)) u_mac (
    .clk, .reset, .din, .din_valid(take), .num_taps, .din_ready(mac_ready),
    .coef_we, .coef_addr, .coef_wdata,
    .dout(dout_bw), .dout_valid(dout_bw_valid), .dout_sat(dout_bw_sat)
  );

  sd_fir #(.TAPS(TAPS), .H(H)) u_sd (
    .clk, .reset, .din, .din_valid(take),
    .dout(dout_sd), .dout_valid(dout_sd_valid), .dout_sat(dout_sd_sat)
  );
endmodule
