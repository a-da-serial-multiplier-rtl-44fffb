// fir_ram: small memory with one synchronous write port and one
// asynchronous read port, as used for the sample memory (XRAM) and the
// coefficient memory (BRAM) of the single-MAC filter.
//
// Writes happen on the rising clock edge when we is high; the read port
// returns mem[raddr] combinationally (distributed-RAM style), and the
// filter registers it in XREG / BREG.  The 64-entry depth follows the
// source design.  When INIT_COEF is set, the memory starts out holding the
// 32 taps of the symmetric coefficient set INIT_H, so the coefficients are
// already stored at power-up and can be reloaded at run time through the
// write port; otherwise it starts out cleared.  Width and initial
// contents are this design's choices.
module fir_ram #(
  parameter int                 W         = 16,
  parameter int                 DEPTH     = fir_pkg::MEM_DEPTH,
  parameter bit                 INIT_COEF = 1'b0,
  parameter fir_pkg::coef_vec_t INIT_H    = fir_pkg::H_DEFAULT
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++)
      mem[i] = (INIT_COEF && i < fir_pkg::TAPS) ? W'(fir_pkg::tap_coef(INIT_H, i)) : '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
