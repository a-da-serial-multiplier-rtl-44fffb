// mac_ctrl: control unit of the single-MAC direct-form filter.
//
// It generates the addresses and write strobes of the sample memory
// (XRAM) and the read addresses of the coefficient memory (BRAM), and
// sequences the datapath.  After reset it first writes zeros into every
// XRAM entry (CLEAR, DEPTH cycles), so the filter history starts at zero.
// In IDLE it accepts a sample (din_valid with ready high), writes it at
// the circular write pointer, latches the run-time tap count N (num_taps,
// 1..TAPS; 0 or a larger value means TAPS) and then, in RUN, issues N read
// pairs: XRAM[newest - k] with BRAM[k], k = 0..N-1, one per cycle (ld).
// The accumulate strobes follow one cycle later and out_en two cycles
// after the last read, so the filter output register is written N + 2
// clock edges after the sample was taken: 34 for the full 32 taps, the
// latency of the source design.  A new sample may be accepted every
// N + 1 cycles.  A run-time tap count with an upper limit of 32 follows
// the source design; its encoding, the circular addressing, the clearing
// pass and the handshake are this design's choices.  Synchronous
// active-high reset.
module mac_ctrl #(
  parameter int TAPS  = fir_pkg::TAPS,
  parameter int DEPTH = fir_pkg::MEM_DEPTH
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     din_valid,
  input  logic [$clog2(TAPS):0]    num_taps,  // taps to use, 1..TAPS
  output logic                     ready,     // IDLE: a sample can be taken
  output logic                     x_we,      // XRAM write strobe
  output logic                     x_wzero,   // write zero (clearing pass)
  output logic [$clog2(DEPTH)-1:0] x_waddr,
  output logic [$clog2(DEPTH)-1:0] x_raddr,
  output logic [$clog2(DEPTH)-1:0] b_raddr,
  output logic                     ld,        // load XREG / BREG
  output logic                     acc_en,
  output logic                     acc_clr,
  output logic                     out_en     // accumulator holds y(n)
);
  localparam int AW = $clog2(DEPTH);

  typedef enum logic [1:0] {CLEAR, IDLE, RUN} state_t;
  state_t  state;
  logic [AW-1:0] cnt;      // clearing address, or tap index k in RUN
  logic [AW-1:0] wptr;     // next XRAM write address
  logic [AW-1:0] newest;   // address of x(n)
  logic          last_q;
  logic [AW-1:0] last_k;   // N - 1 for the sample in progress

  always_comb begin
    ready   = (state == IDLE);
    x_we    = (state == CLEAR) || (ready && din_valid);
    x_wzero = (state == CLEAR);
    x_waddr = (state == CLEAR) ? cnt : wptr;
    x_raddr = newest - cnt;
    b_raddr = cnt;
    ld      = (state == RUN);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= CLEAR;
      cnt    <= '0;
      wptr   <= '0;
      newest <= '0;
      last_k <= AW'(TAPS-1);
    end else begin
      unique case (state)
        CLEAR: begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(DEPTH-1)) begin
            cnt   <= '0;
            state <= IDLE;
          end
        end
        IDLE: if (din_valid) begin
          last_k <= (num_taps == '0 || num_taps > ($clog2(TAPS)+1)'(TAPS))
                    ? AW'(TAPS-1) : AW'(num_taps - 1'b1);
          newest <= wptr;
          wptr   <= wptr + 1'b1;
          cnt    <= '0;
          state  <= RUN;
        end
        RUN: begin
          cnt <= cnt + 1'b1;
          if (cnt == last_k) begin
            cnt   <= '0;
            state <= IDLE;
          end
        end
        default: state <= CLEAR;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      acc_en  <= 1'b0;
      acc_clr <= 1'b0;
      last_q  <= 1'b0;
      out_en  <= 1'b0;
    end else begin
      acc_en  <= ld;
      acc_clr <= ld && (cnt == '0);
      last_q  <= ld && (cnt == last_k);
      out_en  <= last_q;
    end
  end

  // The tap count must fit in the memory.
  initial assert (TAPS <= DEPTH && TAPS >= 1);
endmodule
