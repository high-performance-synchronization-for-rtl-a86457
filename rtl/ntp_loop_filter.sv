// ntp_loop_filter: the NTP loop's filter H1(z) and gain G1, and the sum with f_0 that gives
// the NTP frequency estimate d[n].
//
// The document filters the phase offsets theta[n] with a single-pole IIR,
// H1(z) = (1 - alpha) / (1 - alpha z^-1), alpha = 0.1. It scales the result by G1 = 0.08
// and adds the nominal frequency f_0. There is no integrator: the timestamps accumulate
// phase already, so the NTP loop behaves as a phase-locked loop around the holdover loop.
// The holdover loop's control input is a period in reference ticks, not a frequency. So
// this design gives d[n] in the same units: a frequency offset df gives a control value of
// about C0 - df * N*f_r0/f_0^2. The output is therefore
//     v[n] = alpha * v[n-1] + (1 - alpha) * theta[n]
//     d[n] = C0 - G1 * (N * f_r0 / f_0^2) * v[n]
// where C0 = N*f_r0/f_0 is the nominal control value. A master ahead of the slave
// (theta > 0) lowers d, a shorter period, so the recovered clock speeds up.
//
// How it works: theta arrives in half cycles. It is turned into Q16 cycles, clipped to
// +-2^31 cycles, and filtered in Q16. `d_valid` follows `theta_valid` by one cycle. v
// starts at 0, so d starts at C0.
// This design's choices: the change to period units and the fixed-point formats. The
// document computes this stage in floating point in software.
module ntp_loop_filter
  import ces_pkg::*;
#(
  parameter longint N     = 1544000,
  parameter real    F0    = 1.544e6,
  parameter real    F_R0  = 311.04e6,
  parameter real    ALPHA = 0.1,
  parameter real    G1    = 0.08,       // Hz per cycle of phase offset
  parameter int     TS_W  = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 theta_valid,
  input  logic signed [TS_W:0] theta,      // half cycles
  output logic                 d_valid,
  output ctrl_t                d
);
  localparam ctrl_t  C0      = nominal_ctrl(N, F_R0, F0);
  localparam longint A_Q     = to_q16(ALPHA);
  localparam longint B_Q     = to_q16(1.0 - ALPHA);
  localparam longint G1T_Q   = to_q16(G1 * real'(N) * F_R0 / (F0 * F0));  // ticks per cycle, Q16
  localparam int     VW      = 56;
  localparam int     PW      = VW + 40;
  localparam longint LIM     = longint'(1) << 32;   // 2^31 cycles in half cycles

  logic signed [VW-1:0] v, th_q, v_new;
  logic signed [PW-1:0] pa, pb, pg;

  always_comb begin
    if (theta > (TS_W+1)'(LIM))        th_q = VW'(LIM) <<< (Q - 1);
    else if (theta < -(TS_W+1)'(LIM))  th_q = -(VW'(LIM) <<< (Q - 1));
    else                               th_q = VW'(theta) <<< (Q - 1);
  end
  assign pa    = PW'(v) * PW'(A_Q);
  assign pb    = PW'(th_q) * PW'(B_Q);
  assign v_new = VW'((pa + pb) >>> Q);
  assign pg    = PW'(v_new) * PW'(G1T_Q);     // Q16 cycles * Q16 ticks/cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v       <= '0;
      d       <= C0;
      d_valid <= 1'b0;
    end else begin
      d_valid <= theta_valid;
      if (theta_valid) begin
        v <= v_new;
        d <= C0 - CTRL_W'(pg >>> (2 * Q - CTRL_F));
      end
    end
  end
endmodule
