// weight_blend: hands control of the holdover loop from the open-loop filter to NTP,
// and holds the last control value when updates stop.
//
// The document blends the open-loop estimate c[n] and the NTP estimate d[n] with a weight
// w that ramps linearly from 0 to 1, reaching 1 after 50 seconds:
//     C[n] = (1 - w) * c[n] + w * d[n]
// C is the control input subtracted from the Measure-T result in the holdover loop. Once
// w = 1, NTP alone steers the loop. In holdover, which begins when updates from the master
// stop, the last valid control value is kept.
//
// How it works: the latest c and d are held in registers. Both start at the nominal value
// C0 = N*f_r0/f_0, so the output runs at the nominal frequency until the first estimate.
// The ramp starts at the first c (`ramp_start` pulses once). It then advances one step
// on every holdover-loop update `step`, once per second in the document's configuration.
// w = k/RAMP_STEPS, in Q16, equals exactly 1 from step RAMP_STEPS on (`ntp_full`).
// C = c + w*(d - c) is recomputed into a register every cycle, so it follows a new input
// two cycles later. `holdover` rises after HOLD_STEPS updates with no new c and no new d.
// It freezes the ramp. C then keeps its last value, since neither input changes.
//
// This design's choices, where the document is silent: the fixed-point formats, starting
// the ramp at the first open-loop estimate, advancing it per loop update, and the holdover
// detection by a count of updates.
module weight_blend
  import ces_pkg::*;
#(
  parameter int    RAMP_STEPS = 50,
  parameter int    HOLD_STEPS = 3,
  parameter ctrl_t C0         = nominal_ctrl(1544000, 311.04e6, 1.544e6)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   c_valid,
  input  ctrl_t  c,
  input  logic   d_valid,
  input  ctrl_t  d,
  input  logic   step,
  output ctrl_t  ctrl,         // C[n]
  output logic [Q:0] w,        // weight, Q16 (65536 = 1)
  output logic   ramp_start,
  output logic   ntp_full,
  output logic   holdover
);
  localparam int KW    = $clog2(RAMP_STEPS + 1);
  localparam int HW    = $clog2(HOLD_STEPS + 1);
  localparam int W_INC = (1 << Q) / RAMP_STEPS;

  ctrl_t          c_reg, d_reg;
  logic           have_c;
  logic [KW-1:0]  k;
  logic [HW-1:0]  idle;
  logic [Q:0]     w_next;
  logic signed [CTRL_W+Q+1:0] mix;

  always_comb begin
    if (k >= KW'(RAMP_STEPS)) w_next = (Q+1)'(1 << Q);
    else                      w_next = (Q+1)'(k) * (Q+1)'(W_INC);
  end
  assign mix = (CTRL_W+Q+2)'(d_reg - c_reg) * (CTRL_W+Q+2)'(signed'({1'b0, w}));
  assign ntp_full = (w == (Q+1)'(1 << Q));
  assign holdover = (idle >= HW'(HOLD_STEPS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_reg      <= C0;
      d_reg      <= C0;
      have_c     <= 1'b0;
      k          <= '0;
      idle       <= '0;
      w          <= '0;
      ctrl       <= C0;
      ramp_start <= 1'b0;
    end else begin
      ramp_start <= 1'b0;
      if (c_valid) begin
        c_reg  <= c;
        have_c <= 1'b1;
        if (!have_c) ramp_start <= 1'b1;
      end
      if (d_valid) d_reg <= d;
      if (c_valid || d_valid)  idle <= '0;
      else if (step && !holdover) idle <= idle + HW'(1);
      if (step && have_c && !holdover && k < KW'(RAMP_STEPS)) k <= k + KW'(1);
      w    <= w_next;
      ctrl <= c_reg + CTRL_W'(mix >>> Q);
    end
  end
endmodule
