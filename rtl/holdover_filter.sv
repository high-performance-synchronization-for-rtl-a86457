// holdover_filter: the digital part of the holdover loop, a frequency-locked loop, from
// the period error to the DAC code.
//
// Following the document, the Measure-T result (reference ticks in N output cycles) minus
// the control input C gives the period error e[n]. The error passes through the loop
// filter H(z) = (1 - d z^-1) / (1 - z^-1), with a pole at z = 1 for zero steady-state error
// and d = 0.05, then the gain G. The result sets a 16-bit DAC that steers the VCO. G is
// chosen so that the loop gain A = G * Kv * N * f_r0 / f_0^2 is 1, where Kv is the VCO
// gain. With a +-50 ppm VCO across the full 16-bit DAC range, f_0 = 1.544 MHz,
// f_r0 = 311.04 MHz and N = 1,544,000, this gives G of about 2.107 DAC codes per tick.
//
// How it works: on `meas_valid`,
//     e[n] = meas - C,   y[n] = y[n-1] + e[n] - d*e[n-1],   code = 2^(DAC_W-1) + G*y[n]
// computed in Q16 fixed point, rounded to the nearest code and saturated to the DAC range. `dac_valid` follows
// `meas_valid` by one cycle. When the code saturates, y keeps its previous value, so the
// integrator does not wind up, and `sat` is set. A rising error gives a higher code, and a
// higher code must mean a higher VCO frequency. A longer measured period means a slower
// output, so the loop is negative feedback.
//
// This design's choices, where the document is silent: fixed point in place of the
// document's floating point, the offset-binary DAC code centred on f_0, and the
// anti-windup rule.
module holdover_filter
  import ces_pkg::*;
#(
  parameter longint N       = 1544000,
  parameter real    F0      = 1.544e6,   // nominal VCO centre frequency, Hz
  parameter real    F_R0    = 311.04e6,  // nominal reference frequency, Hz
  parameter real    VCO_PPM = 50.0,      // VCO deviation, +- ppm over the DAC range
  parameter real    LOOP_A  = 1.0,       // loop gain A
  parameter real    D       = 0.05,      // zero of H(z)
  parameter int     MW      = 32,        // Measure-T width
  parameter int     DAC_W   = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             meas_valid,
  input  logic [MW-1:0]    meas,
  input  ctrl_t            ctrl,        // C[n]
  output logic             dac_valid,
  output logic [DAC_W-1:0] dac_code,
  output ctrl_t            err,         // e[n], last value
  output logic             sat
);
  // G = LOOP_A * f_0^2 / (Kv * N * f_r0), Kv = 2*VCO_PPM*1e-6*f_0 / 2^DAC_W  (codes per tick)
  localparam real    KV  = 2.0 * VCO_PPM * 1.0e-6 * F0 / real'(longint'(1) << DAC_W);
  localparam real    G   = LOOP_A * F0 * F0 / (KV * real'(N) * F_R0);
  localparam longint G_Q = to_q16(G);
  localparam longint D_Q = to_q16(D);
  localparam int     YW  = 64;
  localparam int     PW  = YW + 40;

  ctrl_t                 e, e_prev;
  logic signed [YW-1:0]  y, y_new;
  logic signed [PW-1:0]  u;
  logic signed [PW-1:0]  code_full;
  logic signed [YW+Q+1:0] de;

  localparam longint CODE_MAX = (longint'(1) << DAC_W) - 1;
  localparam longint CODE_MID =  longint'(1) << (DAC_W - 1);

  assign e         = (ctrl_t'({1'b0, meas}) <<< CTRL_F) - ctrl;
  assign de        = (YW+Q+2)'(e_prev) * (YW+Q+2)'(D_Q);
  assign y_new     = y + YW'(e) - YW'(de >>> Q);
  assign u         = PW'(y_new) * PW'(G_Q);
  assign code_full = ((u + (PW'(1) <<< (CTRL_F + Q - 1))) >>> (CTRL_F + Q)) + PW'(CODE_MID);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      e_prev    <= '0;
      err       <= '0;
      dac_valid <= 1'b0;
      dac_code  <= DAC_W'(CODE_MID);
      sat       <= 1'b0;
    end else begin
      dac_valid <= meas_valid;
      if (meas_valid) begin
        e_prev <= e;
        err    <= e;
        if (code_full > PW'(CODE_MAX)) begin
          dac_code <= DAC_W'(CODE_MAX);
          sat      <= 1'b1;
        end else if (code_full < 0) begin
          dac_code <= '0;
          sat      <= 1'b1;
        end else begin
          dac_code <= DAC_W'(code_full);
          y        <= y_new;
          sat      <= 1'b0;
        end
      end
    end
  end
endmodule
