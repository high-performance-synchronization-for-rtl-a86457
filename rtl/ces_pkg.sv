// ces_pkg: shared types and constants of the circuit-emulation clock-recovery design.
//
// The control path (open-loop estimate c[n], NTP estimate d[n], blended control C[n] and the
// holdover-loop error e[n]) is carried in one signed fixed-point format, ctrl_t: a count of
// reference-clock ticks with CTRL_F fraction bits. The reference is 311.04 MHz and the nominal
// control value, the length of N output cycles in reference ticks, is N*f_r0/f_0 = 311,040,000,
// so 32 integer bits (signed) suffice. Gains are unsigned Q16 numbers (1.0 = 65536).
// The formats are this design's choice; the document computes these stages in floating point.
package ces_pkg;
  localparam int CTRL_W = 48;            // width of ctrl_t
  localparam int CTRL_F = 16;            // fraction bits of ctrl_t
  localparam int Q      = 16;            // fraction bits of gains
  typedef logic signed [CTRL_W-1:0] ctrl_t;

  // Nominal control value N*f_r0/f_0 in ctrl_t units.
  function automatic ctrl_t nominal_ctrl(input longint n, input real f_r0, input real f_0);
    real t;
    t = real'(n) * f_r0 / f_0 * 65536.0;
    return ctrl_t'(longint'(t));   // real to integer conversion rounds
  endfunction

  // Round a real gain to Q16.
  function automatic longint to_q16(input real g);
    return longint'(g * 65536.0);
  endfunction
endpackage
