// vco_model: behavioural model of the DAC and the voltage-controlled oscillator, for
// simulation only.
//
// The output frequency is linear in the DAC code:
//     f = F0 * (1 + OFFSET_PPM*1e-6) + (code - 2^15) / 2^16 * 2 * DEV_PPM*1e-6 * F0
// It spans +-DEV_PPM around a centre that is OFFSET_PPM away from the nominal F0
// (+-50 ppm and a 10 ppm offset in the document's simulations). Edges are placed at
// their ideal real-valued times. Each delay is rounded to the simulator's precision, but
// the rounding errors do not add up. `freq` shows the present frequency, for testbench
// checks. A new code takes effect at the next half period.
module vco_model #(
  parameter real F0         = 1.544e6,
  parameter real OFFSET_PPM = 10.0,
  parameter real DEV_PPM    = 50.0
) (
  input  logic [15:0] code,
  output logic        f_out
);
  real freq;
  real t_ideal;

  always_comb
    freq = F0 * (1.0 + OFFSET_PPM * 1.0e-6)
         + (real'(code) - 32768.0) / 65536.0 * 2.0 * DEV_PPM * 1.0e-6 * F0;

  initial begin
    f_out   = 1'b0;
    t_ideal = 0.0;
    forever begin
      t_ideal = t_ideal + 0.5e9 / freq;          // ns
      #(t_ideal - $realtime);
      f_out = ~f_out;
    end
  end
endmodule
