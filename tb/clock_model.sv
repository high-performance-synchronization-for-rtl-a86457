// clock_model: behavioural fixed-frequency clock for simulation, with edges at their ideal
// real-valued times, so that rounding to the simulator's precision does not add up.
// FREQ is in Hz and the first rising edge comes after half a period.
module clock_model #(
  parameter real FREQ = 311.04e6
) (
  output logic clk
);
  real t_ideal;
  initial begin
    clk     = 1'b0;
    t_ideal = 0.0;
    forever begin
      t_ideal = t_ideal + 0.5e9 / FREQ;
      #(t_ideal - $realtime);
      clk = ~clk;
    end
  end
endmodule
