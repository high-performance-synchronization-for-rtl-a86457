// tb_holdover_filter: checks the holdover-loop error, loop filter and gain with the
// document's parameters (d = 0.05, A = 1, 16-bit DAC, +-50 ppm VCO, N = 1,544,000).
// Random period measurements near the nominal 311,040,000 ticks are fed with a fixed
// control value. A real-arithmetic model gives e = meas - C,
// y += e - d*e_prev, code = 32768 + G*y, G = f0^2 / (Kv*N*f_r0). Every DAC code must
// match within 1 code, one cycle after `meas_valid` (the model uses d and G as held in Q16). A large error must saturate the code
// and set `sat`, and the integrator must not wind up: returning to zero error must bring
// the code back at once.
module tb_holdover_filter;
  import ces_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #2 clk = ~clk;

  logic mv = 0, dv, sat;
  logic [31:0] meas = 0;
  ctrl_t ctrl, err;
  logic [15:0] code;
  holdover_filter dut (.clk, .rst_n, .meas_valid(mv), .meas, .ctrl, .dac_valid(dv), .dac_code(code), .err, .sat);

  real y = 0.0, e_prev = 0.0;
  real G;

  task automatic update(input longint m, input bit expect_sat);
    real e, ynew, cexp;
    @(negedge clk); mv = 1; meas = 32'(m);
    @(negedge clk); mv = 0;
    e = real'(m) - real'(ctrl) / 65536.0;
    ynew = y + e - (3277.0 / 65536.0) * e_prev;   // d = 0.05 in Q16
    e_prev = e;
    cexp = 32768.0 + G * ynew;
    checks++;
    if (!dv) begin failures++; $display("dac_valid missing"); end
    if (expect_sat) begin
      checks++;
      if (!sat || !(code == 16'hFFFF || code == 0)) begin failures++; $display("no saturation, code %0d", code); end
    end else begin
      y = ynew;
      checks++;
      if (real'(code) - cexp > 1.0 || real'(code) - cexp < -1.0) begin
        failures++; $display("code %0d expected %f", code, cexp);
      end
    end
  endtask

  initial begin
    G = 1.544e6 * 1.544e6 / ((100.0e-6 * 1.544e6 / 65536.0) * 1544000.0 * 311.04e6);
    G = real'(longint'(G * 65536.0)) / 65536.0;   // G as held in Q16
    ctrl = ctrl_t'(64'd311040000 << 16) + ctrl_t'(12345);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 300; i++) update(311040000 + longint'($urandom_range(0, 2000)) - 1000, 0);
    // large error: saturates, y frozen
    update(311040000 + 100000, 1);
    update(311040000 + 100000, 1);
    e_prev = real'(100000) - 12345.0 / 65536.0;
    for (int i = 0; i < 20; i++) update(311040000 + longint'($urandom_range(0, 200)) - 100, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
