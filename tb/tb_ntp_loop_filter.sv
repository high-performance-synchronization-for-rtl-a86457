// tb_ntp_loop_filter: checks H1(z) = (1 - alpha)/(1 - alpha z^-1), alpha = 0.1, and the
// gain G1 = 0.08 Hz per cycle, expressed as a control period.
// Random phase offsets (in half cycles) are fed. A real-arithmetic model gives
// v = alpha*v + (1 - alpha)*theta and d = C0 - G1*(N*f_r0/f0^2)*v. d must match within
// 0.02 tick, one cycle after `theta_valid`. A constant offset must settle to the DC
// gain of 1, and a positive offset must lower d (a higher frequency).
module tb_ntp_loop_filter;
  import ces_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #2 clk = ~clk;

  logic tv = 0, dv;
  logic signed [64:0] theta = 0;
  ctrl_t d;
  ntp_loop_filter dut (.clk, .rst_n, .theta_valid(tv), .theta, .d_valid(dv), .d);

  real v = 0.0;
  real C0 = 311040000.0;
  real KT = real'(longint'(0.08 * 1544000.0 * 311.04e6 / (1.544e6 * 1.544e6) * 65536.0)) / 65536.0;

  task automatic feed(input longint th_half);
    real dexp;
    @(negedge clk); tv = 1; theta = 65'(th_half);
    @(negedge clk); tv = 0;
    v = (6554.0 / 65536.0) * v + (58982.0 / 65536.0) * (real'(th_half) / 2.0);   // alpha in Q16
    dexp = C0 - KT * v;
    checks += 2;
    if (!dv) begin failures++; $display("d_valid missing"); end
    if (real'(d) / 65536.0 - dexp > 0.02 || real'(d) / 65536.0 - dexp < -0.02) begin
      failures++; $display("d %f expected %f", real'(d) / 65536.0, dexp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    checks++;
    if (d != ctrl_t'(64'd311040000 << 16)) begin failures++; $display("reset value"); end
    for (int i = 0; i < 200; i++) feed(longint'($urandom_range(0, 4000)) - 2000);
    for (int i = 0; i < 30; i++) feed(200);    // constant 100 cycles
    checks++;
    if (real'(d) / 65536.0 > C0 - KT * 99.9) begin failures++; $display("DC gain / sign wrong"); end
    for (int i = 0; i < 30; i++) feed(-7);
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
