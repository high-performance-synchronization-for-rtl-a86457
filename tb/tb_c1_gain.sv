// tb_c1_gain: checks the open-loop gain C1 with the document's N = 1,544,000 and
// L_frame = 193, and with a non-integer ratio (N = 1000, L_frame = 193).
// For a mean FIR output m (ticks * 2^15), the control value must be
// m * N / L_frame / 2^15 ticks, here computed in real arithmetic. It must match within 2
// LSBs of the 16-bit fraction, one cycle after the input. A 125 us interarrival time
// (38,880 ticks) must give the nominal 311,040,000 ticks exactly.
module tb_c1_gain;
  import ces_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #2 clk = ~clk;

  logic iv = 0, cv_a, cv_b;
  logic signed [31:0] m = 0;
  ctrl_t ca, cb;
  c1_gain                              dut_a (.clk, .rst_n, .in_valid(iv), .in_data(m), .c_valid(cv_a), .c(ca));
  c1_gain #(.N(1000), .L_FRAME(193))   dut_b (.clk, .rst_n, .in_valid(iv), .in_data(m), .c_valid(cv_b), .c(cb));

  task automatic apply(input int val);
    real ea, eb;
    @(negedge clk); iv = 1; m = val;
    @(negedge clk); iv = 0;
    ea = real'(val) * 1544000.0 / 193.0 / 32768.0 * 65536.0;
    eb = real'(val) * 1000.0 / 193.0 / 32768.0 * 65536.0;
    checks += 3;
    if (!(cv_a && cv_b)) begin failures++; $display("valid missing"); end
    if ((real'(ca) - ea) > 2.0 || (real'(ca) - ea) < -2.0) begin failures++; $display("a: %0d vs %f", ca, ea); end
    if ((real'(cb) - eb) > 2.0 || (real'(cb) - eb) < -2.0) begin failures++; $display("b: %0d vs %f", cb, eb); end
    @(negedge clk);
    checks++;
    if (cv_a) begin failures++; $display("valid stuck"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    apply(38880 * 32768);
    checks++;
    if (ca != ctrl_t'(64'd311040000 << 16)) begin failures++; $display("nominal %0d", ca >>> 16); end
    for (int i = 0; i < 200; i++) apply(38880 * 32768 + int'($urandom_range(0, 4000000)) - 2000000);
    for (int i = 0; i < 50; i++) apply(int'($urandom) >>> 1);
    apply(-12345678);
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
