// tb_weight_blend: checks the hand-over from the open-loop estimate to NTP, and
// holdover, with a 5-step ramp.
// Before the first open-loop estimate, C must be the nominal C0. The first c must start
// the ramp (`ramp_start`). After k further loop updates, C must be c + (d - c)*k/5,
// within the rounding of the Q16 weight, and w must be exactly 1 from step 5 on
// (`ntp_full`). After 3 updates with no new c or d, `holdover` must rise. Further updates
// must then leave C unchanged. A new input must end holdover.
module tb_weight_blend;
  import ces_pkg::*;
  localparam ctrl_t C0 = ctrl_t'(64'd311040000 << 16);
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #2 clk = ~clk;

  logic cv = 0, dv = 0, step = 0;
  ctrl_t c = 0, d = 0, ctrl;
  logic [16:0] w;
  logic rs, full, hold;
  int rs_count = 0;
  weight_blend #(.RAMP_STEPS(5), .HOLD_STEPS(3), .C0(C0)) dut (.clk, .rst_n, .c_valid(cv), .c, .d_valid(dv), .d,
    .step, .ctrl, .w, .ramp_start(rs), .ntp_full(full), .holdover(hold));

  always @(posedge clk) if (rst_n && rs) rs_count++;

  task automatic pulse_step();
    @(negedge clk); step = 1; @(negedge clk); step = 0; repeat (3) @(negedge clk);
  endtask
  task automatic give_c(input ctrl_t v);
    @(negedge clk); cv = 1; c = v; @(negedge clk); cv = 0; repeat (3) @(negedge clk);
  endtask
  task automatic give_d(input ctrl_t v);
    @(negedge clk); dv = 1; d = v; @(negedge clk); dv = 0; repeat (3) @(negedge clk);
  endtask
  task automatic expect_ctrl(input real e, input string what);
    checks++;
    if ((real'(ctrl) - e) > 4096.0 || (real'(ctrl) - e) < -4096.0) begin
      failures++; $display("%s: ctrl %0d expected %f", what, ctrl, e);
    end
  endtask

  initial begin
    ctrl_t cval, dval;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(negedge clk);
    expect_ctrl(real'(C0), "reset");
    pulse_step();   // no c yet: ramp must not move
    checks++; if (w != 0) begin failures++; $display("ramp moved early"); end
    cval = C0 + ctrl_t'(64'd1000 << 16);
    dval = C0 - ctrl_t'(64'd3000 << 16);
    give_d(dval);
    expect_ctrl(real'(cval) * 0 + real'(C0) + 0.0, "d before c, w=0");
    give_c(cval);
    checks++; if (rs_count != 1) begin failures++; $display("ramp_start count %0d", rs_count); end
    expect_ctrl(real'(cval), "w=0");
    for (int k = 1; k <= 7; k++) begin
      pulse_step();
      if (k % 2 == 0) give_d(dval);       // keep inputs fresh
      else give_c(cval);
      expect_ctrl(real'(cval) + (real'(dval) - real'(cval)) * real'(k > 5 ? 5 : k) / 5.0, $sformatf("k=%0d", k));
      checks++;
      if ((k >= 5) != full) begin failures++; $display("ntp_full wrong at k=%0d", k); end
    end
    checks++; if (w != 17'h10000) begin failures++; $display("w %0d", w); end
    // holdover: no inputs for 3 steps
    dval = dval + ctrl_t'(64'd77 << 16);
    give_d(dval);
    for (int s = 1; s <= 5; s++) begin
      pulse_step();
      checks++;
      if (hold != (s >= 3)) begin failures++; $display("holdover %0d at s=%0d", hold, s); end
      expect_ctrl(real'(dval), "holdover hold");
    end
    give_d(dval);
    checks++; if (hold) begin failures++; $display("holdover not cleared"); end
    checks++; if (rs_count != 1) begin failures++; $display("ramp_start repeated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
