// tb_measure_t: checks the Measure-T period counter.
// Events are driven at known cycle distances, away from the clock edge. Each reported
// period must equal the distance in cycles, 3 cycles after the edge. A narrow instance
// with BOTH_EDGES = 1 must count both edges of a toggle and saturate at all-ones for a
// long gap. The first event after reset must give no output.
module tb_measure_t;
  logic clk = 0, rst_n = 0;
  logic evt = 0, tog = 0;
  logic v1, v2;
  logic [15:0] p1;
  logic [7:0]  p2;
  int checks = 0, failures = 0;
  int exp_q[$];
  int exp2_q[$];
  longint cyc = 0, last_edge_cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  measure_t #(.W(16), .BOTH_EDGES(1'b0)) dut  (.clk, .rst_n, .evt(evt), .period_valid(v1), .period(p1));
  measure_t #(.W(8),  .BOTH_EDGES(1'b1)) dut2 (.clk, .rst_n, .evt(tog), .period_valid(v2), .period(p2));

  always @(posedge clk) begin
    if (v1 && rst_n) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected period %0d", p1); end
      else begin
        int e;
        e = exp_q.pop_front();
        if (p1 != 16'(e)) begin failures++; $display("period %0d expected %0d", p1, e); end
      end
      checks++;
      if (cyc - last_edge_cyc != 3) begin failures++; $display("latency %0d", cyc - last_edge_cyc); end
    end
    if (v2 && rst_n) begin
      checks++;
      if (exp2_q.size() == 0) begin failures++; $display("unexpected period2 %0d", p2); end
      else begin
        int e;
        e = exp2_q.pop_front();
        if (p2 != 8'(e)) begin failures++; $display("period2 %0d expected %0d", p2, e); end
      end
    end
  end

  task automatic pulse_after(input int n);
    repeat (n) @(posedge clk);
    #2 evt = 1; last_edge_cyc = cyc;
    repeat (1) @(posedge clk);
    #2 evt = 0;
  endtask

  initial begin
    int d;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    // first event: arms only
    pulse_after(3);
    for (int i = 0; i < 40; i++) begin
      d = 5 + int'($urandom_range(0, 300));
      exp_q.push_back(d);
      pulse_after(d - 1);
    end
    repeat (10) @(posedge clk);
    // toggle path, both edges, with saturation
    #2 tog = ~tog;
    for (int i = 0; i < 20; i++) begin
      d = 3 + int'($urandom_range(0, 400));
      exp2_q.push_back(d > 255 ? 255 : d);
      repeat (d) @(posedge clk);
      #2 tog = ~tog;
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || exp2_q.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
