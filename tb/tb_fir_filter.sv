// tb_fir_filter: checks the symmetric FIR filter against a direct convolution.
// Two instances run: 32 taps with full-range random coefficients, and the document's
// 2048 taps. The random coefficients are scaled down so that the sum stays inside the
// 32-bit MAC. Random 16-bit samples are fed. Each output must equal
// sum_j h[j]*x[n-j] with h[TAPS-1-k] = h[k], the sample history zero before the first
// input, modulo 2^32. It must come TAPS/2 + 3 cycles after its input. A sample offered
// while the filter is busy must be dropped and flagged. `primed` must rise with the
// TAPS-th sample.
module tb_fir_filter;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #2 clk = ~clk;

  // ---- small instance ----
  localparam int T1N = 32;
  logic cwe_s = 0; logic [3:0] ca_s = 0; logic signed [15:0] cd_s = 0;
  logic iv_s = 0; logic [15:0] id_s = 0;
  logic ov_s, busy_s, orun_s, pr_s; logic signed [31:0] od_s;
  fir_filter #(.TAPS(T1N)) dut_s (.clk, .rst_n, .coef_we(cwe_s), .coef_addr(ca_s), .coef_data(cd_s),
    .in_valid(iv_s), .in_data(id_s), .out_valid(ov_s), .out_data(od_s), .busy(busy_s), .overrun(orun_s), .primed(pr_s));

  // ---- full-size instance ----
  localparam int T2N = 2048;
  logic cwe_f = 0; logic [9:0] ca_f = 0; logic signed [15:0] cd_f = 0;
  logic iv_f = 0; logic [15:0] id_f = 0;
  logic ov_f, busy_f, orun_f, pr_f; logic signed [31:0] od_f;
  fir_filter dut_f (.clk, .rst_n, .coef_we(cwe_f), .coef_addr(ca_f), .coef_data(cd_f),
    .in_valid(iv_f), .in_data(id_f), .out_valid(ov_f), .out_data(od_f), .busy(busy_f), .overrun(orun_f), .primed(pr_f));

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // wait for an output and compare it
  task automatic expect_out(input int which, input int exp, input longint t_in, input int taps);
    while (!((which == 0) ? ov_s : ov_f)) @(posedge clk);
    checks++;
    if (((which == 0) ? od_s : od_f) != exp) begin
      failures++; $display("taps %0d: out %0d expected %0d", taps, (which == 0) ? od_s : od_f, exp);
    end
    checks++;
    if (cyc - t_in != longint'(taps / 2 + 3)) begin failures++; $display("taps %0d latency %0d", taps, cyc - t_in); end
  endtask

  task automatic run(input int which, input int taps, input int nout, input int cmax);
    int h[];
    int x[$];
    longint acc;
    h = new[taps];
    // load coefficients (first half), mirror for the reference
    for (int k = 0; k < taps / 2; k++) begin
      h[k] = int'($urandom_range(0, 2 * cmax)) - cmax;
      h[taps - 1 - k] = h[k];
      @(negedge clk);
      if (which == 0) begin cwe_s = 1; ca_s = 4'(k); cd_s = 16'(h[k]); end
      else            begin cwe_f = 1; ca_f = 10'(k); cd_f = 16'(h[k]); end
    end
    @(negedge clk); cwe_s = 0; cwe_f = 0;
    while ((which == 0) ? busy_s : busy_f) @(negedge clk);
    for (int n = 0; n < nout; n++) begin
      int xs;
      longint t_in;
      xs = int'($urandom_range(0, 65535));
      x.push_front(xs);
      acc = 0;
      for (int j = 0; j < taps && j < x.size(); j++) acc += longint'(h[j]) * longint'(x[j]);
      @(negedge clk);
      if (which == 0) begin iv_s = 1; id_s = 16'(xs); end else begin iv_f = 1; id_f = 16'(xs); end
      @(posedge clk); t_in = cyc;
      @(negedge clk);
      iv_s = 0; iv_f = 0;
      checks++;
      if (((which == 0) ? pr_s : pr_f) != (n >= taps - 1)) begin failures++; $display("primed wrong at %0d", n); end
      if (n == 3) begin
        // offer a sample while busy: must be dropped and flagged
        @(negedge clk);
        if (which == 0) begin iv_s = 1; id_s = 16'hBEEF; end else begin iv_f = 1; id_f = 16'hBEEF; end
        @(posedge clk); #1;
        checks++;
        if (!((which == 0) ? orun_s : orun_f)) begin failures++; $display("overrun not flagged"); end
        @(negedge clk); iv_s = 0; iv_f = 0;
      end
      @(posedge clk);
      expect_out(which, int'(acc[31:0]), t_in, taps);
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(0, T1N, 80, 32767);
    run(1, T2N, 6, 1000);
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
