// tb_open_loop_network: the open-loop estimator at its full default sizes, fed with packet
// arrivals as jittered as those of a loaded five-hop gigabit network.
//
// Chain under test: measure_t (16 bits) -> t1_accumulator -> fir_filter (2048 taps) ->
// mavg_decim (M = 8000) -> c1_gain (N = 1,544,000, L = 193), wired as in ces_sync_top
// but with the arrival events driven directly as pulses, not through the PHY stream.
//
// Traffic: the master sends a T1 packet every 193 cycles of a clock 30 ppm above
// 1.544 MHz, i.e. about every 125 us. Each packet gets an independent delay, uniform in
// 0..40 us, so arrival jitter is +-20 us. Between two T1 packets come 0 to 6 background
// packets, spread over the gap. Each arrival is followed 1 us later by a header decision:
// T1 header or a non-matching one.
//
// The FIR is loaded with a 2048-tap Hamming-windowed low-pass (cut-off 1e-4*pi), quantised
// to Q1.15 so that the coefficients sum exactly to 1. Only the reference clock is
// slower than the design's: 31.104 MHz (a tenth) keeps the 2.3 s of traffic short to
// simulate. The estimate c is then in ticks of that clock, and C1 does not depend on it.
// Its half period is 16.075 ns, so the ideal count is computed for 31.10420 MHz.
//
// Checks:
//   * every FIR output equals the exact integer convolution of the measured T1
//     intervals;
//   * every decimated mean equals the truncated mean of 8000 primed FIR outputs;
//   * c equals mean * N/L * 2 (Q15 in, Q16 out) within 2 LSB;
//   * c lies within 2 ppm of the period count N * f_ref / f_master that would make the
//     slave run at the master's rate;
//   * no FIR input is lost.
// Two estimates are produced, after about 1.26 s and 2.26 s of traffic.
module tb_open_loop_network;
  import ces_pkg::*;
  localparam longint N      = 1544000;
  localparam int     M      = 8000;
  localparam int     TAPS   = 2048;
  localparam int     L      = 193;
  localparam real    FREF   = 31.104e6;
  localparam real    HALF   = 16.075;                     // ns: half period, as the 1 ps
  localparam real    FREF_S = 1.0e9 / (2.0 * HALF);       // resolution lets it be simulated
  localparam real    FM     = 1.544e6 * (1.0 + 30.0e-6);
  localparam real    TM_NS  = real'(L) / FM * 1.0e9;     // T1 packet period, ns
  localparam real    JIT_NS = 40000.0;                    // delay spread, ns
  localparam int     NOUT   = 2;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #(HALF) clk = ~clk;

  // ---------------- chain ----------------
  logic evt = 0;
  logic arr_valid; logic [15:0] arr_period;
  logic hdr_valid = 0; logic [111:0] hdr = '0;
  localparam logic [111:0] PAT  = 112'h0123_4567_89ab_cdef_0011_2233_8902;
  localparam logic [111:0] MASK = {{48{1'b1}}, 48'h0, 16'hffff};
  logic r_valid, non_t1; logic [15:0] r;
  logic cwe = 0; logic [9:0] ca = 0; logic signed [15:0] cd = 0;
  logic fir_valid, fir_busy, fir_overrun, fir_primed; logic signed [31:0] fir_out;
  logic mean_valid; logic signed [31:0] mean;
  logic c_valid; ctrl_t c;

  measure_t #(.W(16)) u_meas (.clk, .rst_n, .evt, .period_valid(arr_valid), .period(arr_period));
  t1_accumulator #(.W(16), .HDR_W(112)) u_acc (.clk, .rst_n, .meas_valid(arr_valid), .meas(arr_period),
    .hdr_valid, .hdr, .hdr_pattern(PAT), .hdr_mask(MASK), .r_valid, .r, .non_t1);
  fir_filter u_fir (.clk, .rst_n, .coef_we(cwe), .coef_addr(ca), .coef_data(cd),
    .in_valid(r_valid), .in_data(r), .out_valid(fir_valid), .out_data(fir_out),
    .busy(fir_busy), .overrun(fir_overrun), .primed(fir_primed));
  mavg_decim u_mavg (.clk, .rst_n, .in_valid(fir_valid && fir_primed), .in_data(fir_out),
    .out_valid(mean_valid), .out_data(mean));
  c1_gain u_c1 (.clk, .rst_n, .in_valid(mean_valid), .in_data(mean), .c_valid, .c);

  // ---------------- coefficients ----------------
  int h [TAPS];
  initial begin : make_coef
    real hr [TAPS];
    real s, wc, x;
    int   qs;
    wc = 1.0e-4 * 3.14159265358979;
    s = 0.0;
    for (int n = 0; n < TAPS; n++) begin
      x = real'(n) - real'(TAPS - 1) / 2.0;
      hr[n] = (0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * real'(n) / real'(TAPS - 1)));
      hr[n] = hr[n] * ((x == 0.0) ? 1.0 : $sin(wc * x) / (wc * x));
      s += hr[n];
    end
    qs = 0;
    for (int n = 0; n < TAPS / 2; n++) begin
      h[n] = int'(hr[n] / s * 32768.0);
      qs += 2 * h[n];
    end
    // put the rounding residue on the two centre taps so the sum is exactly 32768
    h[TAPS / 2 - 1] += (32768 - qs) / 2;
    for (int n = TAPS / 2; n < TAPS; n++) h[n] = h[TAPS - 1 - n];
  end

  // ---------------- reference model ----------------
  int     xs [$];          // T1 intervals as measured
  longint nfir = 0, nprimed = 0, nmean = 0, nbg = 0;
  longint msum = 0;
  longint exp_mean [$];

  always @(posedge clk) if (rst_n) begin
    if (r_valid) xs.push_back(int'(r));
    if (fir_overrun) begin checks++; failures++; $display("FIR input lost"); end
    if (non_t1) nbg++;
    if (fir_valid) begin : fir_chk
      longint y;
      int i;
      i = int'(nfir);
      y = 0;
      for (int j = 0; j < TAPS; j++) if (i - j >= 0) y += longint'(h[j]) * longint'(xs[i - j]);
      checks++;
      if (int'(y) != fir_out) begin
        failures++;
        if (failures < 10) $display("FIR output %0d: %0d expected %0d", i, fir_out, y);
      end
      nfir++;
      if (fir_primed) begin
        msum += longint'(fir_out);
        nprimed++;
        if (nprimed % M == 0) begin exp_mean.push_back(msum / M); msum = 0; end
      end
    end
    if (mean_valid) begin
      checks++;
      if (exp_mean.size() == 0 || longint'(mean) != exp_mean[0]) begin
        failures++; $display("mean %0d expected %0d", mean, (exp_mean.size() != 0) ? exp_mean[0] : -1);
      end
      if (exp_mean.size() != 0) void'(exp_mean.pop_front());
    end
    if (c_valid) begin : c_chk
      real cm, cideal, err;
      cm = real'(mean) * real'(N) / real'(L) * 2.0;        // model of c, Q16 ticks
      cideal = real'(N) * FREF_S / FM;                      // ticks for N master cycles
      err = (cideal * 65536.0 / real'(c) - 1.0) * 1.0e6;    // slave frequency error, ppm
      nmean++;
      $display("estimate %0d: c = %0.3f ticks, ideal %0.3f, error %0.3f ppm",
               nmean, real'(c) / 65536.0, cideal, err);
      checks++;
      if (real'(c) - cm > 2.0 || cm - real'(c) > 2.0) begin
        failures++; $display("c %0d model %0.1f", c, cm);
      end
      checks++;
      if (err > 2.0 || err < -2.0) begin failures++; $display("estimate outside 2 ppm"); end
    end
  end

  // ---------------- traffic ----------------
  task automatic arrive(input real t_ns, input bit is_t1);
    if (t_ns > $realtime) #(t_ns - $realtime);
    evt = 1;
    #64 evt = 0;
    #936;
    hdr = is_t1 ? PAT : (PAT ^ {$urandom, 80'h0});
    if (!is_t1 && hdr[111:64] == PAT[111:64]) hdr[111] = ~hdr[111];
    @(posedge clk) hdr_valid <= 1;
    @(posedge clk) hdr_valid <= 0;
  endtask

  initial begin : main
    real t_prev, t_next, g;
    int k;
    #100 rst_n = 1;
    wait (!fir_busy);
    for (int a = 0; a < TAPS / 2; a++) begin
      @(posedge clk); cwe <= 1; ca <= 10'(a); cd <= 16'(h[a]);
    end
    @(posedge clk) cwe <= 0;
    t_prev = 200000.0;
    arrive(t_prev, 1'b1);
    for (int n = 1; nmean < NOUT; n++) begin
      t_next = 200000.0 + real'(n) * TM_NS + JIT_NS * real'($urandom_range(0, 1000000)) / 1.0e6;
      g = t_next - t_prev;
      k = $urandom_range(0, 6);
      for (int j = 1; j <= k; j++) arrive(t_prev + g * real'(j) / real'(k + 1) + real'($urandom_range(0, 400)) - 200.0, 1'b0);
      arrive(t_next, 1'b1);
      t_prev = t_next;
    end
    repeat (10) @(posedge clk);
    checks++;
    if (nbg == 0) begin failures++; $display("no background packets merged"); end
    $display("T1 packets %0d, background %0d, FIR outputs %0d, estimates %0d", xs.size(), nbg, nfir, nmean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(2.6e9);
    $display("watchdog: %0d estimates", nmean);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
