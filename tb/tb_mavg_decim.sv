// tb_mavg_decim: checks the accumulate-and-divide decimator.
// A small instance (M = 7) gets random signed samples, full-range and negative ones
// included. The document's M = 8000 instance gets values near the nominal FIR output
// (38880 ticks * 2^15) with jitter. Every output must be the exact mean of its block,
// truncated toward zero, and must arrive SUM_W + 1 cycles after the block's last sample.
// No other output may appear.
module tb_mavg_decim;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #2 clk = ~clk;

  logic iv_s = 0, iv_f = 0, ov_s, ov_f;
  logic signed [31:0] id_s = 0, id_f = 0, od_s, od_f;
  mavg_decim #(.M(7)) dut_s (.clk, .rst_n, .in_valid(iv_s), .in_data(id_s), .out_valid(ov_s), .out_data(od_s));
  mavg_decim          dut_f (.clk, .rst_n, .in_valid(iv_f), .in_data(id_f), .out_valid(ov_f), .out_data(od_f));

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  longint exp_s[$], exp_f[$], tl_s[$], tl_f[$];

  always @(posedge clk) if (rst_n) begin
    if (ov_s) begin
      checks += 2;
      if (exp_s.size() == 0) failures++;
      else begin
        longint e = 0, t = 0;
        e = exp_s.pop_front(); t = tl_s.pop_front();
        if (od_s != 32'(e)) begin failures++; $display("M=7 out %0d exp %0d", od_s, e); end
        if (cyc - t != 35 + 1) begin failures++; $display("M=7 latency %0d", cyc - t); end
      end
    end
    if (ov_f) begin
      checks += 2;
      if (exp_f.size() == 0) failures++;
      else begin
        longint e = 0, t = 0;
        e = exp_f.pop_front(); t = tl_f.pop_front();
        if (od_f != 32'(e)) begin failures++; $display("M=8000 out %0d exp %0d", od_f, e); end
        if (cyc - t != 45 + 1) begin failures++; $display("M=8000 latency %0d", cyc - t); end
      end
    end
  end

  initial begin
    longint sum_s = 0, sum_f = 0;
    int ns = 0, nf = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 8000 * 3; i++) begin
      int vs, vf;
      vs = (i % 37 == 0) ? 32'sh7FFF_FFFF : (i % 41 == 0) ? 32'sh8000_0000 : int'($urandom);
      vf = 38880 * 32768 + int'($urandom_range(0, 2000000)) - 1000000;
      @(negedge clk);
      iv_f = 1; id_f = vf;
      sum_f += vf; nf++;
      if (i < 7 * 400) begin iv_s = 1; id_s = vs; sum_s += vs; ns++; end
      @(posedge clk);
      if (iv_s && ns == 7) begin exp_s.push_back(sum_s / 7); tl_s.push_back(cyc); sum_s = 0; ns = 0; end
      if (nf == 8000) begin exp_f.push_back(sum_f / 8000); tl_f.push_back(cyc); sum_f = 0; nf = 0; end
      @(negedge clk);
      iv_s = 0; iv_f = 0;
      repeat (48) @(negedge clk);
    end
    repeat (60) @(posedge clk);
    checks++;
    if (exp_s.size() != 0 || exp_f.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
