// tb_t1_accumulator: checks that interarrival times of all packets are summed into
// T1-to-T1 intervals.
// Random packets, about one in three of them T1 (matching the header pattern under the
// mask), each give a measurement and, a few cycles later, a header. A reference sum,
// saturated at 16 bits, predicts every output. Cases covered: the first T1 packet (no
// output), several non-T1 packets between T1 packets, a measurement in the same cycle as
// a matching header, and saturation.
module tb_t1_accumulator;
  localparam int HW = 112;
  logic clk = 0, rst_n = 0;
  logic meas_valid = 0, hdr_valid = 0;
  logic [15:0] meas = 0;
  logic [HW-1:0] hdr = '0, pattern, mask;
  logic r_valid, non_t1;
  logic [15:0] r;
  int checks = 0, failures = 0;
  int exp_q[$];
  int nont1_seen = 0, nont1_exp = 0, sat_cases = 0, same_cycle = 0;
  longint ref_sum = 0;
  bit seen = 0;

  always #5 clk = ~clk;

  t1_accumulator dut (.clk, .rst_n, .meas_valid, .meas, .hdr_valid, .hdr,
                      .hdr_pattern(pattern), .hdr_mask(mask), .r_valid, .r, .non_t1);

  function automatic logic [HW-1:0] make_hdr(input bit is_t1);
    logic [HW-1:0] h;
    h = {$urandom, $urandom, $urandom, $urandom};
    if (is_t1) h = (h & ~mask) | (pattern & mask);
    else       h[15:0] = pattern[15:0] ^ 16'h0101;   // EtherType differs
    return h;
  endfunction

  always @(posedge clk) begin
    if (rst_n && r_valid) begin
      int e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output %0d", r); end
      else begin
        e = exp_q.pop_front();
        if (r != 16'(e)) begin failures++; $display("output %0d expected %0d", r, e); end
      end
    end
    if (rst_n && non_t1) nont1_seen++;
  end

  task automatic packet(input bit is_t1, input int interval, input bit same);
    // measurement
    @(negedge clk);
    meas_valid = 1; meas = 16'(interval);
    ref_sum += interval;
    @(negedge clk);
    meas_valid = 0;
    repeat (2) @(negedge clk);
    // header (optionally together with the next packet's measurement)
    hdr_valid = 1; hdr = make_hdr(is_t1);
    if (!is_t1) nont1_exp++;
    if (is_t1) begin
      if (seen) exp_q.push_back(ref_sum > 65535 ? 65535 : int'(ref_sum));
      if (ref_sum > 65535 && seen) sat_cases++;
      seen = 1;
      ref_sum = 0;
    end
    if (same) begin
      int nxt = 100 + int'($urandom_range(0, 900));
      meas_valid = 1; meas = 16'(nxt);
      if (is_t1) ref_sum = nxt; else ref_sum += nxt;
      same_cycle++;
    end
    @(negedge clk);
    hdr_valid = 0; meas_valid = 0;
  endtask

  initial begin
    pattern = {$urandom, $urandom, $urandom, $urandom};
    mask    = {48'hFFFF_FFFF_FFFF, 48'h0, 16'hFFFF};   // destination address and EtherType
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      bit t1;
      int iv;
      t1 = ($urandom_range(0, 2) == 0);
      iv = (i % 50 == 49) ? 30000 : 500 + int'($urandom_range(0, 15000));
      packet(t1, iv, ($urandom_range(0, 9) == 0));
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
    checks++;
    if (nont1_seen != nont1_exp) begin failures++; $display("non_t1 %0d vs %0d", nont1_seen, nont1_exp); end
    checks++;
    if (sat_cases == 0 || same_cycle == 0) begin failures++; $display("cases not covered"); end
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
