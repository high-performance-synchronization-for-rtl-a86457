// tb_ntp_client: checks the slave side of the timestamp exchange.
// The recovered clock is a free-running 21.1 MHz clock against a 250 MHz reference. The
// slave time must count its cycles (within one, over a long window). A trigger must send
// one request, with T1 equal to the slave time, and a trigger during an exchange must be
// ignored. For responses with chosen T2 and T3, theta must equal T2 - T1 + T3 - T4 in half
// cycles, with T4 the slave time when the response arrives. With `time_sync` set, the
// slave time must step by round(theta) and no theta may be output. A response that never
// comes must end the exchange with `timeout` after TIMEOUT cycles.
module tb_ntp_client;
  localparam int TO = 3000;
  logic clk = 0, rst_n = 0, fo = 0;
  int checks = 0, failures = 0;
  always #2 clk = ~clk;
  always #23.7 fo = ~fo;

  logic trig = 0, tsync = 0, rv = 0;
  logic [63:0] t2 = 0, t3 = 0, t1, st;
  logic rs, thv, synced, tmo;
  logic signed [64:0] theta;
  int req_count = 0, tmo_count = 0;
  longint fo_edges = 0;

  ntp_client #(.TIMEOUT(TO)) dut (.clk, .rst_n, .f_out(fo), .req_trigger(trig), .time_sync(tsync),
    .req_send(rs), .req_t1(t1), .resp_valid(rv), .resp_t2(t2), .resp_t3(t3),
    .theta_valid(thv), .theta, .synced, .timeout(tmo), .slave_time(st));

  always @(posedge fo) fo_edges++;
  always @(posedge clk) if (rst_n) begin
    if (rs) req_count++;
    if (tmo) tmo_count++;
  end

  task automatic trigger(output logic [63:0] t1_seen);
    logic [63:0] st_at;
    @(negedge clk); trig = 1; st_at = st;
    @(negedge clk); trig = 0;
    checks += 2;
    if (!rs) begin failures++; $display("no req_send"); end
    if (t1 != st_at) begin failures++; $display("T1 %0d vs slave time %0d", t1, st_at); end
    t1_seen = t1;
  endtask

  task automatic respond(input logic [63:0] a2, input logic [63:0] a3, output logic [63:0] t4);
    @(negedge clk); rv = 1; t2 = a2; t3 = a3; t4 = st;
    @(negedge clk); rv = 0;
  endtask

  initial begin
    logic [63:0] a1, a4, s0, s1;
    longint e0, e1, th;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // slave time follows f_out
    repeat (20) @(negedge clk);
    s0 = st; e0 = fo_edges;
    repeat (20000) @(negedge clk);
    s1 = st; e1 = fo_edges;
    checks++;
    if (longint'(s1 - s0) - (e1 - e0) > 1 || longint'(s1 - s0) - (e1 - e0) < -1) begin
      failures++; $display("slave time %0d vs edges %0d", s1 - s0, e1 - e0);
    end
    // plain exchanges
    for (int i = 0; i < 20; i++) begin
      longint delta, tau;
      trigger(a1);
      repeat (int'($urandom_range(10, 200))) @(negedge clk);
      // a second trigger while waiting must be ignored
      if (i == 3) begin
        int nreq0;
        nreq0 = req_count;
        @(negedge clk); trig = 1; @(negedge clk); trig = 0;
        checks++; if (req_count != nreq0) begin failures++; $display("request while waiting"); end
      end
      delta = longint'($urandom_range(0, 100000)) - 50000;
      tau   = longint'($urandom_range(100, 5000));
      respond(a1 + 64'(delta), a1 + 64'(delta + tau), a4);
      th = longint'(a1 + 64'(delta)) - longint'(a1) + longint'(a1 + 64'(delta + tau)) - longint'(a4);
      checks += 2;
      if (!thv) begin failures++; $display("theta_valid missing"); end
      if (theta != 65'(th)) begin failures++; $display("theta %0d expected %0d", theta, th); end
    end
    // time step
    tsync = 1;
    trigger(a1);
    repeat (50) @(negedge clk);
    respond(a1 + 64'd100000, a1 + 64'd100000 + 64'd2000, a4);
    th = 100000 + 100000 + 2000 - longint'(a4 - a1);     // 2*theta
    s0 = st;
    checks += 3;
    if (thv) begin failures++; $display("theta output during time step"); end
    if (!synced) begin failures++; $display("synced not set"); end
    if (longint'(s0 - a4) - (th + 1) / 2 > 1 || longint'(s0 - a4) - (th + 1) / 2 < 0) begin
      failures++; $display("step %0d expected %0d", longint'(s0 - a4), (th + 1) / 2);
    end
    tsync = 0;
    // timeout
    trigger(a1);
    repeat (TO + 10) @(negedge clk);
    checks++;
    if (tmo_count != 1) begin failures++; $display("timeouts %0d", tmo_count); end
    trigger(a1);   // a new request is accepted after the timeout
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
