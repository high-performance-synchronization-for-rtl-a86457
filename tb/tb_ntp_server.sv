// tb_ntp_server: checks the master's timestamp responder with TAU = 25 and with the
// document's TAU = 1,544,000 (1 s of a T1 clock).
// For each request, T2 must be the master time at the request's cycle. The response must
// come exactly TAU cycles later, with T3 = T2 + TAU. A request during a pending exchange
// must be dropped and flagged.
module tb_ntp_server;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic rq_a = 0, rq_b = 0, rs_a, rs_b, dr_a, dr_b;
  logic [63:0] t2a, t3a, mta, t2b, t3b, mtb;
  ntp_server #(.TAU(25)) dut_a (.clk, .rst_n, .req_in(rq_a), .resp_send(rs_a), .resp_t2(t2a), .resp_t3(t3a), .req_drop(dr_a), .master_time(mta));
  ntp_server             dut_b (.clk, .rst_n, .req_in(rq_b), .resp_send(rs_b), .resp_t2(t2b), .resp_t3(t3b), .req_drop(dr_b), .master_time(mtb));

  task automatic exchange(input int which, input longint tau, input bit extra);
    logic [63:0] mt;
    longint n = 0;
    @(negedge clk);
    if (which == 0) begin rq_a = 1; mt = mta; end else begin rq_b = 1; mt = mtb; end
    @(negedge clk); rq_a = 0; rq_b = 0;
    if (extra) begin
      @(negedge clk); if (which == 0) rq_a = 1; else rq_b = 1;
      @(negedge clk); rq_a = 0; rq_b = 0;
      checks++;
      if (!((which == 0) ? dr_a : dr_b)) begin failures++; $display("drop not flagged"); end
      n = 2;
    end
    while (!((which == 0) ? rs_a : rs_b)) begin @(negedge clk); n++; end
    checks += 3;
    if (((which == 0) ? t2a : t2b) != mt) begin failures++; $display("T2 wrong"); end
    if (((which == 0) ? t3a : t3b) != mt + 64'(tau)) begin failures++; $display("T3 wrong"); end
    if (n != tau) begin failures++; $display("response after %0d cycles", n); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      repeat (int'($urandom_range(0, 40))) @(negedge clk);
      exchange(0, 25, i % 5 == 2);
    end
    exchange(1, 1544000, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
