// tb_div_n: checks the divide-by-N counter for two values of N (odd and even) and for
// the document's N = 1,544,000. Rising edges of f_div must be exactly N clock cycles
// apart. f_div must be high for floor(N/2) cycles of each period. The first rising edge
// must come 1 cycle after reset is released.
module tb_div_n;
  logic clk = 0, rst_n = 0;
  logic fd7, fd10, fdfull;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  div_n #(.N(7))  d7  (.clk, .rst_n, .f_div(fd7));
  div_n #(.N(10)) d10 (.clk, .rst_n, .f_div(fd10));
  div_n           dfull (.clk, .rst_n, .f_div(fdfull));

  // measure periods and high times of one output
  task automatic check_div(input int n, input int periods, input int which);
    longint c = 0, last_rise = -1, rise_cnt = 0, high = 0;
    logic prev, cur;
    prev = (which == 0) ? fd7 : (which == 1) ? fd10 : fdfull;
    while (rise_cnt <= periods) begin
      @(posedge clk); #1;
      c++;
      cur = (which == 0) ? fd7 : (which == 1) ? fd10 : fdfull;
      if (cur) high++;
      if (cur && !prev) begin
        if (last_rise >= 0) begin
          checks++;
          if (c - last_rise != n) begin failures++; $display("N=%0d period %0d", n, c - last_rise); end
          checks++;
          if (high - 1 != n / 2) begin failures++; $display("N=%0d high %0d", n, high - 1); end
        end
        high = 1;
        last_rise = c;
        rise_cnt++;
      end
      prev = cur;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (!(fd7 && fd10 && fdfull)) begin failures++; $display("first edge late"); end
    rst_n = 0; #1 rst_n = 1;
    fork
      check_div(7, 20, 0);
      check_div(10, 20, 1);
    join
    check_div(1544000, 2, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
