// tb_sop_detect: checks the start-of-packet search in an unaligned 10-bit stream.
// The testbench builds a random bit stream. It inserts both running-disparity forms of
// the /S/ code-group (K27.7) at random bit positions, and cuts the stream into 10-bit
// words, first bit in bit 0. A plain bit-by-bit search of the stream gives every
// position where a code-group occurs. For each, the block must report word = pos/10 and
// shift = pos%10, 2 cycles after the word that holds the first bit, and `sop_toggle` must
// change. No other pulse may appear.
module tb_sop_detect;
  localparam int NW = 4000;
  localparam logic [9:0] K_NEG = 10'b0001011011;  // a..j = 1101101000, a in bit 0
  localparam logic [9:0] K_POS = 10'b1110100100;  // a..j = 0010010111
  logic clk = 0, rst_n = 0;
  logic [9:0] rx_word;
  logic sop, tog, tog_prev;
  logic [3:0] shift;
  logic [31:0] word;
  int checks = 0, failures = 0;
  bit stream [NW*10];
  int exp_pos[$];
  int widx = -1;            // index of the word sampled at the latest edge

  always #4 clk = ~clk;

  sop_detect dut (.clk, .rst_n, .rx_word, .sop, .sop_shift(shift), .sop_word(word), .sop_toggle(tog));

  initial begin
    // random stream with code-groups inserted
    for (int i = 0; i < NW*10; i++) stream[i] = 1'($urandom_range(0, 1));
    for (int p = 40; p < NW*10 - 40; p += 30 + int'($urandom_range(0, 120))) begin
      logic [9:0] k;
      k = $urandom_range(0, 1) ? K_POS : K_NEG;
      for (int i = 0; i < 10; i++) stream[p+i] = k[i];
    end
    for (int p = 0; p <= NW*10 - 10; p++) begin
      logic [9:0] c;
      for (int i = 0; i < 10; i++) c[i] = stream[p+i];
      if (c == K_NEG || c == K_POS) exp_pos.push_back(p);
    end
  end

  // drive words: word w is applied before the edge that samples it
  initial begin
    rx_word = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      for (int i = 0; i < 10; i++) rx_word[i] = stream[w*10 + i];
      @(posedge clk); widx = w; #1;
    end
    rx_word = '0;
    repeat (5) begin @(posedge clk); widx++; end
    checks++;
    if (exp_pos.size() != 0) begin failures++; $display("%0d code-groups not found", exp_pos.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    tog_prev <= tog;
    if (rst_n && sop) begin
      int p;
      checks++;
      if (exp_pos.size() == 0) begin failures++; $display("spurious sop"); end
      else begin
        p = exp_pos.pop_front();
        if (word != 32'(p / 10) || shift != 4'(p % 10)) begin
          failures++; $display("pos %0d: word %0d shift %0d", p, word, shift);
        end
        checks++;
        // sop is seen at this edge; it was set at the previous edge, 2 after word p/10
        if (widx - 1 != p / 10 + 2) begin failures++; $display("pos %0d: latency, widx %0d", p, widx); end
        checks++;
        if (tog == tog_prev) begin failures++; $display("toggle did not change"); end
      end
    end
  end

  initial begin
    repeat (NW + 1000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
