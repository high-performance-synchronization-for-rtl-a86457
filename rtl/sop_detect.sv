// sop_detect: finds start-of-packet code-groups in an unaligned PHY parallel stream.
//
// Following the document, arrival times are taken as close to the physical layer as
// possible. The PHY runs with byte realignment disabled, so the 10-bit words it delivers may
// hold a code-group at any bit offset. Every word is searched for the start-of-packet
// character. The block records the word in which it appeared and the shift that would
// realign that word. Every packet on the line is found, whether valid or not.
//
// How it works: the last two words form a 20-bit window, with bit 0 of a word received
// first. Each of the 10 start positions in the older word is compared with both running-
// disparity forms of the start-of-packet code-group. Each code-group is therefore found
// exactly once, whatever its alignment. A match gives a one-cycle `sop` pulse, the
// offset `sop_shift` (0..9 bit times), a running word count `sop_word`, and a toggle
// `sop_toggle`. The toggle carries the event into the reference-clock domain (see measure_t).
//
// Timing: `sop` rises 2 word-clock cycles after the word that starts the code-group.
// This design's choices, where the document is silent: the 1000BASE-X /S/ code-group
// (K27.7, abcdeifghj = 110110 1000 or its complement) and the 10-bit word width.
module sop_detect #(
  parameter int          WORD_W = 10,
  parameter logic [9:0]  SOP_RD_NEG = 10'h05B,  // K27.7 RD-, bit 0 = first bit 'a'
  parameter logic [9:0]  SOP_RD_POS = 10'h3A4   // K27.7 RD+
) (
  input  logic                      clk,        // PHY parallel word clock
  input  logic                      rst_n,
  input  logic [WORD_W-1:0]         rx_word,    // unaligned received word, bit 0 first
  output logic                      sop,        // start-of-packet seen
  output logic [$clog2(WORD_W)-1:0] sop_shift,  // realignment shift of the code-group
  output logic [31:0]               sop_word,   // index of the word that held it
  output logic                      sop_toggle  // changes at every start-of-packet
);
  logic [WORD_W-1:0]    prev, cur;
  logic [2*WORD_W-1:0]  win;
  logic [31:0]          word_cnt;
  logic                 hit;
  logic [$clog2(WORD_W)-1:0] hit_pos;

  assign win = {cur, prev};

  always_comb begin
    hit     = 1'b0;
    hit_pos = '0;
    for (int o = WORD_W - 1; o >= 0; o--) begin
      if (win[o +: 10] == SOP_RD_NEG || win[o +: 10] == SOP_RD_POS) begin
        hit     = 1'b1;
        hit_pos = ($clog2(WORD_W))'(o);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev       <= '0;
      cur        <= '0;
      word_cnt   <= '0;
      sop        <= 1'b0;
      sop_shift  <= '0;
      sop_word   <= '0;
      sop_toggle <= 1'b0;
    end else begin
      cur      <= rx_word;
      prev     <= cur;
      word_cnt <= word_cnt + 32'd1;
      sop      <= hit;
      if (hit) begin
        sop_shift  <= hit_pos;
        sop_word   <= word_cnt - 32'd2;   // word that held the first bit
        sop_toggle <= ~sop_toggle;
      end
    end
  end
endmodule
