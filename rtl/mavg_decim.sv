// mavg_decim: moving-average filter and decimator by M, merged into an accumulator and a
// divider.
//
// The document's moving average has length M, equal to the downsampling rate, so its
// decimated output is just the mean of each block of M input samples. As the document
// describes, it needs no sample buffer: an accumulator adds M samples, the sum is divided
// by M and passed on, and the accumulator restarts from zero. The accumulator has at least
// b_MAC + log2(M) bits, 32 + 13 = 45 with the document's M = 8000. The document divides in
// floating point on its host processor. Here the division is done in hardware instead.
//
// How it works: `in_valid` adds the signed `in_data`. The M-th sample closes the block.
// Its sum goes to a restoring divider, one quotient bit per cycle, that works on the
// magnitude and restores the sign. Meanwhile the accumulator starts the next block.
// `out_valid` pulses SUM_W + 1 cycles after the M-th `in_valid`, with `out_data` =
// sum / M, truncated toward zero. Blocks must be at least SUM_W + 1 cycles apart, which
// at the document's rates (one sample per 125 us) they always are.
module mavg_decim #(
  parameter int M     = 8000,
  parameter int IN_W  = 32,
  parameter int SUM_W = IN_W + $clog2(M)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   out_valid,
  output logic signed [IN_W-1:0] out_data
);
  localparam int MC = $clog2(M + 1);
  localparam int CC = $clog2(SUM_W + 1);

  logic signed [SUM_W-1:0] acc, acc_next;
  logic [MC-1:0]           n;
  logic                    div_busy, neg;
  logic [SUM_W-1:0]        quo;      // dividend shifting out, quotient shifting in
  logic [MC-1:0]           rem;
  logic [MC:0]             rem_sh, rem_sub;
  logic [CC-1:0]           bitc;

  assign acc_next = acc + SUM_W'(in_data);
  assign rem_sh   = {rem, quo[SUM_W-1]};
  assign rem_sub  = rem_sh - (MC+1)'(M);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      n         <= '0;
      div_busy  <= 1'b0;
      neg       <= 1'b0;
      quo       <= '0;
      rem       <= '0;
      bitc      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (n == MC'(M - 1)) begin
          // block complete: hand the sum to the divider
          acc      <= '0;
          n        <= '0;
          div_busy <= 1'b1;
          neg      <= acc_next[SUM_W-1];
          quo      <= acc_next[SUM_W-1] ? SUM_W'(-acc_next) : SUM_W'(acc_next);
          rem      <= '0;
          bitc     <= '0;
        end else begin
          acc <= acc_next;
          n   <= n + MC'(1);
        end
      end
      if (div_busy) begin
        if (!rem_sub[MC]) begin
          rem <= rem_sub[MC-1:0];
          quo <= {quo[SUM_W-2:0], 1'b1};
        end else begin
          rem <= rem_sh[MC-1:0];
          quo <= {quo[SUM_W-2:0], 1'b0};
        end
        bitc <= bitc + CC'(1);
        if (bitc == CC'(SUM_W - 1)) begin
          div_busy  <= 1'b0;
          out_valid <= 1'b1;
        end
      end
    end
  end

  // The quotient is complete one cycle after the last step; out_data tracks it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_data <= '0;
    else if (div_busy && bitc == CC'(SUM_W - 1))
      out_data <= neg ? -IN_W'({quo[SUM_W-2:0], !rem_sub[MC]})
                      :  IN_W'({quo[SUM_W-2:0], !rem_sub[MC]});
  end
endmodule
