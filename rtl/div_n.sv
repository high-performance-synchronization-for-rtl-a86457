// div_n: the divide-by-N block of the holdover loop, clocked by the recovered clock f_out.
//
// A modulo-N counter runs on f_out. The registered output f_div is high for the first N/2
// counts of each period and low for the rest. It has one rising edge every N f_out cycles,
// which Measure-T times against the reference clock. With the document's N = 1,544,000 and
// f_out = 1.544 MHz, the holdover loop is sampled once per second. The document gives the
// function and N; the duty cycle and reset behaviour (count 0, f_div low) are this design's
// own. The first rising edge comes 1 cycle after reset is released, and then one every N.
module div_n #(
  parameter longint N = 1544000
) (
  input  logic clk,      // recovered clock f_out
  input  logic rst_n,
  output logic f_div
);
  localparam int CW = $clog2(N);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      f_div <= 1'b0;
    end else begin
      cnt   <= (cnt == CW'(N - 1)) ? '0 : cnt + CW'(1);
      f_div <= (cnt < CW'(N / 64'd2));
    end
  end
endmodule
