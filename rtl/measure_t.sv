// measure_t: the Measure-T block, which counts reference-clock ticks between successive events.
//
// The document uses it twice. Before the FIR filter it measures packet interarrival times.
// In the holdover loop it measures the period of the divided output clock f_div. Each is
// the number of f_ref ticks between two events, read downstream as an unsigned fixed-point
// number. Following the document, the count saturates at all-ones, the largest interarrival
// time that can be measured; the holdover-loop instance is 32 bits wide, as in the document.
//
// How it works: the event input is asynchronous to clk and passes through edge_sync. A free
// counter restarts at every event, and the elapsed count is presented with a one-cycle
// `period_valid` strobe. The first event after reset starts the count and yields no output.
// With BOTH_EDGES = 1 every change of the input is an event. The start-of-packet path uses
// this with a toggle signal, so that no pulse is lost in the clock crossing.
//
// Timing: `period_valid` follows the event edge on `evt` by 3 clk cycles (2 synchroniser
// stages, 1 output register). Events less than 2 cycles apart are not resolved.
// This design's choices: the document describes a measurement circuit using both edges of a
// 155.52 MHz clock. Here it is modelled as a single-edge counter on a 311.04 MHz clock with
// the same tick. The synchroniser is also this design's own.
module measure_t #(
  parameter int W          = 32,   // counter / result width (32 in the holdover loop)
  parameter bit BOTH_EDGES = 1'b0  // 0: rising edges are events, 1: both edges are events
) (
  input  logic         clk,          // reference clock f_ref
  input  logic         rst_n,
  input  logic         evt,          // asynchronous event signal
  output logic         period_valid, // one-cycle strobe
  output logic [W-1:0] period        // ticks between the last two events, saturated
);
  logic rise, fall, lvl, ev;
  logic [W-1:0] cnt;
  logic         armed;               // an event has been seen since reset

  edge_sync #(.STAGES(2)) u_sync (.clk, .rst_n, .din(evt), .level(lvl), .rise, .fall);
  assign ev = BOTH_EDGES ? (rise | fall) : rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      armed        <= 1'b0;
      period_valid <= 1'b0;
      period       <= '0;
    end else begin
      period_valid <= 1'b0;
      if (ev) begin
        if (armed) begin
          period       <= (&cnt) ? cnt : cnt + W'(1);
          period_valid <= 1'b1;
        end
        armed <= 1'b1;
        cnt   <= '0;
      end else if (!(&cnt)) begin
        cnt <= cnt + W'(1);
      end
    end
  end
endmodule
