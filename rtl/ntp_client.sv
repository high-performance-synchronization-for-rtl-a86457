// ntp_client: the slave side of the timestamp exchange (the "NTP protocol" block), which
// measures the phase offset theta between the master clock and the recovered clock.
//
// Following the document, the slave sends a request and records its departure time T1.
// The master records the arrival T2 and, after a fixed delay, the departure T3 of its
// response. It returns T2 and T3, and the slave records the response's arrival T4. Then
//     theta = (T2 - T1 + T3 - T4) / 2
// All timestamps count clock cycles. The slave's tick counter counts cycles of the
// recovered clock f_out, not of the local reference. The master's counts cycles of its
// service clock. Only frequency is to be synchronised, so the document reduces standard
// NTP to this calculation, with no clock selection or filtering.
//
// How it works: `f_out` is synchronised to the reference clock, and its rising edges
// advance the 64-bit slave time. `req_trigger` (one request per holdover-loop update, as
// in the document) sends a request if none is outstanding. The block then pulses
// `req_send` and presents T1 on `req_t1`. `resp_valid` with `resp_t2`/`resp_t3` completes
// the exchange. One cycle later `theta_valid` pulses, with theta in units of half a cycle
// (one fraction bit). A response that does not come within TIMEOUT reference cycles
// abandons the exchange (`timeout` pulse). When `time_sync` is set at a response, the slave
// time is stepped by theta instead: this is the initial absolute-time alignment that keeps
// the offset term small, as the document asks. `synced` then rises and theta is not output
// for that exchange.
//
// This design's choices, where the document is silent: counting synchronised f_out edges
// in the reference domain, the 64-bit timestamps, the timeout, and when the time step is
// made.
module ntp_client #(
  parameter int TS_W    = 64,
  parameter int TIMEOUT = 933120000   // reference cycles (3 s at 311.04 MHz)
) (
  input  logic                   clk,          // reference clock
  input  logic                   rst_n,
  input  logic                   f_out,        // recovered clock (asynchronous)
  input  logic                   req_trigger,
  input  logic                   time_sync,    // step the slave time at the next response
  output logic                   req_send,     // request departs now
  output logic [TS_W-1:0]        req_t1,
  input  logic                   resp_valid,
  input  logic [TS_W-1:0]        resp_t2,
  input  logic [TS_W-1:0]        resp_t3,
  output logic                   theta_valid,
  output logic signed [TS_W:0]   theta,        // units of 1/2 cycle
  output logic                   synced,
  output logic                   timeout,
  output logic [TS_W-1:0]        slave_time
);
  localparam int TW = $clog2(TIMEOUT + 1);

  logic              tick, lvl, fall_unused;
  logic              waiting;
  logic [TS_W-1:0]   t1;
  logic [TW-1:0]     wait_cnt;
  logic signed [TS_W+1:0] sum2;
  logic signed [TS_W-1:0] d21, d34;   // T2-T1 and T3-T4, modulo 2^TS_W
  logic [TS_W-1:0]   t4;

  edge_sync #(.STAGES(2)) u_sync (.clk, .rst_n, .din(f_out), .level(lvl), .rise(tick), .fall(fall_unused));

  assign t4   = slave_time;
  // Differences are taken modulo 2^TS_W, so counters that wrap, or that started at
  // unrelated values, give the right result as long as each difference is below 2^(TS_W-1).
  assign d21  = signed'(resp_t2 - t1);
  assign d34  = signed'(resp_t3 - t4);
  assign sum2 = (TS_W+2)'(d21) + (TS_W+2)'(d34);
  // sum2 = 2*theta; theta in half cycles is sum2 itself

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slave_time  <= '0;
      waiting     <= 1'b0;
      t1          <= '0;
      req_t1      <= '0;
      req_send    <= 1'b0;
      wait_cnt    <= '0;
      theta_valid <= 1'b0;
      theta       <= '0;
      synced      <= 1'b0;
      timeout     <= 1'b0;
    end else begin
      req_send    <= 1'b0;
      theta_valid <= 1'b0;
      timeout     <= 1'b0;
      if (tick) slave_time <= slave_time + TS_W'(1);
      if (!waiting) begin
        if (req_trigger) begin
          waiting  <= 1'b1;
          t1       <= slave_time;
          req_t1   <= slave_time;
          req_send <= 1'b1;
          wait_cnt <= '0;
        end
      end else if (resp_valid) begin
        waiting <= 1'b0;
        if (time_sync) begin
          // step the slave clock by round(theta) = round(sum2/2)
          slave_time <= slave_time + TS_W'((sum2 + (TS_W+2)'(1)) >>> 1) + TS_W'(tick);
          synced     <= 1'b1;
        end else begin
          theta       <= (TS_W+1)'(sum2);
          theta_valid <= 1'b1;
        end
      end else if (wait_cnt == TW'(TIMEOUT)) begin
        waiting <= 1'b0;
        timeout <= 1'b1;
      end else begin
        wait_cnt <= wait_cnt + TW'(1);
      end
    end
  end
endmodule
