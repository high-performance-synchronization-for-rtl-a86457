// ntp_server: the master adapter's side of the timestamp exchange.
//
// The master time counts cycles of the master service clock f_m. For each request it
// records the arrival time T2. It waits a fixed time tau and then sends a response that
// carries T2 and its own departure time T3. Following the document, tau is deterministic
// and much longer than the network delay (1 s in the document's configuration, 1,544,000
// cycles of a T1 clock). The phase error measured by the slave then grows with tau, while
// the noise from the path does not.
//
// How it works: the block runs on f_m. `req_in` (one cycle, synchronous to f_m) starts an
// exchange and latches T2. After TAU cycles, `resp_send` pulses with `resp_t2` and
// `resp_t3` (T3 = T2 + TAU). A request that comes while a response is pending is ignored
// and flagged on `req_drop`. Sending the timestamps over the network is outside this
// block, as packet encapsulation is outside the document's scope.
module ntp_server #(
  parameter int TS_W = 64,
  parameter int TAU  = 1544000        // master cycles between request arrival and response
) (
  input  logic            clk,         // master service clock f_m
  input  logic            rst_n,
  input  logic            req_in,
  output logic            resp_send,
  output logic [TS_W-1:0] resp_t2,
  output logic [TS_W-1:0] resp_t3,
  output logic            req_drop,
  output logic [TS_W-1:0] master_time
);
  localparam int CW = $clog2(TAU + 1);
  logic          busy;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      master_time <= '0;
      busy        <= 1'b0;
      cnt         <= '0;
      resp_send   <= 1'b0;
      resp_t2     <= '0;
      resp_t3     <= '0;
      req_drop    <= 1'b0;
    end else begin
      master_time <= master_time + TS_W'(1);
      resp_send   <= 1'b0;
      req_drop    <= req_in && busy;
      if (!busy) begin
        if (req_in) begin
          busy    <= 1'b1;
          cnt     <= CW'(1);
          resp_t2 <= master_time;
        end
      end else if (cnt == CW'(TAU)) begin
        busy      <= 1'b0;
        resp_send <= 1'b1;
        resp_t3   <= master_time;
      end else begin
        cnt <= cnt + CW'(1);
      end
    end
  end
endmodule
