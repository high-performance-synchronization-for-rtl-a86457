// t1_accumulator: packet-processor stage that turns all-traffic interarrival times into
// interarrival times of the monitored T1 stream.
//
// As the document describes, Measure-T times every packet on the interface, since it
// cannot yet tell them apart. Each measurement is added to an accumulator. When the
// packet header is later found to match the pattern of the monitored T1 traffic, the
// accumulated value, the time since the previous T1 packet, goes to the FIR filter, and
// the accumulator returns to zero.
//
// How it works: `meas_valid` adds `meas`, saturating at all-ones. `hdr_valid` offers the
// header of the packet whose start was measured last. When (hdr & hdr_mask) equals
// (hdr_pattern & hdr_mask), the sum is emitted on `r` with the one-cycle strobe `r_valid`.
// If a measurement and a matching header come in the same cycle, the measurement belongs
// to the next packet and starts the new sum. `non_t1` pulses for a header that does not
// match. Output latency is one cycle after `hdr_valid`.
//
// This design's choices, where the document is silent: a masked compare over the first 14
// header bytes (addresses and EtherType), with pattern and mask as inputs; saturation at
// all-ones; emitting a T1 interval only after a first T1 packet has set a reference point.
module t1_accumulator #(
  parameter int W     = 16,    // measurement and output width (FIR input width)
  parameter int HDR_W = 112    // header bits compared
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             meas_valid,
  input  logic [W-1:0]     meas,
  input  logic             hdr_valid,
  input  logic [HDR_W-1:0] hdr,
  input  logic [HDR_W-1:0] hdr_pattern,
  input  logic [HDR_W-1:0] hdr_mask,
  output logic             r_valid,
  output logic [W-1:0]     r,
  output logic             non_t1
);
  logic [W-1:0] acc, acc_add;
  logic         match, seen_t1;
  logic [W:0]   sum;

  assign match   = hdr_valid && ((hdr & hdr_mask) == (hdr_pattern & hdr_mask));
  assign sum     = {1'b0, acc} + {1'b0, meas};
  assign acc_add = sum[W] ? '1 : sum[W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      seen_t1 <= 1'b0;
      r_valid <= 1'b0;
      r       <= '0;
      non_t1  <= 1'b0;
    end else begin
      r_valid <= 1'b0;
      non_t1  <= hdr_valid && !match;
      if (match) begin
        r_valid <= seen_t1;
        r       <= acc;
        seen_t1 <= 1'b1;
        acc     <= meas_valid ? meas : '0;
      end else if (meas_valid) begin
        acc <= acc_add;
      end
    end
  end
endmodule
