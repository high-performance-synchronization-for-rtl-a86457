// c1_gain: the constant gain C1 that turns the decimated interarrival time into a holdover-
// loop control value c[n].
//
// The document sets C1 = N * 2^b / L_frame. Here b is the interarrival counter width,
// read as a fraction, and L_frame = 193 bits is the T1 frame. c[n] is then the expected
// length of N output cycles, in reference ticks, if the output ran at the estimated master
// frequency. This design keeps the interarrival time as an integer tick count rather than
// a b-bit fraction, so the factor 2^b drops out. The input here is the decimator's mean
// FIR output. It is in ticks, scaled by 2^IN_F by the Q1.15 FIR coefficients. So the gain is
//     c = mean * (N / L_frame) * 2^(CTRL_F - IN_F)
// and c is in ces_pkg::ctrl_t format (ticks with 16 fraction bits). With the document's
// numbers, N / L_frame = 8000 and a 125 us interarrival time of 38,880 ticks gives the
// nominal control value 311,040,000 ticks. The gain is rounded to 32 fraction bits and applied in one
// registered multiply: `c_valid` follows `in_valid` by one cycle. The document computes
// this gain in floating point in software.
module c1_gain
  import ces_pkg::*;
#(
  parameter longint N       = 1544000,
  parameter int     L_FRAME = 193,
  parameter int     IN_W    = 32,
  parameter int     IN_F    = 15
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   c_valid,
  output ctrl_t                  c
);
  // K with KF fraction bits: N * 2^(KF + CTRL_F - IN_F) / L_FRAME, rounded
  localparam int     KF = 32;
  localparam longint KQ = ((N << (KF + CTRL_F - IN_F)) + longint'(L_FRAME) / 2) / longint'(L_FRAME);
  localparam int     PW = IN_W + 64;

  logic signed [PW-1:0] prod;
  assign prod = PW'(in_data) * PW'(KQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_valid <= 1'b0;
      c       <= '0;
    end else begin
      c_valid <= in_valid;
      if (in_valid) c <= CTRL_W'(prod >>> KF);
    end
  end
endmodule
