// fir_filter: the long low-pass FIR filter of the open-loop path, on a single
// multiply-accumulate (MAC) unit.
//
// The document's filter has 2048 taps, a cut-off of 1e-4*pi and linear phase. It runs once
// per T1 packet (every 125 us on average), with 16-bit samples and coefficients and a 32-bit
// MAC, and its coefficients sum to 1 so that the MAC cannot overflow. Because the
// coefficients are symmetric, only the first TAPS/2 are stored. Each output then takes
// TAPS/2 MAC operations on pre-added sample pairs:
//     y[n] = sum_{k=0}^{TAPS/2-1} h[k] * (x[n-k] + x[n-(TAPS-1-k)])
// The storage is as the document gives it: TAPS 16-bit samples and TAPS/2 16-bit coefficients.
//
// How it works: samples go into a circular buffer. A new sample starts a pass that issues
// one sample pair and one coefficient per clock, through a read stage, a pre-add/multiply
// stage and the accumulator. `out_valid` pulses TAPS/2 + 3 cycles after `in_valid`, with
// out_data = sum h*x. The coefficients are signed Q1.15, so with unit DC gain out_data is
// the input scaled by 2^15. The accumulator is ACC_W bits and wraps like the document's
// 32-bit MAC; the unit-DC-gain rule keeps it in range. After reset the block spends TAPS
// cycles zeroing the sample buffer (`busy` high). An input that arrives while `busy` is
// dropped and flagged on `overrun`. `primed` rises with the TAPS-th sample, once every
// tap holds a real sample; the outputs before it include the zeroed history. The document requires one MAC per 122 ns; this design
// does one per reference clock.
//
// This design's choices, where the document is silent: the coefficient write port for the
// host, the Q1.15 coefficient format, the pipeline and the zeroing of the buffer. The
// coefficient values are the host's (not given in the document).
module fir_filter #(
  parameter int TAPS  = 2048,
  parameter int DW    = 16,     // sample width (unsigned)
  parameter int CW    = 16,     // coefficient width (signed Q1.15)
  parameter int ACC_W = 32      // MAC width
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          coef_we,
  input  logic [$clog2(TAPS/2)-1:0]     coef_addr,
  input  logic signed [CW-1:0]          coef_data,
  input  logic                          in_valid,
  input  logic [DW-1:0]                 in_data,
  output logic                          out_valid,
  output logic signed [ACC_W-1:0]       out_data,
  output logic                          busy,
  output logic                          overrun,
  output logic                          primed      // TAPS samples taken since reset
);
  localparam int HALF = TAPS / 2;
  localparam int AW   = $clog2(TAPS);
  localparam int HW   = $clog2(HALF);
  localparam int PW   = DW + 2 + CW;   // pre-add (DW+1 unsigned, made signed) times coefficient

  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_RUN} state_t;
  state_t state;

  logic [DW-1:0]        smem [TAPS];
  logic signed [CW-1:0] cmem [HALF];

  logic [AW-1:0] wptr, newest, clr_cnt;
  logic [HW-1:0] k;
  logic          issue;
  logic [AW:0]   nsamp;

  // pipeline registers
  logic                 v1, v2, last1, last2;
  logic [DW-1:0]        xa, xb;
  logic signed [CW-1:0] hk;
  logic signed [PW-1:0] prod;
  logic signed [ACC_W-1:0] acc;

  logic [AW-1:0] addr_a, addr_b;
  assign addr_a = newest - AW'(k);
  assign addr_b = newest + AW'(1) + AW'(k);   // newest - (TAPS-1-k) modulo TAPS
  assign issue  = (state == S_RUN);
  assign busy   = (state != S_IDLE) || v1 || v2;

  // coefficient memory
  always_ff @(posedge clk) begin
    if (coef_we) cmem[coef_addr] <= coef_data;
  end

  // sample memory: one write port, two read ports
  always_ff @(posedge clk) begin
    if (state == S_CLEAR)                 smem[clr_cnt] <= '0;
    else if (state == S_IDLE && in_valid) smem[wptr]    <= in_data;
    xa <= smem[addr_a];
    xb <= smem[addr_b];
    hk <= cmem[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CLEAR;
      clr_cnt   <= '0;
      wptr      <= '0;
      newest    <= '0;
      k         <= '0;
      v1        <= 1'b0;
      v2        <= 1'b0;
      last1     <= 1'b0;
      last2     <= 1'b0;
      prod      <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      overrun   <= 1'b0;
      nsamp     <= '0;
      primed    <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      overrun   <= in_valid && (state != S_IDLE || v1 || v2);
      case (state)
        S_CLEAR: begin
          clr_cnt <= clr_cnt + AW'(1);
          if (clr_cnt == AW'(TAPS - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (in_valid && !v1 && !v2) begin
            newest <= wptr;
            if (!primed) nsamp <= nsamp + (AW+1)'(1);
            if (nsamp == (AW+1)'(TAPS - 1)) primed <= 1'b1;
            wptr   <= wptr + AW'(1);
            k      <= '0;
            state  <= S_RUN;
          end
        end
        S_RUN: begin
          k <= k + HW'(1);
          if (k == HW'(HALF - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      // stage 1 -> 2: pre-add and multiply
      v1    <= issue;
      last1 <= issue && (k == HW'(HALF - 1));
      v2    <= v1;
      last2 <= last1;
      prod  <= PW'(signed'({2'b00, xa} + {2'b00, xb})) * PW'(hk);
      // stage 3: accumulate
      if (v2) begin
        if (last2) begin
          out_data  <= acc + ACC_W'(prod);
          out_valid <= 1'b1;
          acc       <= '0;
        end else begin
          acc <= acc + ACC_W'(prod);
        end
      end
    end
  end
endmodule
