// ces_sync_top: clock recovery for a T1 circuit emulated over Ethernet: the slave
// adapter's full algorithm, with the master adapter's timestamp responder beside it.
//
// The slave must regenerate the master's T1 service clock (1.544 MHz) from packets that
// crossed an asynchronous network. It has no common reference clock. Three parts work
// together:
//   * Holdover loop: a frequency-locked loop around the external DAC and VCO. The VCO
//     output f_out is divided by N (div_n). The period of f_div is measured in ticks of a
//     local 311.04 MHz reference (measure_t, 32 bits) and compared with a control value C.
//     The filtered error (holdover_filter) sets the DAC. C encodes the wanted frequency as
//     the length of N output cycles in reference ticks.
//   * Open-loop filter: start-of-packet events are found in the raw PHY stream
//     (sop_detect) and timed (measure_t, 16 bits). The intervals are merged up to each
//     packet of the monitored T1 stream (t1_accumulator). A 2048-tap FIR (fir_filter)
//     and an M-sample mean (mavg_decim) then reduce network jitter by several orders of
//     magnitude. The gain C1 (c1_gain) turns the result into the control value c[n].
//     FIR outputs are averaged only once the filter holds TAPS real samples.
//   * NTP loop: timestamp exchanges (ntp_client here, ntp_server at the master) measure
//     the phase offset theta. It is filtered and scaled (ntp_loop_filter) into d[n].
// weight_blend gives C = (1-w)c + wd, with w ramping from 0 to 1 over RAMP_STEPS loop
// updates. The open loop gives a fast first estimate, and NTP then takes over for accuracy.
// With no updates, C is held: this is holdover mode.
//
// Clock domains: clk_ref (the reference, 311.04 MHz) runs everything on the slave except
// sop_detect, on the PHY word clock clk_phy, and div_n, on f_out. f_out and the
// start-of-packet toggle are resynchronised to clk_ref. ntp_server runs on the master
// clock clk_m. The DAC, the VCO, the network that carries the NTP messages, and the host
// that loads the FIR coefficients and decodes packet headers are outside, connected
// through ports.
//
// This design's choices: the document computes C1, the weighting, the loop filters and
// the gains in floating point on a processor. This design does them in fixed-point
// hardware (see ces_pkg). Defaults are the document's configuration: N = 1,544,000,
// M = 8000, 2048 taps, d = 0.05, A = 1, alpha = 0.1, G1 = 0.08, a 50 s ramp and tau = 1 s.
// The start-of-packet event reaches the arrival Measure-T at the resolution of one PHY
// word (8 ns at 125 MHz), not one line bit as in the document: sop_shift, which would
// refine it, is only brought out. The FIR's busy flag is left unused; a sample that
// arrives while the filter runs is reported on fir_overrun instead.
module ces_sync_top
  import ces_pkg::*;
#(
  parameter longint N          = 1544000,
  parameter int     M          = 8000,
  parameter int     TAPS       = 2048,
  parameter int     L_FRAME    = 193,
  parameter real    F0         = 1.544e6,
  parameter real    F_R0       = 311.04e6,
  parameter real    VCO_PPM    = 50.0,
  parameter real    LOOP_A     = 1.0,
  parameter real    D          = 0.05,
  parameter real    ALPHA      = 0.1,
  parameter real    G1         = 0.08,
  parameter int     RAMP_STEPS = 50,
  parameter int     HOLD_STEPS = 3,
  parameter int     TAU        = 1544000,
  parameter int     NTP_TIMEOUT = 933120000,
  parameter int     HDR_W      = 112
) (
  // slave reference domain
  input  logic                      clk_ref,
  input  logic                      rst_n,
  // PHY parallel interface (realignment disabled)
  input  logic                      clk_phy,
  input  logic                      rst_phy_n,
  input  logic [9:0]                rx_word,
  // packet processor: header of the packet whose start was seen last
  input  logic                      hdr_valid,
  input  logic [HDR_W-1:0]          hdr,
  input  logic [HDR_W-1:0]          hdr_pattern,
  input  logic [HDR_W-1:0]          hdr_mask,
  // host: FIR coefficients
  input  logic                      coef_we,
  input  logic [$clog2(TAPS/2)-1:0] coef_addr,
  input  logic signed [15:0]        coef_data,
  // VCO output and DAC input
  input  logic                      f_out,
  output logic                      dac_valid,
  output logic [15:0]               dac_code,
  // NTP messages of the slave
  output logic                      ntp_req_send,
  output logic [63:0]               ntp_req_t1,
  input  logic                      ntp_resp_valid,
  input  logic [63:0]               ntp_resp_t2,
  input  logic [63:0]               ntp_resp_t3,
  // master adapter's responder, on the master service clock
  input  logic                      clk_m,
  input  logic                      rst_m_n,
  input  logic                      m_req_in,
  output logic                      m_resp_send,
  output logic [63:0]               m_resp_t2,
  output logic [63:0]               m_resp_t3,
  output logic                      m_req_drop,
  // status
  output logic                      sop,
  output logic [3:0]                sop_shift,
  output logic [31:0]               sop_word,
  output logic                      t1_valid,
  output logic [15:0]               t1_interval,
  output logic                      non_t1,
  output logic                      fir_overrun,
  output logic                      c_valid,
  output ctrl_t                     c_est,
  output ctrl_t                     d_est,
  output ctrl_t                     ctrl,
  output logic [16:0]               w,
  output logic                      loop_update,
  output logic [31:0]               fdiv_period,
  output ctrl_t                     loop_err,
  output logic                      dac_sat,
  output logic                      ntp_full,
  output logic                      holdover,
  output logic                      theta_valid,
  output logic signed [64:0]        theta,
  output logic                      ntp_synced,
  output logic                      ntp_timeout,
  output logic [63:0]               slave_time,
  output logic [63:0]               master_time
);
  // ---------------- open-loop path ----------------
  logic        sop_toggle;
  logic        arr_valid;
  logic [15:0] arr_period;
  logic        fir_valid, fir_busy, fir_primed;
  logic signed [31:0] fir_out;
  logic        mean_valid;
  logic signed [31:0] mean;

  sop_detect u_sop (
    .clk(clk_phy), .rst_n(rst_phy_n), .rx_word,
    .sop, .sop_shift, .sop_word, .sop_toggle
  );

  measure_t #(.W(16), .BOTH_EDGES(1'b1)) u_meas_arrival (
    .clk(clk_ref), .rst_n, .evt(sop_toggle),
    .period_valid(arr_valid), .period(arr_period)
  );

  t1_accumulator #(.W(16), .HDR_W(HDR_W)) u_acc (
    .clk(clk_ref), .rst_n, .meas_valid(arr_valid), .meas(arr_period),
    .hdr_valid, .hdr, .hdr_pattern, .hdr_mask,
    .r_valid(t1_valid), .r(t1_interval), .non_t1
  );

  fir_filter #(.TAPS(TAPS), .DW(16), .CW(16), .ACC_W(32)) u_fir (
    .clk(clk_ref), .rst_n, .coef_we, .coef_addr, .coef_data,
    .in_valid(t1_valid), .in_data(t1_interval),
    .out_valid(fir_valid), .out_data(fir_out), .busy(fir_busy), .overrun(fir_overrun), .primed(fir_primed)
  );

  mavg_decim #(.M(M), .IN_W(32)) u_decim (
    .clk(clk_ref), .rst_n, .in_valid(fir_valid && fir_primed), .in_data(fir_out),
    .out_valid(mean_valid), .out_data(mean)
  );

  c1_gain #(.N(N), .L_FRAME(L_FRAME), .IN_W(32), .IN_F(15)) u_c1 (
    .clk(clk_ref), .rst_n, .in_valid(mean_valid), .in_data(mean),
    .c_valid, .c(c_est)
  );

  // ---------------- NTP loop ----------------
  logic d_valid, ramp_start, ramp_begun;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n)          ramp_begun <= 1'b0;
    else if (ramp_start) ramp_begun <= 1'b1;
  end

  ntp_client #(.TS_W(64), .TIMEOUT(NTP_TIMEOUT)) u_ntp (
    .clk(clk_ref), .rst_n, .f_out,
    .req_trigger(loop_update), .time_sync(ramp_begun && !ntp_synced),
    .req_send(ntp_req_send), .req_t1(ntp_req_t1),
    .resp_valid(ntp_resp_valid), .resp_t2(ntp_resp_t2), .resp_t3(ntp_resp_t3),
    .theta_valid, .theta, .synced(ntp_synced), .timeout(ntp_timeout), .slave_time
  );

  ntp_loop_filter #(.N(N), .F0(F0), .F_R0(F_R0), .ALPHA(ALPHA), .G1(G1), .TS_W(64)) u_ntp_lf (
    .clk(clk_ref), .rst_n, .theta_valid, .theta, .d_valid, .d(d_est)
  );

  // ---------------- blending and holdover loop ----------------
  weight_blend #(.RAMP_STEPS(RAMP_STEPS), .HOLD_STEPS(HOLD_STEPS),
                 .C0(nominal_ctrl(N, F_R0, F0))) u_blend (
    .clk(clk_ref), .rst_n, .c_valid, .c(c_est), .d_valid, .d(d_est),
    .step(loop_update), .ctrl, .w, .ramp_start, .ntp_full, .holdover
  );

  logic f_div;
  div_n #(.N(N)) u_div (.clk(f_out), .rst_n, .f_div);

  measure_t #(.W(32), .BOTH_EDGES(1'b0)) u_meas_loop (
    .clk(clk_ref), .rst_n, .evt(f_div),
    .period_valid(loop_update), .period(fdiv_period)
  );

  holdover_filter #(.N(N), .F0(F0), .F_R0(F_R0), .VCO_PPM(VCO_PPM), .LOOP_A(LOOP_A),
                    .D(D), .MW(32), .DAC_W(16)) u_hold (
    .clk(clk_ref), .rst_n, .meas_valid(loop_update), .meas(fdiv_period), .ctrl,
    .dac_valid, .dac_code, .err(loop_err), .sat(dac_sat)
  );

  // ---------------- master adapter ----------------
  ntp_server #(.TS_W(64), .TAU(TAU)) u_master (
    .clk(clk_m), .rst_n(rst_m_n), .req_in(m_req_in),
    .resp_send(m_resp_send), .resp_t2(m_resp_t2), .resp_t3(m_resp_t3),
    .req_drop(m_req_drop), .master_time
  );
endmodule
