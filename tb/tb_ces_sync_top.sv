// tb_ces_sync_top: end-to-end run of the clock-recovery design, at reduced sizes.
//
// The master T1 clock runs 30 ppm fast. The slave's VCO starts 10 ppm fast at mid-code,
// so the initial error is 20 ppm. Time is compressed by the factor
// 1 s / (N / 1.544 MHz): N = 77,200 gives a holdover-loop update every 50 ms instead of
// 1 s. M = 400 keeps one decimated sample per update, the FIR is a 256-tap boxcar, the
// ramp takes 5 updates, the master answers after TAU = 77,200 of its cycles, and G1 is
// scaled by the same factor so that the NTP loop has the document's gain per update.
// The reference is 31.104 MHz and the PHY word clock 12.5 MHz, a tenth of the real
// rates, to keep the run short.
//
// The network: T1 packets leave the master every 193 master cycles. They arrive with a
// fixed delay plus random jitter of up to 0.2 us, far less than in the document's network
// simulations, and 0-2 background packets come between them. Packets are placed in the
// 10-bit PHY stream as /S/ code-groups at bit resolution. The packet
// processor's header decision follows 1 us after each start. NTP messages cross the
// network with 20 us delays plus jitter.
//
// Phases and checks:
//   1. open loop: after the first estimate the VCO frequency must be within 8 ppm of the
//      master clock;
//   2. the ramp hands over to NTP: w must pass through values between 0 and 1 and reach 1,
//      and the slave time must be stepped once;
//   3. NTP control: 30 updates after w reaches 1 (about 2.5 time constants of the
//      NTP loop), the frequency averaged over 8 updates must be within 2 ppm;
//   4. holdover: packets and NTP replies stop. `holdover` must rise, the NTP exchange must
//      time out, and the frequency must stay within 2 ppm of its value at entry. When
//      traffic resumes, holdover must end.
// Every mechanism (start-of-packet detection, merging of background intervals, FIR and
// decimator outputs, open-loop estimates, ramp, NTP take-over, time step, theta updates,
// holdover, timeout) is counted, and one that never happens counts as a failure.
module tb_ces_sync_top;
  import ces_pkg::*;
  localparam longint N      = 77200;
  localparam int     M      = 400;
  localparam int     TAPS   = 256;
  localparam int     RAMP   = 5;
  localparam real    FREF   = 31.104e6;                // reference, 1/10 of the document's
  localparam real    FPHY   = 12.5e6;                  // PHY word clock, 1/10 of 1000BASE-X
  localparam real    TBIT   = 1.0e9 / FPHY / 10.0;     // ns per line bit
  localparam real    F0     = 1.544e6;
  localparam real    FM     = F0 * (1.0 + 30.0e-6);     // master service clock
  localparam real    SCALE  = 1.544e6 / real'(N);       // time compression
  localparam real    T_UPD  = real'(N) / F0 * 1.0e9;    // ns per loop update
  localparam int     TO     = int'(3.0 * T_UPD * FREF * 1.0e-9); // NTP timeout, reference cycles
  localparam int     HW     = 112;

  logic clk_ref, clk_phy, clk_m, f_out;
  logic rst_n = 0, rst_phy_n = 0, rst_m_n = 0;
  int checks = 0, failures = 0;

  clock_model #(.FREQ(FREF))     u_cref (.clk(clk_ref));
  clock_model #(.FREQ(FPHY))     u_cphy (.clk(clk_phy));
  clock_model #(.FREQ(FM))       u_cm   (.clk(clk_m));

  // DUT signals
  logic [9:0]  rx_word = '0;
  logic        hdr_valid = 0;
  logic [HW-1:0] hdr = '0, hdr_pattern, hdr_mask;
  logic        coef_we = 0;
  logic [6:0]  coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic        dac_valid;
  logic [15:0] dac_code;
  logic        ntp_req_send, ntp_resp_valid = 0;
  logic [63:0] ntp_req_t1, ntp_resp_t2 = '0, ntp_resp_t3 = '0;
  logic        m_req_in = 0, m_resp_send, m_req_drop;
  logic [63:0] m_resp_t2, m_resp_t3;
  logic        sop, t1_valid, non_t1, fir_overrun, c_valid, loop_update, dac_sat;
  logic        ntp_full, holdover, theta_valid, ntp_synced, ntp_timeout;
  logic [3:0]  sop_shift;
  logic [31:0] sop_word, fdiv_period;
  logic [15:0] t1_interval;
  ctrl_t       c_est, d_est, ctrl, loop_err;
  logic [16:0] w;
  logic signed [64:0] theta;
  logic [63:0] slave_time, master_time;

  ces_sync_top #(.N(N), .M(M), .TAPS(TAPS), .F_R0(FREF), .G1(0.08 * SCALE), .RAMP_STEPS(RAMP),
                 .TAU(int'(N)), .NTP_TIMEOUT(TO)) dut (.*);

  vco_model #(.F0(F0), .OFFSET_PPM(10.0), .DEV_PPM(50.0)) u_vco (.code(dac_code), .f_out);

  function automatic real err_ppm();
    return (u_vco.freq / FM - 1.0) * 1.0e6;
  endfunction

  // ---------------- counters of mechanisms ----------------
  int n_sop = 0, n_non_t1 = 0, n_t1 = 0, n_fir = 0, n_c = 0, n_ramp_mid = 0, n_full = 0;
  int n_theta = 0, n_hold = 0, n_timeout = 0, n_upd = 0, n_req = 0, n_resp = 0;
  always @(posedge clk_phy) if (rst_phy_n && sop) n_sop++;
  always @(posedge clk_ref) if (rst_n) begin
    if (non_t1) n_non_t1++;
    if (t1_valid) n_t1++;
    if (dut.fir_valid) n_fir++;
    if (c_valid) n_c++;
    if (w != 0 && w != 17'h10000 && loop_update) n_ramp_mid++;
    if (ntp_full && loop_update) n_full++;
    if (theta_valid) n_theta++;
    if (holdover && loop_update) n_hold++;
    if (ntp_timeout) n_timeout++;
    if (loop_update) n_upd++;
    if (ntp_req_send) n_req++;
  end

  // ---------------- network: T1 and background packets ----------------
  bit  traffic_on = 1;
  real ev_time[$];
  bit  ev_t1[$];

  initial begin : packet_source
    real t_dep, t_arr, gap;
    int  nbg;
    t_dep = 20000.0;
    forever begin
      t_dep = t_dep + 193.0 / FM * 1.0e9;           // one T1 frame of the master clock
      t_arr = t_dep + 20000.0 + real'($urandom_range(0, 200));   // 20 us + 0..0.2 us jitter
      nbg = int'($urandom_range(0, 2));
      for (int b = 0; b < nbg; b++) begin
        gap = 20000.0 + 40000.0 * real'(b) + real'($urandom_range(0, 10000));
        if (traffic_on) begin ev_time.push_back(t_arr + gap - 125000.0); ev_t1.push_back(1'b0); end
      end
      if (traffic_on) begin ev_time.push_back(t_arr); ev_t1.push_back(1'b1); end
      // wait until this frame's arrival time before scheduling the next
      #(t_arr - $realtime - 125000.0 + 1000.0);
    end
  end

  // PHY: emit 10-bit words, inserting /S/ at the bit where each start falls
  localparam logic [9:0] K_S = 10'b0001011011;
  initial begin : phy_tx
    logic [19:0] pend;
    real t0;
    pend = '0;
    forever begin
      @(negedge clk_phy);
      t0 = $realtime;
      while (ev_time.size() > 0 && ev_time[0] < t0 + 10.0 * TBIT) begin
        real te;
        int  sh;
        bit  is_t1;
        te = ev_time.pop_front();
        is_t1 = ev_t1.pop_front();
        sh = (te <= t0) ? 0 : int'((te - t0) / TBIT - 0.5);
        if (sh > 9) sh = 9;
        if (sh < 0) sh = 0;
        pend = pend | (20'(K_S) << sh);
        fork
          begin : hdr_later
            automatic bit t1f = is_t1;
            #1000;
            @(negedge clk_ref);
            hdr_valid = 1;
            hdr = {$urandom, $urandom, $urandom, $urandom};
            if (t1f) hdr = (hdr & ~hdr_mask) | (hdr_pattern & hdr_mask);
            else     hdr[15:0] = ~hdr_pattern[15:0];
            @(negedge clk_ref);
            hdr_valid = 0;
          end
        join_none
      end
      rx_word = pend[9:0];
      pend = pend >> 10;
    end
  end

  // ---------------- network: NTP messages ----------------
  bit ntp_on = 1;
  always @(posedge clk_ref) if (rst_n && ntp_req_send) begin
    fork
      begin
        #(20000.0 + real'($urandom_range(0, 500)));
        @(negedge clk_m); m_req_in = 1;
        @(negedge clk_m); m_req_in = 0;
      end
    join_none
  end
  always @(posedge clk_m) if (rst_m_n && m_resp_send) begin
    fork
      begin
        automatic logic [63:0] a2 = m_resp_t2, a3 = m_resp_t3;
        automatic bit deliver = ntp_on;
        #(20000.0 + real'($urandom_range(0, 500)));
        if (deliver) begin
          @(negedge clk_ref);
          ntp_resp_valid = 1; ntp_resp_t2 = a2; ntp_resp_t3 = a3;
          n_resp++;
          @(negedge clk_ref);
          ntp_resp_valid = 0;
        end
      end
    join_none
  end

  // ---------------- run ----------------
  task automatic wait_updates(input int n);
    repeat (n) @(posedge loop_update);
  endtask

  real avg_acc;
  int  avg_n;
  real f_hold;

  initial begin : main
    hdr_pattern = {$urandom, $urandom, $urandom, $urandom};
    hdr_mask    = {48'hFFFF_FFFF_FFFF, 48'h0, 16'hFFFF};
    #100 rst_n = 1; rst_phy_n = 1;
    #2000 rst_m_n = 1;          // after the first master clock edges
    // host loads a 256-tap boxcar (unit DC gain: 128 coefficients of 128 in Q1.15)
    wait (!dut.u_fir.busy);
    for (int k = 0; k < TAPS / 2; k++) begin
      @(negedge clk_ref); coef_we = 1; coef_addr = 7'(k); coef_data = 16'sd128;
    end
    @(negedge clk_ref); coef_we = 0;
    $display("initial error %0.2f ppm", err_ppm());

    // 1. open loop
    wait (n_c >= 1);
    wait_updates(3);
    $display("open loop: error %0.2f ppm, w=%0d, c=%0d ticks", err_ppm(), w, c_est >>> 16);
    checks++;
    if (err_ppm() > 8.0 || err_ppm() < -8.0) begin failures++; $display("open-loop estimate too far"); end

    // 2./3. ramp and NTP control
    wait (ntp_full);
    wait_updates(30);
    avg_acc = 0.0; avg_n = 0;
    for (int i = 0; i < 8; i++) begin
      wait_updates(1);
      avg_acc += err_ppm(); avg_n++;
      $display("NTP control: error %0.3f ppm, theta=%0d half cycles", err_ppm(), theta);
    end
    checks++;
    if (avg_acc / avg_n > 2.0 || avg_acc / avg_n < -2.0) begin
      failures++; $display("locked average error %0.3f ppm", avg_acc / avg_n);
    end
    checks++;
    if (!ntp_synced) begin failures++; $display("no time step"); end

    // 4. holdover
    f_hold = u_vco.freq;
    traffic_on = 0; ntp_on = 0;
    wait_updates(5);
    checks++;
    if (!holdover) begin failures++; $display("holdover not entered"); end
    checks++;
    if ((u_vco.freq / f_hold - 1.0) * 1.0e6 > 2.0 || (u_vco.freq / f_hold - 1.0) * 1.0e6 < -2.0) begin
      failures++; $display("holdover drift %0.3f ppm", (u_vco.freq / f_hold - 1.0) * 1.0e6);
    end
    $display("holdover: error %0.3f ppm", err_ppm());
    traffic_on = 1; ntp_on = 1;
    wait_updates(3);
    checks++;
    if (holdover) begin failures++; $display("holdover did not end"); end

    // mechanism counts
    $display("sop=%0d non_t1=%0d t1=%0d fir=%0d c=%0d ramp=%0d full=%0d theta=%0d hold=%0d timeout=%0d req=%0d resp=%0d upd=%0d",
             n_sop, n_non_t1, n_t1, n_fir, n_c, n_ramp_mid, n_full, n_theta, n_hold, n_timeout, n_req, n_resp, n_upd);
    checks++; if (n_sop == 0)     begin failures++; $display("no start-of-packet"); end
    checks++; if (n_non_t1 == 0)  begin failures++; $display("no background packet"); end
    checks++; if (n_t1 == 0)      begin failures++; $display("no T1 interval"); end
    checks++; if (n_fir == 0)     begin failures++; $display("no FIR output"); end
    checks++; if (n_c < 2)        begin failures++; $display("no open-loop estimates"); end
    checks++; if (n_ramp_mid == 0) begin failures++; $display("ramp never between 0 and 1"); end
    checks++; if (n_full == 0)    begin failures++; $display("NTP never in full control"); end
    checks++; if (n_theta == 0)   begin failures++; $display("no theta"); end
    checks++; if (n_hold == 0)    begin failures++; $display("no holdover"); end
    checks++; if (n_timeout == 0) begin failures++; $display("no NTP timeout"); end
    checks++; if (fir_overrun)    begin failures++; $display("FIR overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(T_UPD * 100.0);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
