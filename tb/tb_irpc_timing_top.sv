// End-to-end testbench of irpc_timing_top at its default parameters (two
// links, 12-bit counters, 34 TDC channels, a full LHC orbit of 3564 bunch
// crossings between BC0s).
//
// Link 0 has a one-way fiber delay of 60.2 ns, link 1 of 158.95 ns (98.75 ns
// longer, which is the 79-count loopback difference of the document's FEB
// test). Each direction is a gbt_link_model with a different initial bit
// offset. Each FEB's TDC is modelled here: its timestamp is the absolute
// simulation time in 2.5 ns steps from a board-specific origin, BC0 and
// Resync calibration pulses become hits on channels 32 and 33.
//
// Checks: both sides align (rxslide used), every handshake step happens on
// both links, the measured loopback difference and the correction match the
// fiber delays, the BC0 offsets and enable bit arrive in both FEBs, the BC0
// timestamp returned to the backend equals one orbit (35640 steps of 2.5 ns),
// and a particle crossing both halves of the chamber at the same time gets
// the same corrected timestamp on both FEBs (it would differ by about 39
// steps without the correction). Resync is distributed and, like every
// standard channel, shifted by the correction.
module tb_irpc_timing_top;
  import irpc_pkg::*;
  localparam int N = 2, CNT_W = 12;
  localparam realtime T40 = 25.0, T400 = 2.5;
  // fiber delays: whole frames (model stages) + fraction (clock phase)
  localparam int      KD [N] = '{2, 6};
  localparam realtime FD [N] = '{10.2, 8.95};

  logic clk40 = 0, clk400 = 0, rst_n = 0, bc0_in = 0, resync_in = 0, start = 0;
  logic bc0_corr_en = 1;
  logic [N-1:0][HDR_W+FRAME_W-1:0] beb_tx_word, feb_rx_word;
  logic [N-1:0] beb_rx_clk, beb_rx_rst_n, beb_rxslide, beb_rx_locked;
  logic [N-1:0][HDR_W+WB_W-1:0] beb_rx_word, feb_tx_word;
  logic [N-1:0][CNT_W-1:0] latency, latency_bx, start_cnt, end_cnt, corr;
  logic meas_done, corr_valid, corr_written;
  logic [N-1:0] corr_half;
  logic [$clog2(N+1)-1:0] ref_idx;
  logic [N-1:0] beb_bc0_ts_valid;
  logic [N-1:0][TS_W-1:0] beb_bc0_ts;
  logic [N-1:0] feb_clk, feb_rst_n, feb_rxslide, feb_locked, feb_calib_bc0, feb_calib_resync;
  logic [N-1:0][N_TDC_CH-1:0] feb_tdc_valid, feb_ts_valid;
  logic [N-1:0][N_TDC_CH-1:0][TS_W-1:0] feb_tdc_ts, feb_ts_out;
  logic [N-1:0][TS_W-1:0] feb_offset0;
  logic [N-1:0] feb_bc0_corr_en, feb_established, feb_meas_done;
  int dl_slides [N], ul_slides [N];

  int checks = 0, failures = 0;

  irpc_timing_top dut (.*);

  // clocks: clk400 and clk40 from one source, clk40 shifted a little so the
  // two domains never sample on the same instant
  always #(T400 / 2) clk400 = ~clk400;
  initial begin #0.3; forever #(T40 / 2) clk40 = ~clk40; end

  for (genvar i = 0; i < N; i++) begin : g_link
    assign #(FD[i]) feb_clk[i]    = clk40;       // FEB clock recovered from the downlink
    assign #(FD[i]) beb_rx_clk[i] = feb_clk[i];  // backend clock recovered from the uplink
    gbt_link_model #(.W(HDR_W + FRAME_W), .DLY(KD[i]), .INIT_OFFS(17 + 23 * i)) u_down (
      .tx_clk(clk40), .tx_word(beb_tx_word[i]), .rx_clk(feb_clk[i]),
      .rxslide(feb_rxslide[i]), .rx_word(feb_rx_word[i]), .slides(dl_slides[i]));
    gbt_link_model #(.W(HDR_W + WB_W), .DLY(KD[i]), .INIT_OFFS(40 + 31 * i)) u_up (
      .tx_clk(feb_clk[i]), .tx_word(feb_tx_word[i]), .rx_clk(beb_rx_clk[i]),
      .rxslide(beb_rxslide[i]), .rx_word(beb_rx_word[i]), .slides(ul_slides[i]));
  end

  // ---------------- FEB TDC models ----------------
  localparam realtime T0 [N] = '{1234.5, 98765.0};  // TDC time origins
  function automatic logic [TS_W-1:0] tdc_time(int i, realtime t);
    return TS_W'(longint'((t - T0[i]) / T400));
  endfunction

  realtime mu_time = -1.0;       // time of a particle crossing
  int      mu_ch   = 5;
  logic [N-1:0] mu_done = '0;
  realtime bc0_arr [N];
  int bc0_hits [N], resync_hits [N];

  for (genvar i = 0; i < N; i++) begin : g_tdc
    initial begin bc0_hits[i] = 0; resync_hits[i] = 0; end
    always @(posedge feb_clk[i]) begin
      logic [N_TDC_CH-1:0] v;
      logic [N_TDC_CH-1:0][TS_W-1:0] t;
      v = '0; t = '0;
      if (feb_calib_bc0[i]) begin
        v[BC0_CH] = 1; t[BC0_CH] = tdc_time(i, $realtime);
        bc0_arr[i] = $realtime;
        bc0_hits[i]++;
      end
      if (feb_calib_resync[i]) begin
        v[RESYNC_CH] = 1; t[RESYNC_CH] = tdc_time(i, $realtime);
        resync_hits[i]++;
      end
      if (mu_time > 0 && !mu_done[i] && $realtime >= mu_time) begin
        v[mu_ch] = 1; t[mu_ch] = tdc_time(i, mu_time);
        mu_done[i] = 1;
      end
      feb_tdc_valid[i] <= v;
      feb_tdc_ts[i]    <= t;
    end
  end

  // corrected timestamps of the particle hit and of Resync
  logic [N-1:0][TS_W-1:0] mu_out, rs_out;
  logic [N-1:0] mu_seen = '0, rs_seen = '0;
  for (genvar i = 0; i < N; i++) begin : g_rd
    always @(posedge feb_clk[i]) begin
      if (feb_ts_valid[i][mu_ch])     begin mu_out[i] <= feb_ts_out[i][mu_ch];     mu_seen[i] <= 1; end
      if (feb_ts_valid[i][RESYNC_CH]) begin rs_out[i] <= feb_ts_out[i][RESYNC_CH]; rs_seen[i] <= 1; end
    end
  end

  // BC0 from the timing system every 3564 bunch crossings
  int bx = 0;
  always @(posedge clk40) begin
    bx <= (bx == BX_PER_ORBIT - 1) ? 0 : bx + 1;
    bc0_in <= (bx == BX_PER_ORBIT - 1);
  end

  // BC0 timestamps returned to the backend
  logic [N-1:0][TS_W-1:0] last_bc0_ts;
  int bc0_fb [N];
  for (genvar i = 0; i < N; i++) begin : g_fb
    initial bc0_fb[i] = 0;
    always @(posedge beb_rx_clk[i])
      if (beb_bc0_ts_valid[i]) begin last_bc0_ts[i] <= beb_bc0_ts[i]; bc0_fb[i]++; end
  end

  // mechanism counters
  int n_hs [N], n_flag [N];
  logic [N-1:0][TS_W-1:0] bc0_off;
  for (genvar i = 0; i < N; i++) begin : g_mon
    initial begin n_hs[i] = 0; n_flag[i] = 0; end
    assign bc0_off[i] = dut.g_feb[i].offs[BC0_CH];
    always @(posedge feb_clk[i]) begin
      if (dut.g_feb[i].u_feb.u_link.lm_code == LM_HS)   n_hs[i]++;
      if (dut.g_feb[i].u_feb.u_link.lm_code == LM_FLAG) n_flag[i]++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #3ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int d_lat, exp_diff, mu_diff, raw_diff;
    feb_rst_n = '0; beb_rx_rst_n = '0;
    #100;
    rst_n = 1; feb_rst_n = '1; beb_rx_rst_n = '1;
    // 1. link alignment
    wait (&feb_locked && &beb_rx_locked);
    $display("links aligned at %0t", $time);
    for (int i = 0; i < N; i++)
      check(dl_slides[i] > 0 && ul_slides[i] > 0, $sformatf("link %0d: both receivers used bit slip", i));
    repeat (10) @(negedge clk40);
    // 2. latency measurement, correction, download
    @(negedge clk40) start = 1;
    @(negedge clk40) start = 0;
    wait (meas_done);
    wait (corr_written);
    $display("latency: link0 %0d (%0d..%0d), link1 %0d (%0d..%0d) x2.5ns; BX counts %0d %0d; corr %0d %0d ref %0d",
             latency[0], start_cnt[0], end_cnt[0], latency[1], start_cnt[1], end_cnt[1],
             latency_bx[0], latency_bx[1], corr[0], corr[1], ref_idx);
    for (int i = 0; i < N; i++) begin
      check(n_hs[i] == 1 && n_flag[i] == 1, $sformatf("link %0d: one handshake and one flag", i));
      check(feb_meas_done[i], $sformatf("FEB %0d reached latency measure_end", i));
      // loopback = 2 x one-way fiber + fixed logic latency
      check(latency[i] * T400 >= 2 * (KD[i] * T40 + FD[i]) &&
            latency[i] * T400 <= 2 * (KD[i] * T40 + FD[i]) + 40 * T40, "loopback above fiber time");
      check(latency_bx[i] >= latency[i] / 10 - 1 && latency_bx[i] <= latency[i] / 10 + 2,
            "25 ns count agrees with 2.5 ns count");
    end
    exp_diff = int'(2 * ((KD[1] - KD[0]) * T40 + FD[1] - FD[0]) / T400);   // 79
    d_lat = int'(latency[1]) - int'(latency[0]);
    check(d_lat >= exp_diff - 1 && d_lat <= exp_diff + 1,
          $sformatf("loopback difference %0d expected %0d +-1", d_lat, exp_diff));
    check(ref_idx == 0 && corr[0] == 0, "faster link is the reference");
    check(corr[1] == CNT_W'(d_lat / 2), "correction = difference / 2");
    check(corr[1] >= 38 && corr[1] <= 41, $sformatf("correction %0d near 39.5", corr[1]));
    // 3. downloaded into the FEBs (after the downlink delay)
    #500;
    for (int i = 0; i < N; i++) begin
      check(bc0_off[i] == TS_W'(corr[i]), $sformatf("FEB %0d BC0 offset", i));
      check(feb_bc0_corr_en[i], $sformatf("FEB %0d BC0 correction enabled", i));
    end
    // 4. BC0 feedback equals one orbit
    for (int i = 0; i < N; i++) bc0_fb[i] = 0;
    wait (bc0_fb[0] >= 2 && bc0_fb[1] >= 2);
    for (int i = 0; i < N; i++)
      check(last_bc0_ts[i] == TS_W'(BX_PER_ORBIT * 10),
            $sformatf("FEB %0d BC0 period %0d expected %0d", i, last_bc0_ts[i], BX_PER_ORBIT * 10));
    // 5. a particle crossing both FEBs' strips at the same time
    #(1000.0);
    mu_time = $realtime + 3.7;
    wait (&mu_seen);
    #50;
    mu_diff  = int'(mu_out[1]) - int'(mu_out[0]);
    raw_diff = mu_diff - int'(corr[1]);      // what it would be without the offset
    $display("particle: FEB0 %0d FEB1 %0d (without correction FEB1 %0d); BC0 arrivals %0t %0t",
             mu_out[0], mu_out[1], int'(mu_out[1]) - int'(corr[1]), bc0_arr[0], bc0_arr[1]);
    check(mu_diff >= -2 && mu_diff <= 2, $sformatf("corrected timestamps agree (diff %0d)", mu_diff));
    check(raw_diff <= -36, $sformatf("without correction they differ (diff %0d)", raw_diff));
    // 6. Resync distribution
    @(negedge clk40) resync_in = 1;
    @(negedge clk40) resync_in = 0;
    wait (&rs_seen);
    #50;
    check(resync_hits[0] == 1 && resync_hits[1] == 1, "Resync reached both FEBs");
    mu_diff = int'(rs_out[1]) - int'(rs_out[0]);
    // Resync travels the same link as BC0, so its raw time since BC0 is equal
    // on both FEBs; as a standard channel it is shifted by the correction.
    check(mu_diff == int'(corr[1]), $sformatf("Resync shifted like a hit (diff %0d)", mu_diff));
    check(bc0_hits[0] >= 3 && bc0_hits[1] >= 3, "BC0 distributed every orbit");
    $display("mechanisms: slides dl %0d/%0d ul %0d/%0d, handshakes %0d/%0d, flags %0d/%0d, BC0 hits %0d/%0d, resync %0d/%0d",
             dl_slides[0], dl_slides[1], ul_slides[0], ul_slides[1], n_hs[0], n_hs[1],
             n_flag[0], n_flag[1], bc0_hits[0], bc0_hits[1], resync_hits[0], resync_hits[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
