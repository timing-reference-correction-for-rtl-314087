// irpc_measure_scenario: one complete system (irpc_timing_top at its
// defaults, two gbt_link_model links, FEB TDC models) with the one-way link
// delays given as parameters: KD whole frames plus FD ns of clock phase.
// It aligns the links, runs one latency measurement and correction, and
// checks the measured loopback counts against EXP0/EXP1 (+-1), the 25 ns
// counts against EXPBX (+-1; 0 means: one tenth of the 2.5 ns count), the reference choice, the correction and its
// half-step bit, the values written into both FEBs, and that a particle
// crossing both FEBs at once gets equal corrected timestamps. Results are
// returned on the output ports when `done` rises.
module irpc_measure_scenario #(
  parameter int      KD0 = 2,
  parameter int      KD1 = 6,
  parameter realtime FD0 = 10.2,
  parameter realtime FD1 = 8.95,
  parameter int      EXP0 = 98,
  parameter int      EXP1 = 177,
  parameter int      EXPBX = 10,
  parameter string   NAME = "scenario"
) (
  output bit done,
  output int checks,
  output int failures
);
  import irpc_pkg::*;
  localparam int N = 2, CNT_W = 12;
  localparam realtime T40 = 25.0, T400 = 2.5;
  localparam int      KD [N] = '{KD0, KD1};
  localparam realtime FD [N] = '{FD0, FD1};

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

  initial begin checks = 0; failures = 0; done = 0; end

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
    if (!ok) begin failures++; $display("%s FAIL: %s (t=%0t)", NAME, what, $time); end
  endtask

  initial begin
    int d_lat, mu_diff, lo, e [N];
    e[0] = EXP0; e[1] = EXP1;
    feb_rst_n = '0; beb_rx_rst_n = '0;
    #100;
    rst_n = 1; feb_rst_n = '1; beb_rx_rst_n = '1;
    wait (&feb_locked && &beb_rx_locked);
    repeat (10) @(negedge clk40);
    @(negedge clk40) start = 1;
    @(negedge clk40) start = 0;
    wait (corr_written);
    $display("%s: latency %0d %0d (2.5 ns), %0d %0d (25 ns), corr %0d %0d, half %b%b, ref %0d",
             NAME, latency[0], latency[1], latency_bx[0], latency_bx[1], corr[0], corr[1],
             corr_half[1], corr_half[0], ref_idx);
    lo = (latency[1] < latency[0]) ? 1 : 0;
    for (int i = 0; i < N; i++) begin
      check(int'(latency[i]) >= e[i] - 1 && int'(latency[i]) <= e[i] + 1,
            $sformatf("link %0d loopback %0d counts, expected %0d", i, latency[i], e[i]));
      if (EXPBX > 0)
        check(int'(latency_bx[i]) >= EXPBX - 1 && int'(latency_bx[i]) <= EXPBX + 1,
              $sformatf("link %0d loopback %0d BX, expected %0d", i, latency_bx[i], EXPBX));
      else
        check(latency_bx[i] >= latency[i] / 10 - 1 && latency_bx[i] <= latency[i] / 10 + 2,
              "25 ns count agrees with 2.5 ns count");
      check(corr[i] == (latency[i] - latency[lo]) >> 1 && corr_half[i] == (latency[i] - latency[lo]) % 2,
            $sformatf("link %0d correction and half step", i));
    end
    check(int'(ref_idx) == lo && corr[lo] == 0, "fastest link is the reference");
    #1000;
    for (int i = 0; i < N; i++)
      check(bc0_off[i] == TS_W'(corr[i]) && feb_bc0_corr_en[i], $sformatf("FEB %0d correction written", i));
    // wait for a BC0 after the correction, then a particle
    for (int i = 0; i < N; i++) bc0_fb[i] = 0;
    wait (bc0_fb[0] >= 1 && bc0_fb[1] >= 1);
    #(1000.0);
    mu_time = $realtime + 3.7;
    wait (&mu_seen);
    #50;
    mu_diff = int'(mu_out[1]) - int'(mu_out[0]);
    $display("%s: particle FEB0 %0d FEB1 %0d", NAME, mu_out[0], mu_out[1]);
    check(mu_diff >= -2 && mu_diff <= 2, $sformatf("corrected timestamps agree (diff %0d)", mu_diff));
    done = 1;
  end
endmodule
