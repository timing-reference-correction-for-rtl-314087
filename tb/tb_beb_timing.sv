// Testbench for beb_timing: the two front ends are simple models written
// here that read the downlink frame fields directly, answer a handshake or a
// flag REPLY frames later on the uplink and record slow-control writes. The
// links are gbt_link_model instances with different delays and bit offsets.
// Checks alignment, the measured loopback difference against the modelled
// delays, the correction, and the two slow-control writes received by each
// front end (0x2840/0x2841 = correction, 0x2844 = enable).
module tb_beb_timing;
  import irpc_pkg::*;
  localparam int N = 2, CNT_W = 12, REPLY = 3;
  localparam realtime T40 = 25.0, T400 = 2.5;
  localparam int      KD [N] = '{3, 5};
  localparam realtime FD [N] = '{4.0, 11.5};   // below half a period

  logic clk40 = 0, clk400 = 0, rst_n = 0, bc0_in = 0, resync_in = 0, start = 0, bc0_corr_en = 1;
  logic [N-1:0][HDR_W+FRAME_W-1:0] tx_word, feb_rx;
  logic [N-1:0] rx_clk, rx_rst_n, rxslide, rx_locked, feb_clk;
  logic [N-1:0][HDR_W+WB_W-1:0] rx_word, feb_tx;
  logic [N-1:0][CNT_W-1:0] latency, latency_bx, start_cnt, end_cnt, corr;
  logic meas_done, corr_valid, corr_written;
  logic [N-1:0] corr_half, bc0_ts_valid;
  logic [$clog2(N+1)-1:0] ref_idx;
  logic [N-1:0][TS_W-1:0] bc0_ts;
  int ul_slides [N], dl_slides [N];
  int checks = 0, failures = 0;

  beb_timing #(.N_LINKS(N), .CNT_W(CNT_W)) dut (.*);

  always #(T400 / 2) clk400 = ~clk400;
  initial begin #0.3; forever #(T40 / 2) clk40 = ~clk40; end

  // front-end models: the downlink is read at the true frame boundary
  logic [15:0] regs [N][logic [15:0]];
  for (genvar i = 0; i < N; i++) begin : g_l
    assign #(FD[i]) feb_clk[i] = clk40;
    assign #(FD[i]) rx_clk[i]  = feb_clk[i];
    gbt_link_model #(.W(HDR_W + FRAME_W), .DLY(KD[i]), .INIT_OFFS(0)) u_down (
      .tx_clk(clk40), .tx_word(tx_word[i]), .rx_clk(feb_clk[i]), .rxslide(1'b0),
      .rx_word(feb_rx[i]), .slides(dl_slides[i]));
    gbt_link_model #(.W(HDR_W + WB_W), .DLY(KD[i]), .INIT_OFFS(9 + 50 * i)) u_up (
      .tx_clk(feb_clk[i]), .tx_word(feb_tx[i]), .rx_clk(rx_clk[i]), .rxslide(rxslide[i]),
      .rx_word(rx_word[i]), .slides(ul_slides[i]));

    up_code_t pipe [REPLY];
    initial for (int k = 0; k < REPLY; k++) pipe[k] = UP_NONE;
    int burst_left = 0;
    logic [15:0] baddr;
    always @(posedge feb_clk[i]) begin
      logic [79:0] f;
      wb_frame_t u;
      f = feb_rx[i][79:0];
      for (int k = REPLY - 1; k > 0; k--) pipe[k] <= pipe[k-1];
      pipe[0] <= (f[70:68] == 3'(LM_HS)) ? UP_HS_ACK : (f[70:68] == 3'(LM_FLAG)) ? UP_FLAG : UP_NONE;
      u = '0; u.code = pipe[REPLY-1];
      feb_tx[i] <= {(u.code == UP_NONE) ? HDR_IDLE : HDR_DATA, WB_W'(u)};
      if (f[67] && feb_rx[i][83:80] == HDR_DATA && f[56]) begin   // write request frame
        regs[i][f[47:32]] = f[31:16];
        if (f[55:48] >= 1) regs[i][f[47:32] + 1] = f[15:0];
        if (f[55:48] > 1) $display("unexpected long burst");
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // scaled-down orbit: BC0 every 200 frames
  int bx = 0;
  int bc0_n = 0;
  always @(posedge clk40) begin
    bx <= (bx == 199) ? 0 : bx + 1;
    bc0_in <= (bx == 199);
    if (bc0_in) bc0_n++;
  end

  initial begin
    int d, e;
    #100 rst_n = 1; rx_rst_n = '1;
    wait (&rx_locked);
    for (int i = 0; i < N; i++) check(ul_slides[i] > 0, "uplink aligned by bit slip");
    @(negedge clk40) start = 1;
    @(negedge clk40) start = 0;
    wait (corr_written);
    #1000;
    e = int'(2 * ((KD[1] - KD[0]) * T40 + FD[1] - FD[0]) / T400);   // 60
    d = int'(latency[1]) - int'(latency[0]);
    $display("latency %0d %0d, corr %0d %0d", latency[0], latency[1], corr[0], corr[1]);
    check(d >= e - 1 && d <= e + 1, $sformatf("loopback difference %0d expected %0d", d, e));
    check(corr_valid && ref_idx == 0 && corr[0] == 0 && corr[1] == CNT_W'(d / 2), "correction");
    check(corr_half[1] == d[0], "half step");
    for (int i = 0; i < N; i++) begin
      check(regs[i].exists(16'h2840) && regs[i][16'h2840] == 16'(corr[i]), $sformatf("FEB %0d 0x2840", i));
      check(regs[i].exists(16'h2841) && regs[i][16'h2841] == 16'h0, $sformatf("FEB %0d 0x2841", i));
      check(regs[i].exists(16'h2844) && regs[i][16'h2844] == 16'h1, $sformatf("FEB %0d 0x2844", i));
      check(latency_bx[i] >= latency[i] / 10 - 1 && latency_bx[i] <= latency[i] / 10 + 2, "BX counter");
    end
    // a second measurement gives the same result (deterministic latency)
    begin
      logic [N-1:0][CNT_W-1:0] l0;
      l0 = latency;
      @(negedge clk40) start = 1;
      @(negedge clk40) start = 0;
      wait (!meas_done);
      wait (corr_written);
      for (int i = 0; i < N; i++)
        check(latency[i] >= l0[i] - 1 && latency[i] <= l0[i] + 1, "repeatable latency");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
