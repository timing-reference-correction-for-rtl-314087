// Testbench for feb_timing: the backend side is written here as a queue of
// downlink frames built field by field from the frame layout, sent through a
// gbt_link_model that starts off the frame boundary, so the FEB must find it
// by bit slip. The uplink words leaving the FEB are decoded directly.
// Checks: alignment, BC0/Resync calibration pulses, the handshake replies and
// the fixed flag-reply latency, a 68-word burst write of all 34 channel
// offsets, a request for another FPGA being ignored, the control register,
// a read returned on the uplink, and the corrected TDC timestamps (offset
// and Previous BC0 subtraction) including the BC0 timestamp feedback.
module tb_feb_timing;
  import irpc_pkg::*;
  localparam int W = HDR_W + FRAME_W;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] bw, rx_word;
  logic rxslide, locked, calib_bc0, calib_resync, bc0_corr_en, established, meas_done;
  logic [HDR_W+WB_W-1:0] tx_word;
  logic [N_TDC_CH-1:0] tdc_valid = '0, ts_valid;
  logic [N_TDC_CH-1:0][TS_W-1:0] tdc_ts = '0, ts_out, offset;
  int slides;
  int checks = 0, failures = 0;

  feb_timing dut (.*);
  gbt_link_model #(.W(W), .DLY(2), .INIT_OFFS(37)) u_link (
    .tx_clk(clk), .tx_word(bw), .rx_clk(clk), .rxslide, .rx_word, .slides);

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #200us; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- downlink frame source ----------------
  function automatic fc_hdr_t hdr(bit b0, bit rs, lm_code_t code, bit sc, logic [2:0] fsel);
    fc_hdr_t h;
    h.resync = rs; h.bc0 = b0; h.reset_sc_path = 1'b0;
    h.misc_ctrl = misc_pack(sc, code); h.fpga_sel = fsel;
    return h;
  endfunction

  function automatic logic [W-1:0] fc_frame(bit b0, bit rs, lm_code_t code);
    logic [FRAME_W-1:0] f;
    f = {hdr(b0, rs, code, 1'b0, 3'd0), 64'd0};
    return {(b0 || rs || code != LM_NONE) ? HDR_DATA : HDR_IDLE, f};
  endfunction

  logic [W-1:0] dq [$];
  int cyc = 0, sent_cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dq.size() > 0) begin bw <= dq.pop_front(); sent_cyc <= cyc; end
    else bw <= fc_frame(0, 0, LM_NONE);
  end
  initial bw = '0;

  task automatic send_write(input logic [2:0] fsel, input logic [15:0] addr,
                            input logic [15:0] w [$]);
    sc_req_frame_t r;
    sc_pay_frame_t p;
    int n = w.size();
    r.hdr = hdr(0, 0, LM_NONE, 1'b1, fsel);
    r.info.svsd = 7'd0; r.info.wr_req = 1'b1; r.info.burst_add_words = 8'(n - 1);
    r.addr = addr; r.wrdata0 = w[0]; r.wrdata1 = (n > 1) ? w[1] : 16'd0;
    dq.push_back({HDR_DATA, FRAME_W'(r)});
    for (int i = 2; i < n; i += 4) begin
      p.hdr = hdr(0, 0, LM_NONE, 1'b1, fsel);
      for (int k = 0; k < 4; k++) p.wrdata[3-k] = (i + k < n) ? w[i+k] : 16'd0;
      dq.push_back({HDR_DATA, FRAME_W'(p)});
    end
  endtask

  task automatic send_read(input logic [15:0] addr);
    sc_req_frame_t r;
    r = '0;
    r.hdr = hdr(0, 0, LM_NONE, 1'b1, 3'd0);
    r.addr = addr;
    dq.push_back({HDR_DATA, FRAME_W'(r)});
  endtask

  task automatic drain(input int extra);
    wait (dq.size() == 0);
    repeat (extra) @(negedge clk);
  endtask

  // ---------------- uplink monitor ----------------
  wb_frame_t upq [$];
  int up_cyc [$];
  int n_bc0_pulse = 0, n_resync_pulse = 0;
  always @(posedge clk) begin
    if (rst_n && tx_word[WB_W +: HDR_W] == HDR_DATA) begin
      upq.push_back(wb_frame_t'(tx_word[WB_W-1:0]));
      up_cyc.push_back(cyc);
    end
    if (rst_n && tx_word[WB_W +: HDR_W] != HDR_DATA && tx_word[WB_W +: HDR_W] != HDR_IDLE)
      check(0, "uplink header neither data nor idle");
    if (calib_bc0) n_bc0_pulse++;
    if (calib_resync) n_resync_pulse++;
  end

  task automatic expect_up(input up_code_t code, input logic [95:0] data, input string what,
                           output int at);
    int guard = 0;
    at = -1;
    while (guard < 40) begin
      while (upq.size() > 0) begin
        wb_frame_t u;
        int c;
        u = upq.pop_front(); c = up_cyc.pop_front();
        if (u.code == code) begin
          check(u.data == data, {what, ": uplink data"});
          at = c;
          return;
        end
      end
      @(negedge clk); guard++;
    end
    check(0, {what, ": uplink reply missing"});
  endtask

  // ---------------- TDC hits ----------------
  logic [TS_W-1:0] offs_m [N_TDC_CH];
  logic [TS_W-1:0] prev_m = '0;
  bit en_m = 0;
  int hit_checks = 0;

  task automatic hit(input int ch, input logic [TS_W-1:0] t);
    logic [TS_W-1:0] e;
    int at;
    @(negedge clk);
    tdc_valid = '0; tdc_valid[ch] = 1'b1; tdc_ts[ch] = t;
    @(negedge clk);
    tdc_valid = '0;
    e = t - offs_m[ch] - (en_m ? prev_m : '0);
    check(ts_valid[ch] && ts_out[ch] == e, $sformatf("corrected timestamp ch %0d", ch));
    hit_checks++;
    if (ch == BC0_CH) begin
      prev_m = t - offs_m[ch];
      expect_up(UP_BC0_TS, 96'(e), "BC0 timestamp feedback", at);
    end
  endtask

  initial begin
    int t_flag, t_rep, lat1, lat2, at;
    logic [15:0] w [$];
    for (int k = 0; k < N_TDC_CH; k++) offs_m[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // alignment
    fork
      wait (locked);
      begin repeat (3000) @(negedge clk); end
    join_any
    disable fork;
    check(locked, "downlink locked");
    check(slides > 0, "frame boundary found by bit slip");
    repeat (5) @(negedge clk);
    upq.delete(); up_cyc.delete();

    // fast control
    n_bc0_pulse = 0; n_resync_pulse = 0;
    dq.push_back(fc_frame(1, 0, LM_NONE));
    dq.push_back(fc_frame(0, 1, LM_NONE));
    drain(8);
    check(n_bc0_pulse == 1, "one BC0 calibration pulse");
    check(n_resync_pulse == 1, "one Resync calibration pulse");
    upq.delete(); up_cyc.delete();   // the BC0 hit is not driven: nothing expected

    // handshake and two flag measurements
    for (int m = 0; m < 2; m++) begin
      dq.push_back(fc_frame(0, 0, LM_HS));
      drain(0);
      expect_up(UP_HS_ACK, '0, "handshake reply", at);
      check(!established, "not established before SC GBT frame_2");
      dq.push_back(fc_frame(0, 0, LM_EST));
      drain(10);
      check(established, "established");
      dq.push_back(fc_frame(1, 0, LM_FLAG));
      drain(0);
      t_flag = sent_cyc;
      expect_up(UP_FLAG, '0, "flag reply", t_rep);
      if (m == 0) lat1 = t_rep - t_flag; else lat2 = t_rep - t_flag;
      dq.push_back(fc_frame(0, 0, LM_END));
      drain(10);
      check(meas_done, "latency measure_end");
    end
    check(lat1 == lat2 && lat1 > 0 && lat1 < 10, $sformatf("fixed flag latency %0d/%0d", lat1, lat2));
    $display("flag reply latency %0d frames (link + decode + reply)", lat1);

    // burst write of all channel offsets
    w.delete();
    for (int k = 0; k < N_TDC_CH; k++) begin
      offs_m[k] = TS_W'($urandom);
      w.push_back(offs_m[k][15:0]);
      w.push_back({8'h00, offs_m[k][23:16]});
    end
    send_write(3'd0, OFFSET_BASE, w);
    drain(10);
    for (int k = 0; k < N_TDC_CH; k++)
      check(offset[k] == offs_m[k], $sformatf("offset ch %0d after 68-word burst", k));

    // a request for another FPGA of the board is ignored
    w.delete(); w.push_back(16'hdead); w.push_back(16'h00be);
    send_write(3'd1, OFFSET_BASE, w);
    drain(10);
    check(offset[0] == offs_m[0], "write for another FPGA ignored");

    // read back through the uplink
    upq.delete(); up_cyc.delete();
    send_read(OFFSET_BASE + 16'd5);
    drain(0);
    expect_up(UP_RDATA, 96'({OFFSET_BASE + 16'd5, 8'h00, offs_m[2][23:16]}), "read data", at);

    // TDC correction, Previous BC0 subtraction off
    for (int i = 0; i < 20; i++) hit($urandom_range(N_TDC_CH - 1), TS_W'($urandom));
    // enable BC0 timestamp correction
    w.delete(); w.push_back(16'h0001);
    send_write(3'd0, CTRL_ADDR, w);
    drain(10);
    check(bc0_corr_en, "BC0 timestamp correction enabled");
    en_m = 1;
    hit(BC0_CH, TS_W'($urandom));
    for (int i = 0; i < 30; i++) begin
      int ch = $urandom_range(N_TDC_CH - 1);
      hit(ch, TS_W'($urandom));
    end
    hit(RESYNC_CH, TS_W'($urandom));
    hit(BC0_CH, TS_W'($urandom));
    hit(0, TS_W'($urandom));

    $display("hits checked %0d, slides %0d", hit_checks, slides);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
