// Testbench for beb_link_ctrl: a front-end model answers the downlink codes
// on the uplink (receive clock with a different phase) after a fixed number
// of frames. Checks the order of codes (HS, EST, FLAG only with a BC0, END),
// the start/end toggles, done, and the capture of BC0 timestamps and read
// data from the uplink.
module tb_beb_link_ctrl;
  import irpc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, bc0 = 0;
  lm_code_t lm_code;
  logic start_tgl, busy, established, done;
  logic rx_clk = 0, rx_rst_n = 0, rx_locked = 0;
  logic [WB_W-1:0] rx_frame = '0;
  logic end_tgl, bc0_ts_valid, rd_valid;
  logic [TS_W-1:0] bc0_ts;
  logic [31:0] rd_word;
  int checks = 0, failures = 0;

  beb_link_ctrl dut (.*);
  always #12.5 clk = ~clk;
  initial begin #7; forever #12.5 rx_clk = ~rx_clk; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // front-end model: replies REPLY_DLY frames after seeing a code
  localparam int REPLY_DLY = 5;
  up_code_t q[$];
  lm_code_t seen[$];
  int bc0_cnt = 0, flag_cnt = 0, flag_wo_bc0 = 0;
  always @(posedge clk) begin
    if (lm_code != LM_NONE) seen.push_back(lm_code);
    if (lm_code == LM_FLAG) begin
      flag_cnt++;
      if (!bc0) flag_wo_bc0++;
    end
  end
  up_code_t pipe [REPLY_DLY];
  always @(posedge clk) begin
    for (int i = REPLY_DLY - 1; i > 0; i--) pipe[i] <= pipe[i-1];
    pipe[0] <= (lm_code == LM_HS) ? UP_HS_ACK : (lm_code == LM_FLAG) ? UP_FLAG : UP_NONE;
  end
  always @(posedge rx_clk) begin
    wb_frame_t f;
    f = '0;
    f.code = pipe[REPLY_DLY-1];
    rx_frame <= WB_W'(f);
  end

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // BC0 every 100 frames (scaled-down orbit)
  initial begin
    forever begin
      repeat (99) @(negedge clk);
      bc0 = 1;
      @(negedge clk) bc0 = 0;
    end
  end

  initial begin
    logic s0, e0;
    for (int i = 0; i < REPLY_DLY; i++) pipe[i] = UP_NONE;
    repeat (3) @(negedge clk);
    rst_n = 1; rx_rst_n = 1;
    // start before the link is aligned: ignored
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (3) @(negedge clk);
    check(busy && lm_code == LM_NONE && seen.size() == 0, "start held while uplink not aligned");
    rx_locked = 1;
    wait (done);
    repeat (4) @(negedge clk);
    for (int run = 0; run < 2; run++) begin
      s0 = start_tgl; e0 = end_tgl;
      seen.delete();
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      check(busy && !done, "busy after start");
      wait (established);
      check(start_tgl == s0, "no start before BC0");
      wait (start_tgl != s0);
      check(end_tgl == e0, "end after start");
      wait (done);
      check(end_tgl != e0, "end toggle seen");
      check(seen.size() == 4 && seen[0] == LM_HS && seen[1] == LM_EST &&
            seen[2] == LM_FLAG && seen[3] == LM_END, $sformatf("code order (%0d codes)", seen.size()));
      check(flag_wo_bc0 == 0, "flag frame always carries BC0");
    end
    // uplink BC0 timestamp and read data
    @(posedge rx_clk) begin
      wb_frame_t f; f = '0; f.code = UP_BC0_TS; f.data[23:0] = 24'h123456;
      force rx_frame = WB_W'(f);
    end
    @(posedge rx_clk) release rx_frame;
    #1 check(bc0_ts_valid && bc0_ts == 24'h123456, "BC0 timestamp captured");
    @(posedge rx_clk) begin
      wb_frame_t f; f = '0; f.code = UP_RDATA; f.data[31:0] = 32'h2841_0012;
      force rx_frame = WB_W'(f);
    end
    @(posedge rx_clk) release rx_frame;
    #1 check(rd_valid && rd_word == 32'h2841_0012, "read data captured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
