// Testbench for feb_link_ctrl: walks the handshake (HS, EST, FLAG, END),
// checks each uplink reply code and its cycle, that a flag is ignored before
// the link is established, that the flag reply has top priority and exactly
// one cycle of latency, and that BC0 timestamps and read data are sent.
module tb_feb_link_ctrl;
  import irpc_pkg::*;
  logic clk = 0, rst_n = 0, link_ready = 0;
  lm_code_t lm_code = LM_NONE;
  logic bc0_ts_valid = 0, rd_valid = 0;
  logic [TS_W-1:0] bc0_ts = '0;
  logic [15:0] rd_addr = '0, rd_data = '0;
  logic established, meas_done;
  logic [HDR_W+WB_W-1:0] tx_word;
  int checks = 0, failures = 0;
  wb_frame_t f;
  assign f = wb_frame_t'(tx_word[WB_W-1:0]);

  feb_link_ctrl dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic code(input lm_code_t c);
    @(negedge clk) lm_code = c;
    @(negedge clk) lm_code = LM_NONE;   // output of the cycle that saw c
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; link_ready = 1;
    @(negedge clk);
    check(tx_word[115:112] == HDR_IDLE && f.code == UP_NONE, "idle uplink");
    code(LM_FLAG);
    check(f.code == UP_NONE, "flag ignored before handshake");
    code(LM_HS);
    check(f.code == UP_NONE, "no reply in the decode cycle");
    @(negedge clk);
    check(f.code == UP_HS_ACK && tx_word[115:112] == HDR_DATA, "handshake reply");
    check(!established, "not established before EST");
    code(LM_EST);
    check(established, "established");
    // flag together with a pending BC0 timestamp: flag goes first
    @(negedge clk) begin lm_code = LM_FLAG; bc0_ts_valid = 1; bc0_ts = 24'h00ABCD; end
    @(negedge clk) begin lm_code = LM_NONE; bc0_ts_valid = 0; end
    check(f.code == UP_FLAG, "flag reply one cycle after the flag frame");
    @(negedge clk);
    check(f.code == UP_BC0_TS && f.data[23:0] == 24'h00ABCD, "BC0 timestamp after the flag reply");
    @(negedge clk);
    check(f.code == UP_NONE, "back to idle");
    code(LM_END);
    check(meas_done, "latency measure end");
    // second flag after END: no reply (not in Established)
    code(LM_FLAG);
    check(f.code == UP_NONE, "no flag reply after end");
    // read data
    @(negedge clk) begin rd_valid = 1; rd_addr = 16'h2841; rd_data = 16'h0012; end
    @(negedge clk) rd_valid = 0;
    check(f.code == UP_NONE, "read data held one cycle");
    @(negedge clk);
    check(f.code == UP_RDATA && f.data[31:0] == 32'h2841_0012, "read data frame");
    // link loss resets the handshake
    @(negedge clk) link_ready = 0;
    @(negedge clk) link_ready = 1;
    check(!established && !meas_done, "link loss resets the handshake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
