// Testbench for sc_frame_encoder: idle and BC0 frames, a one-word write, a
// read request and bursts of several lengths (the correction download of 69
// words among them). Every frame is compared field by field with the frame
// layout (G4 header bits [79:64], G3..G0 below), computed here by hand.
module tb_sc_frame_encoder;
  import irpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bc0 = 0, resync = 0, reset_sc_path = 0;
  logic [2:0] fpga_sel = 3'd0;
  lm_code_t lm_code = LM_NONE;
  logic sc_req = 0, sc_wr = 1;
  logic [6:0] sc_svsd = 7'h15;
  logic [15:0] sc_addr = 16'h2800;
  logic [8:0] sc_nwords = 9'd1;
  logic [3:0][7:0] wd_idx;
  logic [3:0][15:0] wd;
  logic sc_busy, sc_done;
  logic [HDR_W+FRAME_W-1:0] tx_word;
  int checks = 0, failures = 0;

  sc_frame_encoder dut (.*);
  always #12.5 clk = ~clk;

  // word k of the transfer
  always_comb for (int k = 0; k < 4; k++) wd[k] = 16'hA000 + 16'(wd_idx[k]);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic do_write(input int n);
    int sent, frames;
    sc_nwords = 9'(n); sc_wr = 1;
    @(negedge clk) sc_req = 1;
    @(negedge clk) sc_req = 0;
    // request frame
    check(tx_word[83:80] == 4'b0101, "request header 0101");
    check(tx_word[79] == 0 && tx_word[78] == 0, "resync/bc0 clear");
    check(tx_word[76:67] == 10'h001, "MiscCtrl: sc frame");
    check(tx_word[66:64] == fpga_sel, "FPGASel");
    check(tx_word[63:57] == 7'h15, "SVSD");
    check(tx_word[56] == 1'b1, "WrReq");
    check(tx_word[55:48] == 8'(n - 1), "BurstAdditionalWords");
    check(tx_word[47:32] == 16'h2800, "Address");
    check(tx_word[31:16] == 16'hA000, "WrData0");
    check(tx_word[15:0] == ((n > 1) ? 16'hA001 : 16'h0000), "WrData1");
    sent = (n > 1) ? 2 : 1;
    frames = 1;
    if (n <= 2) check(sc_done, "done with the request frame");
    while (sent < n) begin
      @(negedge clk);
      frames++;
      check(tx_word[76:67] == 10'h001, "payload MiscCtrl");
      for (int k = 0; k < 4; k++) begin
        logic [15:0] exp;
        exp = (sent + k < n) ? 16'hA000 + 16'(sent + k) : 16'h0000;
        check(tx_word[63 - 16*k -: 16] == exp,
              $sformatf("payload word %0d: %h expected %h", sent + k, tx_word[63 - 16*k -: 16], exp));
      end
      sent += 4;
      check(sc_done == (sent >= n), "done with the last payload frame");
    end
    check(frames == 1 + (n > 2 ? (n - 2 + 3) / 4 : 0), "frame count");
    @(negedge clk);
    check(tx_word[83:80] == 4'b0110 && tx_word[79:0] == {13'd0, fpga_sel, 64'd0}, "idle after transfer");
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(tx_word == {4'b0110, 80'h0}, "idle frame");
    bc0 = 1;
    @(negedge clk) bc0 = 0;
    check(tx_word[83:80] == 4'b0101 && tx_word[78] && tx_word[77:0] == '0, "BC0 frame");
    resync = 1; lm_code = LM_FLAG;
    @(negedge clk) begin resync = 0; lm_code = LM_NONE; end
    check(tx_word[79] && tx_word[76:67] == 10'b0000000110, "Resync + flag code");
    fpga_sel = 3'd2;
    do_write(1);
    fpga_sel = 3'd0;
    do_write(2);
    do_write(3);
    do_write(6);
    do_write(7);
    do_write(69);
    // read request
    sc_wr = 0; sc_nwords = 1; sc_addr = 16'h2841;
    @(negedge clk) sc_req = 1;
    @(negedge clk) sc_req = 0;
    check(tx_word[56] == 0 && tx_word[47:32] == 16'h2841 && tx_word[31:0] == 0 && sc_done, "read request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
