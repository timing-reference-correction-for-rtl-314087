// Testbench for tdc_ts_correction: random hits on all 34 channels with
// random offsets, BC0 hits on channel 32 and the BC0 correction switched off
// and on. Expected values follow Timestamp - Offset (- PrevBC0), modulo 2^24,
// with PrevBC0 the last corrected BC0 timestamp before the hit's cycle.
module tb_tdc_ts_correction;
  import irpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [N_TDC_CH-1:0] hit_valid = '0, out_valid;
  logic [N_TDC_CH-1:0][TS_W-1:0] ts = '0, offset = '0, out_ts;
  logic bc0_corr_en = 0;
  logic [TS_W-1:0] prev_bc0;
  int checks = 0, failures = 0;
  int bc0_seen = 0;

  tdc_ts_correction dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [TS_W-1:0] model_prev, exp;
    logic [N_TDC_CH-1:0] v;
    logic [N_TDC_CH-1:0][TS_W-1:0] t;
    logic en;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < N_TDC_CH; k++) offset[k] = TS_W'($urandom);
    model_prev = '0;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      en = (c >= 100);
      bc0_corr_en = en;
      for (int k = 0; k < N_TDC_CH; k++) begin
        v[k] = ($urandom % 4 == 0);
        t[k] = TS_W'($urandom);
      end
      v[BC0_CH] = (c % 17 == 3);
      hit_valid = v; ts = t;
      @(negedge clk);
      hit_valid = '0;
      for (int k = 0; k < N_TDC_CH; k++) begin
        check(out_valid[k] == v[k], "valid follows the hit");
        if (v[k]) begin
          exp = t[k] - offset[k];
          if (en) exp = exp - model_prev;
          check(out_ts[k] == exp, $sformatf("cycle %0d chan %0d: %h expected %h", c, k, out_ts[k], exp));
        end
      end
      if (v[BC0_CH]) begin
        model_prev = t[BC0_CH] - offset[BC0_CH];
        bc0_seen++;
      end
      check(prev_bc0 == model_prev, "previous BC0 register");
    end
    check(bc0_seen > 10, "BC0 hits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
