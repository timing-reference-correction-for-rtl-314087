// Testbench for correction_calc: the document's latency pair (637, 716 ->
// 39 for the slower link) in both orders, then random latencies on four
// links against a reference model.
module tb_correction_calc;
  localparam int N = 4, CNT_W = 12;
  logic clk = 0, rst_n = 0, calc = 0;
  logic [N-1:0][CNT_W-1:0] latency, corr;
  logic [N-1:0] corr_half;
  logic [$clog2(N+1)-1:0] ref_idx;
  logic done;
  int checks = 0, failures = 0;

  correction_calc #(.N_LINKS(N), .CNT_W(CNT_W)) dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_and_check();
    int mn, mi;
    mn = latency[0]; mi = 0;
    for (int i = 1; i < N; i++) if (latency[i] < mn) begin mn = latency[i]; mi = i; end
    @(negedge clk) calc = 1;
    @(negedge clk) calc = 0;
    check(done, "done one cycle after calc");
    check(ref_idx == mi, $sformatf("ref_idx %0d expected %0d", ref_idx, mi));
    for (int i = 0; i < N; i++) begin
      check(corr[i] == (latency[i] - mn) / 2,
            $sformatf("link %0d corr %0d expected %0d", i, corr[i], (latency[i] - mn) / 2));
      check(corr_half[i] == (((latency[i] - mn) % 2) == 1), "half bit");
    end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    latency = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    latency = '{12'd900, 12'd900, 12'd716, 12'd637};
    run_and_check();
    check(corr[1] == 12'd39, "document example: (716-637)/2 = 39");
    latency = '{12'd900, 12'd900, 12'd637, 12'd716};
    run_and_check();
    check(corr[0] == 12'd39 && corr[1] == 0, "document example, swapped");
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < N; i++) latency[i] = CNT_W'($urandom);
      run_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
