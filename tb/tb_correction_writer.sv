// Testbench for correction_writer: checks, for every link, the first write
// (2 words at 0x2840: correction bits 15:0, then bits 23:16) and the second
// (1 word at 0x2844: BC0 correction enable), and that each request waits for
// every link's encoder to finish the previous one.
module tb_correction_writer;
  import irpc_pkg::*;
  localparam int N = 3, CNT_W = 12;
  logic clk = 0, rst_n = 0, go = 0, bc0_corr_en = 0;
  logic [N-1:0][CNT_W-1:0] corr = '0;
  logic [N-1:0] sc_req, sc_done = '0;
  logic [15:0] sc_addr;
  logic [8:0] sc_nwords;
  logic [N-1:0][3:0][7:0] wd_idx = '0;
  logic [N-1:0][3:0][15:0] wd;
  logic busy, done;
  int checks = 0, failures = 0;

  correction_writer #(.N_LINKS(N), .CNT_W(CNT_W)) dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic finish_links();
    for (int l = 0; l < N; l++) begin
      @(negedge clk) sc_done = '0;
      sc_done[l] = 1;
      @(negedge clk) sc_done = '0;
      if (l < N - 1) check(sc_req == '0 && !done, "waits for every link");
    end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      logic [N-1:0][CNT_W-1:0] c;
      for (int l = 0; l < N; l++) c[l] = CNT_W'($urandom);
      c[0] = 12'd39;   // the document's example value
      @(negedge clk) begin corr = c; go = 1; bc0_corr_en = (run != 1); end
      @(negedge clk) begin go = 0; corr = '0; end   // values must be latched
      check(sc_req == '1 && busy, "first request on every link");
      check(sc_addr == 16'h2840 && sc_nwords == 9'd2, "offset burst at 0x2840, 2 words");
      for (int l = 0; l < N; l++) begin
        wd_idx[l] = {8'd3, 8'd2, 8'd1, 8'd0};
      end
      #1;
      for (int l = 0; l < N; l++) begin
        check(wd[l][0] == 16'(c[l]), $sformatf("link %0d low word %h expected %h", l, wd[l][0], c[l]));
        check(wd[l][1] == 16'h0000, "high word");
      end
      finish_links();
      check(sc_req == '1 && sc_addr == 16'h2844 && sc_nwords == 9'd1, "control write at 0x2844");
      #1;
      for (int l = 0; l < N; l++) check(wd[l][0] == {15'd0, run != 1}, "enable bit");
      finish_links();
      check(done, "done after the second write");
      @(negedge clk);
      check(!busy && !done, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
