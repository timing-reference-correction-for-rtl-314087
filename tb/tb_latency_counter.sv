// Testbench for latency_counter: toggles start and end with known cycle
// distances (including distances that cross the counter wrap) and checks the
// captured counts and the difference, plus that an end toggle without a
// start is ignored.
module tb_latency_counter;
  localparam int CNT_W = 12;
  logic clk = 0, rst_n = 0, start_tgl = 0, end_tgl = 0;
  logic [CNT_W-1:0] counter, start_cnt, end_cnt, latency;
  logic done;
  int checks = 0, failures = 0;

  latency_counter #(.CNT_W(CNT_W)) dut (.*);

  always #1.25 clk = ~clk;   // 400 MHz: 2.5 ns per count

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(input int d);
    logic [CNT_W-1:0] c0;
    @(negedge clk);
    start_tgl = ~start_tgl;
    c0 = counter;               // value sampled at the next edge is c0
    repeat (d) @(negedge clk);
    end_tgl = ~end_tgl;
    wait (done);
    @(negedge clk);
    check(latency == CNT_W'(d), $sformatf("latency %0d expected %0d", latency, d));
    check(end_cnt - start_cnt == CNT_W'(d), "end_cnt - start_cnt");
    check(start_cnt == c0 + CNT_W'(2), $sformatf("start_cnt %0d expected %0d", start_cnt, c0 + 2));
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // end without start: ignored
    @(negedge clk) end_tgl = ~end_tgl;
    repeat (8) @(negedge clk);
    check(!done, "done without start");
    // the document's measured values (2.5 ns counts)
    measure(216);
    measure(215);
    measure(637);
    measure(716);
    // cross the wrap of the counter
    wait (counter == 12'd4000);
    measure(300);
    for (int i = 0; i < 5; i++) measure(1 + ($urandom % 3000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
