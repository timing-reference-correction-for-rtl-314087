// Testbench for gbt_header_aligner with a bit-slip transceiver model: frames
// with GBT headers and random payload are cut at a random bit boundary; each
// rxslide pulse moves the boundary by one bit after a short latency. Checks:
// the aligner ends on the true boundary, locks only after 24 good headers,
// never slides twice within 32 cycles, and drops and regains lock when
// headers are corrupted.
module tb_gbt_header_aligner;
  import irpc_pkg::*;
  localparam int W = HDR_W + FRAME_W;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] rx_word;
  logic rxslide, locked;
  logic [15:0] slide_count;
  int checks = 0, failures = 0;

  gbt_header_aligner #(.W(W)) dut (.*);
  always #12.5 clk = ~clk;

  logic [W-1:0] prev_f, cur_f;
  int offs, pend[$], last_slide = -100, cyc = 0, corrupt = 0, good_run = 0;
  bit spacing_ok = 1;

  function automatic logic [W-1:0] new_frame();
    logic [W-1:0] f;
    f = {($urandom % 2) ? HDR_DATA : HDR_IDLE, 16'($urandom), 32'($urandom), 32'($urandom)};
    return f;
  endfunction

  // transceiver model
  always @(posedge clk) begin
    logic [2*W-1:0] s;
    cyc++;
    prev_f <= cur_f;
    cur_f  <= new_frame();
    if (rxslide && rst_n) begin
      if (cyc - last_slide < 32) begin spacing_ok = 0; $display("slide spacing %0d at %0d", cyc - last_slide, cyc); end
      last_slide = cyc;
      pend.push_back(cyc + 3);
    end
    if (pend.size() > 0 && pend[0] == cyc) begin
      void'(pend.pop_front());
      offs = (offs + 1) % W;
    end
  end
  always_comb begin
    logic [2*W-1:0] s;
    s = {prev_f, cur_f};
    rx_word = s[2*W-1-offs -: W];
    if (corrupt > 0 && offs == 0) rx_word[W-1 -: 4] = 4'b1111;
  end

  // headers seen on the true boundary before lock
  always @(posedge clk) begin
    if (!locked && offs == 0 && dut.gap_cnt == 0) good_run <= good_run + 1;
    if (locked) good_run <= 0;
    if (corrupt > 0) corrupt <= corrupt - 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    prev_f = new_frame(); cur_f = new_frame();
    for (int trial = 0; trial < 4; trial++) begin
      int t0, slides_exp;
      rst_n = 0;
      offs = (trial == 0) ? 0 : 1 + ($urandom % (W - 1));
      slides_exp = (W - offs) % W;
      repeat (2) @(negedge clk);
      rst_n = 1;
      t0 = cyc;
      wait (locked);
      @(negedge clk);
      check(offs == 0, $sformatf("trial %0d: locked on the frame boundary (offset %0d)", trial, offs));
      check(slide_count >= 16'(slides_exp), $sformatf("trial %0d: slides %0d >= %0d", trial, slide_count, slides_exp));
      check(cyc - t0 >= 24, "at least 24 frames to lock");
      repeat (20) @(negedge clk);
      check(locked && offs == 0, "stays locked");
    end
    check(spacing_ok, "slides at least 32 cycles apart");
    // three bad headers do not drop the lock, four do
    corrupt = 3;
    repeat (8) @(negedge clk);
    check(locked, "3 bad headers tolerated");
    corrupt = 6;
    repeat (6) @(negedge clk);
    check(!locked, "lock dropped after 4 bad headers");
    wait (locked);
    @(negedge clk);
    check(offs == 0, "relocked on the boundary");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
