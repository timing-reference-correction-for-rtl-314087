// Testbench for feb_offset_regs: writes every offset through the four write
// ports in random order, checks the 24-bit offsets against a model of the
// register map (low 16 bits at 0x2800+2k, high 8 bits at 0x2801+2k), the
// control register at 0x2844, read-back and unmapped addresses.
module tb_feb_offset_regs;
  import irpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] wr_en = '0;
  logic [3:0][15:0] wr_addr = '0, wr_data = '0;
  logic rd_req = 0, rd_valid;
  logic [15:0] rd_addr = '0, rd_data;
  logic [N_TDC_CH-1:0][TS_W-1:0] offset;
  logic bc0_corr_en;
  int checks = 0, failures = 0;
  logic [TS_W-1:0] model [N_TDC_CH];

  feb_offset_regs dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic rd(input logic [15:0] a, input logic [15:0] exp);
    @(negedge clk) begin rd_req = 1; rd_addr = a; end
    @(negedge clk) rd_req = 0;
    check(rd_valid && rd_data == exp, $sformatf("read %h = %h expected %h", a, rd_data, exp));
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(offset == '0 && !bc0_corr_en, "reset values");
    for (int k = 0; k < N_TDC_CH; k++) model[k] = '0;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        int k;
        k = $urandom % N_TDC_CH;
        wr_en[p]   = 1'($urandom);
        wr_addr[p] = 16'h2800 + 16'(2 * k + ($urandom % 2));
        wr_data[p] = 16'($urandom);
      end
      // model: ports in order, later port wins
      for (int p = 0; p < 4; p++) if (wr_en[p]) begin
        int k;
        k = (wr_addr[p] - 16'h2800) / 2;
        if (wr_addr[p][0]) model[k][23:16] = wr_data[p][7:0];
        else               model[k][15:0]  = wr_data[p];
      end
    end
    @(negedge clk) wr_en = '0;
    for (int k = 0; k < N_TDC_CH; k++)
      check(offset[k] == model[k], $sformatf("offset %0d = %h expected %h", k, offset[k], model[k]));
    // figure examples: channel 32 at 0x2840/0x2841
    @(negedge clk) begin
      wr_en = 4'b0011;
      wr_addr[0] = 16'h2840; wr_data[0] = 16'hBEEF;
      wr_addr[1] = 16'h2841; wr_data[1] = 16'hAB12;
    end
    @(negedge clk) wr_en = '0;
    check(offset[32] == 24'h12BEEF, "channel 32 offset from 0x2840/0x2841");
    rd(16'h2840, 16'hBEEF);
    rd(16'h2841, 16'h0012);
    rd(16'h2800, model[0][15:0]);
    // control register and unmapped addresses
    @(negedge clk) begin wr_en = 4'b0001; wr_addr[0] = 16'h2844; wr_data[0] = 16'h0001; end
    @(negedge clk) begin wr_en = 4'b0001; wr_addr[0] = 16'h27FF; wr_data[0] = 16'hFFFF; end
    @(negedge clk) wr_en = '0;
    check(bc0_corr_en, "BC0 correction enable");
    check(offset[0] == model[0], "write below the base ignored");
    rd(16'h2844, 16'h0001);
    rd(16'h3000, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
