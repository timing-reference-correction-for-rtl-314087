// Testbench for sc_frame_decoder: frames are built here from the frame
// layout, and the decoded fast-control pulses, write ports and read requests
// are compared with what each frame must produce: single writes, bursts of
// several lengths, a burst for another FPGA (skipped), a read, an aborted
// burst and frames while the link is not established.
module tb_sc_frame_decoder;
  import irpc_pkg::*;
  logic clk = 0, rst_n = 0, frame_valid = 0;
  logic [FRAME_W-1:0] frame = '0;
  logic bc0, resync, reset_sc_path;
  lm_code_t lm_code;
  logic [3:0] wr_en;
  logic [3:0][15:0] wr_addr, wr_data;
  logic rd_req;
  logic [15:0] rd_addr;
  int checks = 0, failures = 0;
  logic [15:0] mem [logic [15:0]];
  int nwrites = 0;

  sc_frame_decoder #(.FPGA_SEL(3'd0)) dut (.*);
  always #12.5 clk = ~clk;

  // record every write seen on the ports
  always @(posedge clk) begin
    for (int k = 0; k < 4; k++) if (wr_en[k]) begin
      mem[wr_addr[k]] = wr_data[k];
      nwrites++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [15:0] hdr(bit rs, bit b, bit rp, bit sc, logic [2:0] code, logic [2:0] sel);
    return {rs, b, rp, 6'd0, code, sc, sel};
  endfunction

  task automatic send(input logic [79:0] f);
    @(negedge clk) frame = f;
  endtask

  task automatic burst(input logic [2:0] sel, input logic [15:0] addr, input int n, input logic [15:0] seed);
    logic [15:0] w [256];
    for (int i = 0; i < n; i++) w[i] = seed + 16'(i * 7);
    send({hdr(0, 0, 0, 1, 0, sel), 7'd0, 1'b1, 8'(n - 1), addr, w[0], (n > 1) ? w[1] : 16'h0});
    for (int i = 2; i < n; i += 4)
      send({hdr(0, 0, 0, 1, 0, sel), w[i], (i + 1 < n) ? w[i+1] : 16'h0,
            (i + 2 < n) ? w[i+2] : 16'h0, (i + 3 < n) ? w[i+3] : 16'h0});
    send({hdr(0, 0, 0, 0, 0, sel), 64'h0});
    @(negedge clk);
    if (sel == 0)
      for (int i = 0; i < n; i++)
        check(mem.exists(addr + 16'(i)) && mem[addr + 16'(i)] == w[i],
              $sformatf("burst word %0d at %h", i, addr + 16'(i)));
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // link not established: nothing decoded
    send({hdr(1, 1, 0, 1, 3'd3, 0), 7'd0, 1'b1, 8'd0, 16'h1234, 16'h5555, 16'h0});
    @(negedge clk);
    check(!bc0 && !resync && wr_en == 0 && lm_code == LM_NONE, "ignored while not valid");
    frame_valid = 1;
    // fast control
    send({hdr(0, 1, 0, 0, 3'd3, 0), 64'h0});
    @(posedge clk) #1 check(bc0 && !resync && lm_code == LM_FLAG, "BC0 + flag code");
    send({hdr(1, 0, 0, 0, 3'd1, 0), 64'h0});
    @(posedge clk) #1 check(!bc0 && resync && lm_code == LM_HS, "Resync + handshake code");
    send({hdr(0, 0, 0, 0, 0, 0), 64'h0});
    @(posedge clk) #1 check(!bc0 && !resync && lm_code == LM_NONE, "pulses end");
    // single write
    send({hdr(0, 0, 0, 1, 0, 0), 7'd0, 1'b1, 8'd0, 16'h2844, 16'h0001, 16'hFFFF});
    @(posedge clk) #1 check(wr_en == 4'b0001 && wr_addr[0] == 16'h2844 && wr_data[0] == 16'h0001, "single write");
    send({hdr(0, 0, 0, 0, 0, 0), 64'h0});
    // bursts
    burst(0, 16'h2800, 2, 16'h1000);
    burst(0, 16'h2810, 3, 16'h2000);
    burst(0, 16'h2820, 6, 16'h3000);
    burst(0, 16'h2800, 69, 16'h4000);
    // burst for another FPGA: no write at all
    nwrites = 0;
    burst(3'd1, 16'h2800, 20, 16'h5000);
    check(nwrites == 0, "other FPGA's burst skipped");
    check(mem[16'h2800] == 16'h4000, "earlier value kept");
    // read request
    send({hdr(0, 0, 0, 1, 0, 0), 7'd0, 1'b0, 8'd0, 16'h2841, 32'h0});
    @(posedge clk) #1 check(rd_req && rd_addr == 16'h2841 && wr_en == 0, "read request");
    // burst aborted by ResetSCPath
    nwrites = 0;
    send({hdr(0, 0, 0, 1, 0, 0), 7'd0, 1'b1, 8'd9, 16'h2900, 16'h1, 16'h2});
    send({hdr(0, 0, 1, 0, 0, 0), 64'h0});
    send({hdr(0, 0, 0, 1, 0, 0), 7'd0, 1'b1, 8'd0, 16'h2A00, 16'h77, 16'h0});
    send({hdr(0, 0, 0, 0, 0, 0), 64'h0});
    @(negedge clk);
    check(nwrites == 3 && mem[16'h2A00] == 16'h77, "after abort the next frame is a request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
