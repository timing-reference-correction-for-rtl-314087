// feb_offset_regs: slow-control slave of the FEB TDC timestamp correction
// module.
//
// Holds one 24-bit offset per TDC channel k (0..N_CH-1): bits [15:0] at
// address BASE + 2k and bits [23:16] in the low byte of BASE + 2k + 1, so
// channel 0 uses 0x2800/0x2801, channel 1 0x2802/0x2803 and channel 32 (BC0)
// 0x2840/0x2841. Bit 0 of CTRL (default 0x2844) enables the BC0 timestamp
// correction. Up to four words are written per cycle (the four write ports of
// the frame decoder); a later port wins if two ports hit the same word. A
// read request returns the 16-bit word one cycle later with rd_valid;
// unmapped addresses read 0 and ignore writes. All registers reset to 0.
//
// The base address and the split of each offset into a 16-bit and an 8-bit
// register follow the document; the control register address, the reset
// values and the read behaviour are this design's.
module feb_offset_regs
  import irpc_pkg::*;
#(
  parameter int          N_CH = N_TDC_CH,
  parameter logic [15:0] BASE = OFFSET_BASE,
  parameter logic [15:0] CTRL = CTRL_ADDR
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [3:0]                 wr_en,
  input  logic [3:0][15:0]           wr_addr,
  input  logic [3:0][15:0]           wr_data,
  input  logic                       rd_req,
  input  logic [15:0]                rd_addr,
  output logic                       rd_valid,
  output logic [15:0]                rd_data,
  output logic [N_CH-1:0][TS_W-1:0]  offset,
  output logic                       bc0_corr_en
);

  // Index of the offset word an address selects, or -1.
  function automatic int unsigned word_idx(logic [15:0] a);
    logic [15:0] d;
    d = a - BASE;
    if (a >= BASE && 32'(d) < 2 * N_CH) return 32'(d);
    return 32'hFFFF_FFFF;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset      <= '0;
      bc0_corr_en <= 1'b0;
      rd_valid    <= 1'b0;
      rd_data     <= '0;
    end else begin
      for (int p = 0; p < 4; p++) begin
        if (wr_en[p]) begin
          for (int k = 0; k < N_CH; k++) begin
            if (word_idx(wr_addr[p]) == 32'(2 * k))
              offset[k][15:0] <= wr_data[p];
            if (word_idx(wr_addr[p]) == 32'(2 * k + 1))
              offset[k][TS_W-1:16] <= wr_data[p][TS_W-17:0];
          end
          if (wr_addr[p] == CTRL) bc0_corr_en <= wr_data[p][0];
        end
      end
      rd_valid <= rd_req;
      if (rd_req) begin
        rd_data <= '0;
        for (int k = 0; k < N_CH; k++) begin
          if (word_idx(rd_addr) == 32'(2 * k))     rd_data <= offset[k][15:0];
          if (word_idx(rd_addr) == 32'(2 * k + 1)) rd_data <= 16'(offset[k][TS_W-1:16]);
        end
        if (rd_addr == CTRL) rd_data <= {15'd0, bc0_corr_en};
      end
    end
  end

endmodule
