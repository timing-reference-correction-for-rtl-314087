// correction_writer: downloads each link's correction value into the TDC
// timestamp correction module of the FEB at the other end of that link.
//
// A FEB measures its hits against the BC0 it received (Previous BC0). A FEB
// on a slower link receives BC0 later, by the link's one-way latency excess,
// so its hits look early by that amount. The correction is therefore written
// as the offset of the BC0 channel (channel 32, registers 0x2840 = bits 15:0
// and 0x2841 = bits 23:16): the FEB subtracts it from its BC0 timestamp, and
// every hit, from which the corrected BC0 is subtracted, moves back by the
// same amount. The reference (fastest) link gets 0.
//
// On `go` two slow-control writes are made on every link at once:
//   1. a 2-word burst at 0x2840: {corr[15:0]}, {8'h00, corr[23:16]}, the
//      correction being zero-extended to 24 bits;
//   2. a 1-word write of the control register (0x2844) with bit 0 =
//      bc0_corr_en, which switches the BC0 timestamp correction on.
// `done` pulses when every link's encoder has sent both.
//
// Interface: per link, sc_req is a one-cycle request to sc_frame_encoder and
// wd_idx/wd its combinational word fetch; sc_done is the encoder's
// end-of-transfer pulse. Each write is one request frame. Writing the
// correction to the FEB over slow control, and subtracting it there, follow
// the document; the choice of the BC0 channel's offset register as its
// destination is this design's reading of how the subtraction lines the
// links up.
module correction_writer
  import irpc_pkg::*;
#(
  parameter int N_LINKS = 2,
  parameter int CNT_W   = 12
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             go,
  input  logic                             bc0_corr_en,
  input  logic [N_LINKS-1:0][CNT_W-1:0]    corr,
  output logic [N_LINKS-1:0]               sc_req,
  output logic [15:0]                      sc_addr,
  output logic [8:0]                       sc_nwords,
  input  logic [N_LINKS-1:0][3:0][7:0]     wd_idx,
  output logic [N_LINKS-1:0][3:0][15:0]    wd,
  input  logic [N_LINKS-1:0]               sc_done,
  output logic                             busy,
  output logic                             done
);

  localparam logic [15:0] BC0_OFFSET_ADDR = OFFSET_BASE + 16'(2 * BC0_CH);

  logic [N_LINKS-1:0][TS_W-1:0] val;     // latched corrections
  logic [N_LINKS-1:0]           pending;
  logic                         en_q;
  logic                         second;  // 0: offset burst, 1: control write

  assign sc_addr   = second ? CTRL_ADDR : BC0_OFFSET_ADDR;
  assign sc_nwords = second ? 9'd1 : 9'd2;
  assign busy      = |pending;

  always_comb begin
    for (int l = 0; l < N_LINKS; l++)
      for (int k = 0; k < 4; k++)
        wd[l][k] = second           ? {15'd0, en_q} :
                   wd_idx[l][k][0]  ? 16'(val[l][TS_W-1:16]) : val[l][15:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      val     <= '0;
      en_q    <= 1'b0;
      pending <= '0;
      second  <= 1'b0;
      sc_req  <= '0;
      done    <= 1'b0;
    end else begin
      sc_req <= '0;
      done   <= 1'b0;
      if (go && !busy) begin
        for (int l = 0; l < N_LINKS; l++) val[l] <= TS_W'(corr[l]);
        en_q    <= bc0_corr_en;
        second  <= 1'b0;
        pending <= '1;
        sc_req  <= '1;
      end else if (busy) begin
        pending <= pending & ~sc_done;
        if ((pending & ~sc_done) == '0) begin
          if (!second) begin
            second  <= 1'b1;
            pending <= '1;
            sc_req  <= '1;
          end else begin
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
