// sc_frame_decoder: front-end decoder of the 80-bit downlink GBT user frame
// (the "Gbt SC Frame Decoder" and "FastControl Decoder" of the FEB master
// FPGA).
//
// Fast control: every frame's G4 header is decoded into one-cycle pulses
// bc0, resync and reset_sc_path (BC0 and Resync go on to the TDC as its
// calibration channels 32 and 33) and into the latency-measurement code
// carried in MiscCtrl[3:1].
//
// Slow control: a frame with MiscCtrl[0] set is a request frame unless a burst
// is in progress, in which case it is a payload frame. A write request of
// BurstAdditionalWords+1 words writes WrData0 to Address and WrData1 to
// Address+1 (if the burst has two or more words); the remaining words arrive
// four per payload frame, WrData(N) first, to consecutive addresses. Up to
// four words are written per frame through four write ports. A read request
// (WrReq = 0) gives a one-cycle rd_req with rd_addr. Requests whose FPGASel
// differs from FPGA_SEL are for another FPGA of the board: their payload
// frames are skipped. ResetSCPath aborts a burst in progress.
//
// Timing: all outputs are registered, one frame clock after the frame.
// Field positions follow the document's frame tables; the request/payload
// distinction through MiscCtrl[0], consecutive-address bursts and the abort
// are this design's choices.
module sc_frame_decoder
  import irpc_pkg::*;
#(
  parameter logic [2:0] FPGA_SEL = 3'd0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_valid,   // link established
  input  logic [FRAME_W-1:0]   frame,
  // fast control
  output logic                 bc0,
  output logic                 resync,
  output logic                 reset_sc_path,
  output lm_code_t             lm_code,
  // slow control
  output logic [3:0]           wr_en,
  output logic [3:0][15:0]     wr_addr,
  output logic [3:0][15:0]     wr_data,
  output logic                 rd_req,
  output logic [15:0]          rd_addr
);

  sc_req_frame_t rq;
  sc_pay_frame_t pf;
  logic          sc_valid;

  logic        in_burst, mine;
  logic [8:0]  remaining;
  logic [15:0] next_addr;

  assign rq       = sc_req_frame_t'(frame);
  assign pf       = sc_pay_frame_t'(frame);
  assign sc_valid = rq.hdr.misc_ctrl[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc0           <= 1'b0;
      resync        <= 1'b0;
      reset_sc_path <= 1'b0;
      lm_code       <= LM_NONE;
      wr_en         <= '0;
      wr_addr       <= '0;
      wr_data       <= '0;
      rd_req        <= 1'b0;
      rd_addr       <= '0;
      in_burst      <= 1'b0;
      mine          <= 1'b0;
      remaining     <= '0;
      next_addr     <= '0;
    end else begin
      wr_en  <= '0;
      rd_req <= 1'b0;
      if (!frame_valid) begin
        bc0           <= 1'b0;
        resync        <= 1'b0;
        reset_sc_path <= 1'b0;
        lm_code       <= LM_NONE;
        in_burst      <= 1'b0;
      end else begin
        bc0           <= rq.hdr.bc0;
        resync        <= rq.hdr.resync;
        reset_sc_path <= rq.hdr.reset_sc_path;
        lm_code       <= lm_code_t'(rq.hdr.misc_ctrl[3:1]);
        if (rq.hdr.reset_sc_path) begin
          in_burst <= 1'b0;
        end else if (sc_valid && in_burst) begin
          // payload frame
          for (int k = 0; k < 4; k++) begin
            wr_en[k]   <= mine && (9'(k) < remaining);
            wr_addr[k] <= next_addr + 16'(k);
            wr_data[k] <= pf.wrdata[3-k];
          end
          if (remaining <= 9'd4) begin
            in_burst  <= 1'b0;
            remaining <= '0;
          end else begin
            remaining <= remaining - 9'd4;
            next_addr <= next_addr + 16'd4;
          end
        end else if (sc_valid) begin
          // request frame
          mine <= (rq.hdr.fpga_sel == FPGA_SEL);
          if (rq.info.wr_req) begin
            wr_en[0]   <= (rq.hdr.fpga_sel == FPGA_SEL);
            wr_addr[0] <= rq.addr;
            wr_data[0] <= rq.wrdata0;
            wr_en[1]   <= (rq.hdr.fpga_sel == FPGA_SEL) && (rq.info.burst_add_words != 0);
            wr_addr[1] <= rq.addr + 16'd1;
            wr_data[1] <= rq.wrdata1;
            if (rq.info.burst_add_words > 8'd1) begin
              in_burst  <= 1'b1;
              remaining <= 9'(rq.info.burst_add_words) - 9'd1;
              next_addr <= rq.addr + 16'd2;
            end
          end else begin
            rd_req  <= (rq.hdr.fpga_sel == FPGA_SEL);
            rd_addr <= rq.addr;
          end
        end
      end
    end
  end

endmodule
