// sc_frame_encoder: backend builder of the 80-bit downlink GBT user frame of
// one link, one frame per 40 MHz frame clock.
//
// Every frame starts with the fast-control header G4 (Resync, BC0,
// ResetSCPath, MiscCtrl, FPGASel), so BC0 and Resync reach the front end in
// the frame of the bunch crossing in which they are requested, whatever slow
// control is doing. A slow-control transfer of `sc_nwords` 16-bit words
// (1..256) is sent as one request frame (SVSD, WrReq, BurstAdditionalWords =
// nwords-1, Address, WrData0, WrData1) followed by back-to-back payload frames
// of four words each (WrData(N)..WrData(N+3)); unused word slots of the last
// frame are zero. A read request is a request frame with WrReq = 0 and one
// word. The words are fetched through wd_idx/wd: the encoder presents four
// word indices and expects their data combinationally.
//
// Interface: sc_req is sampled when sc_busy is low; sc_done pulses with the
// last frame of the transfer. lm_code is placed in MiscCtrl[3:1] of the frame
// being built. Output tx_word = {GBT header, frame} is registered: a request
// appears on tx_word one clock later. Frame fields and groups follow the
// document's frame tables; MiscCtrl usage, header choice (0101 for frames that
// carry something, 0110 otherwise) and back-to-back payload frames are this
// design's choices.
module sc_frame_encoder
  import irpc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // fast control
  input  logic              bc0,
  input  logic              resync,
  input  logic              reset_sc_path,
  input  logic [2:0]        fpga_sel,
  input  lm_code_t          lm_code,
  // slow control
  input  logic              sc_req,
  input  logic              sc_wr,
  input  logic [6:0]        sc_svsd,
  input  logic [15:0]       sc_addr,
  input  logic [8:0]        sc_nwords,
  output logic [3:0][7:0]   wd_idx,
  input  logic [3:0][15:0]  wd,
  output logic              sc_busy,
  output logic              sc_done,
  // GBT header + user frame
  output logic [HDR_W+FRAME_W-1:0] tx_word
);

  logic       in_payload;
  logic [7:0] base;        // index of the next word to send
  logic [8:0] remaining;   // words still to send in payload frames

  fc_hdr_t       hdr;
  sc_req_frame_t rq;
  sc_pay_frame_t pf;

  assign sc_busy = in_payload;

  always_comb begin
    for (int k = 0; k < 4; k++) wd_idx[k] = in_payload ? base + 8'(k) : 8'(k);
  end

  logic [HDR_W+FRAME_W-1:0] word_d;
  logic       in_payload_d, done_d;
  logic [7:0] base_d;
  logic [8:0] remaining_d;

  always_comb begin
    hdr.resync        = resync;
    hdr.bc0           = bc0;
    hdr.reset_sc_path = reset_sc_path;
    hdr.fpga_sel      = fpga_sel;
    hdr.misc_ctrl     = misc_pack(1'b0, lm_code);
    rq           = '0;
    pf           = '0;
    in_payload_d = in_payload;
    base_d       = base;
    remaining_d  = remaining;
    done_d       = 1'b0;
    if (in_payload) begin
      hdr.misc_ctrl = misc_pack(1'b1, lm_code);
      pf.hdr = hdr;
      for (int k = 0; k < 4; k++)
        pf.wrdata[3-k] = (9'(k) < remaining) ? wd[k] : 16'h0000;
      word_d = {HDR_DATA, FRAME_W'(pf)};
      if (remaining <= 9'd4) begin
        in_payload_d = 1'b0;
        remaining_d  = '0;
        done_d       = 1'b1;
      end else begin
        remaining_d = remaining - 9'd4;
        base_d      = base + 8'd4;
      end
    end else if (sc_req) begin
      hdr.misc_ctrl = misc_pack(1'b1, lm_code);
      rq.hdr                  = hdr;
      rq.info.svsd            = sc_svsd;
      rq.info.wr_req          = sc_wr;
      rq.info.burst_add_words = 8'(sc_nwords - 9'd1);
      rq.addr                 = sc_addr;
      rq.wrdata0              = sc_wr ? wd[0] : 16'h0000;
      rq.wrdata1              = (sc_wr && sc_nwords > 9'd1) ? wd[1] : 16'h0000;
      word_d = {HDR_DATA, FRAME_W'(rq)};
      if (sc_wr && sc_nwords > 9'd2) begin
        in_payload_d = 1'b1;
        base_d       = 8'd2;
        remaining_d  = sc_nwords - 9'd2;
      end else begin
        done_d = 1'b1;
      end
    end else begin
      pf.hdr = hdr;
      word_d = {(bc0 || resync || reset_sc_path || lm_code != LM_NONE) ? HDR_DATA : HDR_IDLE,
                FRAME_W'(pf)};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_word    <= {HDR_IDLE, {FRAME_W{1'b0}}};
      in_payload <= 1'b0;
      base       <= '0;
      remaining  <= '0;
      sc_done    <= 1'b0;
    end else begin
      tx_word    <= word_d;
      in_payload <= in_payload_d;
      base       <= base_d;
      remaining  <= remaining_d;
      sc_done    <= done_d;
    end
  end

endmodule
