// beb_timing: timing-reference logic of the iRPC backend board (BEB).
//
// The BEB forwards the BC0 of the central timing system to every front-end
// board (FEB) over its GBT link. Links have different fiber lengths, so BC0
// reaches the FEBs at different times. This block measures every link's
// loopback time and sends each FEB a correction that it subtracts from its
// TDC timestamps:
//   1. On `start`, every link runs the handshake of beb_link_ctrl. The flag
//      frame goes out together with a BC0; the time until the FEB's flag reply
//      comes back is measured by a 2.5 ns counter (clk400) and, for reference,
//      by a 25 ns bunch-crossing counter (clk40).
//   2. When all links are done, correction_calc takes the fastest link as the
//      reference and computes (latency - latency_min)/2 per link.
//   3. correction_writer writes each link's value over slow control into the
//      BC0 channel offset register of its FEB and enables the FEB's BC0
//      timestamp correction.
// Each link has its own downlink frame encoder (clk40 domain), uplink header
// aligner and reply decoder (its recovered receive clock rx_clk[i]).
//
// Interface: tx_word/rx_word are {GBT header, user frame} words for the GBT
// transceivers; rxslide asks the receiving transceiver to slip one bit. The
// latency outputs are in the clk400 domain and stable once meas_done is high;
// corr outputs are valid from corr_valid. The three steps follow the
// document; the automatic sequencing of the steps is this design's choice.
// Status outputs of the sub-blocks that the sequencer does not need (link
// busy, encoder busy, slow-control read replies, counter done pulses and raw
// counter values) are left unused here; lint reports them as unused signals.
module beb_timing
  import irpc_pkg::*;
#(
  parameter int N_LINKS = 2,
  parameter int CNT_W   = 12
) (
  input  logic                          clk40,
  input  logic                          clk400,
  input  logic                          rst_n,
  input  logic                          bc0_in,
  input  logic                          resync_in,
  input  logic                          start,
  input  logic                          bc0_corr_en,  // written to every FEB with the offsets
  // GBT links
  output logic [N_LINKS-1:0][HDR_W+FRAME_W-1:0] tx_word,
  input  logic [N_LINKS-1:0]            rx_clk,
  input  logic [N_LINKS-1:0]            rx_rst_n,
  input  logic [N_LINKS-1:0][HDR_W+WB_W-1:0]    rx_word,
  output logic [N_LINKS-1:0]            rxslide,
  output logic [N_LINKS-1:0]            rx_locked,
  // results
  output logic [N_LINKS-1:0][CNT_W-1:0] latency,      // 2.5 ns steps
  output logic [N_LINKS-1:0][CNT_W-1:0] latency_bx,   // 25 ns steps
  output logic [N_LINKS-1:0][CNT_W-1:0] start_cnt,
  output logic [N_LINKS-1:0][CNT_W-1:0] end_cnt,
  output logic                          meas_done,
  output logic [N_LINKS-1:0][CNT_W-1:0] corr,
  output logic [N_LINKS-1:0]            corr_half,
  output logic [$clog2(N_LINKS+1)-1:0]  ref_idx,
  output logic                          corr_valid,
  output logic                          corr_written,
  // FEB feedback (rx_clk[i] domain)
  output logic [N_LINKS-1:0]            bc0_ts_valid,
  output logic [N_LINKS-1:0][TS_W-1:0]  bc0_ts
);

  lm_code_t [N_LINKS-1:0]          lm_code;
  logic [N_LINKS-1:0]              start_tgl, end_tgl, link_done, link_busy;
  logic [N_LINKS-1:0]              sc_req, sc_done, sc_busy;
  logic [15:0]                     sc_addr;
  logic [8:0]                      sc_nwords;
  logic [N_LINKS-1:0][3:0][7:0]    wd_idx;
  logic [N_LINKS-1:0][3:0][15:0]   wd;
  logic [N_LINKS-1:0]              rd_valid;
  logic [N_LINKS-1:0][31:0]        rd_word;
  logic [N_LINKS-1:0]              lat_done, latbx_done;
  logic [N_LINKS-1:0][CNT_W-1:0]   cnt_fine, cnt_bx, sbx, ebx;
  logic                            calc, calc_done, wr_go, wr_busy, wr_done;

  for (genvar i = 0; i < N_LINKS; i++) begin : g_link
    logic lk;

    gbt_header_aligner #(.W(HDR_W + WB_W)) u_align (
      .clk(rx_clk[i]), .rst_n(rx_rst_n[i]), .rx_word(rx_word[i]),
      .rxslide(rxslide[i]), .locked(lk), .slide_count());
    assign rx_locked[i] = lk;

    beb_link_ctrl u_ctrl (
      .clk(clk40), .rst_n, .start, .bc0(bc0_in),
      .lm_code(lm_code[i]), .start_tgl(start_tgl[i]), .busy(link_busy[i]),
      .established(), .done(link_done[i]),
      .rx_clk(rx_clk[i]), .rx_rst_n(rx_rst_n[i]), .rx_locked(lk),
      .rx_frame(rx_word[i][WB_W-1:0]), .end_tgl(end_tgl[i]),
      .bc0_ts_valid(bc0_ts_valid[i]), .bc0_ts(bc0_ts[i]),
      .rd_valid(rd_valid[i]), .rd_word(rd_word[i]));

    latency_counter #(.CNT_W(CNT_W)) u_fine (
      .clk(clk400), .rst_n, .start_tgl(start_tgl[i]), .end_tgl(end_tgl[i]),
      .counter(cnt_fine[i]), .start_cnt(start_cnt[i]), .end_cnt(end_cnt[i]),
      .latency(latency[i]), .done(lat_done[i]));

    latency_counter #(.CNT_W(CNT_W)) u_bx (
      .clk(clk40), .rst_n, .start_tgl(start_tgl[i]), .end_tgl(end_tgl[i]),
      .counter(cnt_bx[i]), .start_cnt(sbx[i]), .end_cnt(ebx[i]),
      .latency(latency_bx[i]), .done(latbx_done[i]));

    sc_frame_encoder u_enc (
      .clk(clk40), .rst_n, .bc0(bc0_in), .resync(resync_in), .reset_sc_path(1'b0),
      .fpga_sel(3'd0), .lm_code(lm_code[i]),
      .sc_req(sc_req[i]), .sc_wr(1'b1), .sc_svsd(7'd0), .sc_addr, .sc_nwords,
      .wd_idx(wd_idx[i]), .wd(wd[i]), .sc_busy(sc_busy[i]), .sc_done(sc_done[i]),
      .tx_word(tx_word[i]));
  end

  correction_calc #(.N_LINKS(N_LINKS), .CNT_W(CNT_W)) u_calc (
    .clk(clk40), .rst_n, .calc, .latency, .corr, .corr_half, .ref_idx, .done(calc_done));

  correction_writer #(.N_LINKS(N_LINKS), .CNT_W(CNT_W)) u_wr (
    .clk(clk40), .rst_n, .go(wr_go), .bc0_corr_en, .corr, .sc_req, .sc_addr, .sc_nwords,
    .wd_idx, .wd, .sc_done, .busy(wr_busy), .done(wr_done));

  // Sequencer: measure all links, compute, write.
  typedef enum logic [2:0] {Q_IDLE, Q_MEAS, Q_SETTLE, Q_CALC, Q_WRITE, Q_DONE} seq_t;
  seq_t       seq;
  logic [2:0] settle;

  assign meas_done = (seq == Q_SETTLE) || (seq == Q_CALC) || (seq == Q_WRITE) || (seq == Q_DONE);

  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n) begin
      seq          <= Q_IDLE;
      settle       <= '0;
      calc         <= 1'b0;
      wr_go        <= 1'b0;
      corr_valid   <= 1'b0;
      corr_written <= 1'b0;
    end else begin
      calc  <= 1'b0;
      wr_go <= 1'b0;
      if (start) begin
        seq          <= Q_MEAS;
        corr_valid   <= 1'b0;
        corr_written <= 1'b0;
      end else begin
        unique case (seq)
          Q_MEAS:   if (&link_done) begin
                      seq    <= Q_SETTLE;
                      settle <= '1;
                    end
          // the 400 MHz counters finish within a few fast cycles of the
          // synchronised flag; wait before reading their results here
          Q_SETTLE: if (settle == 0) begin
                      seq  <= Q_CALC;
                      calc <= 1'b1;
                    end else settle <= settle - 1'b1;
          Q_CALC:   if (calc_done) begin
                      corr_valid <= 1'b1;
                      wr_go      <= 1'b1;
                      seq        <= Q_WRITE;
                    end
          Q_WRITE:  if (wr_done) begin
                      corr_written <= 1'b1;
                      seq          <= Q_DONE;
                    end
          default: ;
        endcase
      end
    end
  end

endmodule
