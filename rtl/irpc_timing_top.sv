// irpc_timing_top: BC0 timing-reference distribution and latency correction
// for one iRPC chamber system: one backend board (beb_timing) and N_LINKS
// front-end boards (feb_timing), each FEB on its own GBT link.
//
// The backend sends BC0 to every FEB, measures each link's loopback time
// with a 2.5 ns counter, takes the fastest link as reference and writes half
// the loopback difference into each FEB's BC0 channel offset register. Each
// FEB subtracts that from the BC0 time it keeps as reference and measures
// every TDC hit from it, so hits on the strips of the chamber read out by
// different FEBs share one time reference.
//
// The GBT transceivers, optics and fibers are outside this block: the link
// words leave and enter as ports ({GBT header, user frame}, one word per
// 40 MHz frame clock), and each side's rxslide output asks its transceiver to
// slip one bit. Clocks: clk40 is the backend frame clock (the 40.0786 MHz
// LHC clock), clk400 the 10x clock of the fine latency counter, beb_rx_clk[i]
// the backend's recovered uplink clock of link i, feb_clk[i] the FEB's clock
// recovered from the downlink. The FEB TDCs are outside too: calibration
// pulses go out and raw hits come in on the feb_* TDC ports.
module irpc_timing_top
  import irpc_pkg::*;
#(
  parameter int N_LINKS = 2,
  parameter int CNT_W   = 12
) (
  // backend
  input  logic                                    clk40,
  input  logic                                    clk400,
  input  logic                                    rst_n,
  input  logic                                    bc0_in,
  input  logic                                    resync_in,
  input  logic                                    start,
  input  logic                                    bc0_corr_en,
  output logic [N_LINKS-1:0][HDR_W+FRAME_W-1:0]   beb_tx_word,
  input  logic [N_LINKS-1:0]                      beb_rx_clk,
  input  logic [N_LINKS-1:0]                      beb_rx_rst_n,
  input  logic [N_LINKS-1:0][HDR_W+WB_W-1:0]      beb_rx_word,
  output logic [N_LINKS-1:0]                      beb_rxslide,
  output logic [N_LINKS-1:0]                      beb_rx_locked,
  output logic [N_LINKS-1:0][CNT_W-1:0]           latency,
  output logic [N_LINKS-1:0][CNT_W-1:0]           latency_bx,
  output logic [N_LINKS-1:0][CNT_W-1:0]           start_cnt,
  output logic [N_LINKS-1:0][CNT_W-1:0]           end_cnt,
  output logic                                    meas_done,
  output logic [N_LINKS-1:0][CNT_W-1:0]           corr,
  output logic [N_LINKS-1:0]                      corr_half,
  output logic [$clog2(N_LINKS+1)-1:0]            ref_idx,
  output logic                                    corr_valid,
  output logic                                    corr_written,
  output logic [N_LINKS-1:0]                      beb_bc0_ts_valid,
  output logic [N_LINKS-1:0][TS_W-1:0]            beb_bc0_ts,
  // front ends
  input  logic [N_LINKS-1:0]                      feb_clk,
  input  logic [N_LINKS-1:0]                      feb_rst_n,
  input  logic [N_LINKS-1:0][HDR_W+FRAME_W-1:0]   feb_rx_word,
  output logic [N_LINKS-1:0]                      feb_rxslide,
  output logic [N_LINKS-1:0]                      feb_locked,
  output logic [N_LINKS-1:0][HDR_W+WB_W-1:0]      feb_tx_word,
  output logic [N_LINKS-1:0]                      feb_calib_bc0,
  output logic [N_LINKS-1:0]                      feb_calib_resync,
  input  logic [N_LINKS-1:0][N_TDC_CH-1:0]        feb_tdc_valid,
  input  logic [N_LINKS-1:0][N_TDC_CH-1:0][TS_W-1:0] feb_tdc_ts,
  output logic [N_LINKS-1:0][N_TDC_CH-1:0]        feb_ts_valid,
  output logic [N_LINKS-1:0][N_TDC_CH-1:0][TS_W-1:0] feb_ts_out,
  output logic [N_LINKS-1:0][TS_W-1:0]            feb_offset0,   // channel 0 offset
  output logic [N_LINKS-1:0]                      feb_bc0_corr_en,
  output logic [N_LINKS-1:0]                      feb_established,
  output logic [N_LINKS-1:0]                      feb_meas_done
);

  beb_timing #(.N_LINKS(N_LINKS), .CNT_W(CNT_W)) u_beb (
    .clk40, .clk400, .rst_n, .bc0_in, .resync_in, .start, .bc0_corr_en,
    .tx_word(beb_tx_word), .rx_clk(beb_rx_clk), .rx_rst_n(beb_rx_rst_n),
    .rx_word(beb_rx_word), .rxslide(beb_rxslide), .rx_locked(beb_rx_locked),
    .latency, .latency_bx, .start_cnt, .end_cnt, .meas_done,
    .corr, .corr_half, .ref_idx, .corr_valid, .corr_written,
    .bc0_ts_valid(beb_bc0_ts_valid), .bc0_ts(beb_bc0_ts));

  for (genvar i = 0; i < N_LINKS; i++) begin : g_feb
    logic [N_TDC_CH-1:0][TS_W-1:0] offs;

    feb_timing u_feb (
      .clk(feb_clk[i]), .rst_n(feb_rst_n[i]),
      .rx_word(feb_rx_word[i]), .rxslide(feb_rxslide[i]), .locked(feb_locked[i]),
      .tx_word(feb_tx_word[i]),
      .calib_bc0(feb_calib_bc0[i]), .calib_resync(feb_calib_resync[i]),
      .tdc_valid(feb_tdc_valid[i]), .tdc_ts(feb_tdc_ts[i]),
      .ts_valid(feb_ts_valid[i]), .ts_out(feb_ts_out[i]),
      .offset(offs), .bc0_corr_en(feb_bc0_corr_en[i]),
      .established(feb_established[i]), .meas_done(feb_meas_done[i]));

    assign feb_offset0[i] = offs[0];
  end

endmodule
