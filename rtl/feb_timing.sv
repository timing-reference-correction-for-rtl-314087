// feb_timing: timing-reference logic of one iRPC front-end board (FEB).
//
// Runs on the FEB's system clock, which is the clock recovered from the
// downlink, so it is frequency-locked to the backend. The downlink word is
// frame-aligned by gbt_header_aligner and decoded by sc_frame_decoder into
// fast control (BC0 and Resync, sent to the TDC as calibration pulses for
// channels 32 and 33, and the latency-measurement codes) and slow-control
// writes/reads of feb_offset_regs. tdc_ts_correction subtracts each channel's
// offset (and, if enabled, the previous BC0 timestamp) from the TDC
// timestamps before readout. feb_link_ctrl answers the backend's handshake
// and sends back the flag reply, read data and every corrected BC0
// timestamp on the uplink.
//
// Interface: rx_word/tx_word are {GBT header, user frame} words of the GBT
// transceiver, rxslide its bit-slip request. The TDC itself is outside this
// block: it receives calib_bc0/calib_resync and returns hits on
// tdc_valid/tdc_ts; corrected hits leave on ts_valid/ts_out one clock later.
// The block structure follows the FEB firmware of the document; the choices
// inside each block are listed in their own headers.
module feb_timing
  import irpc_pkg::*;
#(
  parameter logic [2:0] FPGA_SEL = 3'd0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [HDR_W+FRAME_W-1:0]      rx_word,
  output logic                          rxslide,
  output logic                          locked,
  output logic [HDR_W+WB_W-1:0]         tx_word,
  output logic                          calib_bc0,
  output logic                          calib_resync,
  input  logic [N_TDC_CH-1:0]           tdc_valid,
  input  logic [N_TDC_CH-1:0][TS_W-1:0] tdc_ts,
  output logic [N_TDC_CH-1:0]           ts_valid,
  output logic [N_TDC_CH-1:0][TS_W-1:0] ts_out,
  output logic [N_TDC_CH-1:0][TS_W-1:0] offset,
  output logic                          bc0_corr_en,
  output logic                          established,
  output logic                          meas_done
);

  lm_code_t         lm_code;
  logic             reset_sc_path;
  logic [3:0]       wr_en;
  logic [3:0][15:0] wr_addr, wr_data;
  logic             rd_req, rd_valid;
  logic [15:0]      rd_addr, rd_data;
  logic [TS_W-1:0]  prev_bc0;

  gbt_header_aligner #(.W(HDR_W + FRAME_W)) u_align (
    .clk, .rst_n, .rx_word, .rxslide, .locked, .slide_count());

  sc_frame_decoder #(.FPGA_SEL(FPGA_SEL)) u_dec (
    .clk, .rst_n, .frame_valid(locked), .frame(rx_word[FRAME_W-1:0]),
    .bc0(calib_bc0), .resync(calib_resync), .reset_sc_path, .lm_code,
    .wr_en, .wr_addr, .wr_data, .rd_req, .rd_addr);

  feb_offset_regs u_regs (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .rd_req, .rd_addr,
    .rd_valid, .rd_data, .offset, .bc0_corr_en);

  tdc_ts_correction u_corr (
    .clk, .rst_n, .hit_valid(tdc_valid), .ts(tdc_ts), .offset, .bc0_corr_en,
    .out_valid(ts_valid), .out_ts(ts_out), .prev_bc0);

  feb_link_ctrl u_link (
    .clk, .rst_n, .link_ready(locked), .lm_code,
    .bc0_ts_valid(ts_valid[BC0_CH]), .bc0_ts(ts_out[BC0_CH]),
    .rd_valid, .rd_addr, .rd_data, .established, .meas_done, .tx_word);

endmodule
