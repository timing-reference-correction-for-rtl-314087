// irpc_pkg: types and constants shared by the iRPC backend (BEB) and front-end
// (FEB) timing logic.
//
// Downlink (BEB -> FEB) user frame: 80 bits, split into five 16-bit groups
// G4..G0 with G4 in bits [79:64]. G4 is the fast-control header
// {Resync, BC0, ResetSCPath, MiscCtrl[9:0], FPGASel[2:0]}, most significant
// field first. A slow-control request frame carries
// {SVSD[6:0], WrReq, BurstAdditionalWords[7:0]} in G3, the register address in
// G2 and two data words in G1/G0; a payload frame carries four more data words
// in G3..G0. These field lengths and groups follow the frame tables of the
// design; the bit order within a group (first listed field most significant)
// is this design's choice.
//
// The use of MiscCtrl bits is this design's choice: MiscCtrl[0] marks a frame
// that carries slow control (request or payload), MiscCtrl[3:1] carries the
// latency-measurement code of the handshake. The uplink (FEB -> BEB) wide-bus
// frame is 112 bits; its layout here (4-bit reply code on top, 96-bit data
// field below) is also this design's choice.
//
// On the wire each frame is preceded by the 4-bit GBT header: 0101 for a data
// frame, 0110 for an idle frame.
package irpc_pkg;

  localparam int FRAME_W  = 80;   // downlink GBT user data
  localparam int WB_W     = 112;  // uplink wide-bus user data
  localparam int HDR_W    = 4;    // GBT frame header
  localparam int N_TDC_CH = 34;   // 32 strip channels + BC0 (32) + Resync (33)
  localparam int TS_W     = 24;   // TDC timestamp width
  localparam int BC0_CH   = 32;
  localparam int RESYNC_CH = 33;
  localparam int BX_PER_ORBIT = 3564;

  localparam logic [HDR_W-1:0] HDR_DATA = 4'b0101;
  localparam logic [HDR_W-1:0] HDR_IDLE = 4'b0110;

  // FEB slow-control map of the timestamp correction module.
  localparam logic [15:0] OFFSET_BASE = 16'h2800;
  // Control register (bit 0: BC0 timestamp correction enable). Its address is
  // this design's choice: the first word after the 34 offset pairs.
  localparam logic [15:0] CTRL_ADDR   = 16'h2844;

  // Latency-measurement codes carried in MiscCtrl[3:1] (downlink).
  typedef enum logic [2:0] {
    LM_NONE = 3'd0,
    LM_HS   = 3'd1,   // SC GBT frame_1: handshake request
    LM_EST  = 3'd2,   // SC GBT frame_2: link established
    LM_FLAG = 3'd3,   // Flag GBT frame_1: latency measure start (sent with BC0)
    LM_END  = 3'd4    // SC GBT frame_3: latency measure end
  } lm_code_t;

  // Reply codes carried in the top nibble of the uplink frame.
  typedef enum logic [3:0] {
    UP_NONE    = 4'd0,
    UP_HS_ACK  = 4'd1,  // SC WB frame_1
    UP_FLAG    = 4'd2,  // Flag WB frame_1
    UP_BC0_TS  = 4'd3,  // data[23:0] = corrected BC0 timestamp
    UP_RDATA   = 4'd4   // data[31:16] = address, data[15:0] = read data
  } up_code_t;

  typedef struct packed {
    logic       resync;
    logic       bc0;
    logic       reset_sc_path;
    logic [9:0] misc_ctrl;
    logic [2:0] fpga_sel;
  } fc_hdr_t;  // 16 bits, group G4

  typedef struct packed {
    logic [6:0] svsd;
    logic       wr_req;
    logic [7:0] burst_add_words;
  } sc_info_t; // 16 bits, group G3 of a request frame

  typedef struct packed {
    fc_hdr_t     hdr;
    sc_info_t    info;
    logic [15:0] addr;
    logic [15:0] wrdata0;
    logic [15:0] wrdata1;
  } sc_req_frame_t;

  typedef struct packed {
    fc_hdr_t          hdr;
    logic [3:0][15:0] wrdata;  // [3] = WrData(N) in G3 ... [0] = WrData(N+3) in G0
  } sc_pay_frame_t;

  typedef struct packed {
    up_code_t    code;
    logic [11:0] rsvd;
    logic [95:0] data;
  } wb_frame_t;

  // Helpers for MiscCtrl.
  function automatic logic [9:0] misc_pack(logic sc_valid, lm_code_t code);
    return {6'd0, code, sc_valid};
  endfunction

endpackage
