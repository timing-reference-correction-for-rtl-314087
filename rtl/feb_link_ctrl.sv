// feb_link_ctrl: front-end side of the latency-measurement handshake and
// assembler of the 112-bit uplink wide-bus frame.
//
// Handshake (one step per downlink code, decoded by sc_frame_decoder):
//   LM_HS   (SC GBT frame_1)   -> Handshake_rcvd: reply UP_HS_ACK (SC WB frame_1)
//   LM_EST  (SC GBT frame_2)   -> Established
//   LM_FLAG (Flag GBT frame_1) -> latency measure_rcvd: reply UP_FLAG
//                                 (Flag WB frame_1), only when established
//   LM_END  (SC GBT frame_3)   -> latency measure_end
// A handshake request restarts the sequence from any state.
//
// Uplink frames: the flag reply is sent in the first frame after the flag
// frame is decoded and has top priority, so the loopback path has a fixed
// latency. Other replies wait in one-entry holding registers and go out in
// the next free frame, in the order handshake reply, slow-control read data
// ({address, data}), corrected BC0 timestamp (the feedback the backend
// receives for every BC0). A new item of a kind overwrites an unsent one.
// Frames without a reply carry the idle header.
//
// Timing: tx_word is registered; a flag decoded in cycle n leaves in cycle
// n+1. The handshake steps follow the document's sequence; codes, frame
// layout and priorities are this design's.
module feb_link_ctrl
  import irpc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  link_ready,
  input  lm_code_t              lm_code,
  input  logic                  bc0_ts_valid,
  input  logic [TS_W-1:0]       bc0_ts,
  input  logic                  rd_valid,
  input  logic [15:0]           rd_addr,
  input  logic [15:0]           rd_data,
  output logic                  established,
  output logic                  meas_done,
  output logic [HDR_W+WB_W-1:0] tx_word
);

  typedef enum logic [2:0] {S_IDLE, S_HS_RCVD, S_EST, S_MEAS_RCVD, S_MEAS_END} state_t;
  state_t state;

  logic            hs_pend, rd_pend, ts_pend;
  logic [31:0]     rd_hold;
  logic [TS_W-1:0] ts_hold;
  logic            flag_now;
  wb_frame_t       f;

  assign flag_now    = link_ready && lm_code == LM_FLAG && (state == S_EST);
  assign established = (state == S_EST) || (state == S_MEAS_RCVD) || (state == S_MEAS_END);
  assign meas_done   = (state == S_MEAS_END);

  always_comb begin
    f = '0;
    if (flag_now) begin
      f.code = UP_FLAG;
    end else if (hs_pend) begin
      f.code = UP_HS_ACK;
    end else if (rd_pend) begin
      f.code       = UP_RDATA;
      f.data[31:0] = rd_hold;
    end else if (ts_pend) begin
      f.code           = UP_BC0_TS;
      f.data[TS_W-1:0] = ts_hold;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      hs_pend <= 1'b0;
      rd_pend <= 1'b0;
      ts_pend <= 1'b0;
      rd_hold <= '0;
      ts_hold <= '0;
      tx_word <= {HDR_IDLE, {WB_W{1'b0}}};
    end else begin
      // handshake state machine
      if (!link_ready) begin
        state <= S_IDLE;
      end else begin
        unique case (lm_code)
          LM_HS:   state <= S_HS_RCVD;
          LM_EST:  if (state == S_HS_RCVD) state <= S_EST;
          LM_FLAG: if (state == S_EST) state <= S_MEAS_RCVD;
          LM_END:  if (state == S_MEAS_RCVD) state <= S_MEAS_END;
          default: ;
        endcase
      end

      // holding registers (set) and uplink frame (clear what is sent)
      if (!flag_now) begin
        if (hs_pend)      hs_pend <= 1'b0;
        else if (rd_pend) rd_pend <= 1'b0;
        else if (ts_pend) ts_pend <= 1'b0;
      end
      tx_word <= {(f.code == UP_NONE) ? HDR_IDLE : HDR_DATA, WB_W'(f)};

      if (link_ready && lm_code == LM_HS) hs_pend <= 1'b1;
      if (rd_valid) begin
        rd_pend <= 1'b1;
        rd_hold <= {rd_addr, rd_data};
      end
      if (bc0_ts_valid) begin
        ts_pend <= 1'b1;
        ts_hold <= bc0_ts;
      end
    end
  end

endmodule
