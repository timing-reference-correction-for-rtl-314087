// beb_link_ctrl: backend side of the latency-measurement handshake of one
// GBT link.
//
// Sequence (40 MHz transmit frame clock `clk`), one downlink code per step:
//   S_HS_SENT  send LM_HS (SC GBT frame_1, "Handshake_sent"), then wait for
//              the front end's UP_HS_ACK (SC WB frame_1)
//   S_EST      send LM_EST (SC GBT frame_2, "Established")
//   S_WAIT_BC0 wait for the next BC0 from the timing system; the flag code
//              LM_FLAG (Flag GBT frame_1, "latency measure_start") goes out in
//              the same frame as that BC0 and start_tgl toggles
//   S_WAIT_FLAG wait for the flag reply UP_FLAG (Flag WB frame_1); end_tgl
//              toggles in the receive clock domain when it arrives
//   S_END      send LM_END (SC GBT frame_3, "latency measure_end"), then DONE
// A `start` pulse begins (or restarts) the sequence; it is held until the
// uplink is aligned.
//
// The uplink is decoded in the recovered receive frame clock `rx_clk`: flag
// and handshake replies toggle flags that are synchronised into `clk`, and the
// BC0 timestamps and slow-control read data returned by the front end are
// presented there with a one-cycle valid. start_tgl (registered on `clk`, on
// the edge the flag frame is launched) and end_tgl (registered on `rx_clk`,
// one edge after the reply frame is received) drive the latency counters.
//
// The steps follow the document's handshake sequence; the codes, the
// toggle interface and the restart rule are this design's.
module beb_link_ctrl
  import irpc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  bc0,          // BC0 being sent in this frame
  output lm_code_t              lm_code,      // to the frame encoder, this frame
  output logic                  start_tgl,
  output logic                  busy,
  output logic                  established,
  output logic                  done,
  // receive side
  input  logic                  rx_clk,
  input  logic                  rx_rst_n,
  input  logic                  rx_locked,
  input  logic [WB_W-1:0]       rx_frame,
  output logic                  end_tgl,
  output logic                  bc0_ts_valid,
  output logic [TS_W-1:0]       bc0_ts,
  output logic                  rd_valid,
  output logic [31:0]           rd_word       // {address, data}
);

  typedef enum logic [2:0] {
    S_IDLE, S_HS_SENT, S_WAIT_HS, S_EST, S_WAIT_BC0, S_WAIT_FLAG, S_END, S_DONE
  } state_t;
  state_t state;
  logic   start_pend;

  // ---------------- receive clock domain ----------------
  wb_frame_t rf;
  logic      hs_tgl;
  assign rf = wb_frame_t'(rx_frame);

  always_ff @(posedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) begin
      hs_tgl       <= 1'b0;
      end_tgl      <= 1'b0;
      bc0_ts_valid <= 1'b0;
      bc0_ts       <= '0;
      rd_valid     <= 1'b0;
      rd_word      <= '0;
    end else begin
      bc0_ts_valid <= 1'b0;
      rd_valid     <= 1'b0;
      if (rx_locked) begin
        unique case (rf.code)
          UP_HS_ACK: hs_tgl  <= ~hs_tgl;
          UP_FLAG:   end_tgl <= ~end_tgl;
          UP_BC0_TS: begin
            bc0_ts_valid <= 1'b1;
            bc0_ts       <= rf.data[TS_W-1:0];
          end
          UP_RDATA: begin
            rd_valid <= 1'b1;
            rd_word  <= rf.data[31:0];
          end
          default: ;
        endcase
      end
    end
  end

  // ---------------- transmit clock domain ----------------
  logic [2:0] hs_s, fl_s;   // synchronisers + previous value
  logic [1:0] lk_s;
  logic       hs_seen, fl_seen, link_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs_s <= '0;
      fl_s <= '0;
      lk_s <= '0;
    end else begin
      hs_s <= {hs_s[1:0], hs_tgl};
      fl_s <= {fl_s[1:0], end_tgl};
      lk_s <= {lk_s[0], rx_locked};
    end
  end
  assign hs_seen = hs_s[2] ^ hs_s[1];
  assign fl_seen = fl_s[2] ^ fl_s[1];
  assign link_ok = lk_s[1];

  always_comb begin
    unique case (state)
      S_HS_SENT:  lm_code = LM_HS;
      S_EST:      lm_code = LM_EST;
      S_WAIT_BC0: lm_code = bc0 ? LM_FLAG : LM_NONE;
      S_END:      lm_code = LM_END;
      default:    lm_code = LM_NONE;
    endcase
  end

  assign busy        = start_pend || ((state != S_IDLE) && (state != S_DONE));
  assign established = (state == S_WAIT_BC0) || (state == S_WAIT_FLAG) ||
                       (state == S_END) || (state == S_DONE);
  assign done        = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      start_tgl  <= 1'b0;
      start_pend <= 1'b0;
    end else begin
      if (start) start_pend <= 1'b1;
      if ((start || start_pend) && link_ok) begin
        state      <= S_HS_SENT;
        start_pend <= 1'b0;
      end else begin
        unique case (state)
          S_HS_SENT:   state <= S_WAIT_HS;
          S_WAIT_HS:   if (hs_seen) state <= S_EST;
          S_EST:       state <= S_WAIT_BC0;
          S_WAIT_BC0:  if (bc0) begin
                         state     <= S_WAIT_FLAG;
                         start_tgl <= ~start_tgl;
                       end
          S_WAIT_FLAG: if (fl_seen) state <= S_END;
          S_END:       state <= S_DONE;
          default: ;
        endcase
      end
    end
  end

endmodule
