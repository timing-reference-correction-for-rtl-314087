// latency_counter: loopback latency measurement of one GBT link.
//
// A free-running CNT_W-bit counter advances on every edge of clk. At 400 MHz
// one count is 2.5 ns (the fine measurement); run from the 40 MHz bunch
// crossing clock one count is 25 ns (the coarse measurement). The start of the
// BC0/flag distribution and the arrival of the feedback are signalled by
// toggles (start_tgl, end_tgl) that may come from other clock domains: each
// goes through a two-flop synchroniser and an edge detector, so both events
// see the same synchroniser delay and it cancels in the difference. On the
// start edge the counter value is stored in start_cnt; on the end edge it is
// stored in end_cnt, latency = end_cnt - start_cnt (modulo 2^CNT_W, so one
// counter wrap between the two events is harmless) and done goes high until
// the next start.
//
// Timing: start_cnt/end_cnt are captured three clk edges after the toggle
// (two synchroniser flops plus the edge detector); latency and done are
// valid one edge after end_cnt. The counter width of 12 bits is the
// document's; the toggle interface and the synchroniser are this design's.
module latency_counter #(
  parameter int CNT_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_tgl,   // toggles once when the measurement starts
  input  logic             end_tgl,     // toggles once when the feedback arrives
  output logic [CNT_W-1:0] counter,     // free-running count, for monitoring
  output logic [CNT_W-1:0] start_cnt,
  output logic [CNT_W-1:0] end_cnt,
  output logic [CNT_W-1:0] latency,
  output logic             done
);

  logic [2:0] s_sync, e_sync;   // [0],[1] synchroniser, [2] previous value
  logic       s_edge, e_edge;
  logic       armed, end_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_sync <= '0;
      e_sync <= '0;
    end else begin
      s_sync <= {s_sync[1:0], start_tgl};
      e_sync <= {e_sync[1:0], end_tgl};
    end
  end

  assign s_edge = s_sync[2] ^ s_sync[1];
  assign e_edge = e_sync[2] ^ e_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      counter   <= '0;
      start_cnt <= '0;
      end_cnt   <= '0;
      latency   <= '0;
      done      <= 1'b0;
      armed     <= 1'b0;
      end_seen  <= 1'b0;
    end else begin
      counter  <= counter + 1'b1;
      end_seen <= 1'b0;
      if (s_edge) begin
        start_cnt <= counter;
        armed     <= 1'b1;
        done      <= 1'b0;
      end else if (e_edge && armed) begin
        end_cnt  <= counter;
        armed    <= 1'b0;
        end_seen <= 1'b1;
      end
      if (end_seen) begin
        latency <= end_cnt - start_cnt;
        done    <= 1'b1;
      end
    end
  end

endmodule
