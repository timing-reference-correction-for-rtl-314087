// gbt_header_aligner: frame alignment of a GBT receiver by header search and
// transceiver bit slip.
//
// The receiving transceiver delivers words of W bits whose boundary is
// arbitrary after the clock and data recovery has locked. The aligner looks
// at the top HDR_W bits of every word. While unlocked, each word must carry a
// valid GBT header (0110 idle or 0101 data); LOCK_CNT successive valid headers
// declare the link established (locked = 1). A word with an invalid header
// resets the count and issues a one-cycle rxslide pulse, which makes the
// transceiver shift its word boundary by one bit; after a pulse the aligner
// waits SLIDE_GAP cycles (the transceiver's minimum spacing between two
// slides, which also covers the slide latency through its PCS) before judging
// headers again. Once locked, UNLOCK_BAD successive invalid headers drop the
// lock and the search starts again.
//
// The header values, the 24 successive headers and the 32-cycle slide spacing
// are the document's; the loss-of-lock rule (UNLOCK_BAD) is this design's.
// Timing: rxslide and locked are registered.
module gbt_header_aligner
  import irpc_pkg::*;
#(
  parameter int W          = HDR_W + FRAME_W,
  parameter int LOCK_CNT   = 24,
  parameter int SLIDE_GAP  = 32,
  parameter int UNLOCK_BAD = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] rx_word,
  output logic         rxslide,
  output logic         locked,
  output logic [15:0]  slide_count   // slides issued since reset (monitoring)
);

  logic [HDR_W-1:0] hdr;
  logic             hdr_ok;
  logic [$clog2(LOCK_CNT+1)-1:0]   good_cnt;
  logic [$clog2(SLIDE_GAP+1)-1:0]  gap_cnt;
  logic [$clog2(UNLOCK_BAD+1)-1:0] bad_cnt;

  assign hdr    = rx_word[W-1 -: HDR_W];
  assign hdr_ok = (hdr == HDR_DATA) || (hdr == HDR_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxslide     <= 1'b0;
      locked      <= 1'b0;
      good_cnt    <= '0;
      gap_cnt     <= '0;
      bad_cnt     <= '0;
      slide_count <= '0;
    end else begin
      rxslide <= 1'b0;
      if (locked) begin
        if (hdr_ok) begin
          bad_cnt <= '0;
        end else if (32'(bad_cnt) == UNLOCK_BAD - 1) begin
          locked   <= 1'b0;
          bad_cnt  <= '0;
          good_cnt <= '0;
        end else begin
          bad_cnt <= bad_cnt + 1'b1;
        end
      end else if (gap_cnt != 0) begin
        gap_cnt <= gap_cnt - 1'b1;
      end else if (hdr_ok) begin
        if (32'(good_cnt) == LOCK_CNT - 1) begin
          locked   <= 1'b1;
          good_cnt <= '0;
        end else begin
          good_cnt <= good_cnt + 1'b1;
        end
      end else begin
        good_cnt    <= '0;
        rxslide     <= 1'b1;
        gap_cnt     <= ($clog2(SLIDE_GAP+1))'(SLIDE_GAP);
        slide_count <= slide_count + 1'b1;
      end
    end
  end

endmodule
