// correction_calc: per-link correction value from the measured loopback
// latencies of all links of the backend.
//
// The downlink and uplink of a link are taken to take equal time, so the
// difference between two links' one-way latencies is half the difference of
// their loopback times. The fastest link is the reference; every link i gets
//   corr[i] = (latency[i] - latency_min) / 2
// in the units of the latency counter (2.5 ns), rounded down, and corr_half[i]
// is the bit dropped by the division (a further 1.25 ns). The reference link
// gets 0. With the document's example, latencies 637 and 716 give 39 (and
// corr_half = 1) for the slower link.
//
// Interface: pulse `calc` while all `latency` inputs are valid; one clock
// later corr/corr_half/ref_idx are valid and `done` pulses for one cycle.
// The formula and the choice of the fastest link as reference follow the
// document; the handshake and the output of the dropped half step are this
// design's.
module correction_calc #(
  parameter int N_LINKS = 2,
  parameter int CNT_W   = 12
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      calc,
  input  logic [N_LINKS-1:0][CNT_W-1:0] latency,
  output logic [N_LINKS-1:0][CNT_W-1:0] corr,
  output logic [N_LINKS-1:0]        corr_half,
  output logic [$clog2(N_LINKS+1)-1:0] ref_idx,
  output logic                      done
);

  logic [CNT_W-1:0]              lat_min;
  logic [$clog2(N_LINKS+1)-1:0]  min_idx;
  logic [N_LINKS-1:0][CNT_W-1:0] diff;

  always_comb begin
    lat_min = latency[0];
    min_idx = '0;
    for (int i = 1; i < N_LINKS; i++) begin
      if (latency[i] < lat_min) begin
        lat_min = latency[i];
        min_idx = i[$clog2(N_LINKS+1)-1:0];
      end
    end
    for (int i = 0; i < N_LINKS; i++) diff[i] = latency[i] - lat_min;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      corr      <= '0;
      corr_half <= '0;
      ref_idx   <= '0;
      done      <= 1'b0;
    end else begin
      done <= calc;
      if (calc) begin
        ref_idx <= min_idx;
        for (int i = 0; i < N_LINKS; i++) begin
          corr[i]      <= diff[i] >> 1;
          corr_half[i] <= diff[i][0];
        end
      end
    end
  end

endmodule
