// tdc_ts_correction: FEB TDC timestamp correction module.
//
// For every TDC channel k a hit's 24-bit timestamp has the channel's offset
// subtracted (Timestamp - Offset). The offset is the per-link correction the
// backend writes over slow control, so all FEBs of a chamber refer to the same
// instant. Channel 32 records BC0: its corrected timestamp is kept as
// "Previous BC0". When the BC0 timestamp correction is enabled, the Previous
// BC0 value is also subtracted from every channel's result
// (Timestamp - Offset - PrevBC0), which turns timestamps into times since the
// last BC0; channel 33 (Resync) is treated like the standard channels.
// Channel 32 itself then gives the time between two successive BC0s.
//
// Arithmetic is modulo 2^24. Timing: one register stage; out_valid/out_ts
// follow hit_valid/ts by one clock. A hit that arrives in the same cycle as a
// BC0 hit uses the BC0 before it; the new BC0 is used from the next cycle.
// The subtractions, widths and channel roles follow the document; the
// pipeline and the same-cycle rule are this design's.
module tdc_ts_correction
  import irpc_pkg::*;
#(
  parameter int N_CH = N_TDC_CH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_CH-1:0]           hit_valid,
  input  logic [N_CH-1:0][TS_W-1:0] ts,
  input  logic [N_CH-1:0][TS_W-1:0] offset,
  input  logic                      bc0_corr_en,
  output logic [N_CH-1:0]           out_valid,
  output logic [N_CH-1:0][TS_W-1:0] out_ts,
  output logic [TS_W-1:0]           prev_bc0
);

  logic [N_CH-1:0][TS_W-1:0] ts_off;

  always_comb begin
    for (int k = 0; k < N_CH; k++) ts_off[k] = ts[k] - offset[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_ts    <= '0;
      prev_bc0  <= '0;
    end else begin
      out_valid <= hit_valid;
      for (int k = 0; k < N_CH; k++)
        if (hit_valid[k])
          out_ts[k] <= bc0_corr_en ? ts_off[k] - prev_bc0 : ts_off[k];
      if (hit_valid[BC0_CH]) prev_bc0 <= ts_off[BC0_CH];
    end
  end

endmodule
