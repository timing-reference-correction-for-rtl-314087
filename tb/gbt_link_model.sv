// gbt_link_model: behavioural model of one direction of a GBT link for
// simulation: transmitting transceiver, fiber and receiving transceiver with
// recovered clock.
//
// Words written on tx_clk travel through DLY frame-clock stages (the whole
// frames of fiber and transceiver latency); the fractional part of the fiber
// delay is the phase of rx_clk, which the testbench derives from tx_clk. The
// receiver cuts the word stream at a boundary that starts INIT_OFFS bits off
// the true frame boundary and moves by one bit three rx_clk cycles after
// each rxslide pulse, like a transceiver's bit-slip port.
module gbt_link_model #(
  parameter int W         = 84,
  parameter int DLY       = 2,
  parameter int INIT_OFFS = 17
) (
  input  logic         tx_clk,
  input  logic [W-1:0] tx_word,
  input  logic         rx_clk,
  input  logic         rxslide,
  output logic [W-1:0] rx_word,
  output int           slides
);
  logic [W-1:0] pipe [DLY];
  logic [W-1:0] prev_w = '0, cur_w = '0;
  int offs = INIT_OFFS % W;
  int pend [$];
  int cyc = 0;

  initial slides = 0;

  always @(posedge tx_clk) begin
    pipe[0] <= tx_word;
    for (int i = 1; i < DLY; i++) pipe[i] <= pipe[i-1];
  end

  always @(posedge rx_clk) begin
    cyc++;
    prev_w <= cur_w;
    cur_w  <= pipe[DLY-1];
    if (rxslide) begin
      pend.push_back(cyc + 3);
      slides++;
    end
    if (pend.size() > 0 && pend[0] == cyc) begin
      void'(pend.pop_front());
      offs = (offs + 1) % W;
    end
  end

  always_comb begin
    logic [2*W-1:0] s;
    s = {prev_w, cur_w};
    rx_word = s[2*W-1-offs -: W];
  end
endmodule
