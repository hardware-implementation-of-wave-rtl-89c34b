// bw_rx_circuit: internal receiver at one output port of the BW switch.
//
// A bank of flip-flops clocked by the source clock that came through the
// crossbar (bit 0 of the crossbar output) re-captures the data bits after
// their trip across the switch, realigning them to that clock before they go
// to the external link transceiver; the clock itself is passed on. Because
// capture happens on the forwarded clock, the crossbar delay only has to match
// between the data and the clock, not fit into a switch clock period.
//
// Re-timing with the forwarded source clock follows the published design.
// Capturing on the falling edge (half a period after the transmitter stage
// launched the data on the rising edge) and the asynchronous reset are this
// implementation's choices. With this choice a word entering the switch on a
// rising edge of the source clock leaves it on the next falling edge: a
// fall-through latency of half a source-clock period.
module bw_rx_circuit #(
  parameter int unsigned LINK_W = 17          // 16 data bits + source clock
) (
  input  logic              rst_n,
  input  logic [LINK_W-1:0] xbar_in,          // from the crossbar
  output logic [LINK_W-1:0] link_out          // to the external transceiver
);

  logic              fwd_clk;
  logic [LINK_W-1:1] q;

  assign fwd_clk = xbar_in[0];

  always_ff @(negedge fwd_clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= xbar_in[LINK_W-1:1];
  end

  assign link_out = {q, fwd_clk};

endmodule
