// bw_tx_circuit: internal transmitter at one input port of the BW switch.
//
// A bank of flip-flops clocked by the source clock that arrives with the
// data (link bit 0) re-times the data bits coming from the external link
// transceiver, and the source clock itself is forwarded next to them into the
// crossbar. Data and clock therefore leave this stage aligned to the source
// clock, independent of the switch's own clock, which is what lets the
// crossbar pass them on as a wave.
//
// Registers clocked by the source clock on the data side of the crossbar
// follow the published design. The choice of the rising edge (the receiver
// stage samples on the falling edge, half a source-clock period later) and
// the asynchronous reset are this implementation's own. The clock-path
// buffering is a physical delay-matching matter and is a plain wire here.
// Timing: link_out data bits change on each rising edge of link_in[0].
module bw_tx_circuit #(
  parameter int unsigned LINK_W = 17          // 16 data bits + source clock
) (
  input  logic              rst_n,
  input  logic [LINK_W-1:0] link_in,          // from the external transceiver
  output logic [LINK_W-1:0] link_out          // toward the crossbar
);

  logic              src_clk;
  logic [LINK_W-1:1] q;

  assign src_clk = link_in[0];

  always_ff @(posedge src_clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= link_in[LINK_W-1:1];
  end

  assign link_out = {q, src_clk};

endmodule
