// bw_crossbar: mux-based 5x5 crossbar of the BW switch.
//
// One multiplexer per output port selects the link bus (data bits plus the
// source clock in bit 0) of one input port, chosen by the crossbar control
// bus. Each output's multiplexer has the four other ports as inputs: a
// circuit never turns back out of the port it came in on. The path is purely
// combinational, so data and its source clock travel together through the
// switch as a wave, without any local clock. An output whose enable is low
// drives all zeros, which also keeps its forwarded clock still.
//
// The mux-per-output structure, the shared control bus and the forwarding of
// the source clock with the data follow the published design; the all-zero
// idle value is this implementation's choice.
module bw_crossbar
  import bw_pkg::*;
#(
  parameter int unsigned LINK_W = 17          // 16 data bits + source clock
) (
  input  logic [NPORTS-1:0][LINK_W-1:0] data_in,
  input  logic [NPORTS-1:0][2:0]        sel,   // input feeding each output
  input  logic [NPORTS-1:0]             en,
  output logic [NPORTS-1:0][LINK_W-1:0] data_out
);

  always_comb begin
    data_out = '0;
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++) begin
        if (i != o && en[o] && sel[o] == 3'(i)) data_out[o] = data_in[i];
      end
    end
  end

endmodule
