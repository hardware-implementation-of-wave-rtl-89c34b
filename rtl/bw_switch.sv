// bw_switch: backtracking wave-pipeline (BW) circuit-switched NoC switch.
//
// Five bidirectional ports (0 IP, 1 North, 2 East, 3 South, 4 West) each
// carry a link bus (DATA_W data bits above the source clock in bit 0), a
// 1-bit request and a 2-bit answer in each direction. The switch has two
// halves:
//   * control part, clocked by clk: one bw_ctrl_in and one bw_ctrl_out per
//     port and a bw_arbiter. A probe (req high, destination address in the
//     low data bits) is routed over profitable outputs; a probe that meets a
//     busy or blocked path backtracks and tries the next profitable output.
//   * data path, with no switch clock: per input a bw_tx_circuit, the mux
//     crossbar, per output a bw_rx_circuit, all timed by the source clock
//     that travels with the data, so a set-up circuit forwards data directly.
//
// Probe header: data bits [X_W:1] hold the destination x and bits
// [X_W+Y_W:X_W+1] the destination y; the sender keeps the header and its
// source clock running while req is high and no ack has arrived. Each hop
// raises its outgoing request HDR_DELAY+1 clocks after the output is granted.
// The handshake codes and block structure follow the published design; the
// header layout, the torus size defaults and all timing numbers are choices
// of this implementation. All switches of a network share clk.
// Lint reports data_in as used both as a clock and as data: bit 0 of each
// link is the source clock of the transceiver stages, the other bits are
// data, so this is intended.
module bw_switch
  import bw_pkg::*;
#(
  parameter int unsigned DATA_W    = 16,     // data bits per link
  parameter int unsigned NX        = 4,      // torus columns
  parameter int unsigned NY        = 4,      // torus rows
  parameter int unsigned HDR_DELAY = 4,      // header settling time, clocks
  localparam int unsigned LINK_W   = DATA_W + 1,
  localparam int unsigned X_W      = (NX > 1) ? $clog2(NX) : 1,
  localparam int unsigned Y_W      = (NY > 1) ? $clog2(NY) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [X_W-1:0]                my_x,
  input  logic [Y_W-1:0]                my_y,
  // per port, index = port number
  input  logic [NPORTS-1:0][LINK_W-1:0] data_in,
  output logic [NPORTS-1:0][LINK_W-1:0] data_out,
  input  logic [NPORTS-1:0]             req_in,
  output ans_e [NPORTS-1:0]             ans_in,
  output logic [NPORTS-1:0]             req_out,
  input  ans_e [NPORTS-1:0]             ans_out
);

  // request bus
  logic       [NPORTS-1:0]      arb_req, arb_rel;
  port_mask_t [NPORTS-1:0]      arb_mask;
  // grant and answer bus
  logic       [NPORTS-1:0]      arb_gnt, arb_blocked;
  logic [NPORTS-1:0][2:0]       arb_gnt_port;
  ans_e       [NPORTS-1:0]      arb_ans;
  // monitor bus
  ans_e       [NPORTS-1:0]      ans_mon;
  logic       [NPORTS-1:0]      out_free;
  // control bus
  logic       [NPORTS-1:0]      alloc, out_rel;
  // crossbar control bus
  logic [NPORTS-1:0][2:0]       xbar_sel;
  logic       [NPORTS-1:0]      xbar_en;
  // data path
  logic [NPORTS-1:0][LINK_W-1:0] tx_out, xbar_out;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    bw_ctrl_in #(.NX(NX), .NY(NY), .X_W(X_W), .Y_W(Y_W), .MY_PORT(p)) u_ctrl_in (
      .clk, .rst_n, .my_x, .my_y,
      .req_in      (req_in[p]),
      .ans_in      (ans_in[p]),
      .hdr_dst_x   (data_in[p][X_W:1]),
      .hdr_dst_y   (data_in[p][X_W+Y_W:X_W+1]),
      .arb_req     (arb_req[p]),
      .arb_mask    (arb_mask[p]),
      .arb_release (arb_rel[p]),
      .arb_gnt     (arb_gnt[p]),
      .arb_blocked (arb_blocked[p]),
      .arb_gnt_port(arb_gnt_port[p]),
      .arb_ans     (arb_ans[p])
    );

    bw_ctrl_out #(.HDR_DELAY(HDR_DELAY)) u_ctrl_out (
      .clk, .rst_n,
      .alloc    (alloc[p]),
      .release_i(out_rel[p]),
      .req_out  (req_out[p]),
      .ans_out  (ans_out[p]),
      .ans_mon  (ans_mon[p]),
      .free     (out_free[p])
    );

    bw_tx_circuit #(.LINK_W(LINK_W)) u_tx (
      .rst_n, .link_in(data_in[p]), .link_out(tx_out[p])
    );

    bw_rx_circuit #(.LINK_W(LINK_W)) u_rx (
      .rst_n, .xbar_in(xbar_out[p]), .link_out(data_out[p])
    );
  end

  bw_arbiter u_arbiter (
    .clk, .rst_n,
    .req        (arb_req),
    .mask       (arb_mask),
    .release_i  (arb_rel),
    .gnt        (arb_gnt),
    .blocked    (arb_blocked),
    .gnt_port   (arb_gnt_port),
    .ans_fwd    (arb_ans),
    .ans_mon    (ans_mon),
    .out_free   (out_free),
    .alloc      (alloc),
    .out_release(out_rel),
    .xbar_sel   (xbar_sel),
    .xbar_en    (xbar_en)
  );

  bw_crossbar #(.LINK_W(LINK_W)) u_crossbar (
    .data_in (tx_out),
    .sel     (xbar_sel),
    .en      (xbar_en),
    .data_out(xbar_out)
  );

endmodule
