// bw_ctrl_in: handshake controller of one input port of the BW switch.
//
// It serves the request/answer pair (req_in, ans_in) of its port. When the
// upstream neighbour raises req_in, the controller latches the destination
// address from the probe header on the port's data lines and asks the
// arbiter for one of the profitable output ports it has not yet tried for
// this probe. The search is depth-first with backtracking:
//   * the arbiter grants an output: the probe advances; the controller then
//     forwards the downstream answer (ack 01 or busy destination 11) upstream;
//   * the downstream answers "network blocked" (10): the output is released,
//     marked as tried, and the next profitable output is requested;
//   * every profitable output is busy or already tried: the controller answers
//     "network blocked" upstream so that the probe backtracks one hop.
// Whenever req_in falls the held output is released and the answer returns
// to idle (00) in the next cycle.
//
// The answer codes and the backtrack-instead-of-wait rule follow the
// published design; the state machine, the tried-port mask and the header
// layout are this implementation's own. All outputs toward the neighbour are
// registered: ans_in changes one clock after the event that causes it. The
// request to the arbiter is combinational from the state and req_in.
module bw_ctrl_in
  import bw_pkg::*;
#(
  parameter int unsigned NX     = 4,      // torus columns
  parameter int unsigned NY     = 4,      // torus rows
  parameter int unsigned X_W    = (NX > 1) ? $clog2(NX) : 1,
  parameter int unsigned Y_W    = (NY > 1) ? $clog2(NY) : 1,
  parameter int unsigned MY_PORT = 0      // index of the port this controller serves
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [X_W-1:0]   my_x,
  input  logic [Y_W-1:0]   my_y,
  // switch-to-switch handshake of this port
  input  logic             req_in,
  output ans_e             ans_in,
  input  logic [X_W-1:0]   hdr_dst_x,     // probe header seen on the data lines
  input  logic [Y_W-1:0]   hdr_dst_y,
  // request bus to the arbiter
  output logic             arb_req,
  output port_mask_t       arb_mask,
  output logic             arb_release,
  // grant and answer bus from the arbiter
  input  logic             arb_gnt,
  input  logic             arb_blocked,
  input  logic [2:0]       arb_gnt_port,
  input  ans_e             arb_ans         // answer seen on the output held by this port
);

  typedef enum logic [1:0] {
    S_IDLE,   // no circuit through this input
    S_ROUTE,  // asking the arbiter for an untried profitable output
    S_FWD,    // holding an output, forwarding its answer upstream
    S_FAIL    // every profitable output failed, answering "blocked"
  } state_e;

  state_e           state;
  port_mask_t       tried;
  logic [2:0]       held_port;
  logic [X_W-1:0]   dst_x;
  logic [Y_W-1:0]   dst_y;
  port_mask_t       prof;

  always_comb begin
    prof = profitable_ports(NX, NY, int'(my_x), int'(my_y), int'(dst_x), int'(dst_y));
    prof[MY_PORT] = 1'b0;                       // no U-turn
  end

  assign arb_req     = (state == S_ROUTE) && req_in;
  assign arb_mask    = prof & ~tried;
  assign arb_release = (state == S_FWD) && (!req_in || arb_ans == ANS_BLOCKED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      tried     <= '0;
      held_port <= '0;
      dst_x     <= '0;
      dst_y     <= '0;
      ans_in    <= ANS_IDLE;
    end else begin
      unique case (state)
        S_IDLE: begin
          ans_in <= ANS_IDLE;
          if (req_in) begin
            dst_x <= hdr_dst_x;
            dst_y <= hdr_dst_y;
            tried <= '0;
            state <= S_ROUTE;
          end
        end
        S_ROUTE: begin
          if (!req_in) begin
            ans_in <= ANS_IDLE;
            state  <= S_IDLE;
          end else if (arb_gnt) begin
            held_port <= arb_gnt_port;
            state     <= S_FWD;
          end else if (arb_blocked) begin
            ans_in <= ANS_BLOCKED;
            state  <= S_FAIL;
          end
        end
        S_FWD: begin
          if (!req_in) begin
            ans_in <= ANS_IDLE;
            state  <= S_IDLE;
          end else if (arb_ans == ANS_BLOCKED) begin
            tried[held_port] <= 1'b1;           // backtrack from this output
            ans_in <= ANS_IDLE;
            state  <= S_ROUTE;
          end else begin
            ans_in <= arb_ans;                  // 00, ack or busy destination
          end
        end
        S_FAIL: begin
          if (!req_in) begin
            ans_in <= ANS_IDLE;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A grant only ever answers a request, and names an output in the mask.
  a_gnt_req : assert property (@(posedge clk) disable iff (!rst_n)
      arb_gnt |-> (arb_req && arb_mask[arb_gnt_port]));

endmodule
