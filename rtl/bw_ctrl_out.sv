// bw_ctrl_out: handshake controller of one output port of the BW switch.
//
// It owns the port's request line toward the neighbour (or toward the local
// IP wrapper on port 0) and watches the neighbour's answer. On an allocation
// pulse from the arbiter (control bus) it waits HDR_DELAY clock cycles, so
// that the probe header has passed the internal transceivers and the
// crossbar and is stable on the data lines, then raises req_out. A release
// pulse drops req_out; the port then stays unavailable until the neighbour
// has returned its answer to idle (00), so that a new probe never meets a
// stale answer. The registered answer and the port's availability go back to
// the arbiter and input controllers on the monitor bus.
//
// The request/answer codes follow the published design; the header delay,
// the drain phase and the registering of the answer are this
// implementation's choices. Timing: req_out rises HDR_DELAY+1 cycles after
// alloc and falls one cycle after release; ans_mon lags ans_out by a cycle.
module bw_ctrl_out
  import bw_pkg::*;
#(
  parameter int unsigned HDR_DELAY = 4    // clock cycles from allocation to req_out
) (
  input  logic  clk,
  input  logic  rst_n,
  // control bus from the arbiter
  input  logic  alloc,
  input  logic  release_i,
  // switch-to-switch handshake of this port
  output logic  req_out,
  input  ans_e  ans_out,
  // monitor bus
  output ans_e  ans_mon,
  output logic  free
);

  typedef enum logic [1:0] {
    S_FREE,   // unused and the neighbour is idle
    S_WAIT,   // allocated, letting the header settle
    S_REQ,    // request raised toward the neighbour
    S_DRAIN   // released, waiting for the neighbour's answer to clear
  } state_e;

  localparam int unsigned CW = (HDR_DELAY > 1) ? $clog2(HDR_DELAY + 1) : 1;

  state_e        state;
  logic [CW-1:0] cnt;

  assign free = (state == S_FREE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_FREE;
      cnt     <= '0;
      req_out <= 1'b0;
      ans_mon <= ANS_IDLE;
    end else begin
      ans_mon <= (state == S_REQ) ? ans_out : ANS_IDLE;
      unique case (state)
        S_FREE: begin
          req_out <= 1'b0;
          if (alloc) begin
            cnt   <= '0;
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (release_i) begin
            state <= S_DRAIN;
          end else if (cnt == CW'(HDR_DELAY)) begin
            req_out <= 1'b1;
            state   <= S_REQ;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_REQ: begin
          if (release_i) begin
            req_out <= 1'b0;
            ans_mon <= ANS_IDLE;
            state   <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          req_out <= 1'b0;
          if (!req_out && ans_out == ANS_IDLE) state <= S_FREE;
        end
        default: state <= S_FREE;
      endcase
    end
  end

  a_alloc_free : assert property (@(posedge clk) disable iff (!rst_n) alloc |-> free);

endmodule
