// bw_arbiter: output-port allocator of the BW switch.
//
// Each input controller presents a request with the mask of output ports it
// would accept (profitable and not yet tried). In one cycle the arbiter
// visits the inputs in round-robin order, starting after the input served
// last, and gives each requester the lowest-numbered output of its mask that
// is available and not already given away in that cycle. An output is
// available when no input holds it and its output controller reports it free
// on the monitor bus. A requester whose mask holds no available output at
// all gets "blocked" in the same cycle, which makes its probe backtrack
// instead of waiting; one that only lost a race to another input this cycle
// simply asks again.
//
// Granted outputs are recorded in an owner table, which drives the crossbar
// control bus (select and enable per output) and routes each output's
// monitored answer back to the input that holds it (grant and answer bus).
// The inputs, buses and their roles follow the published block diagram; the
// allocation policy is this implementation's choice. Grants and "blocked"
// are combinational; the owner table updates at the next clock edge.
module bw_arbiter
  import bw_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // request bus
  input  logic       [NPORTS-1:0]  req,
  input  port_mask_t [NPORTS-1:0]  mask,
  input  logic       [NPORTS-1:0]  release_i,
  // grant and answer bus
  output logic       [NPORTS-1:0]  gnt,
  output logic       [NPORTS-1:0]  blocked,
  output logic [NPORTS-1:0][2:0]   gnt_port,
  output ans_e       [NPORTS-1:0]  ans_fwd,
  // monitor bus from the output controllers
  input  ans_e       [NPORTS-1:0]  ans_mon,
  input  logic       [NPORTS-1:0]  out_free,
  // control bus to the output controllers
  output logic       [NPORTS-1:0]  alloc,
  output logic       [NPORTS-1:0]  out_release,
  // crossbar control bus
  output logic [NPORTS-1:0][2:0]   xbar_sel,
  output logic       [NPORTS-1:0]  xbar_en
);

  logic [NPORTS-1:0]      own_v;      // output is held by some input
  logic [NPORTS-1:0][2:0] owner;      // which input holds it
  logic [2:0]             rr;         // input visited first

  port_mask_t avail;
  port_mask_t taken;

  always_comb begin
    gnt      = '0;
    blocked  = '0;
    gnt_port = '0;
    taken    = '0;
    avail    = ~own_v & out_free;
    for (int k = 0; k < NPORTS; k++) begin
      int i;
      i = (int'(rr) + k) % NPORTS;
      if (req[i]) begin
        if ((mask[i] & avail) == '0) begin
          blocked[i] = 1'b1;
        end else begin
          for (int o = NPORTS - 1; o >= 0; o--) begin
            if (mask[i][o] && avail[o] && !taken[o]) begin
              gnt[i]      = 1'b1;
              gnt_port[i] = 3'(o);
            end
          end
          if (gnt[i]) taken[gnt_port[i]] = 1'b1;
        end
      end
    end
  end

  // Release requests name the input; turn them into per-output pulses.
  always_comb begin
    out_release = '0;
    ans_fwd     = '{default: ANS_IDLE};
    for (int o = 0; o < NPORTS; o++) begin
      if (own_v[o]) begin
        if (release_i[owner[o]]) out_release[o] = 1'b1;
        ans_fwd[owner[o]] = ans_mon[o];
      end
    end
  end

  assign alloc    = taken;
  assign xbar_sel = owner;
  assign xbar_en  = own_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_v <= '0;
      owner <= '0;
      rr    <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (out_release[o]) own_v[o] <= 1'b0;
      end
      for (int i = 0; i < NPORTS; i++) begin
        if (gnt[i]) begin
          own_v[gnt_port[i]] <= 1'b1;
          owner[gnt_port[i]] <= 3'(i);
        end
      end
      if (gnt != '0) rr <= (rr == 3'(NPORTS - 1)) ? '0 : rr + 1'b1;
    end
  end

  // An output is never given to two inputs in one cycle.
  a_one_owner : assert property (@(posedge clk) disable iff (!rst_n)
      (alloc & own_v) == '0);

endmodule
