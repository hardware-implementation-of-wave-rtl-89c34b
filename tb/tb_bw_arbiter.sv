// tb_bw_arbiter: self-checking test of the output-port allocator.
//
// Random requests, masks, releases and output-free flags are applied each
// clock. The testbench keeps its own owner table and checks, every cycle:
// a grant names an output that is in the requester's mask, is free and not
// held; no output is granted twice; "blocked" is raised exactly when the mask
// holds no available output; a requester that has an available output but no
// grant only lost it to another input in the same cycle; allocation and
// crossbar control follow the grants one clock later; releases reach the
// right output; answers are routed back to the holding input. It also checks
// that contention is shared: two inputs that always want the same single
// output are each granted it.
module tb_bw_arbiter;
  import bw_pkg::*;

  logic clk = 1'b0, rst_n;
  logic       [NPORTS-1:0]     req, rel, gnt, blocked, out_free, alloc, out_rel, xen;
  port_mask_t [NPORTS-1:0]     mask;
  logic [NPORTS-1:0][2:0]      gport, xsel;
  ans_e       [NPORTS-1:0]     ans_fwd, ans_mon;
  // reference state
  logic [NPORTS-1:0]           m_own;
  int                          m_owner [NPORTS];
  int                          held_by [NPORTS];   // output held by each input, -1 none
  int checks = 0, failures = 0;
  int wins [NPORTS];

  always #5 clk = ~clk;

  bw_arbiter dut (.clk, .rst_n, .req, .mask, .release_i(rel), .gnt, .blocked,
    .gnt_port(gport), .ans_fwd, .ans_mon, .out_free, .alloc, .out_release(out_rel),
    .xbar_sel(xsel), .xbar_en(xen));

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // combinational checks against the reference state
  task automatic check_cycle();
    port_mask_t avail, given;
    avail = ~m_own & out_free;
    given = '0;
    for (int i = 0; i < NPORTS; i++) begin
      if (gnt[i]) begin
        chk(req[i], "grant without request");
        chk(mask[i][gport[i]] && avail[gport[i]], "grant outside mask or unavailable");
        chk(!given[gport[i]], "output granted twice");
        given[gport[i]] = 1'b1;
      end
    end
    for (int i = 0; i < NPORTS; i++) begin
      chk(blocked[i] == (req[i] && ((mask[i] & avail) == '0)), "blocked flag");
      if (req[i] && !gnt[i] && !blocked[i])
        chk(((mask[i] & avail) & ~given) == '0, "available output left unused");
    end
    chk(alloc == given, "alloc pulses equal grants");
    chk(xen == m_own, "crossbar enables");
    for (int o = 0; o < NPORTS; o++) if (m_own[o]) begin
      chk(int'(xsel[o]) == m_owner[o], "crossbar select");
      chk(ans_fwd[m_owner[o]] == ans_mon[o], "answer routed to holder");
      chk(out_rel[o] == rel[m_owner[o]], "release mapped to output");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; req = '0; rel = '0; mask = '0; out_free = '1; ans_mon = '{default: ANS_IDLE};
    m_own = '0;
    for (int i = 0; i < NPORTS; i++) begin held_by[i] = -1; m_owner[i] = 0; wins[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3000) begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) begin
        req[i]  = (held_by[i] < 0) && ($urandom_range(0, 2) != 0);
        mask[i] = port_mask_t'($urandom) & ~(port_mask_t'(1) << i);
        rel[i]  = (held_by[i] >= 0) && ($urandom_range(0, 3) == 0);
        ans_mon[i] = ans_e'($urandom_range(0, 3));
      end
      out_free = port_mask_t'($urandom) | port_mask_t'($urandom);
      #1 check_cycle();
      @(posedge clk);
      // update the reference after the edge
      for (int o = 0; o < NPORTS; o++)
        if (m_own[o] && rel[m_owner[o]]) begin held_by[m_owner[o]] = -1; m_own[o] = 1'b0; end
      for (int i = 0; i < NPORTS; i++)
        if (gnt[i]) begin m_own[gport[i]] = 1'b1; m_owner[gport[i]] = i; held_by[i] = int'(gport[i]); end
    end
    // fairness: inputs 1 and 3 both want output 0 and release it at once
    @(negedge clk);
    req = '0; rel = '0; out_free = '1;
    for (int o = 0; o < NPORTS; o++) if (m_own[o]) rel[m_owner[o]] = 1'b1;
    @(posedge clk); @(negedge clk); rel = '0;
    m_own = '0; for (int i = 0; i < NPORTS; i++) held_by[i] = -1;
    repeat (10) begin
      @(negedge clk);
      req = '0; rel = '0;
      mask[1] = 5'b00001; mask[3] = 5'b00001;
      req[1] = 1'b1; req[3] = 1'b1;
      #1;
      if (gnt[1]) wins[1]++;
      if (gnt[3]) wins[3]++;
      chk(gnt[1] ^ gnt[3], "exactly one of two contenders wins");
      @(negedge clk);
      req = '0;
      for (int o = 0; o < NPORTS; o++) if (xen[o]) rel[xsel[o]] = 1'b1;
      @(negedge clk); rel = '0;
    end
    chk(wins[1] > 0 && wins[3] > 0, $sformatf("both contenders served (%0d/%0d)", wins[1], wins[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
