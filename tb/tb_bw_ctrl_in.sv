// tb_bw_ctrl_in: self-checking test of the input-port controller.
//
// The testbench plays the arbiter and the upstream neighbour of an IP-port
// controller on a 4x4 torus. It checks: the output mask requested for random
// source/destination pairs against the set of moves that shorten the torus
// distance (computed here from distances, not from the direction rule);
// advancing on a grant; backtracking after a "blocked" answer (release pulse,
// the failed output removed from the mask); exhaustion of every profitable
// output leading to a "blocked" answer upstream; forwarding of the ack and
// busy-destination answers; return to idle when the request drops; and that
// a probe from the IP port addressed to its own switch finds no output (it
// may not turn back into the IP port).
module tb_bw_ctrl_in;
  import bw_pkg::*;
  localparam int unsigned NX = 4, NY = 4, X_W = 2, Y_W = 2;

  logic clk = 1'b0, rst_n;
  logic [X_W-1:0] my_x, hx;
  logic [Y_W-1:0] my_y, hy;
  logic req_in, arb_req, arb_release, arb_gnt, arb_blocked;
  logic [2:0] arb_gnt_port;
  ans_e ans_in, arb_ans;
  port_mask_t arb_mask;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bw_ctrl_in #(.NX(NX), .NY(NY), .X_W(X_W), .Y_W(Y_W), .MY_PORT(0)) dut (
    .clk, .rst_n, .my_x, .my_y, .req_in, .ans_in, .hdr_dst_x(hx), .hdr_dst_y(hy),
    .arb_req, .arb_mask, .arb_release, .arb_gnt, .arb_blocked, .arb_gnt_port, .arb_ans);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int tdist(int a, int b, int n);
    int d;
    d = ((b - a) % n + n) % n;
    return (d < n - d) ? d : n - d;
  endfunction

  function automatic port_mask_t ref_mask(int mx, int my, int dx, int dy);
    port_mask_t m;
    int d0;
    m = '0;
    d0 = tdist(mx, dx, NX) + tdist(my, dy, NY);
    if (d0 == 0) begin m[0] = 1'b1; return m; end
    if (tdist((mx + 1) % NX, dx, NX) < tdist(mx, dx, NX))      m[2] = 1'b1;
    if (tdist((mx + NX - 1) % NX, dx, NX) < tdist(mx, dx, NX)) m[4] = 1'b1;
    if (tdist(mx, dx, NX) == 0) begin m[2] = 1'b0; m[4] = 1'b0; end
    if (tdist((my + 1) % NY, dy, NY) < tdist(my, dy, NY))      m[1] = 1'b1;
    if (tdist((my + NY - 1) % NY, dy, NY) < tdist(my, dy, NY)) m[3] = 1'b1;
    m[0] = 1'b0;   // the IP port never leads back out of the IP port
    return m;
  endfunction

  task automatic start_probe(int mx, int my, int dx, int dy);
    @(negedge clk);
    my_x = X_W'(mx); my_y = Y_W'(my); hx = X_W'(dx); hy = Y_W'(dy);
    req_in = 1'b1;
    @(negedge clk);
  endtask

  task automatic drop_req();
    @(negedge clk);
    req_in = 1'b0; arb_gnt = 1'b0; arb_blocked = 1'b0; arb_ans = ANS_IDLE;
    @(negedge clk);
    chk(ans_in == ANS_IDLE, "answer idle after request drops");
    chk(!arb_req, "no request while idle");
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    port_mask_t m, m0;
    int p, tries;
    rst_n = 1'b0; req_in = 1'b0; arb_gnt = 1'b0; arb_blocked = 1'b0; arb_gnt_port = '0;
    arb_ans = ANS_IDLE; my_x = '0; my_y = '0; hx = '0; hy = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // 1. random masks, checked against torus distances
    repeat (200) begin
      int mx, my, dx, dy;
      mx = $urandom_range(0, 3); my = $urandom_range(0, 3);
      dx = $urandom_range(0, 3); dy = $urandom_range(0, 3);
      if (mx == dx && my == dy) dx = (dx + 1) % NX;
      start_probe(mx, my, dx, dy);
      chk(arb_req, "request after probe arrives");
      chk(arb_mask == ref_mask(mx, my, dx, dy),
          $sformatf("mask %b for (%0d,%0d)->(%0d,%0d), expected %b", arb_mask, mx, my, dx, dy,
                    ref_mask(mx, my, dx, dy)));
      drop_req();
    end
    // 2. depth-first search with backtracking, then ack
    start_probe(1, 1, 3, 2);          // East, West and North are profitable
    m0 = arb_mask;
    chk(m0 == 5'b10110, "three profitable outputs");
    tries = 0;
    m = m0;
    while (m != '0) begin
      p = 0;
      for (int k = NPORTS - 1; k >= 0; k--) if (m[k]) p = k;
      arb_gnt = 1'b1; arb_gnt_port = 3'(p);
      @(negedge clk);
      arb_gnt = 1'b0;
      chk(!arb_req, "no request while holding an output");
      chk(ans_in == ANS_IDLE, "answer idle while probe advances");
      tries++;
      if (tries < 3) begin
        arb_ans = ANS_BLOCKED;          // downstream blocked: backtrack
        #1 chk(arb_release, "release on blocked answer");
        @(negedge clk);
        arb_ans = ANS_IDLE;
        m[p] = 1'b0;
        chk(arb_req && arb_mask == m, $sformatf("retry mask %b, expected %b", arb_mask, m));
      end else begin
        arb_ans = ANS_ACK;
        @(negedge clk);
        chk(ans_in == ANS_ACK, "ack forwarded upstream");
        repeat (5) @(negedge clk);
        chk(ans_in == ANS_ACK && !arb_release, "circuit held during transmission");
        break;
      end
    end
    chk(tries == 3, "third output reached after two backtracks");
    req_in = 1'b0;
    #1 chk(arb_release, "release when request drops");
    drop_req();
    // 3. exhaustion: every profitable output blocked, then blocked upstream
    start_probe(0, 0, 1, 0);          // only East is profitable
    chk(arb_mask == 5'b00100, "single profitable output");
    arb_gnt = 1'b1; arb_gnt_port = 3'd2;
    @(negedge clk);
    arb_gnt = 1'b0; arb_ans = ANS_BLOCKED;
    @(negedge clk);
    arb_ans = ANS_IDLE;
    chk(arb_req && arb_mask == '0, "nothing left to try");
    arb_blocked = 1'b1;               // an empty mask is blocked
    @(negedge clk);
    arb_blocked = 1'b0;
    chk(ans_in == ANS_BLOCKED, "probe backtracks upstream");
    repeat (3) @(negedge clk);
    chk(ans_in == ANS_BLOCKED && !arb_req, "blocked answer held until request drops");
    drop_req();
    // 4. busy destination forwarded
    start_probe(2, 3, 2, 0);          // North is profitable (wraps)
    chk(arb_mask == 5'b00010, "north across the wrap-around");
    arb_gnt = 1'b1; arb_gnt_port = 3'd1;
    @(negedge clk);
    arb_gnt = 1'b0; arb_ans = ANS_BUSY;
    @(negedge clk);
    chk(ans_in == ANS_BUSY, "busy destination forwarded");
    drop_req();
    // 5. at the destination only the IP port is profitable
    start_probe(3, 3, 3, 3);
    chk(arb_mask == 5'b00000, "IP port excluded for a probe from the IP port");
    drop_req();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
