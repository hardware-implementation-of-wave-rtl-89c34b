// tb_bw_torus: network-level test of BW switches on a 4x4 folded torus.
//
// Sixteen switches at their default parameters are wired as a torus: the
// East port of (x,y) meets the West port of (x+1,y) and the North port of
// (x,y) meets the South port of (x,y+1), wrapping around at the edges. Each
// switch's IP port has a wrapper model that sends N_MSG messages to random
// destinations while the others do the same, so probes collide, backtrack
// inside the network, get "blocked" or "busy destination" at the source and
// retry. The test checks that every message is delivered complete and in
// order (no data loss, no mixing of streams), that the network never
// deadlocks (everything finishes before the watchdog), and counts the
// backtracks seen on the links, the blocked and busy answers at the sources,
// and the delivered words; each of these must occur.
module tb_bw_torus;
  import bw_pkg::*;
  localparam int unsigned NX = 4, NY = 4, DATA_W = 16, LINK_W = DATA_W + 1;
  localparam int unsigned X_W = 2, Y_W = 2, N = NX * NY;
  localparam int unsigned N_MSG = 20, N_WORDS = 16;

  logic clk = 1'b0, rst_n, src = 1'b0;
  always #5  clk = ~clk;
  always #10 src = ~src;

  logic [NPORTS-1:0][LINK_W-1:0] d_in  [N];
  logic [NPORTS-1:0][LINK_W-1:0] d_out [N];
  logic [NPORTS-1:0]             r_in  [N];
  logic [NPORTS-1:0]             r_out [N];
  ans_e [NPORTS-1:0]             a_in  [N];
  ans_e [NPORTS-1:0]             a_out [N];
  logic [N-1:0] done;
  int msgs_sent [N], msgs_rcvd [N], words_rcvd [N], rx_errors [N], n_blocked [N], n_busy [N];
  int checks = 0, failures = 0, n_backtrack = 0;

  function automatic int idx(int x, int y);
    return ((y + NY) % NY) * NX + ((x + NX) % NX);
  endfunction

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int I = y * NX + x;
      localparam int IN_ = ((y + 1) % NY) * NX + x;            // north neighbour
      localparam int IE  = y * NX + (x + 1) % NX;              // east
      localparam int IS  = ((y + NY - 1) % NY) * NX + x;       // south
      localparam int IW  = y * NX + (x + NX - 1) % NX;         // west

      bw_switch u_sw (.clk, .rst_n, .my_x(X_W'(x)), .my_y(Y_W'(y)),
        .data_in(d_in[I]), .data_out(d_out[I]), .req_in(r_in[I]), .ans_in(a_in[I]),
        .req_out(r_out[I]), .ans_out(a_out[I]));

      // links: what arrives on a port is what the neighbour sends out of the
      // facing port, and the answer to our request comes from its input side
      assign d_in[I][PORT_NORTH]  = d_out[IN_][PORT_SOUTH];
      assign r_in[I][PORT_NORTH]  = r_out[IN_][PORT_SOUTH];
      assign a_out[I][PORT_NORTH] = a_in[IN_][PORT_SOUTH];
      assign d_in[I][PORT_EAST]   = d_out[IE][PORT_WEST];
      assign r_in[I][PORT_EAST]   = r_out[IE][PORT_WEST];
      assign a_out[I][PORT_EAST]  = a_in[IE][PORT_WEST];
      assign d_in[I][PORT_SOUTH]  = d_out[IS][PORT_NORTH];
      assign r_in[I][PORT_SOUTH]  = r_out[IS][PORT_NORTH];
      assign a_out[I][PORT_SOUTH] = a_in[IS][PORT_NORTH];
      assign d_in[I][PORT_WEST]   = d_out[IW][PORT_EAST];
      assign r_in[I][PORT_WEST]   = r_out[IW][PORT_EAST];
      assign a_out[I][PORT_WEST]  = a_in[IW][PORT_EAST];

      bw_wrapper_model #(.NX(NX), .NY(NY), .X_W(X_W), .Y_W(Y_W), .DATA_W(DATA_W),
                         .MY_X(x), .MY_Y(y), .N_MSG(N_MSG), .N_WORDS(N_WORDS)) u_wrap (
        .clk, .rst_n, .src,
        .tx_link(d_in[I][PORT_IP]), .tx_req(r_in[I][PORT_IP]), .tx_ans(a_in[I][PORT_IP]),
        .rx_link(d_out[I][PORT_IP]), .rx_req(r_out[I][PORT_IP]), .rx_ans(a_out[I][PORT_IP]),
        .done(done[I]), .msgs_sent(msgs_sent[I]), .msgs_rcvd(msgs_rcvd[I]),
        .words_rcvd(words_rcvd[I]), .rx_errors(rx_errors[I]),
        .n_blocked(n_blocked[I]), .n_busy(n_busy[I]));

      // backtrack: a link request withdrawn after a "blocked" answer
      logic [NPORTS-1:0] r_q;
      always @(posedge clk) begin
        for (int p = 1; p < NPORTS; p++)
          if (r_q[p] && !r_out[I][p] && a_out[I][p] == ANS_BLOCKED) n_backtrack++;
        r_q <= r_out[I];
      end
    end
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: deadlock or livelock, done=%b", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent, rcvd, words, errs, blk, bsy;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done == '1);
    repeat (50) @(posedge clk);
    sent = 0; rcvd = 0; words = 0; errs = 0; blk = 0; bsy = 0;
    for (int i = 0; i < N; i++) begin
      sent += msgs_sent[i]; rcvd += msgs_rcvd[i]; words += words_rcvd[i];
      errs += rx_errors[i]; blk += n_blocked[i]; bsy += n_busy[i];
      chk(msgs_sent[i] == N_MSG, $sformatf("node %0d sent %0d messages", i, msgs_sent[i]));
    end
    chk(errs == 0, $sformatf("%0d receive errors", errs));
    chk(rcvd == N * N_MSG, $sformatf("%0d of %0d messages received", rcvd, N * N_MSG));
    chk(words == N * N_MSG * N_WORDS, $sformatf("%0d of %0d words received", words, N * N_MSG * N_WORDS));
    chk(n_backtrack > 0, "mechanism: backtrack inside the network");
    chk(blk > 0, "mechanism: blocked answer at a source");
    chk(bsy > 0, "mechanism: busy destination");
    $display("messages=%0d words=%0d backtracks=%0d blocked_at_source=%0d busy_dest=%0d time=%0t",
             rcvd, words, n_backtrack, blk, bsy, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
