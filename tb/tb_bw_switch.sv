// tb_bw_switch: end-to-end test of one BW switch at its default parameters.
//
// The switch sits at (1,1) of the default 4x4 torus. The testbench plays its
// four neighbours, which answer each incoming request with a programmable
// code (ack, blocked, busy destination) two clocks after it rises and return
// to idle one clock after it falls, and the local IP wrapper. Every input is
// driven with a source clock (period two switch clocks) whose falling edge
// launches the next word; the header is held on the data lines while the
// request is high and no ack has arrived.
//
// Scenarios: a probe from the IP port meets a blocked East link, backtracks
// and is acknowledged on West, then streams data; a probe arriving from West
// whose only profitable link is blocked is answered "blocked"; a probe that
// finds its only profitable link already held by another circuit is answered
// "blocked" without any downstream request; probes addressed to this switch
// reach the IP port and get a busy-destination answer, then an ack, and carry
// data while the first circuit is still streaming. Checked are the answers,
// the data words and their latency (a word launched on one falling source-
// clock edge leaves on the next), the set-up latency per hop (request out
// HDR_DELAY+2 clocks after request in) and the ack return (two clocks per
// hop), and that a "receiver not ready" answer (11) during transmission
// reaches the source without tearing the circuit down. Each mechanism is
// counted and must occur.
module tb_bw_switch;
  import bw_pkg::*;
  localparam int unsigned DATA_W = 16, NX = 4, NY = 4, HDR_DELAY = 4;
  localparam int unsigned LINK_W = DATA_W + 1, X_W = 2, Y_W = 2;

  logic clk = 1'b0, rst_n, src = 1'b0;
  logic [NPORTS-1:0][LINK_W-1:0] data_in, data_out;
  logic [NPORTS-1:0][DATA_W-1:0] payload;
  logic [NPORTS-1:0]             src_en, req_in, req_out;
  ans_e [NPORTS-1:0]             ans_in, ans_out, ans_mode;
  logic [NPORTS-1:0]             ovr;         // neighbour changes its answer mid-circuit
  ans_e                          ovr_val;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_advance = 0, n_backtrack = 0, n_blocked_up = 0, n_busy_dest = 0;
  int n_ack = 0, n_words = 0, n_release = 0, n_to_ip = 0, n_busy_link = 0, n_not_ready = 0;

  always #5  clk = ~clk;
  always #10 src = ~src;

  for (genvar p = 0; p < NPORTS; p++) begin : g_drv
    assign data_in[p] = {payload[p], src & src_en[p]};
  end

  bw_switch dut (.clk, .rst_n, .my_x(2'd1), .my_y(2'd1), .data_in, .data_out,
                 .req_in, .ans_in, .req_out, .ans_out);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // neighbours and IP wrapper: answer each request with ans_mode[p]
  for (genvar p = 0; p < NPORTS; p++) begin : g_nb
    initial begin
      ans_out[p] = ANS_IDLE;
      forever begin
        @(posedge clk);
        if (!rst_n) ans_out[p] <= ANS_IDLE;
        else if (ovr[p]) ans_out[p] <= ovr_val;
        else if (req_out[p]) begin
          if (ans_out[p] == ANS_IDLE) begin
            @(posedge clk);
            if (req_out[p]) ans_out[p] <= ans_mode[p];
          end
        end else ans_out[p] <= ANS_IDLE;
      end
    end
  end

  // mechanism monitors
  logic [NPORTS-1:0] req_out_q;
  ans_e [NPORTS-1:0] ans_in_q;
  always @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (req_out[p] && !req_out_q[p]) begin
        n_advance++;
        if (p == PORT_IP) n_to_ip++;
      end
      if (!req_out[p] && req_out_q[p]) begin
        n_release++;
        if (ans_out[p] == ANS_BLOCKED) n_backtrack++;
      end
      if (ans_in[p] != ans_in_q[p]) begin
        if (ans_in[p] == ANS_BLOCKED) n_blocked_up++;
        if (ans_in[p] == ANS_BUSY)    n_busy_dest++;
        if (ans_in[p] == ANS_ACK)     n_ack++;
      end
    end
    req_out_q <= req_out;
    ans_in_q  <= ans_in;
  end

  function automatic logic [DATA_W-1:0] header(int dx, int dy);
    logic [DATA_W-1:0] h;
    h = '0;
    h[X_W-1:0] = X_W'(dx);
    h[X_W+Y_W-1:X_W] = Y_W'(dy);
    return h;
  endfunction

  // launch a probe on input p and wait for a non-idle answer; returns the
  // answer and the number of falling clock edges from request to answer
  task automatic probe(input int p, input int dx, input int dy, output ans_e a,
                       output int t_ans);
    payload[p] = header(dx, dy);
    src_en[p]  = 1'b1;
    @(negedge clk);
    req_in[p] = 1'b1;
    t_ans = 0;
    while (ans_in[p] == ANS_IDLE && t_ans < 200) begin @(negedge clk); t_ans++; end
    a = ans_in[p];
  endtask

  task automatic release_probe(input int p);
    @(negedge clk);
    req_in[p] = 1'b0;
    repeat (3) @(negedge clk);
    chk(ans_in[p] == ANS_IDLE, "answer idle after release");
  endtask

  // stream n words from input pi to output po, checking every word
  task automatic stream(input int pi, input int po, input int n, input int seed);
    logic [DATA_W-1:0] w, prev;
    @(negedge src);
    prev = DATA_W'(seed);
    payload[pi] = prev;
    for (int k = 1; k <= n; k++) begin
      @(negedge src);
      w = DATA_W'(seed * 7 + k * 40503);
      payload[pi] = w;
      #1;
      chk(data_out[po][DATA_W:1] == prev,
          $sformatf("word %0d on port %0d: got %h exp %h", k, po, data_out[po][DATA_W:1], prev));
      chk(data_out[po][0] == 1'b0, "forwarded clock low after falling edge");
      n_words++;
      prev = w;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ans_e a;
    int t, t_req;
    rst_n = 1'b0; req_in = '0; src_en = '0; payload = '0; req_out_q = '0;
    ovr = '0; ovr_val = ANS_IDLE;
    ans_in_q = '{default: ANS_IDLE};
    ans_mode = '{default: ANS_ACK};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. IP -> (3,1): East and West profitable; East blocked, West acks
    ans_mode[PORT_EAST] = ANS_BLOCKED;
    ans_mode[PORT_WEST] = ANS_ACK;
    fork
      probe(PORT_IP, 3, 1, a, t);
      begin
        t_req = 0;
        @(posedge req_in[PORT_IP]);
        @(posedge clk);                 // first edge that sees the request
        forever begin
          #1;
          if (req_out[PORT_EAST] || t_req > 100) break;
          @(posedge clk);
          t_req++;
        end
      end
    join
    chk(t_req == HDR_DELAY + 2, $sformatf("set-up latency %0d clocks, expected %0d", t_req, HDR_DELAY + 2));
    chk(a == ANS_ACK, $sformatf("ack after backtracking, got %0d", a));
    chk(!req_out[PORT_EAST] && req_out[PORT_WEST], "circuit on West, East released");
    stream(PORT_IP, PORT_WEST, 20, 1);

    // 1b. receiver not ready during transmission: 11 passes upstream and the
    //     circuit stays up; 01 again resumes
    @(negedge clk); ovr_val = ANS_BUSY; ovr[PORT_WEST] = 1'b1;
    repeat (3) @(negedge clk);
    chk(ans_in[PORT_IP] == ANS_BUSY, "receiver-not-ready forwarded mid-circuit");
    chk(req_out[PORT_WEST], "circuit kept while receiver not ready");
    if (ans_in[PORT_IP] == ANS_BUSY) n_not_ready++;
    ovr_val = ANS_ACK;
    repeat (3) @(negedge clk);
    ovr[PORT_WEST] = 1'b0;
    chk(ans_in[PORT_IP] == ANS_ACK, "ack again after receiver ready");
    stream(PORT_IP, PORT_WEST, 4, 2);

    // 2. while IP->West streams: probe from East to (3,1): only West is
    //    profitable, and West is held: blocked with no request downstream
    begin
      int adv;
      adv = n_advance;
      probe(PORT_EAST, 3, 1, a, t);
      chk(a == ANS_BLOCKED, "busy link answered blocked");
      chk(n_advance == adv, "no downstream request for a busy link");
      if (a == ANS_BLOCKED) n_busy_link++;
      release_probe(PORT_EAST);
    end

    // 3. probe from West to (3,1): only East profitable, East blocked
    probe(PORT_WEST, 3, 1, a, t);
    chk(a == ANS_BLOCKED, "blocked answer sent upstream");
    chk(!req_out[PORT_EAST], "blocked output released");
    release_probe(PORT_WEST);

    // 4. probe from North to this switch: busy destination, then ack
    ans_mode[PORT_IP] = ANS_BUSY;
    probe(PORT_NORTH, 1, 1, a, t);
    chk(a == ANS_BUSY, "busy destination forwarded");
    release_probe(PORT_NORTH);
    ans_mode[PORT_IP] = ANS_ACK;
    probe(PORT_NORTH, 1, 1, a, t);
    chk(a == ANS_ACK, "destination ack");
    // set-up (HDR_DELAY+2 edges after the first edge seeing req_in), the
    // neighbour's two clocks, two clocks back through the switch, and one
    // for counting from the falling edge that raised req_in
    chk(t == HDR_DELAY + 2 + 2 + 2 + 1, $sformatf("request-to-ack %0d clocks, expected %0d", t, HDR_DELAY + 7));
    // two circuits at once: North->IP and IP->West
    fork
      stream(PORT_NORTH, PORT_IP, 16, 5);
      stream(PORT_IP, PORT_WEST, 16, 9);
    join
    release_probe(PORT_NORTH);
    release_probe(PORT_IP);
    chk(req_out == '0, "all circuits released");

    // 5. a released output is usable again: West circuit re-established
    ans_mode[PORT_EAST] = ANS_ACK;
    probe(PORT_SOUTH, 3, 1, a, t);   // from South: East and West profitable
    chk(a == ANS_ACK, "re-established circuit");
    stream(PORT_SOUTH, req_out[PORT_EAST] ? PORT_EAST : PORT_WEST, 8, 3);
    release_probe(PORT_SOUTH);

    chk(n_advance > 0,    "mechanism: probe advance");
    chk(n_backtrack > 0,  "mechanism: backtrack on blocked link");
    chk(n_busy_link > 0,  "mechanism: blocked by a busy output");
    chk(n_blocked_up > 0, "mechanism: blocked answer upstream");
    chk(n_busy_dest > 0,  "mechanism: busy destination");
    chk(n_ack > 0,        "mechanism: circuit acknowledge");
    chk(n_to_ip > 0,      "mechanism: delivery to the IP port");
    chk(n_words > 0,      "mechanism: wave-pipelined data");
    chk(n_release > 0,    "mechanism: release");
    chk(n_not_ready > 0,  "mechanism: receiver not ready during transmission");
    $display("mechanisms: advance=%0d backtrack=%0d busy_link=%0d blocked_up=%0d busy_dest=%0d ack=%0d to_ip=%0d words=%0d release=%0d not_ready=%0d",
             n_advance, n_backtrack, n_busy_link, n_blocked_up, n_busy_dest, n_ack, n_to_ip, n_words, n_release, n_not_ready);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
