// bw_wrapper_model: behavioural model of the network wrapper that connects an
// IP to port 0 of a BW switch (testbench only, not synthesizable).
//
// Source side: sends N_MSG messages of N_WORDS words to random other nodes.
// For each, it puts the probe header (destination x in the low bits, y above
// it) on the link with its source clock running and raises req. On an ack
// (01) it streams the words, one per source-clock period, launched on the
// falling edge; each word carries bit 15 set, the sender's id in bits 14:8
// and a sequence number in bits 7:0. After the last word it sends idle words
// (bit 15 clear) until the message has drained through the path, then drops
// req. On "blocked" (10) or
// "busy destination" (11) it drops req, backs off for a random time and
// probes again.
// Destination side: answers a request with ack, or with "busy destination"
// at random (1 in BUSY_ONE_IN), samples the incoming link on each falling
// edge of the forwarded clock and checks that each message arrives complete
// and in order from a single sender.
module bw_wrapper_model
  import bw_pkg::*;
#(
  parameter int unsigned NX = 4,
  parameter int unsigned NY = 4,
  parameter int unsigned X_W = 2,
  parameter int unsigned Y_W = 2,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 0,
  parameter int unsigned N_MSG = 4,
  parameter int unsigned N_WORDS = 8,
  parameter int unsigned BUSY_ONE_IN = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              src,          // free-running source clock
  // toward the switch (switch's data_in[0], req_in[0], ans_in[0])
  output logic [DATA_W:0]   tx_link,
  output logic              tx_req,
  input  ans_e              tx_ans,
  // from the switch (switch's data_out[0], req_out[0], ans_out[0])
  input  logic [DATA_W:0]   rx_link,
  input  logic              rx_req,
  output ans_e              rx_ans,
  // statistics
  output logic              done,
  output int                msgs_sent,
  output int                msgs_rcvd,
  output int                words_rcvd,
  output int                rx_errors,
  output int                n_blocked,
  output int                n_busy
);
  localparam int unsigned ID = MY_Y * NX + MY_X;

  logic              src_en;
  logic [DATA_W-1:0] word;

  assign tx_link = {word, src & src_en};

  // ---------------- source side ----------------
  initial begin
    int dx, dy, wait_cyc;
    tx_req = 1'b0; src_en = 1'b0; word = '0; done = 1'b0;
    msgs_sent = 0; n_blocked = 0; n_busy = 0;
    @(posedge rst_n);
    repeat ($urandom_range(1, 20)) @(posedge clk);
    for (int m = 0; m < N_MSG; m++) begin
      do begin
        dx = $urandom_range(0, NX - 1);
        dy = $urandom_range(0, NY - 1);
      end while (dx == MY_X && dy == MY_Y);
      forever begin
        word = '0;
        word[X_W-1:0] = X_W'(dx);
        word[X_W+Y_W-1:X_W] = Y_W'(dy);
        src_en = 1'b1;
        @(negedge clk);
        tx_req = 1'b1;
        while (tx_ans == ANS_IDLE) @(negedge clk);
        if (tx_ans == ANS_ACK) break;
        if (tx_ans == ANS_BLOCKED) n_blocked++;
        else n_busy++;
        tx_req = 1'b0;
        wait_cyc = $urandom_range(4, 40);
        repeat (wait_cyc) @(negedge clk);
      end
      for (int k = 0; k < N_WORDS; k++) begin
        @(negedge src);
        word = {1'b1, 7'(ID), 8'(k)};
      end
      @(negedge src);
      word = '0;                              // idle word: bit 15 clear
      repeat (NX + NY + 4) @(negedge src);   // let the last word drain
      tx_req = 1'b0;
      src_en = 1'b0;
      msgs_sent++;
      while (tx_ans != ANS_IDLE) @(negedge clk);
      repeat ($urandom_range(2, 10)) @(negedge clk);
    end
    done = 1'b1;
  end

  // ---------------- destination side ----------------
  logic in_msg;
  int   exp_seq, sender;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_ans <= ANS_IDLE;
    else if (!rx_req) rx_ans <= ANS_IDLE;
    else if (rx_ans == ANS_IDLE)
      rx_ans <= ($urandom_range(1, BUSY_ONE_IN) == 1) ? ANS_BUSY : ANS_ACK;
  end

  initial begin
    msgs_rcvd = 0; words_rcvd = 0; rx_errors = 0; in_msg = 1'b0; exp_seq = 0; sender = -1;
  end

  // a message starts with an ack and ends when the request drops
  always @(posedge clk) begin
    if (rst_n && rx_req && rx_ans == ANS_ACK && !in_msg) begin
      in_msg  <= 1'b1;
      exp_seq <= 0;
      sender  <= -1;
    end
    if (in_msg && !rx_req) begin
      in_msg <= 1'b0;
      if (exp_seq == int'(N_WORDS)) msgs_rcvd <= msgs_rcvd + 1;
      else begin
        rx_errors <= rx_errors + 1;
        $display("node %0d: message from %0d ended after %0d of %0d words", ID, sender, exp_seq, N_WORDS);
      end
    end
  end

  always @(negedge rx_link[0]) begin
    if (in_msg && rx_req && rx_link[DATA_W]) begin
      if (int'(rx_link[8:1]) != exp_seq || (sender >= 0 && int'(rx_link[15:9]) != sender)) begin
        rx_errors <= rx_errors + 1;
        $display("node %0d: bad word %h (expected seq %0d from %0d)", ID, rx_link[DATA_W:1], exp_seq, sender);
      end
      sender     <= int'(rx_link[15:9]);
      exp_seq    <= exp_seq + 1;
      words_rcvd <= words_rcvd + 1;
    end
  end
endmodule
