// tb_bw_tx_circuit: self-checking test of the internal transmitter stage.
//
// Drives random data with a source clock in bit 0 and checks that after each
// rising edge of that clock the data bits hold the value present at the edge,
// that they hold still on the falling edge and while data changes between
// edges, and that the clock bit is forwarded unchanged. Also checks reset.
module tb_bw_tx_circuit;
  localparam int unsigned LINK_W = 17;
  logic              rst_n;
  logic [LINK_W-1:0] lin, lout;
  logic [LINK_W-1:1] held;
  int checks = 0, failures = 0;

  bw_tx_circuit #(.LINK_W(LINK_W)) dut (.rst_n, .link_in(lin), .link_out(lout));

  task automatic chk(input logic [LINK_W-1:0] exp, input string what);
    checks++;
    if (lout !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, lout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lin = '0; rst_n = 1'b0;
    #5; chk('0, "reset");
    rst_n = 1'b1; #5;
    repeat (500) begin
      lin[LINK_W-1:1] = ($urandom);
      #2;
      held = lin[LINK_W-1:1];
      lin[0] = 1'b1;                      // rising edge: capture
      #1; chk({held, 1'b1}, "after rising edge");
      lin[LINK_W-1:1] = ($urandom);       // data moves, output must not
      #2; chk({held, 1'b1}, "data change while clock high");
      lin[0] = 1'b0;                      // falling edge: no capture
      #1; chk({held, 1'b0}, "after falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
