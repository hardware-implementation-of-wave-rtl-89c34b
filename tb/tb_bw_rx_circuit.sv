// tb_bw_rx_circuit: self-checking test of the internal receiver stage.
//
// Drives random data with a forwarded clock in bit 0 and checks that the data
// bits are captured on the falling edge only, held across the rising edge and
// across data changes, that the clock bit passes through, and that reset
// clears the register.
module tb_bw_rx_circuit;
  localparam int unsigned LINK_W = 17;
  logic              rst_n;
  logic [LINK_W-1:0] xin, lout;
  logic [LINK_W-1:1] held;
  int checks = 0, failures = 0;

  bw_rx_circuit #(.LINK_W(LINK_W)) dut (.rst_n, .xbar_in(xin), .link_out(lout));

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
    xin = '0; xin[0] = 1'b1; rst_n = 1'b0;
    #5; chk({16'h0, 1'b1}, "reset");
    rst_n = 1'b1; #5;
    repeat (500) begin
      xin[LINK_W-1:1] = ($urandom);
      #2;
      held = xin[LINK_W-1:1];
      xin[0] = 1'b0;                      // falling edge: capture
      #1; chk({held, 1'b0}, "after falling edge");
      xin[LINK_W-1:1] = ($urandom);
      #2; chk({held, 1'b0}, "data change while clock low");
      xin[0] = 1'b1;                      // rising edge: no capture
      #1; chk({held, 1'b1}, "after rising edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
