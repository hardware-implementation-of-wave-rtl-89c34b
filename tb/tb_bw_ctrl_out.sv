// tb_bw_ctrl_out: self-checking test of the output-port controller.
//
// Checks, cycle by cycle, that: the port is free after reset; req_out rises
// exactly HDR_DELAY+1 clocks after an allocation pulse; the neighbour's answer
// appears on the monitor bus one clock later; a release drops req_out in one
// clock; the port stays unavailable while the neighbour still answers and
// becomes free once the answer is back to idle; a release during the header
// wait never raises req_out.
module tb_bw_ctrl_out;
  import bw_pkg::*;
  localparam int unsigned HDR_DELAY = 4;

  logic clk = 1'b0, rst_n, alloc, rel, req_out, free;
  ans_e ans_out, ans_mon;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bw_ctrl_out #(.HDR_DELAY(HDR_DELAY)) dut (
    .clk, .rst_n, .alloc, .release_i(rel), .req_out, .ans_out, .ans_mon, .free);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst_n = 1'b0; alloc = 1'b0; rel = 1'b0; ans_out = ANS_IDLE;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    chk(free && !req_out, "free after reset");
    for (int r = 0; r < 4; r++) begin
      ans_e a;
      a = (r == 0) ? ANS_ACK : (r == 1) ? ANS_BLOCKED : (r == 2) ? ANS_BUSY : ANS_ACK;
      alloc = 1'b1;
      @(posedge clk); #1 alloc = 1'b0;
      chk(!free, "busy once allocated");
      n = 0;
      while (!req_out && n < 20) begin @(posedge clk); #1 n++; end
      chk(n == HDR_DELAY + 1, $sformatf("req_out %0d clocks after alloc, expected %0d", n, HDR_DELAY + 1));
      chk(ans_mon == ANS_IDLE, "monitor idle before answer");
      ans_out = a;
      @(posedge clk); #1;
      chk(ans_mon == a, "answer reaches monitor bus");
      rel = 1'b1;
      @(posedge clk); #1 rel = 1'b0;
      chk(!req_out, "req_out drops after release");
      chk(!free, "not free while neighbour still answers");
      repeat (3) @(posedge clk); #1;
      chk(!free, "still draining");
      ans_out = ANS_IDLE;
      @(posedge clk); #1;
      @(posedge clk); #1;
      chk(free, "free once answer idle");
    end
    // release during the header wait
    alloc = 1'b1; @(posedge clk); #1 alloc = 1'b0;
    @(posedge clk); #1 rel = 1'b1; @(posedge clk); #1 rel = 1'b0;
    repeat (HDR_DELAY + 3) begin @(posedge clk); #1 chk(!req_out, "no request after early release"); end
    chk(free, "free after early release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
