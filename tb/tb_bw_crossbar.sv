// tb_bw_crossbar: self-checking test of the mux crossbar.
//
// Applies random link words, selects and enables, and compares every output
// with a reference built independently from the rule "output o carries input
// sel[o] when enabled and sel[o] is another port, else zero". Also checks one
// full permutation explicitly. The crossbar is combinational; the testbench
// waits one time step after each change.
module tb_bw_crossbar;
  import bw_pkg::*;
  localparam int unsigned LINK_W = 17;

  logic [NPORTS-1:0][LINK_W-1:0] din, dout;
  logic [NPORTS-1:0][2:0]        sel;
  logic [NPORTS-1:0]             en;
  int checks = 0, failures = 0;

  bw_crossbar #(.LINK_W(LINK_W)) dut (.data_in(din), .sel, .en, .data_out(dout));

  task automatic compare();
    logic [LINK_W-1:0] exp;
    for (int o = 0; o < NPORTS; o++) begin
      if (en[o] && int'(sel[o]) != o && int'(sel[o]) < NPORTS) exp = din[sel[o]];
      else exp = '0;
      checks++;
      if (dout[o] !== exp) begin
        failures++;
        $display("FAIL out%0d sel=%0d en=%0b got %h exp %h", o, sel[o], en[o], dout[o], exp);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // explicit permutation: out o takes input (o+1)%5
    for (int p = 0; p < NPORTS; p++) din[p] = LINK_W'(32'h1111 * (p + 1));
    for (int o = 0; o < NPORTS; o++) sel[o] = 3'((o + 1) % NPORTS);
    en = '1;
    #1;
    for (int o = 0; o < NPORTS; o++) begin
      checks++;
      if (dout[o] !== LINK_W'(32'h1111 * (((o + 1) % NPORTS) + 1))) begin
        failures++;
        $display("FAIL permutation out%0d = %h", o, dout[o]);
      end
    end
    // U-turn selection is never forwarded
    sel[2] = 3'd2; #1; checks++;
    if (dout[2] !== '0) begin failures++; $display("FAIL u-turn forwarded"); end
    repeat (2000) begin
      for (int p = 0; p < NPORTS; p++) begin
        din[p] = LINK_W'($urandom);
        sel[p] = 3'($urandom_range(0, 4));
      end
      en = NPORTS'($urandom);
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
