// tb_starvation_ctrl: self-checking test of starvation detection and
// release. Holds a request blocked by express flits and checks that freeze
// rises after exactly STARVE_TH blocked cycles, that a gap in the express
// stream used by a local flit restarts the count, and that freeze drops only
// when every VC recorded at detection has sent its tail.
module tb_starvation_ctrl;
  localparam int N = 8, TH = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] want, tail_sent;
  logic st_wait, epass, n_moved, freeze, detect;
  int checks = 0, failures = 0;

  starvation_ctrl #(.NREQ(N), .STARVE_TH(TH)) dut (
    .clk, .rst_n, .want, .tail_sent, .st_wait, .epass, .n_moved, .freeze, .detect);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    want = '0; tail_sent = '0; st_wait = 0; epass = 0; n_moved = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // blocked for TH-1 cycles, then one free cycle: no freeze
    want = 8'b0000_0100; epass = 1;
    repeat (TH - 1) begin @(negedge clk); check(!freeze, "no early freeze"); end
    epass = 0; n_moved = 1;
    @(negedge clk);
    n_moved = 0; epass = 1;
    // blocked again: detection after exactly TH cycles
    for (int c = 1; c <= TH; c++) begin
      check(detect == (c == TH), $sformatf("detect pulse cycle %0d", c));
      @(negedge clk);
      check(freeze == (c == TH), $sformatf("freeze after cycle %0d", c));
    end
    // a second VC starts waiting after detection: not recorded
    want = 8'b0100_0100;
    repeat (3) begin @(negedge clk); check(freeze, "freeze held"); end
    tail_sent = 8'b0100_0000;
    @(negedge clk);
    tail_sent = '0;
    check(freeze, "unrecorded tail does not release");
    tail_sent = 8'b0000_0100;
    @(negedge clk);
    tail_sent = '0; want = '0;
    check(!freeze, "recorded tail releases freeze");
    // starvation of a switched flit alone (st_wait)
    st_wait = 1; epass = 1;
    repeat (TH) @(negedge clk);
    check(freeze, "st_wait starvation detected");
    @(negedge clk);
    check(freeze, "held while the switched flit waits");
    st_wait = 0;
    @(negedge clk);
    check(!freeze, "released when the switched flit has left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
