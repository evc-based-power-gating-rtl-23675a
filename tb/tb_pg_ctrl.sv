// tb_pg_ctrl: self-checking test of the power control unit.
// Checks, cycle by cycle, the idle-detect window (PG/PG_EVC asserted at once,
// sleep after T_IDLE_DETECT cycles), cancellation of idle detection by a WU
// request, and the wake-up timing: with the request seen in cycle 0, PG_EVC
// drops in cycle T_WAKEUP-MARGIN_EVC, PG in cycle T_WAKEUP-MARGIN and the
// router is fully charged in cycle T_WAKEUP+1 (the worked example's timing).
module tb_pg_ctrl;
  import evc_pkg::*;
  localparam int TW = 8, TI = 8, M = 4, ME = 6;
  logic clk = 0, rst_n = 0;
  logic router_empty, vc_nonempty, wu_any;
  pstate_e state;
  logic sleep, pg, pg_evc, writable, charged;
  int checks = 0, failures = 0;

  pg_ctrl #(.T_WAKEUP(TW), .T_IDLE_DETECT(TI), .MARGIN(M), .MARGIN_EVC(ME)) dut (
    .clk, .rst_n, .router_empty, .vc_nonempty, .wu_any,
    .state, .sleep, .pg, .pg_evc, .writable, .charged);

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
      $display("FAIL %s at %0t (state=%s pg=%b pg_evc=%b sleep=%b)", what, $time, state.name(), pg, pg_evc, sleep);
    end
  endtask

  initial begin
    router_empty = 0; vc_nonempty = 1; wu_any = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!pg && !pg_evc && charged && !sleep, "active after reset");
    // --- idle detection: empty from cycle 0 ---
    router_empty = 1; vc_nonempty = 0;
    for (int c = 1; c <= TI + 3; c++) begin
      @(negedge clk);
      check(pg && pg_evc, "PG asserted while idle");
      check(sleep == (c > TI), $sformatf("sleep timing, cycle %0d", c));
      check(charged == (c <= TI), "charged until sleep");
    end
    // --- wake-up: request seen in cycle 0 ---
    wu_any = 1;
    @(negedge clk);
    wu_any = 0;
    for (int c = 1; c <= TW + 3; c++) begin
      check(pg_evc == (c < TW - ME), $sformatf("PG_EVC in charge cycle %0d", c));
      check(pg == (c < TW - M), $sformatf("PG in charge cycle %0d", c));
      check(charged == (c > TW), $sformatf("charged in cycle %0d", c));
      check(!sleep, "not sleeping while charging");
      @(negedge clk);
      router_empty = 0;
    end
    // --- idle detection cancelled by WU ---
    router_empty = 1;
    repeat (3) @(negedge clk);
    check(pg && state == PS_IDLE, "idle again");
    wu_any = 1;
    @(negedge clk);
    check(!pg && !pg_evc && state == PS_ACTIVE, "WU during idle detect de-asserts PG");
    wu_any = 0; router_empty = 0;
    repeat (2) @(negedge clk);
    check(state == PS_ACTIVE, "stays active while not empty");
    // --- idle detection cancelled by a stored flit ---
    router_empty = 1;
    repeat (2) @(negedge clk);
    vc_nonempty = 1; router_empty = 0;
    @(negedge clk);
    check(state == PS_ACTIVE, "stored flit cancels idle detect");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
