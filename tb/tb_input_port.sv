// tb_input_port: self-checking test of one router input port.
// Checks buffering of normal and express-terminating flits, credit pulses
// on pops, the one-cycle EVC-latch bypass of an express flit, a normal flit
// held in the latch (and its order ahead of buffered flits of the same VC),
// the same-cycle direct link while the latch is held, and the latch token.
module tb_input_port;
  import evc_pkg::*;
  logic clk = 0, rst_n = 0;
  link_t in, pass;
  logic writable;
  logic [NUM_VC-1:0] pop, front_valid, vc_full;
  flit_t front [NUM_VC];
  logic [NUM_VN-1:0] credit, ecredit;
  logic latch_tok, vc_nonempty, port_empty, ev_latch_pass, ev_direct, ev_nlatch;
  int checks = 0, failures = 0;

  input_port #(.CTRL_DEPTH(1), .DATA_DEPTH(5)) dut (
    .clk, .rst_n, .in, .writable, .pop, .front_valid, .front, .vc_full, .pass,
    .credit, .ecredit, .latch_tok, .vc_nonempty, .port_empty,
    .ev_latch_pass, .ev_direct, .ev_nlatch);

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

  function automatic flit_t mk(input int vn, input logic ex, input int eh, input logic tl, input int tag);
    flit_t f;
    f = '0;
    f.ftype = FT_HEADTAIL; f.vn = 2'(vn); f.express = ex; f.ehops = 2'(eh);
    f.to_latch = tl; f.data = DATA_W'(tag);
    return f;
  endfunction

  // drive one flit for one cycle (set at negedge, sampled at next posedge)
  task automatic send(input flit_t f);
    in.valid = 1; in.flit = f;
  endtask

  initial begin
    in = '0; writable = 1; pop = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(port_empty && !vc_nonempty, "empty after reset");
    // 1. normal flit into N-VC 1
    send(mk(1, 0, 0, 0, 11));
    @(negedge clk); in = '0;
    check(front_valid == 6'b000010 && front[1].data == 11, "N flit buffered in VC1");
    check(vc_nonempty && !port_empty, "non-empty");
    pop[1] = 1; #1;
    check(credit == 3'b010 && ecredit == 0, "credit pulse on pop of N-VC1");
    @(negedge clk); pop = '0;
    check(front_valid == 0, "VC1 empty after pop");
    // 2. express flit bypassing: latch, pass next cycle
    send(mk(2, 1, 2, 0, 22)); #1;
    check(ev_latch_pass && !pass.valid, "express flit captured in latch");
    @(negedge clk); in = '0; #1;
    check(pass.valid && pass.flit.data == 22 && pass.flit.ehops == 1, "express flit passes next cycle, ehops-1");
    check(front_valid == 0, "bypass flit not buffered");
    @(negedge clk); #1;
    check(!pass.valid, "pass lasts one cycle");
    // 3. express flit terminating here: stored in E-VC of VN0
    @(negedge clk);
    send(mk(0, 1, 0, 0, 33));
    @(negedge clk); in = '0;
    check(front_valid == 6'b001000 && front[3].data == 33, "sink flit in E-VC0");
    pop[3] = 1; #1;
    check(ecredit == 3'b001 && credit == 0, "E-VC credit pulse");
    @(negedge clk); pop = '0;
    // 4. normal flit held in latch while VCs unpowered
    writable = 0;
    send(mk(2, 0, 0, 1, 44)); #1;
    check(ev_nlatch, "normal flit held in latch");
    @(negedge clk);
    check(front_valid == 6'b000100 && front[2].data == 44, "held flit is front of N-VC2");
    // 5. express flit arrives while latch held: direct link, same cycle
    send(mk(1, 1, 1, 0, 55)); #1;
    check(ev_direct && pass.valid && pass.flit.data == 55 && pass.flit.ehops == 0, "direct link same cycle");
    @(negedge clk); in = '0; #1;
    check(!pass.valid && front[2].data == 44, "latch still holds the normal flit");
    // 6. VCs powered again: buffered flit of VC2 queues behind the held flit
    writable = 1;
    send(mk(2, 0, 0, 0, 66));
    @(negedge clk); in = '0;
    check(front[2].data == 44, "held flit still first");
    pop[2] = 1; #1;
    check(latch_tok && credit == 0, "latch token, no credit, when held flit leaves");
    @(negedge clk); pop = '0; #1;
    check(front_valid[2] && front[2].data == 66, "buffered flit follows");
    pop[2] = 1; #1;
    check(!latch_tok && credit == 3'b100, "credit when buffered flit leaves");
    @(negedge clk); pop = '0;
    check(port_empty, "empty at end");
    // 7. fill data VC1 to full (5 flits)
    for (int i = 0; i < 5; i++) begin
      send(mk(1, 0, 0, 0, 100 + i));
      @(negedge clk);
    end
    in = '0;
    check(vc_full[1] && !vc_full[2], "data VC holds five flits");
    for (int i = 0; i < 5; i++) begin
      check(front[1].data == DATA_W'(100 + i), "FIFO order");
      pop[1] = 1;
      @(negedge clk); pop = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
