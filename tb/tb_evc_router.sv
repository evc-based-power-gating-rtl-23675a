// tb_evc_router: self-checking test of a single EVC router at mesh
// position (1,1), with its neighbours modelled by the testbench.
// Checks: the 4-stage pipeline latency of a locally injected normal flit,
// an express launch that waits for PG_EVC while WU_EVC is raised, the
// two-cycle latch bypass of an express flit, sending into the EVC latch of a
// powered-off neighbour under the latch token, ejection, starvation freeze
// requests, and the power-off / wake-up sequence.
module tb_evc_router;
  import evc_pkg::*;
  localparam int STH = 4;
  logic clk = 0, rst_n = 0;
  link_t              in_link [NUM_DIR], out_link [NUM_DIR];
  logic [NUM_VN-1:0]  credit_out [NUM_DIR], credit_in [NUM_DIR];
  logic [NUM_VN-1:0]  ecredit_out [NUM_DIR], ecredit_in [NUM_DIR];
  logic [NUM_DIR-1:0] latch_tok_out, latch_tok_in, wu_out, wu_in, pg_in;
  logic [NUM_DIR-1:0] freeze_out, freeze_in, stop_out, stop_in;
  logic [NUM_DIR-1:0] wu_evc_out, wu_evc_in, pg_evc_out, pg_evc_in;
  logic pg_out, inj_valid, inj_ready, ej_valid;
  flit_t inj_flit, ej_flit;
  pstate_e pstate;
  router_ev_t ev;
  int checks = 0, failures = 0;

  evc_router #(.STARVE_TH(STH)) dut (
    .clk, .rst_n, .my_x(3'd1), .my_y(3'd1),
    .in_link, .out_link, .credit_out, .credit_in, .latch_tok_out, .latch_tok_in,
    .wu_out, .wu_in, .pg_out, .pg_in, .freeze_out, .freeze_in, .stop_out, .stop_in,
    .wu_evc_out, .wu_evc_in, .pg_evc_out, .pg_evc_in, .ecredit_out, .ecredit_in,
    .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit, .pstate, .ev);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
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

  function automatic flit_t mk(input ftype_e t, input int vn, input int dx, input int dy, input int tag);
    flit_t f;
    f = '0;
    f.ftype = t; f.vn = 2'(vn); f.dst_x = 3'(dx); f.dst_y = 3'(dy); f.data = DATA_W'(tag);
    return f;
  endfunction

  // inject one flit; returns after the edge that accepted it
  task automatic inject(input flit_t f);
    inj_valid = 1; inj_flit = f;
    do @(posedge clk); while (!inj_ready);
    @(negedge clk);
    inj_valid = 0;
  endtask

  // wait (from a negedge) until out_link[d] is valid; returns cycles waited
  task automatic wait_out(input int d, output int n, output flit_t f);
    n = 0;
    while (!out_link[d].valid && n < 100) begin @(negedge clk); n++; end
    f = out_link[d].flit;
  endtask

  initial begin
    int n; flit_t f;
    for (int d = 0; d < NUM_DIR; d++) begin
      in_link[d] = '0; credit_in[d] = '0; ecredit_in[d] = '0;
    end
    latch_tok_in = '0; wu_in = 4'b0100; pg_in = '0; freeze_in = '0; stop_in = '0;
    wu_evc_in = '0; pg_evc_in = '0;
    inj_valid = 0; inj_flit = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pstate == PS_ACTIVE && !pg_out, "active while a neighbour requests");

    // 1. normal flit one hop east: BW, VA, SA, ST, then on the link
    inject(mk(FT_HEADTAIL, 0, 2, 1, 1));
    wait_out(D_EAST, n, f);
    check(n == 3, $sformatf("pipeline latency: on link %0d cycles after buffer write (expect 3)", n));
    check(f.data == 1 && !f.express && !f.to_latch, "normal flit unchanged");
    credit_in[D_EAST] = 3'b001; @(negedge clk); credit_in[D_EAST] = '0;

    // 2. express launch towards (5,1) waits for PG_EVC
    pg_evc_in[D_EAST] = 1;
    inject(mk(FT_HEADTAIL, 0, 5, 1, 2));
    repeat (6) @(negedge clk);
    check(wu_evc_out[D_EAST] && !wu_out[D_EAST], "WU_EVC raised for the sink");
    check(!out_link[D_EAST].valid, "blocked while PG_EVC asserted");
    pg_evc_in[D_EAST] = 0;
    wait_out(D_EAST, n, f);
    check(f.data == 2 && f.express && f.ehops == 2'(EVC_HOPS - 1), "express flit launched with ehops=2");
    check(n == 2, $sformatf("launch %0d cycles after PG_EVC drop (expect 2)", n));
    @(negedge clk);
    check(!wu_evc_out[D_EAST], "WU_EVC released");
    ecredit_in[D_EAST] = 3'b001; @(negedge clk); ecredit_in[D_EAST] = '0;

    // 3. express flit from the west bypasses through the latch
    in_link[D_WEST].valid = 1;
    in_link[D_WEST].flit  = mk(FT_HEADTAIL, 1, 6, 1, 3);
    in_link[D_WEST].flit.express = 1; in_link[D_WEST].flit.ehops = 2;
    @(negedge clk);
    in_link[D_WEST] = '0;
    check(!out_link[D_EAST].valid, "bypass: in latch");
    @(negedge clk);
    check(out_link[D_EAST].valid && out_link[D_EAST].flit.data == 3 && out_link[D_EAST].flit.ehops == 1,
          "bypass: on the east link two cycles after arrival, ehops-1");
    check(ev.latch_pass == 0, "event only on capture");

    // 4. two-flit packet to a powered-off east neighbour: latch token
    pg_in[D_EAST] = 1;
    inj_valid = 1; inj_flit = mk(FT_HEAD, 1, 2, 1, 40);
    do @(posedge clk); while (!inj_ready);
    @(negedge clk); inj_flit = mk(FT_TAIL, 1, 2, 1, 41);
    do @(posedge clk); while (!inj_ready);
    @(negedge clk); inj_valid = 0;
    wait_out(D_EAST, n, f);
    check(f.data == 40 && f.to_latch, "head sent into the neighbour's latch");
    check(wu_out[D_EAST], "WU raised for the powered-off neighbour");
    repeat (6) @(negedge clk);
    check(!out_link[D_EAST].valid, "tail waits for the latch token");
    latch_tok_in[D_EAST] = 1; @(negedge clk); latch_tok_in[D_EAST] = 0;
    wait_out(D_EAST, n, f);
    check(f.data == 41 && f.to_latch && n <= 3, "tail sent after the token returned");
    latch_tok_in[D_EAST] = 1; @(negedge clk); latch_tok_in[D_EAST] = 0;
    pg_in[D_EAST] = 0;

    // 5. ejection of a normal flit from the north
    in_link[D_NORTH].valid = 1;
    in_link[D_NORTH].flit  = mk(FT_HEADTAIL, 2, 1, 1, 5);
    @(negedge clk);
    in_link[D_NORTH] = '0;
    n = 0;
    while (!ej_valid && n < 20) begin @(negedge clk); n++; end
    check(ej_valid && ej_flit.data == 5, "ejected at the local port");
    check(n == 3, $sformatf("ejection latency %0d (expect 3)", n));
    @(negedge clk);
    check(credit_out[D_NORTH] == 3'b000, "credit pulse already returned");

    // 6. starvation: express stream from the west while a local flit waits for east
    inj_valid = 1; inj_flit = mk(FT_HEADTAIL, 1, 2, 1, 6);
    @(posedge clk); @(negedge clk); inj_valid = 0;
    for (int c = 0; c < STH + 4; c++) begin
      in_link[D_WEST].valid = 1;
      in_link[D_WEST].flit  = mk(FT_HEADTAIL, 2, 6, 1, 100 + c);
      in_link[D_WEST].flit.express = 1; in_link[D_WEST].flit.ehops = 1;
      @(negedge clk);
    end
    check(freeze_out[D_EAST] && stop_out[D_WEST], "freeze requests on starvation");
    in_link[D_WEST] = '0;
    n = 0;
    while (!(out_link[D_EAST].valid && out_link[D_EAST].flit.data == 6) && n < 20) begin @(negedge clk); n++; end
    check(out_link[D_EAST].flit.data == 6, "starved flit leaves once the stream stops");
    @(negedge clk);
    check(!freeze_out[D_EAST] && !stop_out[D_WEST], "freeze released after the tail");
    credit_in[D_EAST] = 3'b010; @(negedge clk); credit_in[D_EAST] = '0;

    // 7. freeze request from a neighbour raises PG_EVC towards that side
    freeze_in[D_WEST] = 1; #1;
    check(pg_evc_out[D_WEST] && !pg_evc_out[D_EAST], "PG_EVC asserted in the frozen direction");
    freeze_in[D_WEST] = 0;

    // 8. power-off and wake-up
    wu_in = '0;
    repeat (3) @(negedge clk);
    check(pstate == PS_IDLE && pg_out, "idle: PG asserted");
    repeat (8) @(negedge clk);
    check(pstate == PS_SLEEP, "asleep after idle detection");
    wu_evc_in[D_SOUTH] = 1; @(negedge clk); wu_evc_in[D_SOUTH] = 0;
    check(pstate == PS_WAKEUP, "WU_EVC starts the wake-up");
    repeat (8) @(negedge clk);
    check(pstate == PS_ACTIVE && !pg_out, "active after T_WAKEUP cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
