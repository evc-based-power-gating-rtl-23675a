// evc_noc_tester: end-to-end test bench body for the EVC power-gated mesh,
// for an MX x MY mesh (the 8x8 default instantiates the top unchanged).
// Used by tb_evc_noc (reduced mesh) and tb_evc_noc_full (8x8 default).
//
// Phases:
//  1. All routers go to sleep after reset (no traffic).
//  2. Worked example on row 0: router 0 sends a 5-flit packet to router 3
//     (express path), router 1 sends a 5-flit packet to router 3 (normal
//     path through router 2), starting from sleeping routers.
//  3. Synthetic traffic: uniform random, transpose and bit-complement
//     destinations at a light injection rate.
//  4. Express streams along row 1 (routers 0 and 1 to the far end) while
//     router 2 sends to its east neighbour, to provoke starvation.
// A scoreboard checks that every packet arrives once, at its destination,
// with its flits in order and unchanged. The test also counts each
// mechanism (express launch, latch bypass, direct-link bypass, normal flit
// held in a latch, express sink, starvation, sleep, wake-up, bypass of a
// sleeping router) and fails if one never happened.
module evc_noc_tester #(
  parameter int MX = 8,
  parameter int MY = 8
) ();
  import evc_pkg::*;
  localparam int NRT = MX * MY;
  localparam int DATA_LEN = 5;

  logic clk = 0, rst_n = 0;
  logic       inj_valid [NRT];
  flit_t      inj_flit  [NRT];
  logic       inj_ready [NRT];
  logic       ej_valid  [NRT];
  flit_t      ej_flit   [NRT];
  pstate_e    pstate    [NRT];
  router_ev_t ev        [NRT];

  if (MX == 8 && MY == 8) begin : g_full
    // full size: the top at its default parameters
    evc_noc dut (.clk, .rst_n, .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit, .pstate, .ev);
  end else begin : g_small
    evc_noc #(.MESH_X(MX), .MESH_Y(MY)) dut (
      .clk, .rst_n, .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit, .pstate, .ev);
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- traffic generation ----------------
  flit_t q [NRT][$];
  int    next_id = 1;
  int    sent_pkts = 0, recv_pkts = 0;
  int    exp_len [int];
  int    exp_dst [int];
  int    first_cycle [int];
  int    lat_sum = 0;

  task automatic add_packet(input int src, input int dst, input int vn);
    int len;
    len = (vn == 0) ? 1 : DATA_LEN;
    for (int i = 0; i < len; i++) begin
      flit_t f;
      f = '0;
      f.ftype = (len == 1) ? FT_HEADTAIL : (i == 0) ? FT_HEAD : (i == len - 1) ? FT_TAIL : FT_BODY;
      f.vn    = 2'(vn);
      f.dst_x = COORD_W'(dst % MX); f.dst_y = COORD_W'(dst / MX);
      f.src_x = COORD_W'(src % MX); f.src_y = COORD_W'(src / MX);
      f.data  = {64'(cycle), 16'(len), 16'(i), 32'(next_id)};
      q[src].push_back(f);
    end
    exp_len[next_id] = len;
    exp_dst[next_id] = dst;
    next_id++;
    sent_pkts++;
  endtask

  // drive injection ports at the negative edge
  always @(negedge clk) begin
    for (int r = 0; r < NRT; r++) begin
      inj_valid[r] <= q[r].size() != 0;
      inj_flit[r]  <= (q[r].size() != 0) ? q[r][0] : '0;
    end
  end
  always @(posedge clk) begin
    for (int r = 0; r < NRT; r++)
      if (inj_valid[r] && inj_ready[r]) void'(q[r].pop_front());
  end

  // ---------------- scoreboard ----------------
  int cur_id  [NRT][NUM_VN];
  int cur_seq [NRT][NUM_VN];

  always @(negedge clk) if (rst_n) begin
    for (int r = 0; r < NRT; r++) if (ej_valid[r]) begin
      flit_t f; int id, seq, len, vn;
      f   = ej_flit[r];
      id  = int'(f.data[31:0]);
      seq = int'(f.data[47:32]);
      len = int'(f.data[63:48]);
      vn  = int'(f.vn);
      checks++;
      if (!exp_len.exists(id) || exp_dst[id] != r || int'(f.dst_x) + MX * int'(f.dst_y) != r) begin
        failures++;
        $display("FAIL flit of packet %0d ejected at router %0d", id, r);
      end else if (seq != cur_seq[r][vn] || (seq > 0 && id != cur_id[r][vn]) || len != exp_len[id]) begin
        failures++;
        $display("FAIL order: router %0d vn %0d packet %0d seq %0d (expected seq %0d of %0d)",
                 r, vn, id, seq, cur_seq[r][vn], cur_id[r][vn]);
      end else begin
        if (seq == 0) cur_id[r][vn] = id;
        if (is_tail(f) != (seq == len - 1) || is_head(f) != (seq == 0)) begin
          failures++;
          $display("FAIL flit type of packet %0d seq %0d", id, seq);
        end
        if (seq == len - 1) begin
          cur_seq[r][vn] = 0;
          exp_len.delete(id);
          recv_pkts++;
          lat_sum += cycle - int'(f.data[127:64]);
        end else begin
          cur_seq[r][vn] = seq + 1;
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_launch = 0, n_latch_pass = 0, n_direct = 0, n_nlatch = 0, n_sink = 0;
  int n_starve = 0, n_sleep = 0, n_wakeup = 0, n_pass_sleeping = 0;
  always @(negedge clk) if (rst_n) begin
    for (int r = 0; r < NRT; r++) begin
      n_launch     += int'(ev[r].e_launch);
      n_latch_pass += int'(ev[r].latch_pass);
      n_direct     += int'(ev[r].direct);
      n_nlatch     += int'(ev[r].n_latch);
      n_sink       += int'(ev[r].e_sink);
      n_starve     += int'(ev[r].starve);
      n_sleep      += int'(ev[r].sleep);
      n_wakeup     += int'(ev[r].wakeup);
      if ((ev[r].latch_pass || ev[r].direct) && pstate[r] != PS_ACTIVE) n_pass_sleeping++;
    end
  end

  task automatic drain(input int max_cycles);
    int c;
    c = 0;
    while ((recv_pkts != sent_pkts) && c < max_cycles) begin
      @(posedge clk); c++;
    end
    checks++;
    if (recv_pkts != sent_pkts) begin
      failures++;
      $display("FAIL drain: %0d of %0d packets received", recv_pkts, sent_pkts);
    end
  endtask

  function automatic int pattern_dst(input int pat, input int src);
    int x, y;
    x = src % MX; y = src / MX;
    case (pat)
      0: return $urandom % NRT;                         // uniform random
      1: return x * MX + y;                             // transpose (y, x)
      default: return (MY - 1 - y) * MX + (MX - 1 - x); // bit-complement
    endcase
  endfunction

  task automatic count_check(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    for (int r = 0; r < NRT; r++) begin
      inj_valid[r] = 0; inj_flit[r] = '0;
      for (int n = 0; n < NUM_VN; n++) begin cur_id[r][n] = 0; cur_seq[r][n] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. every router powers off when idle
    repeat (30) @(negedge clk);
    for (int r = 0; r < NRT; r++) begin
      checks++;
      if (pstate[r] != PS_SLEEP) begin failures++; $display("FAIL router %0d not asleep", r); end
    end
    // 2. worked example on row 0
    add_packet(0, 3, 1);
    add_packet(1, 3, 2);
    drain(400);
    $display("example: launch=%0d latch_pass=%0d direct=%0d n_latch=%0d sink=%0d",
             n_launch, n_latch_pass, n_direct, n_nlatch, n_sink);
    repeat (40) @(negedge clk);
    // 3. synthetic patterns at a light load
    for (int pat = 0; pat < 3; pat++) begin
      for (int c = 0; c < 1500; c++) begin
        @(negedge clk);
        for (int r = 0; r < NRT; r++)
          if ($urandom % 1000 < 15) begin
            int d;
            d = pattern_dst(pat, r);
            if (d != r) add_packet(r, d, $urandom % NUM_VN);
          end
      end
      drain(5000);
      $display("pattern %0d: %0d packets, mean latency %0d cycles", pat, recv_pkts,
               (recv_pkts > 0) ? lat_sum / recv_pkts : 0);
    end
    // 4. starvation: express streams across router (2,5) east output
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      if (q[MX].size() < 20)     add_packet(MX, 2 * MX - 1, 1 + (c % 2));
      if (q[MX + 1].size() < 20) add_packet(MX + 1, 2 * MX - 1, 1 + ((c + 1) % 2));
      if (q[MX + 2].size() < 4)  add_packet(MX + 2, MX + 3, 1);
    end
    drain(8000);
    $display("events: launch=%0d latch_pass=%0d direct=%0d n_latch=%0d sink=%0d starve=%0d sleep=%0d wakeup=%0d pass_off=%0d",
             n_launch, n_latch_pass, n_direct, n_nlatch, n_sink, n_starve, n_sleep, n_wakeup, n_pass_sleeping);
    count_check(n_launch,        "express launch");
    count_check(n_latch_pass,    "bypass through the EVC latch");
    count_check(n_direct,        "bypass through the direct link");
    count_check(n_nlatch,        "normal flit held in the EVC latch");
    count_check(n_sink,          "express flit stored at the sink");
    count_check(n_starve,        "starvation detected");
    count_check(n_sleep,         "router power-off");
    count_check(n_wakeup,        "router wake-up");
    count_check(n_pass_sleeping, "bypass of a router that is not active");
    $display("packets sent=%0d received=%0d", sent_pkts, recv_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
