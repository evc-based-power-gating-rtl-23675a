// evc_router: EVC router with power gating of its virtual channels.
//
// Five input ports (east, west, north, south, local), each with one N-VC and
// one E-VC per virtual network (VN), an EVC latch and a direct link. The
// pipeline of a locally handled flit is: buffer write, route computation
// with VC allocation, switch allocation, switch traversal into the output
// register, which drives the link for one cycle.
//
// Express virtual channels. Every router is the source of one virtual bypass
// path per direction, ending EVC_HOPS hops away (the sink), and is an
// intermediate router of the paths that start one and two hops upstream. A
// packet with at least EVC_HOPS hops left in its current dimension is given
// an E-VC of the sink (WU_EVC wakes the sink, PG_EVC and the E-VC credits
// gate the sending). At an intermediate router the express flit skips the
// pipeline: it waits one cycle in the EVC latch and then takes the output
// with the highest priority, or crosses through the direct link in the same
// cycle when the latch holds a normal flit. Other flits use normal VCs hop by
// hop (WU wakes the next router, PG and the N-VC credits gate the sending).
//
// Power gating. The power control unit (pg_ctrl) cuts only the VC buffers;
// route computation, EVC latches, allocators and the crossbar stay powered.
// While a neighbour asserts PG, this router may still send it one normal flit
// at a time into the EVC latch of the corresponding input port (one latch
// token per output), and the neighbour forwards it through its own pipeline.
//
// Starvation. One starvation_ctrl per output port; on detection the
// downstream neighbour is asked to assert PG_EVC towards the bypass source
// two hops upstream (freeze_out) and the upstream neighbour is asked to stop
// allocating E-VCs in this direction (stop_out).
//
// Credit and latch-token returns leave the router registered (one cycle).
// What follows the design: the VC organisation (1 N-VC + 1 E-VC per VN, 3
// VNs, 1-flit control and 5-flit data buffers), the bypass-path distribution,
// the latch and direct-link use, the handshakes and the power rules. This
// implementation's choices: round-robin allocators, a VC is given to a new
// packet once the tail of the previous one has left, direct source-to-sink
// wires for E-VC credits, and the latch token.
module evc_router
  import evc_pkg::*;
#(
  parameter int CTRL_DEPTH    = 1,
  parameter int DATA_DEPTH    = 5,
  parameter int T_WAKEUP      = 8,
  parameter int T_IDLE_DETECT = 8,
  parameter int MARGIN        = 4,
  parameter int MARGIN_EVC    = 6,
  parameter int STARVE_TH     = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,          // position of this router in the mesh
  input  logic [COORD_W-1:0] my_y,
  // neighbour links and handshakes, indexed by direction of the neighbour
  input  link_t              in_link      [NUM_DIR],
  output link_t              out_link     [NUM_DIR],
  output logic [NUM_VN-1:0]  credit_out   [NUM_DIR],
  input  logic [NUM_VN-1:0]  credit_in    [NUM_DIR],
  output logic [NUM_DIR-1:0] latch_tok_out,
  input  logic [NUM_DIR-1:0] latch_tok_in,
  output logic [NUM_DIR-1:0] wu_out,
  input  logic [NUM_DIR-1:0] wu_in,
  output logic               pg_out,
  input  logic [NUM_DIR-1:0] pg_in,
  output logic [NUM_DIR-1:0] freeze_out,
  input  logic [NUM_DIR-1:0] freeze_in,
  output logic [NUM_DIR-1:0] stop_out,
  input  logic [NUM_DIR-1:0] stop_in,
  // bypass-path handshakes, indexed by direction of the far end (EVC_HOPS away)
  output logic [NUM_DIR-1:0] wu_evc_out,
  input  logic [NUM_DIR-1:0] wu_evc_in,
  output logic [NUM_DIR-1:0] pg_evc_out,
  input  logic [NUM_DIR-1:0] pg_evc_in,
  output logic [NUM_VN-1:0]  ecredit_out  [NUM_DIR],
  input  logic [NUM_VN-1:0]  ecredit_in   [NUM_DIR],
  // local injection and ejection
  input  logic               inj_valid,
  input  flit_t              inj_flit,
  output logic               inj_ready,
  output logic               ej_valid,
  output flit_t              ej_flit,
  // status
  output pstate_e            pstate,
  output router_ev_t         ev
);
  localparam int NR = NUM_PORTS * NUM_VC;   // input VCs, r = port*NUM_VC + vc

  function automatic int vc_depth(input int v);
    return ((v % NUM_VN) == 0) ? CTRL_DEPTH : DATA_DEPTH;
  endfunction

  // ---------------- power control ----------------
  logic sleep_w, pg_w, pg_evc_w, writable, charged;
  logic router_empty, vc_nonempty, wu_any;

  // ---------------- input ports ----------------
  link_t              in_int       [NUM_PORTS];
  logic [NUM_VC-1:0]  pop          [NUM_PORTS];
  logic [NUM_VC-1:0]  fvalid       [NUM_PORTS];
  flit_t              front        [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0]  vfull        [NUM_PORTS];
  link_t              pass         [NUM_PORTS];
  logic [NUM_VN-1:0]  ip_credit    [NUM_PORTS];
  logic [NUM_VN-1:0]  ip_ecredit   [NUM_PORTS];
  logic [NUM_PORTS-1:0] ip_tok, ip_nonempty, ip_empty, ip_ev_lp, ip_ev_dir, ip_ev_nl;

  for (genvar d = 0; d < NUM_DIR; d++) begin : g_inl
    assign in_int[d] = in_link[d];
  end
  always_comb begin
    in_int[P_LOCAL]                = '0;
    in_int[P_LOCAL].valid          = inj_valid && inj_ready;
    in_int[P_LOCAL].flit           = inj_flit;
    in_int[P_LOCAL].flit.express   = 1'b0;
    in_int[P_LOCAL].flit.ehops     = '0;
    in_int[P_LOCAL].flit.to_latch  = 1'b0;
  end
  assign inj_ready = writable && (int'(inj_flit.vn) < NUM_VN)
                     && !vfull[P_LOCAL][$clog2(NUM_VC)'(inj_flit.vn)];

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_ip
    input_port #(.CTRL_DEPTH(CTRL_DEPTH), .DATA_DEPTH(DATA_DEPTH)) u_ip (
      .clk, .rst_n,
      .in           (in_int[i]),
      .writable     (writable),
      .pop          (pop[i]),
      .front_valid  (fvalid[i]),
      .front        (front[i]),
      .vc_full      (vfull[i]),
      .pass         (pass[i]),
      .credit       (ip_credit[i]),
      .ecredit      (ip_ecredit[i]),
      .latch_tok    (ip_tok[i]),
      .vc_nonempty  (ip_nonempty[i]),
      .port_empty   (ip_empty[i]),
      .ev_latch_pass(ip_ev_lp[i]),
      .ev_direct    (ip_ev_dir[i]),
      .ev_nlatch    (ip_ev_nl[i])
    );
  end

  // ---------------- route computation per input VC ----------------
  logic [2:0]    rc_port [NR];
  logic [NR-1:0] rc_exp;
  logic [NR-1:0] hd_valid;   // front flit is a head waiting for allocation
  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_rci
    for (genvar v = 0; v < NUM_VC; v++) begin : g_rcv
      route_compute u_rc (
        .cur_x     (my_x),
        .cur_y     (my_y),
        .dst_x     (front[i][v].dst_x),
        .dst_y     (front[i][v].dst_y),
        .stop_alloc(stop_in),
        .out_port  (rc_port[i*NUM_VC+v]),
        .express   (rc_exp[i*NUM_VC+v])
      );
    end
  end

  // ---------------- VC state ----------------
  logic [NR-1:0] active;
  logic [2:0]    rt_port [NR];
  logic [NR-1:0] rt_exp;

  // downstream VC state seen by this router
  logic [NUM_VN-1:0] n_busy [NUM_PORTS];   // includes the local (ejection) port
  logic [NUM_VN-1:0] e_busy [NUM_DIR];
  logic [2:0]        n_cred [NUM_DIR][NUM_VN];
  logic [2:0]        e_cred [NUM_DIR][NUM_VN];
  logic [NUM_DIR-1:0] tok_home;

  // ---------------- VC allocation ----------------
  // One arbiter per downstream VC (output port, kind, VN). Only input VCs of
  // the same VN compete for it: requester q = port*2 + kind.
  localparam int NQ = NUM_PORTS * 2;
  logic [NQ-1:0] va_gnt [NUM_PORTS][2][NUM_VN];
  logic          va_gv  [NUM_PORTS][2][NUM_VN];
  logic [NR-1:0] va_won;

  for (genvar r = 0; r < NR; r++) begin : g_hd
    assign hd_valid[r] = !active[r] && fvalid[r/NUM_VC][r%NUM_VC] && is_head(front[r/NUM_VC][r%NUM_VC]);
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_vap
    for (genvar k = 0; k < 2; k++) begin : g_vak
      for (genvar n = 0; n < NUM_VN; n++) begin : g_van
        logic [NQ-1:0] req;
        logic          tgt_free;
        if (k == 0) begin : g_n
          assign tgt_free = !n_busy[p][n];
        end else if (p < NUM_DIR) begin : g_e
          assign tgt_free = !e_busy[p][n];
        end else begin : g_none
          assign tgt_free = 1'b0;
        end
        for (genvar q = 0; q < NQ; q++) begin : g_req
          localparam int R = (q / 2) * NUM_VC + (q % 2) * NUM_VN + n;
          assign req[q] = tgt_free && hd_valid[R] && (int'(rc_port[R]) == p) && (rc_exp[R] == (k == 1));
        end
        rr_arbiter #(.N(NQ)) u_arb (
          .clk, .rst_n, .req, .advance(1'b1),
          .gnt(va_gnt[p][k][n]), .gnt_valid(va_gv[p][k][n])
        );
      end
    end
  end

  always_comb begin
    va_won = '0;
    for (int p = 0; p < NUM_PORTS; p++)
      for (int k = 0; k < 2; k++)
        for (int n = 0; n < NUM_VN; n++)
          for (int q = 0; q < NQ; q++)
            if (va_gnt[p][k][n][q]) va_won[(q / 2) * NUM_VC + (q % 2) * NUM_VN + n] = 1'b1;
  end

  // ---------------- switch allocation ----------------
  logic [NUM_PORTS-1:0] st_valid, st_move, epass_v;
  flit_t                st_flit [NUM_PORTS];
  flit_t                epass_f [NUM_PORTS];
  link_t                oreg    [NUM_PORTS];
  logic [NR-1:0]        sa_req  [NUM_PORTS];
  logic [NR-1:0]        sa_gnt  [NUM_PORTS];
  logic [NUM_PORTS-1:0] sa_gv;
  logic [NR-1:0]        can_send, want_any;
  logic [NUM_PORTS-1:0] out_free;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_ep
    if (p < NUM_DIR) begin : g_dir
      assign epass_v[p] = pass[opposite(p)].valid;
      assign epass_f[p] = pass[opposite(p)].flit;
    end else begin : g_loc
      assign epass_v[p] = 1'b0;
      assign epass_f[p] = '0;
    end
    assign st_move[p]  = st_valid[p] && !epass_v[p];
    assign out_free[p] = !st_valid[p] || st_move[p];
  end

  for (genvar r = 0; r < NR; r++) begin : g_cs
    localparam int N_ = (r % NUM_VC) % NUM_VN;
    always_comb begin
      int p;
      p = int'(rt_port[r]);
      want_any[r] = active[r] && fvalid[r/NUM_VC][r%NUM_VC];
      if (p == P_LOCAL)   can_send[r] = 1'b1;
      else if (p >= NUM_PORTS) can_send[r] = 1'b0;
      else if (rt_exp[r]) can_send[r] = !pg_evc_in[p[1:0]] && (e_cred[p[1:0]][N_] != 0);
      else if (pg_in[p[1:0]]) can_send[r] = tok_home[p[1:0]];
      else                 can_send[r] = (n_cred[p[1:0]][N_] != 0);
    end
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_sa
    for (genvar r = 0; r < NR; r++) begin : g_sr
      assign sa_req[p][r] = want_any[r] && can_send[r] && out_free[p] && (int'(rt_port[r]) == p);
    end
    rr_arbiter #(.N(NR)) u_arb (
      .clk, .rst_n, .req(sa_req[p]), .advance(1'b1),
      .gnt(sa_gnt[p]), .gnt_valid(sa_gv[p])
    );
  end

  // winner per output and the flit it sends
  flit_t            sa_flit  [NUM_PORTS];
  logic [NR-1:0]    sa_any;
  logic [NR-1:0]    tail_gnt [NUM_PORTS];
  logic [$clog2(NR)-1:0] sa_idx [NUM_PORTS];
  always_comb begin
    sa_any = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      sa_idx[p] = '0;
      for (int r = 0; r < NR; r++)
        if (sa_gnt[p][r]) sa_idx[p] = $clog2(NR)'(r);
      sa_any |= sa_gnt[p];
    end
  end
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_saf
    flit_t f;
    logic  ex;
    assign f  = front[int'(sa_idx[p]) / NUM_VC][int'(sa_idx[p]) % NUM_VC];
    assign ex = (p != P_LOCAL) && rt_exp[sa_idx[p]];
    assign tail_gnt[p] = is_tail(f) ? sa_gnt[p] : '0;
    always_comb begin
      sa_flit[p]          = f;
      sa_flit[p].express  = ex;
      sa_flit[p].ehops    = ex ? 2'(EVC_HOPS - 1) : 2'd0;
      sa_flit[p].to_latch = !ex && (p != P_LOCAL) && pg_in[p % NUM_DIR];
    end
  end
  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VC; v++)
        pop[i][v] = sa_any[i*NUM_VC+v];
  end

  // ---------------- sequential state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= '0;
      rt_exp   <= '0;
      for (int r = 0; r < NR; r++) rt_port[r] <= '0;
      st_valid <= '0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        oreg[p]    <= '0;
        st_flit[p] <= '0;
        n_busy[p]  <= '0;
      end
      for (int d = 0; d < NUM_DIR; d++) begin
        e_busy[d] <= '0;
        for (int n = 0; n < NUM_VN; n++) begin
          n_cred[d][n] <= 3'(vc_depth(n));
          e_cred[d][n] <= 3'(vc_depth(n));
        end
      end
      tok_home <= '1;
    end else begin
      // VC allocation
      for (int r = 0; r < NR; r++) begin
        if (va_won[r]) begin
          active[r]  <= 1'b1;
          rt_port[r] <= rc_port[r];
          rt_exp[r]  <= rc_exp[r];
        end
      end
      for (int p = 0; p < NUM_PORTS; p++)
        for (int n = 0; n < NUM_VN; n++) begin
          if (va_gv[p][0][n]) n_busy[p][n] <= 1'b1;
          if (p < NUM_DIR && va_gv[p][1][n]) e_busy[p][n] <= 1'b1;
        end
      // switch allocation, tails release the VC state
      for (int p = 0; p < NUM_PORTS; p++) begin
        for (int r = 0; r < NR; r++) begin
          if (tail_gnt[p][r]) begin
            active[r] <= 1'b0;
            if (rt_exp[r] && p < NUM_DIR) e_busy[p][(r % NUM_VC) % NUM_VN] <= 1'b0;
            else                          n_busy[p][(r % NUM_VC) % NUM_VN] <= 1'b0;
          end
        end
      end
      // credits and latch tokens
      for (int d = 0; d < NUM_DIR; d++) begin
        for (int n = 0; n < NUM_VN; n++) begin
          logic n_dec, e_dec;
          n_dec = sa_gv[d] && !sa_flit[d].express && !sa_flit[d].to_latch && (int'(sa_flit[d].vn) == n);
          e_dec = sa_gv[d] && sa_flit[d].express && (int'(sa_flit[d].vn) == n);
          n_cred[d][n] <= n_cred[d][n] + 3'(credit_in[d][n]) - 3'(n_dec);
          e_cred[d][n] <= e_cred[d][n] + 3'(ecredit_in[d][n]) - 3'(e_dec);
        end
        if (sa_gv[d] && sa_flit[d].to_latch) tok_home[d] <= 1'b0;
        else if (latch_tok_in[d])            tok_home[d] <= 1'b1;
      end
      // switch traversal and output registers
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (sa_gv[p]) begin
          st_valid[p] <= 1'b1;
          st_flit[p]  <= sa_flit[p];
        end else if (st_move[p]) begin
          st_valid[p] <= 1'b0;
        end
        if (epass_v[p]) begin
          oreg[p].valid <= 1'b1;
          oreg[p].flit  <= epass_f[p];
        end else if (st_move[p]) begin
          oreg[p].valid <= 1'b1;
          oreg[p].flit  <= st_flit[p];
        end else begin
          oreg[p].valid <= 1'b0;
        end
      end
    end
  end

  // returns to upstream routers, registered
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NUM_DIR; d++) begin
        credit_out[d]  <= '0;
        ecredit_out[d] <= '0;
      end
      latch_tok_out <= '0;
    end else begin
      for (int d = 0; d < NUM_DIR; d++) begin
        credit_out[d]    <= ip_credit[d];
        ecredit_out[d]   <= ip_ecredit[d];
        latch_tok_out[d] <= ip_tok[d];
      end
    end
  end

  for (genvar d = 0; d < NUM_DIR; d++) begin : g_out
    assign out_link[d] = oreg[d];
  end
  assign ej_valid = oreg[P_LOCAL].valid;
  assign ej_flit  = oreg[P_LOCAL].flit;

  // ---------------- wakeup requests ----------------
  always_comb begin
    wu_out     = '0;
    wu_evc_out = '0;
    for (int r = 0; r < NR; r++) begin
      for (int d = 0; d < NUM_DIR; d++) begin
        if (hd_valid[r] && int'(rc_port[r]) == d) begin
          if (rc_exp[r]) wu_evc_out[d] = 1'b1;
          else           wu_out[d]     = 1'b1;
        end
        if (active[r] && int'(rt_port[r]) == d) begin
          if (rt_exp[r]) wu_evc_out[d] = 1'b1;
          else           wu_out[d]     = 1'b1;
        end
      end
    end
    for (int d = 0; d < NUM_DIR; d++) begin
      if (st_valid[d]) begin
        if (st_flit[d].express) wu_evc_out[d] = 1'b1;
        else                    wu_out[d]     = 1'b1;
      end
      if (oreg[d].valid) begin
        if (!oreg[d].flit.express)                          wu_out[d]     = 1'b1;
        else if (int'(oreg[d].flit.ehops) == EVC_HOPS - 1) wu_evc_out[d] = 1'b1;
      end
    end
  end

  // ---------------- power control ----------------
  always_comb begin
    router_empty = (&ip_empty) && (st_valid == '0);
    for (int p = 0; p < NUM_PORTS; p++) router_empty &= !oreg[p].valid;
    vc_nonempty = |ip_nonempty;
    wu_any      = (|wu_in) || (|wu_evc_in) || inj_valid;
  end

  pg_ctrl #(
    .T_WAKEUP(T_WAKEUP), .T_IDLE_DETECT(T_IDLE_DETECT),
    .MARGIN(MARGIN), .MARGIN_EVC(MARGIN_EVC)
  ) u_pg (
    .clk, .rst_n,
    .router_empty, .vc_nonempty, .wu_any,
    .state   (pstate),
    .sleep   (sleep_w),
    .pg      (pg_w),
    .pg_evc  (pg_evc_w),
    .writable(writable),
    .charged (charged)
  );

  assign pg_out     = pg_w;
  assign pg_evc_out = {NUM_DIR{pg_evc_w}} | freeze_in;

  // ---------------- starvation ----------------
  logic [NUM_DIR-1:0] freeze, starve_det;
  for (genvar d = 0; d < NUM_DIR; d++) begin : g_sv
    logic [NR-1:0] want_d;
    for (genvar r = 0; r < NR; r++) begin : g_w
      assign want_d[r] = want_any[r] && (int'(rt_port[r]) == d);
    end
    starvation_ctrl #(.NREQ(NR), .STARVE_TH(STARVE_TH)) u_sv (
      .clk, .rst_n,
      .want     (want_d),
      .tail_sent(tail_gnt[d]),
      .st_wait  (st_valid[d]),
      .epass    (epass_v[d]),
      .n_moved  (st_move[d]),
      .freeze   (freeze[d]),
      .detect   (starve_det[d])
    );
    assign freeze_out[d]         = freeze[d];
    assign stop_out[opposite(d)] = freeze[d];
  end

  // ---------------- events ----------------
  logic prev_sleep;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prev_sleep <= 1'b0;
    else        prev_sleep <= sleep_w;
  end
  always_comb begin
    ev            = '0;
    ev.latch_pass = |ip_ev_lp;
    ev.direct     = |ip_ev_dir;
    ev.n_latch    = |ip_ev_nl;
    ev.starve     = |starve_det;
    ev.sleep      = sleep_w && !prev_sleep;
    ev.wakeup     = !sleep_w && prev_sleep;
    for (int d = 0; d < NUM_DIR; d++) begin
      if (sa_gv[d] && sa_flit[d].express && is_head(sa_flit[d])) ev.e_launch = 1'b1;
      if (in_link[d].valid && in_link[d].flit.express && in_link[d].flit.ehops == 2'd0) ev.e_sink = 1'b1;
    end
  end

  // A flit sent to the local port or stored here must not be lost.
  assert property (@(posedge clk) disable iff (!rst_n) !(charged && sleep_w))
    else $error("evc_router: inconsistent power state");
endmodule
