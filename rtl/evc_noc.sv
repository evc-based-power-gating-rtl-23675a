// evc_noc: MESH_X x MESH_Y mesh of power-gated EVC routers (top level).
//
// Routers are connected to their four neighbours by a flit link, credit and
// latch-token returns, WU/PG and the starvation freeze/stop requests. For
// every router and direction a virtual bypass path leads to the router
// EVC_HOPS hops away when that router exists; its WU_EVC, PG_EVC and E-VC
// credit wires connect source and sink directly (the flits themselves travel
// hop by hop on the ordinary links). Missing neighbours at the mesh edge are
// tied off (PG held high, no traffic).
// Each node has a local injection port (valid/ready, one flit per cycle) and
// an ejection port (valid, always accepted); routers are numbered
// r = y*MESH_X + x. The 8x8 mesh and the Table 5.1 router settings are the
// defaults; the network interfaces and processors are not part of this RTL.
module evc_noc
  import evc_pkg::*;
#(
  parameter int MESH_X        = 8,
  parameter int MESH_Y        = 8,
  parameter int CTRL_DEPTH    = 1,
  parameter int DATA_DEPTH    = 5,
  parameter int T_WAKEUP      = 8,
  parameter int T_IDLE_DETECT = 8,
  parameter int MARGIN        = 4,
  parameter int MARGIN_EVC    = 6,
  parameter int STARVE_TH     = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       inj_valid [MESH_X*MESH_Y],
  input  flit_t      inj_flit  [MESH_X*MESH_Y],
  output logic       inj_ready [MESH_X*MESH_Y],
  output logic       ej_valid  [MESH_X*MESH_Y],
  output flit_t      ej_flit   [MESH_X*MESH_Y],
  output pstate_e    pstate    [MESH_X*MESH_Y],
  output router_ev_t ev        [MESH_X*MESH_Y]
);
  localparam int NRT = MESH_X * MESH_Y;

  link_t              out_link   [NRT][NUM_DIR];
  link_t              in_link    [NRT][NUM_DIR];
  logic [NUM_VN-1:0]  credit_out [NRT][NUM_DIR];
  logic [NUM_VN-1:0]  credit_in  [NRT][NUM_DIR];
  logic [NUM_VN-1:0]  ecred_out  [NRT][NUM_DIR];
  logic [NUM_VN-1:0]  ecred_in   [NRT][NUM_DIR];
  logic [NUM_DIR-1:0] tok_out [NRT], tok_in [NRT];
  logic [NUM_DIR-1:0] wu_out  [NRT], wu_in  [NRT];
  logic [NUM_DIR-1:0] pg_in   [NRT];
  logic               pg_out  [NRT];
  logic [NUM_DIR-1:0] frz_out [NRT], frz_in [NRT];
  logic [NUM_DIR-1:0] stp_out [NRT], stp_in [NRT];
  logic [NUM_DIR-1:0] wue_out [NRT], wue_in [NRT];
  logic [NUM_DIR-1:0] pge_out [NRT], pge_in [NRT];

  // neighbour of (x,y) at distance h in direction d, or -1 outside the mesh
  function automatic int nbr(input int x, input int y, input int d, input int h);
    int nx, ny;
    nx = x + ((d == D_EAST) ? h : (d == D_WEST) ? -h : 0);
    ny = y + ((d == D_NORTH) ? h : (d == D_SOUTH) ? -h : 0);
    if (nx < 0 || nx >= MESH_X || ny < 0 || ny >= MESH_Y) return -1;
    return ny * MESH_X + nx;
  endfunction

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int R = y * MESH_X + x;
      for (genvar d = 0; d < NUM_DIR; d++) begin : g_d
        localparam int N1 = nbr(x, y, d, 1);
        localparam int N3 = nbr(x, y, d, EVC_HOPS);
        localparam int OD = opposite(d);
        if (N1 >= 0) begin : g_n1
          assign in_link[R][d]     = out_link[N1][OD];
          assign credit_in[R][d]   = credit_out[N1][OD];
          assign tok_in[R][d]      = tok_out[N1][OD];
          assign wu_in[R][d]       = wu_out[N1][OD];
          assign pg_in[R][d]       = pg_out[N1];
          assign frz_in[R][d]      = frz_out[N1][OD];
          assign stp_in[R][d]      = stp_out[N1][OD];
        end else begin : g_e1
          assign in_link[R][d]     = '0;
          assign credit_in[R][d]   = '0;
          assign tok_in[R][d]      = 1'b0;
          assign wu_in[R][d]       = 1'b0;
          assign pg_in[R][d]       = 1'b1;
          assign frz_in[R][d]      = 1'b0;
          assign stp_in[R][d]      = 1'b0;
        end
        if (N3 >= 0) begin : g_n3
          assign wue_in[R][d]   = wue_out[N3][OD];
          assign pge_in[R][d]   = pge_out[N3][OD];
          assign ecred_in[R][d] = ecred_out[N3][OD];
        end else begin : g_e3
          assign wue_in[R][d]   = 1'b0;
          assign pge_in[R][d]   = 1'b1;
          assign ecred_in[R][d] = '0;
        end
      end

      evc_router #(
        .CTRL_DEPTH(CTRL_DEPTH), .DATA_DEPTH(DATA_DEPTH),
        .T_WAKEUP(T_WAKEUP), .T_IDLE_DETECT(T_IDLE_DETECT),
        .MARGIN(MARGIN), .MARGIN_EVC(MARGIN_EVC), .STARVE_TH(STARVE_TH)
      ) u_rt (
        .clk, .rst_n,
        .my_x         (COORD_W'(x)),
        .my_y         (COORD_W'(y)),
        .in_link      (in_link[R]),
        .out_link     (out_link[R]),
        .credit_out   (credit_out[R]),
        .credit_in    (credit_in[R]),
        .latch_tok_out(tok_out[R]),
        .latch_tok_in (tok_in[R]),
        .wu_out       (wu_out[R]),
        .wu_in        (wu_in[R]),
        .pg_out       (pg_out[R]),
        .pg_in        (pg_in[R]),
        .freeze_out   (frz_out[R]),
        .freeze_in    (frz_in[R]),
        .stop_out     (stp_out[R]),
        .stop_in      (stp_in[R]),
        .wu_evc_out   (wue_out[R]),
        .wu_evc_in    (wue_in[R]),
        .pg_evc_out   (pge_out[R]),
        .pg_evc_in    (pge_in[R]),
        .ecredit_out  (ecred_out[R]),
        .ecredit_in   (ecred_in[R]),
        .inj_valid    (inj_valid[R]),
        .inj_flit     (inj_flit[R]),
        .inj_ready    (inj_ready[R]),
        .ej_valid     (ej_valid[R]),
        .ej_flit      (ej_flit[R]),
        .pstate       (pstate[R]),
        .ev           (ev[R])
      );
    end
  end
endmodule
