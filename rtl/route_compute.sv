// route_compute: routing computation (RC) of one input VC.
//
// X-Y dimension-order routing: the packet first travels along X until the
// column matches, then along Y, then leaves through the local port. In
// every direction a virtual bypass path starts at each router and ends
// EVC_HOPS hops further on, so a packet may take one whenever at least
// EVC_HOPS hops remain in the dimension it is travelling; routers always
// prefer such a path. `stop_alloc` (a neighbour's request during starvation
// recovery) forbids new express allocations in its direction.
// Purely combinational; the router position comes in on cur_x/cur_y. X-Y routing and the bypass-path distribution follow
// the design; the stop_alloc input is how this implementation carries the
// freeze request.
module route_compute
  import evc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,      // position of this router
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  input  logic [NUM_DIR-1:0] stop_alloc,
  output logic [2:0]         out_port,   // D_EAST..D_SOUTH or P_LOCAL
  output logic               express     // take the virtual bypass path
);
  logic [COORD_W-1:0] hops;

  always_comb begin
    if (dst_x > cur_x) begin
      out_port = 3'(D_EAST);
      hops     = dst_x - cur_x;
    end else if (dst_x < cur_x) begin
      out_port = 3'(D_WEST);
      hops     = cur_x - dst_x;
    end else if (dst_y > cur_y) begin
      out_port = 3'(D_NORTH);
      hops     = dst_y - cur_y;
    end else if (dst_y < cur_y) begin
      out_port = 3'(D_SOUTH);
      hops     = cur_y - dst_y;
    end else begin
      out_port = 3'(P_LOCAL);
      hops     = '0;
    end
    express = (out_port != 3'(P_LOCAL)) && (int'(hops) >= EVC_HOPS)
              && !stop_alloc[out_port[1:0]];
  end
endmodule
