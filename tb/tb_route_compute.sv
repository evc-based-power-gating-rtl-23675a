// tb_route_compute: self-checking test of X-Y routing and the choice of the
// virtual bypass path, for several router positions of an 8x8 mesh and all
// destinations, with and without a stop request.
module tb_route_compute;
  import evc_pkg::*;
  int checks = 0, failures = 0;
  logic [COORD_W-1:0] dx, dy;
  logic [NUM_DIR-1:0] stop;
  logic [2:0] op [4];
  logic       ex [4];

  route_compute u0 (.cur_x(3'd0), .cur_y(3'd0), .dst_x(dx), .dst_y(dy), .stop_alloc(stop), .out_port(op[0]), .express(ex[0]));
  route_compute u1 (.cur_x(3'd3), .cur_y(3'd4), .dst_x(dx), .dst_y(dy), .stop_alloc(stop), .out_port(op[1]), .express(ex[1]));
  route_compute u2 (.cur_x(3'd7), .cur_y(3'd7), .dst_x(dx), .dst_y(dy), .stop_alloc(stop), .out_port(op[2]), .express(ex[2]));
  route_compute u3 (.cur_x(3'd5), .cur_y(3'd1), .dst_x(dx), .dst_y(dy), .stop_alloc(stop), .out_port(op[3]), .express(ex[3]));

  localparam int PX [4] = '{0, 3, 7, 5};
  localparam int PY [4] = '{0, 4, 7, 1};

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++) begin
      stop = (s == 0) ? 4'b0000 : (s == 1) ? 4'b1111 : 4'b0101;
      for (int x = 0; x < 8; x++) for (int y = 0; y < 8; y++) begin
        dx = COORD_W'(x); dy = COORD_W'(y);
        #1;
        for (int u = 0; u < 4; u++) begin
          int ep, h; logic ee;
          if (x > PX[u])      begin ep = D_EAST;  h = x - PX[u]; end
          else if (x < PX[u]) begin ep = D_WEST;  h = PX[u] - x; end
          else if (y > PY[u]) begin ep = D_NORTH; h = y - PY[u]; end
          else if (y < PY[u]) begin ep = D_SOUTH; h = PY[u] - y; end
          else                begin ep = P_LOCAL; h = 0; end
          ee = (ep != P_LOCAL) && (h >= 3) && !stop[ep % 4];
          checks++;
          if (int'(op[u]) != ep || ex[u] != ee) begin
            failures++;
            $display("FAIL router(%0d,%0d) dst(%0d,%0d) stop=%b: port %0d/%0d exp %0d/%0d",
                     PX[u], PY[u], x, y, stop, op[u], ep, ex[u], ee);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
