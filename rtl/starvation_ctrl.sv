// starvation_ctrl: starvation detection and bypass-path freeze for one
// output port of a router.
//
// Express flits crossing the router have the highest priority on their
// output port, so a steady express stream can starve the router's own
// (normal) flits waiting for that port. The unit counts consecutive cycles
// in which some input VC wants the port while an express flit holds it.
// After STARVE_TH such cycles it raises `freeze` and records which VCs were
// waiting (a flit already switched to the port counts as waiting too). The router turns `freeze` into the two freeze requests of the
// design: the next router downstream asserts PG_EVC towards the bypass
// source two hops upstream, and the next router upstream stops allocating
// express VCs in this direction. `freeze` drops once every recorded VC has
// sent the tail of its packet through the port and no switched flit waits.
// Counting consecutive blocked cycles and the threshold value are this
// implementation's choices (the design takes its detection from earlier
// EVC work without giving it); the freeze and release rule follow the design.
module starvation_ctrl #(
  parameter int NREQ      = 30,
  parameter int STARVE_TH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NREQ-1:0] want,       // VC has a flit for this port
  input  logic [NREQ-1:0] tail_sent,  // VC sent its tail through this port
  input  logic            st_wait,    // a flit already switched to the port waits
  input  logic            epass,      // port taken by a bypassing express flit
  input  logic            n_moved,    // a locally allocated flit used the port
  output logic            freeze,
  output logic            detect      // one-cycle pulse when starvation is found
);
  localparam int CW = $clog2(STARVE_TH + 1);
  logic [CW-1:0]   cnt;
  logic [NREQ-1:0] mask;

  assign detect = !freeze && ((|want) || st_wait) && epass && (int'(cnt) == STARVE_TH - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      mask   <= '0;
      freeze <= 1'b0;
    end else if (freeze) begin
      if (((mask & ~tail_sent) == '0) && !st_wait) begin
        freeze <= 1'b0;
        mask   <= '0;
      end else begin
        mask <= mask & ~tail_sent;
      end
      cnt <= '0;
    end else if (detect) begin
      freeze <= 1'b1;
      mask   <= want;
      cnt    <= '0;
    end else if (((|want) || st_wait) && epass) begin
      cnt <= cnt + 1'b1;
    end else if (n_moved || !((|want) || st_wait)) begin
      cnt <= '0;
    end
  end
endmodule
