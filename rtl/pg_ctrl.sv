// pg_ctrl: power control unit (ctrlr) of one router.
//
// Powering off: when the router holds no flit (EVC latches, N-VCs, E-VCs,
// crossbar) and no WU / WU_EVC request arrives, the unit enters IDLE and
// asserts PG and PG_EVC towards its upstream routers while the VCs are still
// powered. After T_IDLE_DETECT cycles in IDLE it asserts `sleep` and cuts the
// VC supply. A WU / WU_EVC request, or a flit written into a VC, during IDLE
// returns it to ACTIVE at once.
// Powering on: a WU / WU_EVC request in SLEEP starts the charge. The cycle
// the request is seen counts as charge cycle 0, so WAKEUP lasts T_WAKEUP
// cycles (charge cycles 1..T_WAKEUP) and the router is fully charged in the
// following cycle. PG_EVC drops at charge cycle T_WAKEUP-MARGIN_EVC and PG at
// charge cycle T_WAKEUP-MARGIN, so express senders may start earlier than
// normal senders.
// The states, the conditions and the four timing parameters follow the
// design (Table 5.1 values as defaults). `writable` (VC storage usable) from
// the cycle PG drops is this implementation's reading of the margin rule.
module pg_ctrl
  import evc_pkg::*;
#(
  parameter int T_WAKEUP      = 8,
  parameter int T_IDLE_DETECT = 8,
  parameter int MARGIN        = 4,
  parameter int MARGIN_EVC    = 6
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    router_empty,  // no flit anywhere in the router
  input  logic    vc_nonempty,   // some VC holds a flit
  input  logic    wu_any,        // any WU / WU_EVC / local injection request
  output pstate_e state,
  output logic    sleep,         // VC supply cut off
  output logic    pg,            // PG to upstream routers (normal path)
  output logic    pg_evc,        // PG_EVC to sources of bypass paths
  output logic    writable,      // VC buffers may be written this cycle
  output logic    charged        // VC buffers fully powered
);
  localparam int CW = $clog2(((T_WAKEUP > T_IDLE_DETECT) ? T_WAKEUP : T_IDLE_DETECT) + 2);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= PS_ACTIVE;
      cnt   <= '0;
    end else begin
      unique case (state)
        PS_ACTIVE: if (router_empty && !wu_any) begin
          state <= PS_IDLE;
          cnt   <= CW'(1);
        end
        PS_IDLE: begin
          if (wu_any || vc_nonempty) begin
            state <= PS_ACTIVE;
          end else if (int'(cnt) >= T_IDLE_DETECT) begin
            state <= PS_SLEEP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PS_SLEEP: if (wu_any) begin
          state <= PS_WAKEUP;
          cnt   <= CW'(1);
        end
        PS_WAKEUP: begin
          if (int'(cnt) >= T_WAKEUP) state <= PS_ACTIVE;
          else                       cnt   <= cnt + 1'b1;
        end
      endcase
    end
  end

  always_comb begin
    sleep    = (state == PS_SLEEP);
    charged  = (state == PS_ACTIVE) || (state == PS_IDLE);
    pg       = 1'b1;
    pg_evc   = 1'b1;
    writable = charged;
    unique case (state)
      PS_ACTIVE: begin pg = 1'b0; pg_evc = 1'b0; end
      PS_IDLE, PS_SLEEP: ;
      PS_WAKEUP: begin
        pg_evc   = int'(cnt) < T_WAKEUP - MARGIN_EVC;
        pg       = int'(cnt) < T_WAKEUP - MARGIN;
        writable = !pg;
      end
    endcase
  end

  initial begin
    assert (MARGIN_EVC >= MARGIN && MARGIN_EVC < T_WAKEUP)
      else $error("pg_ctrl: need MARGIN <= MARGIN_EVC < T_WAKEUP");
  end
endmodule
