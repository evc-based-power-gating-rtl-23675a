// input_port: one input port of the EVC router.
//
// Holds NUM_VN normal VCs (N-VCs) and NUM_VN express VCs (E-VCs), one EVC
// latch and the direct link of the port. An arriving flit is handled in the
// cycle it is on the link:
//  * an express flit still bypassing routers (ehops != 0) is captured in the
//    EVC latch and leaves on `pass` in the next cycle towards the opposite
//    output; if the latch is holding a normal flit, it takes the direct link
//    instead and is on `pass` in the same cycle;
//  * a normal flit marked to_latch (sent while this router's VCs are powered
//    off or charging) is held in the EVC latch; it is then the front flit of
//    its N-VC and goes through the router pipeline from there;
//  * any other flit is written into its VC (E-VC for an express flit that
//    ends its bypass path here, N-VC otherwise).
// `front`/`front_valid` show the oldest flit of each VC, `pop` removes it.
// `credit` pulses when an N-VC buffer slot frees, `ecredit` when an E-VC slot
// frees and `latch_tok` when a held normal flit leaves the latch; the router
// returns them to the senders. The latch and direct-link roles follow the
// design; the one-slot latch token and the pass timing are this
// implementation's choices.
module input_port
  import evc_pkg::*;
#(
  parameter int CTRL_DEPTH = 1,
  parameter int DATA_DEPTH = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  link_t              in,
  input  logic               writable,     // VC buffers powered
  input  logic [NUM_VC-1:0]  pop,
  output logic [NUM_VC-1:0]  front_valid,
  output flit_t              front [NUM_VC],
  output logic [NUM_VC-1:0]  vc_full,
  output link_t              pass,         // express flit for the opposite output
  output logic [NUM_VN-1:0]  credit,
  output logic [NUM_VN-1:0]  ecredit,
  output logic               latch_tok,
  output logic               vc_nonempty,
  output logic               port_empty,
  output logic               ev_latch_pass, // express flit captured in the latch
  output logic               ev_direct,     // express flit used the direct link
  output logic               ev_nlatch      // normal flit held in the latch
);
  logic  latch_valid, latch_pass;
  flit_t latch_flit;
  logic  held;                      // latch holds a normal flit
  logic [$clog2(NUM_VC)-1:0] held_vc;
  logic  in_bypass, in_held, in_store;
  flit_t in_dec;
  logic [NUM_VC-1:0] wr_en, rd_en, fifo_empty;
  flit_t fifo_front [NUM_VC];
  logic [$clog2(NUM_VC)-1:0] in_vc;

  assign held    = latch_valid && !latch_pass;
  assign held_vc = $bits(held_vc)'(latch_flit.vn);

  always_comb begin
    in_dec       = in.flit;
    in_dec.ehops = in.flit.ehops - 2'd1;
    in_bypass    = in.valid && in.flit.express && (in.flit.ehops != 2'd0);
    in_held      = in.valid && !in_bypass && in.flit.to_latch;
    in_store     = in.valid && !in_bypass && !in.flit.to_latch;
    in_vc        = $bits(in_vc)'(in.flit.express ? NUM_VN + int'(in.flit.vn) : int'(in.flit.vn));
    ev_direct     = in_bypass && held;
    ev_latch_pass = in_bypass && !held;
    ev_nlatch     = in_held;
    pass = '0;
    if (latch_valid && latch_pass) begin
      pass.valid = 1'b1;
      pass.flit  = latch_flit;
    end else if (ev_direct) begin
      pass.valid = 1'b1;
      pass.flit  = in_dec;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch_valid <= 1'b0;
      latch_pass  <= 1'b0;
      latch_flit  <= '0;
    end else begin
      if (ev_latch_pass) begin
        latch_valid <= 1'b1;
        latch_pass  <= 1'b1;
        latch_flit  <= in_dec;
      end else if (in_held) begin
        latch_valid <= 1'b1;
        latch_pass  <= 1'b0;
        latch_flit  <= in.flit;
      end else if (latch_pass || (held && pop[held_vc])) begin
        latch_valid <= 1'b0;
        latch_pass  <= 1'b0;
      end
    end
  end

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    localparam int D = ((v % NUM_VN) == 0) ? CTRL_DEPTH : DATA_DEPTH;
    logic fifo_full;
    assign wr_en[v] = in_store && (int'(in_vc) == v);
    assign rd_en[v] = pop[v] && !(held && int'(held_vc) == v);
    flit_fifo #(.DEPTH(D)) u_fifo (
      .clk, .rst_n,
      .wr_en  (wr_en[v]),
      .wr_data(in.flit),
      .rd_en  (rd_en[v]),
      .rd_data(fifo_front[v]),
      .empty  (fifo_empty[v]),
      .full   (fifo_full)
    );
    assign vc_full[v]     = fifo_full;
    assign front_valid[v] = (held && int'(held_vc) == v) || !fifo_empty[v];
    assign front[v]       = (held && int'(held_vc) == v) ? latch_flit : fifo_front[v];
  end

  for (genvar n = 0; n < NUM_VN; n++) begin : g_cr
    assign credit[n]  = rd_en[n];
    assign ecredit[n] = rd_en[NUM_VN + n];
  end

  assign latch_tok   = held && pop[held_vc];
  assign vc_nonempty = !(&fifo_empty);
  assign port_empty  = (&fifo_empty) && !latch_valid;

  // A held flit must find the latch free or leaving.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_held |-> (!latch_valid || latch_pass || pop[held_vc]))
    else $error("input_port: EVC latch overrun");
  // VC buffers are written only while powered.
  assert property (@(posedge clk) disable iff (!rst_n) in_store |-> writable)
    else $error("input_port: write into an unpowered VC");
endmodule
