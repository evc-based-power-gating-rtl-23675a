// flit_fifo: storage of one virtual channel (N-VC or E-VC).
//
// A circular buffer of DEPTH flits with first-word fall-through: rd_data
// is the oldest flit whenever empty is low, and rd_en pops it at the clock
// edge. A write and a read may happen in the same cycle. The buffer depths
// (1 flit for control VCs, 5 flits for data VCs) are set by the router; the
// FIFO organisation is this implementation's choice.
module flit_fifo
  import evc_pkg::*;
#(
  parameter int DEPTH = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  flit_t wr_data,
  input  logic  rd_en,
  output flit_t rd_data,
  output logic  empty,
  output logic  full
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  flit_t         mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;

  assign empty   = (cnt == 0);
  assign full    = (cnt == (AW+1)'(DEPTH));
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (wr_en) wp <= inc(wp);
      if (rd_en) rp <= inc(rp);
      cnt <= cnt + (AW+1)'(wr_en) - (AW+1)'(rd_en);
    end
  end

  always_ff @(posedge clk) if (wr_en) mem[wp] <= wr_data;

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en))
    else $error("flit_fifo: write into full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("flit_fifo: read from empty buffer");
endmodule
