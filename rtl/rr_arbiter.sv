// rr_arbiter: round-robin arbiter used by the VC and switch allocators.
//
// Grants one of N requests, searching from the position after the last
// granted requester, so every persistent requester is served within N
// grants. The grant is combinational from req; the priority pointer moves
// on the clock edge when `advance` is high and a grant was given.
// The allocators are only named by the design; round-robin is this
// implementation's choice.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt,
  output logic         gnt_valid
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;      // highest-priority index
  logic [IW-1:0] win;

  always_comb begin
    gnt       = '0;
    gnt_valid = 1'b0;
    win       = '0;
    for (int k = 0; k < N; k++) begin
      int idx;
      idx = (int'(ptr) + k) % N;
      if (!gnt_valid && req[idx]) begin
        gnt_valid = 1'b1;
        gnt[idx]  = 1'b1;
        win       = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && gnt_valid) ptr <= (int'(win) == N - 1) ? '0 : win + 1'b1;
  end
endmodule
