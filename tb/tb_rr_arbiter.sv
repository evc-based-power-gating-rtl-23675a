// tb_rr_arbiter: self-checking test of the round-robin arbiter.
// Drives random request vectors and compares each grant with a reference
// search that starts after the previously granted index; checks fairness
// (all-ones requests are granted in rotating order).
module tb_rr_arbiter;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic gnt_valid, advance;
  int checks = 0, failures = 0;
  int ref_ptr;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance, .gnt, .gnt_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_win(input logic [N-1:0] r, input int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return (p + k) % N;
    return -1;
  endfunction

  initial begin
    req = '0; advance = 0; ref_ptr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // rotation with all requests
    req = '1; advance = 1;
    for (int c = 0; c < 2 * N; c++) begin
      #1;
      checks++;
      if (!(gnt_valid && gnt == N'(1) << (c % N))) begin
        failures++;
        $display("rotation: cycle %0d gnt=%b", c, gnt);
      end
      @(negedge clk);
    end
    ref_ptr = 0;  // pointer wrapped back after 2N grants
    for (int c = 0; c < 400; c++) begin
      int w;
      req = N'($urandom);
      advance = ($urandom % 4) != 0;
      #1;
      w = ref_win(req, ref_ptr);
      checks++;
      if ((w < 0 && (gnt_valid || gnt != 0)) || (w >= 0 && (!gnt_valid || gnt != N'(1) << w))) begin
        failures++;
        $display("random: req=%b ptr=%0d gnt=%b exp=%0d", req, ref_ptr, gnt, w);
      end
      @(negedge clk);
      if (advance && w >= 0) ref_ptr = (w + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
