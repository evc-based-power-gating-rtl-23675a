// tb_flit_fifo: self-checking test of the VC buffer.
// Random pushes and pops against a queue model; checks data order, the
// empty/full flags and that a depth-5 buffer holds exactly five flits.
module tb_flit_fifo;
  import evc_pkg::*;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, empty, full;
  flit_t wr_data, rd_data;
  flit_t model [$];
  int checks = 0, failures = 0;

  flit_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill to full
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      check(!full, "not full while filling");
      wr_en = 1; wr_data = '0; wr_data.data = DATA_W'(i + 100);
      model.push_back(wr_data);
      @(posedge clk); #1 wr_en = 0;
    end
    check(full, "full after DEPTH writes");
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() != 0) check(rd_data == model[0], "front data");
      rd_en = (model.size() != 0) && ($urandom % 2);
      wr_en = ((model.size() < DEPTH) || rd_en) && ($urandom % 2);
      wr_data = '0;
      wr_data.data = {$urandom, $urandom, $urandom, $urandom};
      wr_data.vn = 2'($urandom % 3);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      #1; wr_en = 0; rd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
