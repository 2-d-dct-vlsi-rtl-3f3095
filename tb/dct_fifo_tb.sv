// dct_fifo_tb: random push/pop traffic against a queue model on a FIFO of
// non-power-of-two depth (5), including pushes into a full FIFO that pop in
// the same cycle (the R-FIFO access pattern). Checks head word, empty, full
// and count every cycle.
module dct_fifo_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 12, D = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, full_pushpop = 0, fulls = 0;
  logic [W-1:0] model[$];

  dct_fifo #(.WIDTH(W), .DEPTH(D)) u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (model size %0d)", what, model.size());
    end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() != 0) check(dout == model[0], "head word");
      // bias towards filling in the first half, draining in the second
      pop  = !empty && ($urandom_range(9) < (i % 400 < 200 ? 3 : 7));
      push = (!full || pop) && ($urandom_range(9) < (i % 400 < 200 ? 7 : 3));
      din  = W'($urandom);
      if (full) fulls++;
      if (full && push && pop) full_pushpop++;
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    check(fulls > 0, "FIFO reached full");
    check(full_pushpop > 0, "push and pop while full");
    $display("cycles full %0d, push+pop while full %0d", fulls, full_pushpop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
