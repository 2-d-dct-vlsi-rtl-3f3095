// dct_input_ctrl_tb: the input controller of the second chip of a two-chip
// 8-row cascade (N = 6 pixels per row, T = 8, M = 4, ROW_BASE = 4).
// A counting pixel stream with random gaps is offered while the four PE
// ready lines toggle at random. Checks, for every accepted pixel, that rows
// 4..7 of each strip reach PE row-4 only, that rows 0..3 are accepted without
// any PE valid, that in_ready follows the owning PE's ready, and that
// strip_done marks the last pixel of each strip.
module dct_input_ctrl_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 6, T = 8, M = 4, BASE = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, strip_done;
  logic [7:0] in_data, pe_data;
  logic [M-1:0] pe_valid, pe_ready;
  int checks = 0, failures = 0, idx = 0, dropped = 0, blocked = 0, strips = 0;

  dct_input_ctrl #(.N(N), .T(T), .M(M), .ROW_BASE(BASE)) u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at pixel %0d", what, idx);
    end
  endtask

  initial begin
    in_valid = 0; in_data = 0; pe_ready = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (idx < 5 * T * N) begin
      int row, col;
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      in_data  = 8'(idx);
      pe_ready = M'($urandom);
      #1;
      row = (idx / N) % T;
      col = idx % N;
      if (row >= BASE) begin
        check(in_ready == pe_ready[row - BASE], "in_ready follows owning PE");
        check(pe_valid == (in_valid ? M'(1) << (row - BASE) : '0), "pe_valid steering");
        check(pe_data == in_data, "pe_data");
      end else begin
        check(in_ready == 1'b1, "foreign row always accepted");
        check(pe_valid == '0, "foreign row not steered");
      end
      check(strip_done == (in_valid && in_ready && row == T - 1 && col == N - 1), "strip_done");
      if (in_valid && !in_ready) blocked++;
      if (in_valid && in_ready && row < BASE) dropped++;
      if (strip_done) strips++;
      @(posedge clk);
      if (in_valid && in_ready) idx++;
    end
    check(blocked > 0 && dropped > 0 && strips == 5, "mechanisms seen");
    $display("blocked %0d, dropped %0d, strips %0d", blocked, dropped, strips);
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
