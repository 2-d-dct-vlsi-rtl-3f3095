// dct_mac_tb: random operands through all settings of the two MUXes of the
// multiply-add datapath; each result is compared with coef*operand+addend
// computed in 64-bit arithmetic.
module dct_mac_tb;
  timeunit 1ns; timeprecision 1ps;
  logic sel_y;
  logic [1:0] add_sel;
  logic [7:0] pix;
  logic signed [15:0] y;
  logic signed [13:0] coef;
  logic signed [31:0] r_in, q_in, sum;
  int checks = 0, failures = 0;

  dct_mac u_dut (.*);

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint op, add, expv;
      sel_y   = 1'($urandom);
      add_sel = 2'($urandom_range(2));
      pix     = 8'($urandom);
      y       = 16'($urandom);
      coef    = 14'($urandom);
      r_in    = 32'($urandom) >>> 4;
      q_in    = 32'($urandom) >>> 4;
      if (i < 4) begin            // extremes
        pix = 8'hff; y = -16'sd32768; coef = -14'sd8192;
      end
      #1;
      op   = sel_y ? longint'(y) : longint'(pix);
      add  = (add_sel == 2'd1) ? longint'(r_in) : (add_sel == 2'd2) ? longint'(q_in) : 0;
      expv = longint'(coef) * op + add;
      checks++;
      if (longint'(sum) != longint'(32'(expv))) begin
        failures++;
        if (failures < 10)
          $display("FAIL sel_y=%0d add_sel=%0d got %0d expected %0d", sel_y, add_sel, sum, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
