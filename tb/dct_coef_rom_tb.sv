// dct_coef_rom_tb: reads every entry of the 4-, 8- and 16-point coefficient
// buffers and compares it with the DCT-II definition (dct_tb_pkg::ref_coef),
// then checks that the rows of the 4-point table are orthonormal to within
// the rounding of 12 fractional bits.
module dct_coef_rom_tb;
  timeunit 1ns; timeprecision 1ps;
  import dct_tb_pkg::*;

  logic [1:0] k4, j4;
  logic [2:0] k8, j8;
  logic [3:0] k16, j16;
  logic signed [13:0] c4, c8, c16;
  int checks = 0, failures = 0;

  dct_coef_rom #(.T(4))  u_rom4  (.k(k4),  .j(j4),  .coef(c4));
  dct_coef_rom #(.T(8))  u_rom8  (.k(k8),  .j(j8),  .coef(c8));
  dct_coef_rom #(.T(16)) u_rom16 (.k(k16), .j(j16), .coef(c16));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int a4 [4][4];

  initial begin
    for (int k = 0; k < 16; k++)
      for (int j = 0; j < 16; j++) begin
        k16 = 4'(k); j16 = 4'(j);
        k8 = 3'(k); j8 = 3'(j);
        k4 = 2'(k); j4 = 2'(j);
        #1;
        check(int'(c16) == ref_coef(16, k, j), $sformatf("A16[%0d][%0d]=%0d", k, j, c16));
        if (k < 8 && j < 8)
          check(int'(c8) == ref_coef(8, k, j), $sformatf("A8[%0d][%0d]=%0d", k, j, c8));
        if (k < 4 && j < 4) begin
          check(int'(c4) == ref_coef(4, k, j), $sformatf("A4[%0d][%0d]=%0d", k, j, c4));
          a4[k][j] = int'(c4);
        end
      end
    for (int k = 0; k < 4; k++)
      for (int l = 0; l < 4; l++) begin
        int s;
        s = 0;
        for (int j = 0; j < 4; j++) s += a4[k][j] * a4[l][j];
        if (k == l) check(s > 16777216 - 20000 && s < 16777216 + 20000, "row norm");
        else        check(s > -20000 && s < 20000, $sformatf("row orthogonality %0d %0d: %0d", k, l, s));
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
