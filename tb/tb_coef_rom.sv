// tb_coef_rom: compares all 64 constants of the folded-symmetry ROM with
// round(c(k)/2 * cos((2n+1) k pi / 16) * 256) worked out directly, and checks
// that the rows of the integer matrix are nearly orthonormal: squared
// norm close to 2^16 and cross products close to 0 (C C^T = I unscaled).
module tb_coef_rom;
  import idct_ref_pkg::*;
  logic [2:0] k, n;
  logic signed [7:0] c;
  int checks = 0, failures = 0;
  int m [8][8];

  coef_rom dut (.k, .n, .c);

  initial begin
    for (int kk = 0; kk < 8; kk++)
      for (int nn = 0; nn < 8; nn++) begin
        k = 3'(kk); n = 3'(nn);
        #1;
        m[kk][nn] = int'(c);
        checks++;
        if (int'(c) != c_int(kk, nn)) begin
          failures++;
          $display("C[%0d][%0d] = %0d, expected %0d", kk, nn, c, c_int(kk, nn));
        end
      end
    // Rows of C are orthonormal (times 2^16 here).
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        automatic int s = 0;
        for (int nn = 0; nn < 8; nn++) s += m[a][nn] * m[b][nn];
        checks++;
        if (a == b ? (s < 65536 - 800 || s > 65536 + 800) : (s < -800 || s > 800)) begin
          failures++;
          $display("row %0d . row %0d = %0d", a, b, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
