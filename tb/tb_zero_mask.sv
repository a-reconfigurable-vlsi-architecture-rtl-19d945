// tb_zero_mask: checks the zero-data mask on every 8-bit value (and the
// all-ones and single-bit patterns of a 12-bit instance) with and without a
// request: 'skip' only for a requested zero term, 'mult_en' only for a
// requested non-zero term, never both.
module tb_zero_mask;
  logic req;
  logic [7:0] d8;
  logic z8, en8, sk8;
  logic [11:0] d12;
  logic z12, en12, sk12;
  int checks = 0, failures = 0;

  zero_mask #(.W(8))  dut8  (.req, .data(d8),  .is_zero(z8),  .mult_en(en8),  .skip(sk8));
  zero_mask #(.W(12)) dut12 (.req, .data(d12), .is_zero(z12), .mult_en(en12), .skip(sk12));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int r = 0; r < 2; r++)
      for (int v = 0; v < 256; v++) begin
        req = r[0]; d8 = 8'(v);
        #1;
        check(z8 == (v == 0), "is_zero");
        check(en8 == (r == 1 && v != 0), $sformatf("mult_en req=%0d v=%0d", r, v));
        check(sk8 == (r == 1 && v == 0), $sformatf("skip req=%0d v=%0d", r, v));
      end
    req = 1'b1;
    for (int bit_i = -1; bit_i < 12; bit_i++) begin
      d12 = (bit_i < 0) ? 12'hfff : 12'(1 << bit_i);
      #1 check(en12 && !sk12 && !z12, "12-bit non-zero");
    end
    d12 = '0;
    #1 check(!en12 && sk12 && z12, "12-bit zero");
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
