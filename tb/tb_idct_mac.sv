// tb_idct_mac: checks one multiply-accumulate lane.
//
// The testbench answers the lane's term index k combinationally with d(k) and
// c(k) from arrays it fills at random (data 12-bit with a random share of
// zeros, constants 8-bit). It checks the dot product, the number of skipped
// and multiplied terms, and the exact clock count from the start edge to
// 'valid': 1 + sum over terms of (1 if d(k) = 0, else 1 + CW/2 + 1).
module tb_idct_mac;
  localparam int unsigned DW = 12, CW = 8;
  localparam int unsigned MUL_COST = 1 + CW / 2 + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [2:0] k;
  logic signed [DW-1:0] data;
  logic signed [CW-1:0] coef;
  logic valid, busy, zero_skip, mult_start;
  logic signed [DW+CW+2:0] acc;

  int d [8], c [8];
  int checks = 0, failures = 0;
  int n_skip, n_mult;

  idct_mac #(.DW(DW), .CW(CW), .TERMS(8)) dut (
    .clk, .rst_n, .start, .k, .data, .coef, .valid, .busy, .acc, .zero_skip, .mult_start);

  assign data = DW'(d[k]);
  assign coef = CW'(c[k]);

  always @(posedge clk) begin
    if (zero_skip)  n_skip++;
    if (mult_start) n_mult++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      longint exp_acc;
      int exp_cyc, cyc, zeros, pct;
      pct = (it < 2) ? it * 100 : int'($urandom_range(100));
      exp_acc = 0; exp_cyc = 1; zeros = 0;
      for (int t = 0; t < 8; t++) begin
        d[t] = (int'($urandom_range(99)) < pct) ? 0 : int'($urandom_range(4095)) - 2048;
        if (it == 2) d[t] = (t[0]) ? 2047 : -2048;
        c[t] = int'($urandom_range(255)) - 128;
        if (it == 2) c[t] = -128;
        exp_acc += longint'(d[t]) * c[t];
        if (d[t] == 0) begin exp_cyc += 1; zeros++; end
        else exp_cyc += MUL_COST;
      end
      @(negedge clk);
      n_skip = 0; n_mult = 0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!valid && cyc < 100) begin @(negedge clk); cyc++; end
      check(cyc == exp_cyc, $sformatf("cycles %0d expected %0d", cyc, exp_cyc));
      check(longint'(acc) == exp_acc, $sformatf("acc %0d expected %0d", acc, exp_acc));
      check(n_skip == zeros && n_mult == 8 - zeros,
            $sformatf("skips %0d mults %0d, zeros %0d", n_skip, n_mult, zeros));
      // result holds until the next start
      repeat (2) @(negedge clk);
      check(valid && longint'(acc) == exp_acc && !busy, "result held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
