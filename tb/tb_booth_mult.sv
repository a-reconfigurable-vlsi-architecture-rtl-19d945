// tb_booth_mult: exhaustive check of the 8x8 radix-4 serial multiplier.
//
// Multiplies every pair of signed 8-bit operands, compares the product with
// the simulator's own signed multiplication and checks that 'done' comes
// exactly WB/2 + 1 = 5 clocks after the start edge (and not earlier). The
// first case is 12 x 3 = 36. A second instance with a 12-bit multiplicand
// (as used inside the IDCT lanes) is checked on random operands.
module tb_booth_mult;
  localparam int unsigned WA = 8, WB = 8;
  localparam int unsigned LAT = WB / 2 + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done;
  logic signed [WA-1:0] a = '0;
  logic signed [WB-1:0] b = '0;
  logic signed [WA+WB-1:0] product;

  logic start2 = 1'b0, busy2, done2;
  logic signed [11:0] a2 = '0;
  logic signed [7:0]  b2 = '0;
  logic signed [19:0] product2;

  int checks = 0, failures = 0;

  booth_mult #(.WA(WA), .WB(WB)) dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .product);
  booth_mult #(.WA(12), .WB(8)) dut2 (.clk, .rst_n, .start(start2), .a(a2), .b(b2),
                                     .busy(busy2), .done(done2), .product(product2));

  task automatic run_one(input int x, input int y);
    int cyc;
    @(negedge clk);
    a = WA'(x); b = WB'(y); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = '0; b = '0;   // operands only need to be valid at the start edge
    cyc = 1;
    while (!done && cyc < 20) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != LAT) begin
      failures++;
      if (failures < 10) $display("latency %0d x %0d: %0d clocks, expected %0d", x, y, cyc, LAT);
    end
    checks++;
    if (product !== (WA+WB)'(x * y)) begin
      failures++;
      if (failures < 10) $display("product %0d x %0d = %0d, got %0d", x, y, x * y, product);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_one(12, 3);
    for (int x = -128; x < 128; x++)
      for (int y = -128; y < 128; y++)
        run_one(x, y);
    // 12-bit multiplicand
    for (int i = 0; i < 2000; i++) begin
      int x, y, cyc;
      x = int'($urandom_range(4095)) - 2048;
      y = int'($urandom_range(255)) - 128;
      @(negedge clk);
      a2 = 12'(x); b2 = 8'(y); start2 = 1'b1;
      @(negedge clk);
      start2 = 1'b0;
      cyc = 1;
      while (!done2 && cyc < 20) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != LAT || product2 !== 20'(x * y)) begin
        failures++;
        if (failures < 10) $display("12-bit: %0d x %0d = %0d, got %0d after %0d", x, y, x * y, product2, cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
