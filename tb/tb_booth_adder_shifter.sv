// tb_booth_adder_shifter: checks the adder and shifting result register of the
// radix-4 multiplier with a behavioural recoder in the testbench.
//
// For random signed A and B (and the extreme values) it loads B, then for
// WB/2 steps reads the triplet the register presents, checks it against the
// expected bits of B, applies the Booth partial product, and finally compares
// 'product' with A*B.
module tb_booth_adder_shifter;
  localparam int unsigned WA = 8, WB = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic load = 1'b0, step = 1'b0;
  logic signed [WB-1:0] b = '0;
  logic signed [WA+1:0] pp = '0;
  logic [2:0] trip;
  logic signed [WA+WB-1:0] product;

  int checks = 0, failures = 0;

  booth_adder_shifter #(.WA(WA), .WB(WB)) dut (.clk, .rst_n, .load, .b, .step, .pp, .trip, .product);

  function automatic int booth_pp(input int av, input logic [2:0] t);
    case (t)
      3'b001, 3'b010: return av;
      3'b011:         return 2 * av;
      3'b100:         return -2 * av;
      3'b101, 3'b110: return -av;
      default:        return 0;
    endcase
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      int av, bv;
      logic [WB:0] bext;
      av = (it < 4) ? ((it & 1) ? 127 : -128) : int'($urandom_range(255)) - 128;
      bv = (it < 4) ? ((it & 2) ? 127 : -128) : int'($urandom_range(255)) - 128;
      bext = {WB'(bv), 1'b0};
      @(negedge clk);
      b = WB'(bv); load = 1'b1;
      @(negedge clk);
      load = 1'b0; step = 1'b1;
      for (int s = 0; s < WB / 2; s++) begin
        checks++;
        if (trip !== bext[2*s +: 3]) begin
          failures++;
          if (failures < 10) $display("B=%0d step %0d trip=%03b expected %03b", bv, s, trip, bext[2*s +: 3]);
        end
        pp = (WA+2)'(booth_pp(av, trip));
        @(negedge clk);
      end
      step = 1'b0;
      checks++;
      if (product !== (WA+WB)'(av * bv)) begin
        failures++;
        if (failures < 10) $display("%0d x %0d: got %0d", av, bv, product);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
