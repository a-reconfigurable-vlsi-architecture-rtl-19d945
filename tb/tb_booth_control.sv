// tb_booth_control: checks the Booth recoder, partial-product multiplexer and
// control sequence of the radix-4 multiplier on their own.
//
// For random multiplicands A it starts a multiply and then, during the
// stepping cycles, drives all eight recoding triplets b(i+1) b(i) b(i-1) and
// compares 'pp' with the recoding table (+0, +A, +A, +2A, -2A, -A, -A, -0).
// It also checks the sequence: 'load' only with 'start' while idle, 'step'
// for exactly WB/2 cycles, a one-cycle 'done' right after, and that a start
// while busy is ignored.
module tb_booth_control;
  import idct_pkg::*;
  localparam int unsigned WA = 8, WB = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #50 clk = ~clk;  // long period: several #1 probes fit in one phase

  logic start = 1'b0;
  logic signed [WA-1:0] a = '0;
  logic [2:0] trip = '0;
  logic load, step, busy, done;
  logic signed [WA+1:0] pp;
  booth_op_e op;

  int checks = 0, failures = 0;

  booth_control #(.WA(WA), .WB(WB)) dut (.clk, .rst_n, .start, .a, .trip,
                                         .load, .step, .pp, .op, .busy, .done);

  function automatic int expected_pp(input int av, input logic [2:0] t);
    case (t)
      3'b001, 3'b010: return av;
      3'b011:         return 2 * av;
      3'b100:         return -2 * av;
      3'b101, 3'b110: return -av;
      default:        return 0;
    endcase
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 300; it++) begin
      int av;
      av = (it == 0) ? -128 : (it == 1) ? 127 : int'($urandom_range(255)) - 128;
      @(negedge clk);
      check(!busy && !load && !step, "idle before start");
      a = WA'(av); start = 1'b1;
      #1 check(load && !step, "load with start");
      @(negedge clk);
      a = WA'(int'($urandom_range(255)));   // must not be picked up any more
      start = (it % 3 == 0);                // start while busy: ignored
      for (int s = 0; s < WB / 2; s++) begin
        for (int t = 0; t < 8; t++) begin
          trip = 3'(t);
          #1;
          check(step && busy && !load && !done, $sformatf("step phase s=%0d t=%0d %b%b%b%b", s, t, step, busy, load, done));
          check(int'(pp) == expected_pp(av, 3'(t)),
                $sformatf("A=%0d trip=%03b pp=%0d", av, 3'(t), pp));
        end
        @(negedge clk);
      end
      start = 1'b0;
      check(done && !busy && !step, "done after WB/2 steps");
      @(negedge clk);
      check(!done, "done is one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
