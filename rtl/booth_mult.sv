// booth_mult: radix-4 (Modified-Booth) serial multiplier, signed A x signed B.
//
// booth_control recodes B two bits per clock and selects 0, +-A or +-2A;
// booth_adder_shifter adds the selection into the upper half of the result
// register and shifts the register right by two. One clock loads the
// operands and WB/2 clocks add and shift, so a start sampled at one edge gives
// 'done' (one-cycle pulse, product valid) WB/2 + 1 edges later: 5 clocks for
// 8x8 bits, against (n+m)/4 + 1 = 5 for n = m = 8. 'product' stays valid until
// the next start. A start while busy is ignored.
module booth_mult
  import idct_pkg::*;
#(
  parameter int unsigned WA = 8,   // multiplicand width
  parameter int unsigned WB = 8    // multiplier width (even); sets the latency
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [WA-1:0]    a,
  input  logic signed [WB-1:0]    b,
  output logic                    busy,
  output logic                    done,
  output logic signed [WA+WB-1:0] product
);

  logic                 load, step;
  logic [2:0]           trip;
  logic signed [WA+1:0] pp;

  booth_control #(.WA(WA), .WB(WB)) u_ctrl (
    .clk, .rst_n, .start, .a, .trip,
    .load, .step, .pp, .op(), .busy, .done
  );

  booth_adder_shifter #(.WA(WA), .WB(WB)) u_fas (
    .clk, .rst_n, .load, .b, .step, .pp, .trip, .product
  );

endmodule
