// booth_adder_shifter: full-adder-shifter block of the radix-4 serial multiplier.
//
// The result register is {hi, lo, q}: hi is WA+2 bits of partial sum, lo first
// holds the multiplier operand B and q is the appended bit b(-1) = 0. On
// 'load' the register becomes {0, B, 0}. On every 'step' the partial product
// from booth_control is added to hi and the whole register shifts right
// arithmetically by two bits, so the bits of B are consumed at the bottom while
// product bits enter from the top. After WB/2 steps the register holds A*B:
// product = {hi[WA-1:0], lo}. 'trip' = {lo[1:0], q} feeds the recoder.
//
// hi needs two guard bits: the partial sum never exceeds 8|A|/3, below 2^(WA+1).
// Reusing one register for the operand that is consumed and the product that
// is built follows the original multiplier; loading it with the recoded
// operand (rather than the multiplicand) and the exact layout are this
// design's own reading of that scheme.
module booth_adder_shifter #(
  parameter int unsigned WA = 8,
  parameter int unsigned WB = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic signed [WB-1:0]    b,
  input  logic                    step,
  input  logic signed [WA+1:0]    pp,
  output logic        [2:0]       trip,
  output logic signed [WA+WB-1:0] product
);

  logic signed [WA+1:0] hi_q;
  logic        [WB-1:0] lo_q;
  logic                 q_q;

  logic signed [WA+1:0]    sum;
  logic signed [WA+WB+1:0] shifted;

  assign sum     = hi_q + pp;
  assign shifted = $signed({sum, lo_q}) >>> 2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_q <= '0;
      lo_q <= '0;
      q_q  <= 1'b0;
    end else if (load) begin
      hi_q <= '0;
      lo_q <= b;
      q_q  <= 1'b0;
    end else if (step) begin
      hi_q <= shifted[WA+WB+1:WB];
      lo_q <= shifted[WB-1:0];
      q_q  <= lo_q[1];
    end
  end

  assign trip    = {lo_q[1:0], q_q};
  assign product = {hi_q[WA-1:0], lo_q};

endmodule
