// booth_control: control block of the radix-4 serial multiplier.
//
// It holds the multiplicand A, recodes the multiplier serially, two bits per
// clock, into Modified-Booth operations and drives the partial-product
// multiplexer that selects 0, +A, +2A (A shifted left), -A or -2A (shifted and
// negated). The three recoding bits b(i+1) b(i) b(i-1) come from the low end
// of the result register in booth_adder_shifter, which shifts right by two
// after every addition, so the same three wires see every bit group in turn.
//
// Sequence: 'start' while idle asserts 'load' in the same cycle (the adder-
// shifter loads the multiplier, this block latches A). Then 'step' is high for
// WB/2 cycles; the edge that ends the last one raises 'done' for one cycle,
// with the product valid in that cycle. Latency from the start edge to 'done'
// is WB/2 + 1 clocks, that is 5 clocks for an 8x8-bit multiply.
//
// The recoding table, the multiplexer choices and the split into a control
// block and a full-adder-shifter block follow the multiplier's description;
// the handshake (start, load, step, done) and the reset are this design's own.
module booth_control
  import idct_pkg::*;
#(
  parameter int unsigned WA = 8,   // multiplicand width (signed)
  parameter int unsigned WB = 8    // multiplier width (signed, even)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,   // begin a multiply (ignored while busy)
  input  logic signed [WA-1:0] a,       // multiplicand, latched on start
  input  logic        [2:0]    trip,    // b(i+1) b(i) b(i-1) from the result register
  output logic                 load,    // result register loads the multiplier
  output logic                 step,    // add partial product and shift by two
  output logic signed [WA+1:0] pp,      // selected partial product
  output booth_op_e            op,      // recoded operation (for observation)
  output logic                 busy,
  output logic                 done     // one-cycle pulse, product valid
);

  localparam int unsigned STEPS = WB / 2;
  localparam int unsigned CNT_W = (STEPS > 1) ? $clog2(STEPS) : 1;

  logic signed [WA-1:0] a_q;
  logic [CNT_W-1:0]     cnt_q;

  assign load = start && !busy;
  assign step = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        a_q   <= a;
        cnt_q <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        if (cnt_q == CNT_W'(STEPS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  // Partial-product multiplexer.
  logic signed [WA+1:0] a_ext;
  assign a_ext = {{2{a_q[WA-1]}}, a_q};
  always_comb begin
    op = booth_decode(trip);
    unique case (op)
      BOOTH_P1: pp = a_ext;
      BOOTH_P2: pp = a_ext <<< 1;
      BOOTH_M1: pp = -a_ext;
      BOOTH_M2: pp = -(a_ext <<< 1);
      default:  pp = '0;
    endcase
  end

  initial begin
    assert (WB % 2 == 0 && WB >= 2) else $error("booth_control: WB must be even");
  end

endmodule
