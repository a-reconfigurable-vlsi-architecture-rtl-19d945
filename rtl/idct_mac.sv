// idct_mac: one multiply-accumulate lane of a 1-D IDCT stage.
//
// After 'start' the lane forms the dot product acc = sum_{k=0}^{N-1} d(k) * c(k)
// one term at a time. For term k it drives 'k' and reads the data operand
// d(k) ('data') and the constant c(k) ('coef') in the same cycle. zero_mask
// looks at d(k): a zero term is skipped in that one cycle and the multiplier
// stays idle; a non-zero term starts the radix-4 booth_mult (data as
// multiplicand, constant as the recoded multiplier) and the product is added
// to the accumulator in the cycle 'done' returns.
//
// Timing per term: 1 clock when d(k) = 0, 1 + (CW/2 + 1) clocks otherwise
// (6 clocks for 8-bit constants). The lane then sits in MAC_DONE with
// 'valid' high and 'acc' stable until the next 'start', which it accepts in
// MAC_IDLE or MAC_DONE. 'zero_skip' and 'mult_start' pulse once per skipped or
// multiplied term (activity monitors).
//
// MAC-based evaluation and skipping zero data follow the design; the term-
// serial order, the state machine and the timing are this design's own.
module idct_mac
  import idct_pkg::*;
#(
  parameter int unsigned DW    = DATA_W,          // data operand width
  parameter int unsigned CW    = COEF_W,          // constant width (even)
  parameter int unsigned TERMS = N,               // terms per dot product
  parameter int unsigned AW    = DW + CW + $clog2(TERMS)  // accumulator width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic [IDX_W-1:0]        k,          // term index being read
  input  logic signed [DW-1:0]    data,       // d(k)
  input  logic signed [CW-1:0]    coef,       // c(k)
  output logic                    valid,      // acc holds the finished sum
  output logic                    busy,
  output logic signed [AW-1:0]    acc,
  output logic                    zero_skip,  // a term was skipped (data zero)
  output logic                    mult_start  // a term started the multiplier
);

  mac_state_e state_q;
  logic [IDX_W-1:0] k_q;

  logic mult_en, skip;
  logic mult_busy, mult_done;
  logic signed [DW+CW-1:0] product;
  logic last;

  zero_mask #(.W(DW)) u_mask (
    .req     (state_q == MAC_TERM),
    .data    (data),
    .is_zero (),
    .mult_en (mult_en),
    .skip    (skip)
  );

  booth_mult #(.WA(DW), .WB(CW)) u_mult (
    .clk, .rst_n,
    .start   (mult_en),
    .a       (data),
    .b       (coef),
    .busy    (mult_busy),
    .done    (mult_done),
    .product (product)
  );

  assign last = (k_q == IDX_W'(TERMS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= MAC_IDLE;
      k_q     <= '0;
      acc     <= '0;
    end else begin
      unique case (state_q)
        MAC_IDLE, MAC_DONE: begin
          if (start) begin
            state_q <= MAC_TERM;
            k_q     <= '0;
            acc     <= '0;
          end
        end
        MAC_TERM: begin
          if (skip) begin
            if (last) state_q <= MAC_DONE;
            else      k_q     <= k_q + 1'b1;
          end else begin
            state_q <= MAC_MUL;
          end
        end
        MAC_MUL: begin
          if (mult_done) begin
            acc <= acc + AW'(product);
            if (last) state_q <= MAC_DONE;
            else begin
              state_q <= MAC_TERM;
              k_q     <= k_q + 1'b1;
            end
          end
        end
        default: state_q <= MAC_IDLE;
      endcase
    end
  end

  assign k          = k_q;
  assign valid      = (state_q == MAC_DONE);
  assign busy       = (state_q == MAC_TERM) || (state_q == MAC_MUL);
  assign zero_skip  = skip;
  assign mult_start = mult_en;

  // The lane only starts the multiplier when it is free.
  assert property (@(posedge clk) disable iff (!rst_n) mult_en |-> !mult_busy);

endmodule
