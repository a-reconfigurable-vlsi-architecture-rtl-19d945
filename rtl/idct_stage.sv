// idct_stage: one 1-D IDCT stage, N multiply-accumulate lanes working on one
// output row at a time.
//
// Lane j computes element (row, j) of the stage's output matrix as an N-term
// dot product. The constant of term k is C[k][row] when CONST_BY_ROW = 1 and
// C[k][j] when CONST_BY_ROW = 0; each lane has its own coef_rom port. The data
// of term k is fetched by the lane through its own read port (rd_k[j] ->
// rd_data[j]), so lanes that meet zero data run ahead of the others.
//
//   stage 1 (CONST_BY_ROW = 1): T[i][j] = sum_k C[k][i] * Z[k][j]   (T = C^T Z)
//   stage 2 (CONST_BY_ROW = 0): X[i][j] = sum_k T[i][k] * C[k][j]   (X = T C)
//
// Handshake: 'start' with 'row' is taken when the stage is not busy. When all
// lanes are finished, 'res_valid' rises with the row of results, each rescaled
// by 2^-FRAC with rounding (add half, shift right arithmetically) and
// saturated to OW bits. The result holds until 'res_ack'; the stage is busy
// from 'start' until 'res_ack'. A row takes as long as its slowest lane.
//
// The row-by-row dot-product organisation follows the design; the rounding,
// saturation and the handshake are this design's own.
module idct_stage
  import idct_pkg::*;
#(
  parameter int unsigned DW           = DATA_W,     // data width
  parameter int unsigned CW           = COEF_W,     // constant width
  parameter int unsigned FRAC         = COEF_FRAC,  // constant scaling
  parameter int unsigned OW           = T_W,        // result width
  parameter bit          CONST_BY_ROW = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [IDX_W-1:0]           row,
  output logic                       busy,
  output logic [IDX_W-1:0]           res_row,
  output logic [N-1:0][IDX_W-1:0]    rd_k,
  input  logic signed [N-1:0][DW-1:0] rd_data,
  output logic                       res_valid,
  output logic signed [N-1:0][OW-1:0] res,
  input  logic                       res_ack,
  output logic [N-1:0]               zero_skip,
  output logic [N-1:0]               mult_start,
  output logic                       sat_event   // a result was clipped
);

  localparam int unsigned AW = DW + CW + IDX_W;               // exact dot product
  localparam int unsigned SW = (AW - FRAC > OW) ? AW - FRAC : OW;  // rescaled sum

  logic                  active_q;
  logic [IDX_W-1:0]      row_q;
  logic                  go;
  logic [N-1:0]          lane_valid;
  logic signed [N-1:0][AW-1:0] lane_acc;
  logic [N-1:0]          lane_sat;

  assign go = start && !active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      row_q    <= '0;
    end else if (go) begin
      active_q <= 1'b1;
      row_q    <= row;
    end else if (res_valid && res_ack) begin
      active_q <= 1'b0;
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_lane
    logic signed [CW-1:0] coef;
    logic signed [AW-1:0] rounded;
    logic signed [SW-1:0] scaled;

    coef_rom #(.COEF_W(CW), .FRAC(FRAC)) u_rom (
      .k (rd_k[j]),
      .n (CONST_BY_ROW ? row_q : IDX_W'(j)),
      .c (coef)
    );

    idct_mac #(.DW(DW), .CW(CW), .TERMS(N), .AW(AW)) u_mac (
      .clk, .rst_n,
      .start      (go),
      .k          (rd_k[j]),
      .data       (rd_data[j]),
      .coef       (coef),
      .valid      (lane_valid[j]),
      .busy       (),
      .acc        (lane_acc[j]),
      .zero_skip  (zero_skip[j]),
      .mult_start (mult_start[j])
    );

    // Round to nearest (ties upward) and drop the constant's scaling.
    assign rounded = lane_acc[j] + AW'(1 << (FRAC - 1));
    assign scaled  = SW'($signed(rounded[AW-1:FRAC]));

    always_comb begin
      lane_sat[j] = 1'b0;
      if (scaled > SW'(2 ** (OW - 1) - 1)) begin
        res[j]      = {1'b0, {(OW-1){1'b1}}};
        lane_sat[j] = 1'b1;
      end else if (scaled < -SW'(2 ** (OW - 1))) begin
        res[j]      = {1'b1, {(OW-1){1'b0}}};
        lane_sat[j] = 1'b1;
      end else begin
        res[j] = OW'(scaled);
      end
    end
  end

  // Lanes report 'valid' only after they ran, so the row is complete when all
  // of them are valid and the stage has not yet been released.
  assign res_valid = active_q && (&lane_valid);
  assign busy      = active_q;
  assign res_row   = row_q;
  assign sat_event = res_valid && res_ack && (|lane_sat);

endmodule
