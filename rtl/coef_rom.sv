// coef_rom: element C[k][n] of the 8-point IDCT constant matrix.
//
//   C[k][n] = round( c(k)/2 * cos((2n+1) k pi / 16) * 2^FRAC ),
//   c(0) = 1/sqrt(2), c(k) = 1 otherwise,
//
// so that the 1-D IDCT is x(n) = sum_k C[k][n] z(k) / 2^FRAC and the 2-D IDCT
// is X = C^T Z C. The matrix has only eight distinct magnitudes: the angle
// index m = (2n+1)k mod 32 is folded into the first quadrant and the sign is
// taken from the quadrant, so the table holds cos(m pi/16) for m = 0..8 only.
// The magnitudes are worked out at elaboration time from the formula above.
// Combinational; one read port.
module coef_rom #(
  parameter int unsigned COEF_W = idct_pkg::COEF_W,
  parameter int unsigned FRAC   = idct_pkg::COEF_FRAC
) (
  input  logic        [idct_pkg::IDX_W-1:0]  k,   // frequency index (row of C)
  input  logic        [idct_pkg::IDX_W-1:0]  n,   // sample index (column of C)
  output logic signed [COEF_W-1:0] c    // C[k][n]
);

  localparam real PI = 3.14159265358979323846;

  // round(0.5 * cos(m pi / 16) * 2^FRAC), m = 0..8
  function automatic int mag(input int m);
    return int'($floor(0.5 * $cos(real'(m) * PI / 16.0) * (2.0 ** FRAC) + 0.5));
  endfunction

  // DC row: round(1/(2 sqrt 2) * 2^FRAC)
  localparam int DC = int'($floor((2.0 ** FRAC) / (2.0 * $sqrt(2.0)) + 0.5));

  localparam int MAG [0:8] = '{mag(0), mag(1), mag(2), mag(3), mag(4),
                               mag(5), mag(6), mag(7), mag(8)};

  logic [4:0] m;       // (2n+1)k mod 32
  logic [3:0] fold;    // first-quadrant angle index 0..8
  logic       neg;

  always_comb begin
    m = 5'((({1'b0, n} << 1) + 5'd1) * k);
    unique case (m[4:3])
      2'd0: begin fold = {1'b0, m[2:0]};          neg = 1'b0; end
      2'd1: begin fold = 4'(5'd16 - {1'b0, m[3:0]});  neg = 1'b1; end
      2'd2: begin fold = {1'b0, m[2:0]};          neg = 1'b1; end
      default: begin fold = 4'(5'd16 - {1'b0, m[3:0]}); neg = 1'b0; end
    endcase
    if (k == '0) begin
      c = COEF_W'(DC);
    end else begin
      c = neg ? -COEF_W'(MAG[fold]) : COEF_W'(MAG[fold]);
    end
  end

endmodule
