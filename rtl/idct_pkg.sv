// idct_pkg: types and default sizes shared by the 8x8 IDCT datapath.
//
// The 2-D IDCT works on 8x8 blocks (N = 8) by row-column decomposition
// X = C^T Z C. The radix-4 multiplier recodes its multiplier operand three bits
// at a time into one of the five Modified-Booth operations of booth_op_e
// (0, +A, +2A, -A, -2A). Input width 12 bits and output width 9 bits are the
// usual MPEG-2 IDCT ranges; the 8-bit constants follow the 8x8-bit multiplier
// the design is built around; the other widths are chosen so that nothing
// overflows.
package idct_pkg;

  // Block size of the transform.
  localparam int unsigned N = 8;
  localparam int unsigned IDX_W = $clog2(N);

  // Default word sizes.
  localparam int unsigned DATA_W    = 12;  // input DCT coefficient z(k)
  localparam int unsigned COEF_W    = 8;   // constant matrix element C[k][n]
  localparam int unsigned COEF_FRAC = 8;   // C is scaled by 2^COEF_FRAC
  localparam int unsigned T_W       = 16;  // element of T = C^T Z after rescaling
  localparam int unsigned OUT_W     = 9;   // reconstructed sample x(n)

  // Modified-Booth operation chosen by bits b(i+1) b(i) b(i-1).
  typedef enum logic [2:0] {
    BOOTH_ZERO  = 3'd0,
    BOOTH_P1    = 3'd1,
    BOOTH_P2    = 3'd2,
    BOOTH_M1    = 3'd3,
    BOOTH_M2    = 3'd4
  } booth_op_e;

  // Recoding table: 000 +0, 001 +1, 010 +1, 011 +2, 100 -2, 101 -1, 110 -1, 111 -0.
  function automatic booth_op_e booth_decode(input logic [2:0] trip);
    unique case (trip)
      3'b001, 3'b010: return BOOTH_P1;
      3'b011:         return BOOTH_P2;
      3'b100:         return BOOTH_M2;
      3'b101, 3'b110: return BOOTH_M1;
      default:        return BOOTH_ZERO;
    endcase
  endfunction

  // States of one multiply-accumulate lane.
  typedef enum logic [1:0] {
    MAC_IDLE = 2'd0,  // no dot product started yet
    MAC_TERM = 2'd1,  // look at the data of term k: skip it or start the multiplier
    MAC_MUL  = 2'd2,  // multiplier running on term k
    MAC_DONE = 2'd3   // dot product complete, result held
  } mac_state_e;

endpackage
