// zero_mask: zero-operand detector that gates the multiplier.
//
// Most DCT coefficients of a coded block are zero. When a multiply-accumulate
// lane asks for a term ('req') and the data operand is zero, this block raises
// 'skip' instead of 'mult_en': the multiplier is not started, its registers do
// not toggle and the term costs one clock instead of a full multiply. Purely
// combinational. Detecting zero data and disabling the multiplier follows the
// design's low-power strategy; the form of the signals is this design's own.
module zero_mask #(
  parameter int unsigned W = 12
) (
  input  logic         req,       // a term is to be processed
  input  logic [W-1:0] data,      // its data operand
  output logic         is_zero,   // mask: data operand is zero
  output logic         mult_en,   // start the multiplier
  output logic         skip       // term contributes nothing; skip it
);

  assign is_zero = (data == '0);
  assign mult_en = req && !is_zero;
  assign skip    = req && is_zero;

endmodule
