// cmp42_approx: approximate 4-2 compressor with four inputs, no carry in and
// no carry out, and two outputs c (weight 2) and s (weight 1).
// It counts the ones among x1..x4 and saturates at three: 2*c + s equals the
// count for 0..3 ones, and is 3 instead of 4 when all inputs are one. The
// only error is therefore -1, in 1 of the 16 input patterns (one-sided).
// The interface (x1..x4 in, c and s out) is the one drawn for the
// approximate compressor; the logic function itself is this design's choice
// of a single-error saturating compressor. Purely combinational.
module cmp42_approx (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic c,
  output logic s
);
  always_comb begin
    // at least two of the four inputs are one
    c = (x1 & x2) | (x3 & x4) | ((x1 | x2) & (x3 | x4));
    // odd count, or the saturated all-ones case
    s = (x1 ^ x2 ^ x3 ^ x4) | (x1 & x2 & x3 & x4);
  end
endmodule
