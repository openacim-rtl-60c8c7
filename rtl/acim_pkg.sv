// acim_pkg: types and constants shared by the compute-in-memory PE macro.
// MULT_KIND selects, at elaboration time, which of the three multiplier
// families sits next to the SRAM inside the PE: the exact 4-2 compressor
// multiplier, the approximate 4-2 compressor multiplier, or the logarithmic
// multiplier with error compensation. The encoding is this design's choice.
package acim_pkg;

  typedef enum logic [1:0] {
    MULT_EXACT    = 2'd0,  // 4-2 compressor tree, all compressors exact
    MULT_APPROX42 = 2'd1,  // 4-2 compressor tree, approximate in low columns
    MULT_LOG      = 2'd2   // logarithmic multiplier with EP compensation
  } mult_kind_e;

endpackage
