// apc_pkg: types and helpers shared by the pulse compressor and the APC
// coprocessors.
//
// Holds the reference-spectrum source selection of the matched filter (the
// three sources are the document's) and the fixed-point saturation helper
// used wherever a wide product or sum is narrowed to a word (this design's).
// No ports or timing: types and a pure function only.
package apc_pkg;

  // Where the matched filter's reference spectrum comes from.
  //   REF_HOST : pre-calculated coefficients written by the host
  //   REF_MAIN : template pulse captured on the main input channel
  //   REF_TMPL : template pulse captured on a dedicated template channel
  typedef enum logic [1:0] {
    REF_HOST = 2'd0,
    REF_MAIN = 2'd1,
    REF_TMPL = 2'd2
  } ref_src_e;

  // Saturate a 64-bit signed value to a signed word of width w (w <= 63).
  function automatic logic signed [63:0] sat64(input logic signed [63:0] v, input int unsigned w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
