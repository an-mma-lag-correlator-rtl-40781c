// mma_pkg: types and helpers shared by the lag correlator.
//
// A sample is 3-level (-1, 0, +1) and travels as two bits, one per sampler
// output bit. The code used throughout is two's complement on two bits:
// 2'b01 = +1, 2'b00 = 0, 2'b11 = -1; 2'b10 is never produced and reads as 0.
// The 3-level x 3-level product is again -1, 0 or +1. The two-bit format
// follows the 32 x 2 sampler outputs; the code itself is this design's choice.
package mma_pkg;

  typedef logic [1:0] samp_t;

  localparam samp_t S_ZERO = 2'b00;
  localparam samp_t S_POS  = 2'b01;
  localparam samp_t S_NEG  = 2'b11;

  // Value of a sample as a small signed number.
  function automatic logic signed [1:0] samp_val(input samp_t s);
    case (s)
      S_POS:   return 2'sd1;
      S_NEG:   return -2'sd1;
      default: return 2'sd0;
    endcase
  endfunction

  // 3-level x 3-level multiplier.
  function automatic logic signed [1:0] mul3(input samp_t a, input samp_t b);
    logic signed [1:0] va, vb;
    va = samp_val(a);
    vb = samp_val(b);
    if (va == 2'sd0 || vb == 2'sd0) return 2'sd0;
    return (va == vb) ? 2'sd1 : -2'sd1;
  endfunction

endpackage
