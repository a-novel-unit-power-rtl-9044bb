// Fixed-point types and helpers shared by the rectifier control datapath.
//
// Every analog quantity inside the controller (volts, amperes, the PLL phase
// error, the loop-filter output in offset-frequency units) is carried as a
// signed two's-complement number with FRAC = 16 fractional bits in a 32-bit
// word (Q16.16: range about +/-32768, resolution 1.5e-5). Sine and cosine are
// carried in the same format, so 1.0 is 65536. The 16-bit fraction is this
// design's choice; it makes the loop filter's "right shift by 16" a plain
// reinterpretation of the word as a 32-bit phase increment.
package fx_pkg;

  localparam int FRAC = 16;
  localparam int W    = 32;

  typedef logic signed [W-1:0] fx_t;

  // Real constant to Q16.16, rounded to nearest (elaboration time only).
  function automatic fx_t to_fx(input real r);
    return fx_t'($rtoi($floor(r * 65536.0 + 0.5)));
  endfunction

  // Q16.16 product, truncated toward minus infinity, wrapped to 32 bits.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [2*W-1:0] p;
    p = 64'(a) * 64'(b);
    return fx_t'(p >>> FRAC);
  endfunction

endpackage
