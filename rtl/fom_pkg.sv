// fom_pkg: types and constants shared by the figure-of-merit processor.
//
// All real numbers in the processor are IEEE-754 single-precision words
// (32 bits: sign, 8-bit biased exponent, 23-bit fraction), as in the
// original design, which used 32-bit floating-point units throughout.
// The package gives that word a type, a few constants the controllers
// need (1.0, 0.5, ln 2), the parameter set of one pseudo-Voigt component
// and the parameter set of one diffraction peak.
//
// A peak is modelled as a CuK-alpha1 component plus a CuK-alpha2 component
// of the same shape and width and half the intensity. The position of the
// alpha2 component, x02 = 2*asin(sin(x01/2)*lambda2/lambda1), is computed
// by whoever supplies the parameters (it is an input, not a hardware
// operation); this is a choice of this design.
package fom_pkg;

  typedef logic [31:0] float_t;

  localparam float_t FP_ZERO = 32'h0000_0000;
  localparam float_t FP_ONE  = 32'h3F80_0000;  // 1.0
  localparam float_t FP_HALF = 32'h3F00_0000;  // 0.5
  localparam float_t FP_LN2  = 32'h3F31_7218;  // ln 2 = 0.693147...

  // Parameters of one pseudo-Voigt function, Eq. (3):
  // pV(x) = i0 * [ eta/(1+t^2) + (1-eta)*exp(-ln2*t^2) ],  t = (x-x0)/w
  typedef struct packed {
    float_t i0;   // maximum intensity
    float_t x0;   // position of the maximum (degrees 2-theta)
    float_t w;    // half width at half maximum (degrees)
    float_t eta;  // Cauchy/Gauss partition factor, 0..1
  } pv_params_t;

  // Parameters of one peak (alpha1 component plus its alpha2 companion).
  typedef struct packed {
    float_t i0;   // alpha1 maximum intensity; alpha2 uses i0/2
    float_t x01;  // alpha1 position
    float_t x02;  // alpha2 position
    float_t w;    // common HWHM
    float_t eta;  // common partition factor
  } peak_params_t;

  // Rounds a normalised significand to nearest-even and packs the result.
  // mant[23] is the hidden bit, guard is the first bit below mant[0] and
  // sticky is the OR of every bit below guard. exp is the biased exponent.
  // Results below the normal range flush to a signed zero and results
  // above it saturate to a signed infinity (no subnormals).
  function automatic float_t fp_pack(input logic sign,
                                     input logic signed [11:0] exp,
                                     input logic [23:0] mant,
                                     input logic guard,
                                     input logic sticky);
    logic [24:0] m;
    logic signed [11:0] e;
    m = {1'b0, mant} + {24'd0, guard & (sticky | mant[0])};
    e = exp;
    if (m[24]) begin
      m = m >> 1;
      e = e + 12'sd1;
    end
    if (e <= 0) return {sign, 31'd0};
    if (e >= 255) return {sign, 8'hFF, 23'd0};
    return {sign, e[7:0], m[22:0]};
  endfunction

endpackage
