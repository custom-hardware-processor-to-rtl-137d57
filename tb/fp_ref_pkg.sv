// fp_ref_pkg: reference conversions between the simulator's double-precision
// real and IEEE-754 single-precision words, used by the testbenches to work
// out expected results independently of the floating-point units.
// to_single rounds to nearest even, flushes results below the normal range
// to zero and saturates to infinity, the conventions of the units.
package fp_ref_pkg;

  function automatic real to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    // rebias the exponent from 127 to 1023
    d = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_single(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, s;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    g = d[28];
    s = |d[27:0];
    if (g && (s || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // random normal single with biased exponent in [elo, ehi]
  function automatic logic [31:0] rand_single(input int elo, input int ehi);
    int e;
    e = elo + int'($urandom % 32'(ehi - elo + 1));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
