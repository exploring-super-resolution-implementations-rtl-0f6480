// tb_sr_ref_pkg: reference single precision arithmetic for the testbenches.
//
// Works through the simulator's double precision reals, independently of the
// RTL's bit-level adder and multiplier: the exact result is formed in double
// precision and rounded once to single precision (nearest, ties to even).
// For +, - and * of single precision operands this equals a correctly rounded
// single precision operation, since a double holds more than 2*24+2 bits.
// Results below the smallest normal are flushed to zero, as in the RTL.
package tb_sr_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return $bitstoreal({f[31], 63'd0});
    // rebias the exponent: e - 127 + 1023
    d = {f[31], 11'(int'(f[30:23]) + 896), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [24:0] keep;
    logic        g, st;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e    = int'(d[62:52]) - 1023 + 127;
    keep = {2'b01, d[51:29]};
    g    = d[28];
    st   = (d[27:0] != 28'd0);
    if (g && (st || keep[0])) keep = keep + 25'd1;
    if (keep[24]) begin
      keep = keep >> 1;
      e    = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], e[7:0], keep[22:0]};
  endfunction

  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] fsub(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction

  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // Random normal float with exponent in [127-erange, 127+erange].
  function automatic logic [31:0] rand_f(input int erange);
    int e;
    e = 127 - erange + int'($urandom_range(2 * erange, 0));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // Pixel-like positive value in [0, 256).
  function automatic logic [31:0] rand_pix();
    return r2f(real'($urandom_range(65535, 0)) / 256.0);
  endfunction

endpackage
