// sr_pkg: types, constants and IEEE-754 single precision arithmetic shared by
// the super-resolution engine.
//
// All pixel arithmetic in the engine is 32-bit single precision floating
// point. The two functions below are the combinational cores of the add/sub
// unit and the multiplier. They round to nearest, ties to even. Subnormal
// inputs and results are flushed to (signed) zero, and any NaN result is the
// canonical quiet NaN 32'h7FC00000; this flush-to-zero behaviour is a choice
// of this design.
//
// Latencies of the arithmetic units (7 cycles add/sub, 5 cycles multiply) and
// the 12-cycle pipeline slot follow the published FPGA implementation.
package sr_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_POS_ZERO = 32'h0000_0000;
  localparam fp32_t FP_QNAN     = 32'h7FC0_0000;
  localparam fp32_t FP_QUARTER  = 32'h3E80_0000;  // 0.25
  localparam fp32_t FP_FIFTH    = 32'h3E4C_CCCD;  // 0.2 (nearest float)

  localparam int unsigned ADD_LAT     = 7;   // shared add/subtract unit
  localparam int unsigned MUL_LAT     = 5;   // multiplier
  localparam int unsigned SLOT_CYCLES = 12;  // cycles per pipeline slot

  // Number of high-resolution banks: a 2x2 window at any position touches
  // exactly one pixel of each (row parity, column parity) bank.
  localparam int unsigned NUM_BANKS = 4;

  // magnitude tests take bits 30:0 of a value (the sign does not matter)
  function automatic logic fp_is_nan(input logic [30:0] a);
    return (a[30:23] == 8'hFF) && (a[22:0] != 23'd0);
  endfunction

  function automatic logic fp_is_inf(input logic [30:0] a);
    return (a[30:23] == 8'hFF) && (a[22:0] == 23'd0);
  endfunction

  // Pack a sign, a working exponent and the 23 stored significand bits (the
  // hidden bit is implied), applying overflow to infinity and flush-to-zero
  // on underflow.
  function automatic fp32_t fp_pack(input logic s, input logic signed [9:0] e, input logic [22:0] m);
    if (e >= 10'sd255) return {s, 8'hFF, 23'd0};
    if (e <= 10'sd0)   return {s, 31'd0};
    return {s, e[7:0], m};
  endfunction

  // a + b, round to nearest even, using three extra bits (guard, round, sticky).
  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    logic        sl, ss;
    logic [7:0]  el, es;
    logic [23:0] ml, ms;
    logic [26:0] xl, xs, full, man;
    logic [27:0] sum;
    logic [24:0] m25;
    logic [7:0]  d;
    logic [4:0]  lz;
    logic        rnd;
    logic signed [9:0] e;

    if (fp_is_nan(a[30:0]) || fp_is_nan(b[30:0])) return FP_QNAN;
    if (fp_is_inf(a[30:0]) && fp_is_inf(b[30:0])) return (a[31] == b[31]) ? a : FP_QNAN;
    if (fp_is_inf(a[30:0])) return a;
    if (fp_is_inf(b[30:0])) return b;
    // zero or subnormal operands count as zero
    if (a[30:23] == 8'd0 && b[30:23] == 8'd0) return {a[31] & b[31], 31'd0};
    if (a[30:23] == 8'd0) return b;
    if (b[30:23] == 8'd0) return a;

    // order by magnitude: l is the larger operand
    if (a[30:0] >= b[30:0]) begin
      sl = a[31]; el = a[30:23]; ml = {1'b1, a[22:0]};
      ss = b[31]; es = b[30:23]; ms = {1'b1, b[22:0]};
    end else begin
      sl = b[31]; el = b[30:23]; ml = {1'b1, b[22:0]};
      ss = a[31]; es = a[30:23]; ms = {1'b1, a[22:0]};
    end

    d  = el - es;                                   // el >= es, so no borrow
    xl = {ml, 3'b000};
    full = {ms, 3'b000};
    if (d >= 8'd27) begin
      xs = 27'd1;                                   // only the sticky bit survives
    end else begin
      xs = full >> d[4:0];
      xs[0] = xs[0] | ((full & ~(27'h7FF_FFFF << d[4:0])) != 27'd0);
    end

    e = $signed({2'b00, el});
    if (sl == ss) begin
      sum = {1'b0, xl} + {1'b0, xs};
      if (sum[27]) begin
        man = {sum[27:2], sum[1] | sum[0]};
        e   = e + 1;
      end else begin
        man = sum[26:0];
      end
    end else begin
      man = xl - xs;
      if (man == 27'd0) return FP_POS_ZERO;
      // leading zero count: the highest set bit is the last one to assign
      lz = 5'd0;
      for (int i = 0; i <= 26; i++)
        if (man[i]) lz = 5'(26 - i);
      man = man << lz;
      e   = e - $signed({5'd0, lz});
    end

    rnd = man[2] & (man[1] | man[0] | man[3]);
    m25 = {1'b0, man[26:3]} + {24'd0, rnd};
    if (m25[24]) begin
      m25 = m25 >> 1;
      e   = e + 1;
    end
    return fp_pack(sl, e, m25[22:0]);
  endfunction

  // a * b, round to nearest even.
  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic        s;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st, rnd;
    logic [24:0] m25;
    logic signed [9:0] e;

    s = a[31] ^ b[31];
    if (fp_is_nan(a[30:0]) || fp_is_nan(b[30:0])) return FP_QNAN;
    if (fp_is_inf(a[30:0]) || fp_is_inf(b[30:0])) begin
      if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return FP_QNAN;  // inf * 0
      return {s, 8'hFF, 23'd0};
    end
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};

    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = $signed({2'b00, a[30:23]}) + $signed({2'b00, b[30:23]}) - 10'sd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = (p[22:0] != 23'd0);
      e  = e + 1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = (p[21:0] != 22'd0);
    end
    rnd = g & (st | m[0]);
    m25 = {1'b0, m} + {24'd0, rnd};
    if (m25[24]) begin
      m25 = m25 >> 1;
      e   = e + 1;
    end
    return fp_pack(s, e, m25[22:0]);
  endfunction

endpackage
