// fpu: single-precision (IEEE 754 binary32) floating-point unit.
//
// Computes one of add, subtract, multiply, divide, compare, signed
// integer-to-float and float-to-integer per evaluation. The unit is purely
// combinational; the DSP unit that owns it registers the result, so one
// operation completes per clock.
//
// Arithmetic results are rounded to nearest, ties to even. To keep the unit
// small, subnormal operands are read as zero and results below the normal
// range are flushed to zero; results above it become infinity. NaN is not
// produced or propagated. Division by zero gives infinity with the quotient's
// sign. FTOI truncates toward zero and saturates to the 32-bit range.
// The operation set is the one the emulator's DSP needs; rounding, flushing
// and the combinational structure are this design's choices.
//
// Interface: op selects the operation (memristor_pkg::fpu_op_e); a and b are
// the operands (a is a signed integer for ITOF); y is the result; lt/eq/gt
// compare a with b and are valid for every op (+0 equals -0).
module fpu
  import memristor_pkg::*;
(
  input  fpu_op_e     op,
  input  float32_t    a,
  input  float32_t    b,
  output float32_t    y,
  output logic        lt,
  output logic        eq,
  output logic        gt
);

  // Round a normalised 48-bit mantissa (leading one at bit 47) and pack.
  // exp is the biased exponent of the value m[47] * 2^(exp-127).
  function automatic float32_t pack(input logic s, input int exp, input logic [47:0] m);
    logic [24:0] mant;
    logic        grd, st;
    int          e;
    mant = {1'b0, m[47:24]};
    grd  = m[23];
    st   = |m[22:0];
    e    = exp;
    if (grd && (st || mant[0])) mant = mant + 25'd1;
    if (mant[24]) begin
      mant = mant >> 1;
      e    = e + 1;
    end
    if (e >= 255)     pack = {s, 8'hFF, 23'd0};
    else if (e <= 0)  pack = {s, 31'd0};
    else              pack = {s, e[7:0], mant[22:0]};
  endfunction

  // Position of the most significant one of a 49-bit vector, -1 if zero.
  function automatic int msb49(input logic [48:0] v);
    msb49 = -1;
    for (int i = 0; i < 49; i++) if (v[i]) msb49 = i;
  endfunction

  function automatic float32_t fadd(input float32_t u, input float32_t w);
    logic        sx, sz, sbig, ssml;
    logic [7:0]  ex, ez, ebig, esml;
    logic [23:0] mx, mz, mbig, msml;
    logic [48:0] abig, asml, r;
    logic        sticky;
    int          d, p;
    logic [47:0] nm;
    sx = u[31]; ex = u[30:23]; mx = (ex == 8'd0) ? 24'd0 : {1'b1, u[22:0]};
    sz = w[31]; ez = w[30:23]; mz = (ez == 8'd0) ? 24'd0 : {1'b1, w[22:0]};
    if ({ex, mx} >= {ez, mz}) begin
      sbig = sx; ebig = ex; mbig = mx; ssml = sz; esml = ez; msml = mz;
    end else begin
      sbig = sz; ebig = ez; mbig = mz; ssml = sx; esml = ex; msml = mx;
    end
    if (mbig == 24'd0) return {sx & sz, 31'd0};
    if (msml == 24'd0) return {sbig, ebig, mbig[22:0]};
    d      = int'(ebig) - int'(esml);
    abig   = {1'b0, mbig, 24'd0};
    asml   = {1'b0, msml, 24'd0};
    sticky = 1'b0;
    if (d >= 49) begin
      sticky = 1'b1;
      asml   = '0;
    end else begin
      for (int i = 0; i < 49; i++) if (i < d && asml[i]) sticky = 1'b1;
      asml = asml >> d;
    end
    asml[0] = asml[0] | sticky;
    if (sbig == ssml) r = abig + asml;
    else              r = abig - asml;
    if (r == 49'd0) return 32'd0;
    p = msb49(r);
    if (p == 48) nm = {r[48:2], r[1] | r[0]};
    else         nm = r[47:0] << (47 - p);
    fadd = pack(sbig, int'(ebig) + p - 47, nm);
  endfunction

  function automatic float32_t fmul(input float32_t u, input float32_t w);
    logic [23:0] mx, mz;
    logic [47:0] pr;
    logic        s;
    s  = u[31] ^ w[31];
    if (u[30:23] == 8'd0 || w[30:23] == 8'd0) return {s, 31'd0};
    mx = {1'b1, u[22:0]};
    mz = {1'b1, w[22:0]};
    pr = mx * mz;
    if (pr[47]) fmul = pack(s, int'(u[30:23]) + int'(w[30:23]) - 126, pr);
    else        fmul = pack(s, int'(u[30:23]) + int'(w[30:23]) - 127, pr << 1);
  endfunction

  function automatic float32_t fdiv(input float32_t u, input float32_t w);
    logic [48:0] num;
    logic [25:0] qq;
    logic [48:0] rem;
    logic        s;
    logic [47:0] nm;
    s = u[31] ^ w[31];
    if (w[30:23] == 8'd0) return {s, 8'hFF, 23'd0};
    if (u[30:23] == 8'd0) return {s, 31'd0};
    num = {1'b1, u[22:0], 25'd0};
    qq  = 26'(num / {25'd0, 1'b1, w[22:0]});   // quotient is below 2^26
    rem = num % {25'd0, 1'b1, w[22:0]};
    if (qq[25]) begin
      nm = {qq[25:0], 22'd0};
      nm[0] = nm[0] | (rem != 49'd0);
      fdiv = pack(s, int'(u[30:23]) - int'(w[30:23]) + 127, nm);
    end else begin
      nm = {qq[24:0], 23'd0};
      nm[0] = nm[0] | (rem != 49'd0);
      fdiv = pack(s, int'(u[30:23]) - int'(w[30:23]) + 126, nm);
    end
  endfunction

  function automatic float32_t itof(input logic [31:0] v);
    logic        s;
    logic [31:0] mag;
    logic [48:0] w;
    int          p;
    s   = v[31];
    mag = s ? (~v + 32'd1) : v;
    if (mag == 32'd0) return 32'd0;
    w = {17'd0, mag};
    p = msb49(w);
    itof = pack(s, 127 + p, w[47:0] << (47 - p));
  endfunction

  function automatic logic [31:0] ftoi(input float32_t u);
    int          e;
    logic [31:0] mag;
    e = int'(u[30:23]) - 127;
    if (u[30:23] == 8'd0 || e < 0) return 32'd0;
    if (e >= 31) return u[31] ? 32'h8000_0000 : 32'h7FFF_FFFF;
    mag = 32'(({32'd0, 1'b1, u[22:0]} << e) >> 23);
    ftoi = u[31] ? (~mag + 32'd1) : mag;
  endfunction

  // Comparison, with +0 == -0 and subnormals read as zero: both operands are
  // mapped to signed magnitudes and compared as integers.
  logic               a_zero, b_zero;
  logic signed [32:0] av, bv;
  always_comb begin
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    av = a_zero ? 33'sd0 : (a[31] ? -$signed({2'b00, a[30:0]}) : $signed({2'b00, a[30:0]}));
    bv = b_zero ? 33'sd0 : (b[31] ? -$signed({2'b00, b[30:0]}) : $signed({2'b00, b[30:0]}));
    lt = av < bv;
    eq = av == bv;
    gt = av > bv;
  end

  always_comb begin
    unique case (op)
      FPU_ADD:  y = fadd(a, b);
      FPU_SUB:  y = fadd(a, {~b[31], b[30:0]});
      FPU_MUL:  y = fmul(a, b);
      FPU_DIV:  y = fdiv(a, b);
      FPU_ITOF: y = itof(a);
      FPU_FTOI: y = ftoi(a);
      default:  y = a;   // FPU_CMP
    endcase
  end

endmodule
