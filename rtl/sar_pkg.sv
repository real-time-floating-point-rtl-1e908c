// sar_pkg: types, constants and single-precision arithmetic shared by the
// SAR focusing kernel.
//
// All signal processing in the kernel is done in IEEE-754 single precision,
// as the design calls for. The arithmetic here is written as functions so
// that each block can place it in its own pipeline stage:
//   fadd / fsub / fmul / fdiv  round to nearest even, subnormals flushed to
//                              zero, overflow gives infinity, no NaN inputs
//   i2f                        signed 32-bit integer to float
//   f2i_mod32                  float to integer, rounded, kept modulo 2^32
//   cmul / cadd                complex numbers packed as {re, im}
// real2f / f2real are for building tables at elaboration and for testbenches.
// A complex sample is 64 bits, real part in [63:32], imaginary in [31:0].
// The flush-to-zero and no-NaN choices are this design's own; the vendor
// operator cores that a product would use are not specified further.
package sar_pkg;

  typedef logic [31:0] fp32_t;
  typedef logic [63:0] cplx_t;

  localparam fp32_t FP_ONE  = 32'h3f80_0000;
  localparam fp32_t FP_ZERO = 32'h0000_0000;

  // Pipeline latencies of the filter coefficient generator (filter_gen).
  localparam int FPA_LAT    = 5;   // fp_arith
  localparam int POLY_LAT   = 26;  // poly_eval, as given for the design
  localparam int PH_LAT     = 2;   // phase_f2i
  localparam int CORDIC_IT  = 16;  // CORDIC micro-rotations
  localparam int CORDIC_LAT = CORDIC_IT + 2;
  localparam int FILT_LAT   = 1 + FPA_LAT + POLY_LAT + PH_LAT + CORDIC_LAT;

  // Coefficient source selection of the filter MUX.
  typedef enum logic [1:0] {
    COEF_PHASE  = 2'd0,   // exp(j*phase) from polynomial / CORDIC
    COEF_WINDOW = 2'd1,   // window LUT
    COEF_CHIRP  = 2'd2,   // chirp replica LUT
    COEF_UNITY  = 2'd3    // 1 + 0j, no filtering
  } coef_sel_e;

  // Configuration held in the host registers (sar_regs).
  typedef struct packed {
    logic        az_mode;      // 1: azimuth lines (corner-turned load)
    logic        raw_in;       // 1: 8/8-bit raw input through I/Q correction
    logic        inverse;      // 1: IFFT
    coef_sel_e   coef_sel;
    logic        phase_direct; // 1: phase taken from fp_arith, polynomial bypassed
    logic        out_ct;       // 1: output partial corner turn transposes
    logic        load_chirp;   // fill chirp LUT before processing
    logic        load_win;     // fill window LUT before processing
    logic [4:0]  log2n;        // FFT length 2^log2n
    logic [15:0] n_sub;        // sub-blocks to process
    logic [31:0] src_base;
    logic [31:0] dst_base;
    logic [31:0] chirp_base;
    logic [31:0] win_base;
    logic [31:0] line_words;   // range mode: 256-bit words per line to read
    logic [31:0] row_words;    // azimuth mode: 256-bit words per stored row
    logic [31:0] raw_len;      // samples per line before zero padding
    logic [31:0] out_len;      // samples per line kept on output (cropping)
    fp32_t [6:0] poly;         // a6..a0, poly[i] = a_i
    fp32_t       scale;        // fp_arith: x = (k*scale + l*lscale + offset) / divisor
    fp32_t       lscale;
    fp32_t       offset;
    fp32_t       divisor;
    fp32_t       phase_scale;  // phase to 2^32 units per turn
    fp32_t       dc_re;        // I/Q correction: y = (x + dc) * g
    fp32_t       dc_im;
    fp32_t       g_re;
    fp32_t       g_im;
  } sar_cfg_t;

  // ---------------------------------------------------------------- helpers
  function automatic fp32_t fpack(input logic s, input int e, input logic [23:0] m);
    if (e >= 255) return {s, 8'hff, 23'h0};
    if (e <= 0)   return {s, 31'h0};
    return {s, e[7:0], m[22:0]};
  endfunction

  // Round a normalised 27-bit value {1.m(23), guard, round, sticky}.
  function automatic fp32_t fround(input logic s, input int e, input logic [26:0] v);
    logic [24:0] m;
    int ee;
    m  = {1'b0, v[26:3]};
    ee = e;
    if (v[2] && (v[1] || v[0] || v[3])) m = m + 25'd1;
    if (m[24]) begin
      m  = m >> 1;
      ee = ee + 1;
    end
    return fpack(s, ee, m[23:0]);
  endfunction

  function automatic fp32_t fadd(input fp32_t a, input fp32_t b);
    fp32_t x, y;
    logic [26:0] mx, my;
    logic [27:0] s;
    int d, e;
    x = a;
    y = b;
    if (a[30:23] == 8'd0) return (b[30:23] == 8'd0) ? FP_ZERO : b;
    if (b[30:23] == 8'd0) return a;
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    mx = {1'b1, x[22:0], 3'b000};
    my = {1'b1, y[22:0], 3'b000};
    d  = int'(x[30:23]) - int'(y[30:23]);
    if (d > 26) my = 27'd1;
    else if (d > 0) my = (my >> d) | 27'((my & ((27'd1 << d) - 27'd1)) != 27'd0);
    if (x[31] == y[31]) s = {1'b0, mx} + {1'b0, my};
    else s = {1'b0, mx} - {1'b0, my};
    if (s == 28'd0) return FP_ZERO;
    e = int'(x[30:23]);
    if (s[27]) begin
      s = (s >> 1) | {27'd0, s[0]};
      e = e + 1;
    end else begin
      for (int i = 0; i < 27; i++) begin
        if (!s[26]) begin
          s = s << 1;
          e = e - 1;
        end
      end
    end
    return fround(x[31], e, s[26:0]);
  endfunction

  function automatic fp32_t fneg(input fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic fp32_t fsub(input fp32_t a, input fp32_t b);
    return fadd(a, fneg(b));
  endfunction

  function automatic fp32_t fmul(input fp32_t a, input fp32_t b);
    logic [47:0] p;
    logic [26:0] v;
    logic s;
    int e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'h0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      v = {p[47:22], |p[21:0]};
      e = e + 1;
    end else begin
      v = {p[46:21], |p[20:0]};
    end
    return fround(s, e, v);
  endfunction

  function automatic fp32_t fdiv(input fp32_t a, input fp32_t b);
    logic [49:0] num, q, r;
    logic [26:0] v;
    logic s;
    int e;
    s = a[31] ^ b[31];
    if (b[30:23] == 8'd0) return {s, 8'hff, 23'h0};
    if (a[30:23] == 8'd0) return {s, 31'h0};
    num = {1'b1, a[22:0], 26'd0};
    q   = num / {26'd0, 1'b1, b[22:0]};
    r   = num % {26'd0, 1'b1, b[22:0]};
    e   = int'(a[30:23]) - int'(b[30:23]) + 127;
    // q lies in (2^25, 2^27)
    if (q[26]) v = {q[26:1], q[0] | (r != 50'd0)};
    else begin
      v = {q[25:0], r != 50'd0};
      e = e - 1;
    end
    return fround(s, e, v);
  endfunction

  function automatic fp32_t i2f(input logic signed [31:0] i);
    logic [31:0] m;
    logic [26:0] v;
    logic s;
    int e;
    if (i == 0) return FP_ZERO;
    s = i[31];
    m = s ? 32'(-i) : 32'(i);
    e = 127 + 31;
    for (int k = 0; k < 32; k++) begin
      if (!m[31]) begin
        m = m << 1;
        e = e - 1;
      end
    end
    v = {m[31:6], |m[5:0]};
    return fround(s, e, v);
  endfunction

  // Float to integer, rounded to nearest, result taken modulo 2^32.
  function automatic logic [31:0] f2i_mod32(input fp32_t a);
    logic [63:0] m;
    logic [31:0] r;
    int sh;
    if (a[30:23] == 8'd0) return 32'd0;
    m  = {40'd0, 1'b1, a[22:0]};
    sh = int'(a[30:23]) - 150;
    if (sh >= 32) r = 32'd0;
    else if (sh >= 0) r = m[31:0] << sh;
    else if (sh < -25) r = 32'd0;
    else begin
      m = (m + (64'd1 << (-sh - 1))) >> (-sh);
      r = m[31:0];
    end
    return a[31] ? -r : r;
  endfunction

  function automatic cplx_t cpack(input fp32_t re, input fp32_t im);
    return {re, im};
  endfunction

  function automatic cplx_t cadd(input cplx_t a, input cplx_t b);
    return {fadd(a[63:32], b[63:32]), fadd(a[31:0], b[31:0])};
  endfunction

  function automatic cplx_t csub(input cplx_t a, input cplx_t b);
    return {fsub(a[63:32], b[63:32]), fsub(a[31:0], b[31:0])};
  endfunction

  function automatic cplx_t cmul(input cplx_t a, input cplx_t b);
    fp32_t re, im;
    re = fsub(fmul(a[63:32], b[63:32]), fmul(a[31:0], b[31:0]));
    im = fadd(fmul(a[63:32], b[31:0]), fmul(a[31:0], b[63:32]));
    return {re, im};
  endfunction

  // Elaboration / testbench helpers (not for run-time logic).
  function automatic fp32_t real2f(input real r);
    logic [63:0] d;
    logic [52:0] m;
    int e;
    logic [26:0] v;
    if (r == 0.0) return FP_ZERO;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    v = {m[52:27], |m[26:0]};
    return fround(d[63], e, v);
  endfunction

  function automatic real f2real(input fp32_t f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

endpackage
