// pc_pkg: types, constants and arithmetic helpers shared by the pattern
// classifier.
//
// The classifier stores 1024 prototypes of up to 256 five-bit elements,
// measures the city-block (L1) distance of an input vector to all of them,
// and turns the distances into a list of fired classes (RCE rule, D < L)
// and an un-normalised probability density per class (PNN rule, sum of
// C*exp(-K*D)). Densities are kept in a 16-bit float with a 6-bit exponent
// and a 10-bit mantissa, as the chip does.
//
// Float format (the exponent bias and the absence of a sign bit are this
// design's choice): bits [15:10] exponent E, [9:0] mantissa M. E = 0 is zero,
// otherwise the value is 1.M * 2^(E-32). All values are non-negative, so
// comparing two codes as unsigned integers orders them by value.
//
// Prototype parameters (Table of prototype parameters: class 0-63,
// threshold 0-4095, K from 2^-20 to 15/32, C 0-65535, used/bad/confidence
// flags) are packed into the 48 bits the three parameter RAMs deliver per
// cycle. K is held as a 4-bit mantissa and a 4-bit exponent,
// K = k_man * 2^-(5+k_exp), which spans exactly 2^-20 .. 15/32.
package pc_pkg;

  localparam int unsigned NPT_DEF    = 1024; // prototypes per chip
  localparam int unsigned DIM_DEF    = 256;  // maximum vector dimension
  localparam int unsigned NCLASS     = 64;   // class ids 0..63
  localparam int unsigned ELEM_W     = 5;    // bits per vector element
  localparam int unsigned DIST_W     = 13;   // 256 * 31 fits in 13 bits
  localparam int unsigned CLS_W      = 6;
  localparam int unsigned CNT_W      = 7;    // fired class counter 0..64
  localparam logic [15:0] CHIP_ID    = 16'h0C1A;

  typedef struct packed {
    logic [5:0] e;
    logic [9:0] m;
  } fp16_t;

  // 48-bit prototype parameter word: [47:32] RAM 2, [31:16] RAM 1, [15:0] RAM 0
  typedef struct packed {
    logic [5:0]  cls;    // N_i class id
    logic        used;   // U_i
    logic        bad;    // B_i (kept for software)
    logic        conf;   // R_i low-confidence flag (kept for software)
    logic [2:0]  rsvd;
    logic [3:0]  k_man;  // K_i mantissa
    logic [15:0] c;      // C_i amplitude
    logic [3:0]  k_exp;  // K_i exponent
    logic [11:0] l;      // L_i threshold
  } pparam_t;

  typedef enum logic [2:0] {
    MODE_NORMAL   = 3'd0,
    MODE_CLASSIFY = 3'd1,
    MODE_MONITOR  = 3'd2,
    MODE_PGF      = 3'd3,
    MODE_TEST     = 3'd4
  } mode_t;

  // 16-bit unsigned integer to fp16 (exact to 11 significant bits, truncated).
  function automatic fp16_t fp16_from_u16(input logic [15:0] v);
    fp16_t r;
    logic [15:0] sh;
    int unsigned p;
    r = '0;
    p = 0;
    for (int i = 0; i < 16; i++) if (v[i]) p = i;
    sh = v << (15 - p);
    if (v != 0) begin
      r.e = 6'(32 + p);
      r.m = sh[14:5];
    end
    return r;
  endfunction

  // Product of two non-negative fp16 values, truncated; underflow gives zero,
  // overflow saturates.
  function automatic fp16_t fp16_mul(input fp16_t a, input fp16_t b);
    fp16_t r;
    logic [21:0] p;
    int e;
    r = '0;
    p = {1'b1, a.m} * {1'b1, b.m};
    e = int'(a.e) + int'(b.e) - 32 + (p[21] ? 1 : 0);
    if (a.e != 0 && b.e != 0) begin
      if (e > 63) r = '1;
      else if (e >= 1) begin
        r.e = 6'(e);
        r.m = p[21] ? p[20:11] : p[19:10];
      end
    end
    return r;
  endfunction

  // Sum of two non-negative fp16 values, truncated; overflow saturates.
  function automatic fp16_t fp16_add(input fp16_t a, input fp16_t b);
    fp16_t hi, lo, r;
    logic [5:0]  d;
    logic [11:0] s;
    logic [10:0] ms;
    if (a.e >= b.e) begin hi = a; lo = b; end
    else begin hi = b; lo = a; end
    d  = hi.e - lo.e;
    ms = (d > 10) ? 11'd0 : ({1'b1, lo.m} >> d);
    s  = {1'b0, 1'b1, hi.m} + {1'b0, ms};
    r  = hi;
    if (lo.e == 0) r = hi;
    else if (s[11]) begin
      if (hi.e == 6'h3f) r = '1;
      else begin r.e = hi.e + 6'd1; r.m = s[10:1]; end
    end else r.m = s[9:0];
    return r;
  endfunction

  // fp16 to IEEE 754 single precision (the output buffer's formatter).
  function automatic logic [31:0] fp16_to_ieee(input fp16_t a);
    logic [7:0] e8;
    e8 = 8'(a.e) + 8'd95;  // (E - 32) + 127
    return (a.e == 0) ? 32'd0 : {1'b0, e8, a.m, 13'd0};
  endfunction

endpackage
