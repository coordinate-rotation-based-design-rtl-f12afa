// sqdiv_pkg: types and elaboration-time constants shared by the CORDIC
// square-root / division datapath.
//
// Number format: every CORDIC word is a W-bit two's-complement fixed-point
// number with F = W-2 fraction bits (range [-2, 2)), so 1.0 is 2**F.
//
// Micro-rotation convention: a micro-rotation bit mu_i = 1 means a
// counter-clockwise rotation by atan(2**-i) (sigma_i = +1) and mu_i = 0 a
// clockwise one (sigma_i = -1). Bit i of every mu vector belongs to stage i.
//
// The constants below are computed with integer arithmetic only:
//   stage_gain(i)  = sqrt(1 + 2**-2i), the length growth of one micro-rotation
//   inv_gain(n)    = 1 / prod_{i<n} stage_gain(i), the start length that makes
//                    an n-stage rotation come out with unit length
//   zero_mu(n)     = a micro-rotation sequence whose angle sum is (nearly) 0.
//                    For 16 stages it is the sequence 1000101100001011
//                    (stage 0 first) that the architecture is specified with;
//                    for other stage counts it is found by driving the vector
//                    (1,0) back onto the x axis with an n-stage vectoring run.
package sqdiv_pkg;

  // Operation select; sqrt = 0 and div = 1 as on the sqrt/div select line.
  typedef enum logic {
    OP_SQRT = 1'b0,
    OP_DIV  = 1'b1
  } op_e;

  // Two-bit micro-rotation code {A_mu, B_mu} fed to the rotation CORDIC.
  // Equal bits rotate in that direction, unequal bits mean "no rotation".
  typedef enum logic [1:0] {
    AB_CW    = 2'b00,
    AB_NONE0 = 2'b01,
    AB_NONE1 = 2'b10,
    AB_CCW   = 2'b11
  } ab_code_e;

  // Internal precision of the elaboration-time constants (Q2.30).
  localparam int CF = 30;

  // Integer square root, floor(sqrt(v)), bit by bit.
  function automatic longint unsigned isqrt(input longint unsigned v);
    longint unsigned r, b, rem;
    rem = v;
    r   = 0;
    b   = 64'd1 << 62;
    while (b > rem) b = b >> 2;
    while (b != 0) begin
      if (rem >= r + b) begin
        rem = rem - (r + b);
        r   = (r >> 1) + b;
      end else begin
        r = r >> 1;
      end
      b = b >> 2;
    end
    return r;
  endfunction

  // sqrt(1 + 2**-2i) in Q(CF).
  function automatic longint unsigned stage_gain_q30(input int i);
    longint unsigned one2;
    one2 = 64'd1 << (2 * CF);
    if (2 * i <= 2 * CF) return isqrt(one2 + (64'd1 << (2 * CF - 2 * i)));
    return 64'd1 << CF;
  endfunction

  // Round a Q(CF) constant to Q(f).
  function automatic longint unsigned round_q(input longint unsigned v, input int f);
    if (f >= CF) return v << (f - CF);
    return (v + (64'd1 << (CF - f - 1))) >> (CF - f);
  endfunction

  // sqrt(1 + 2**-2i) in Q(f).
  function automatic longint unsigned stage_gain(input int i, input int f);
    return round_q(stage_gain_q30(i), f);
  endfunction

  // 1 / prod_{i<n} sqrt(1 + 2**-2i) in Q(f).
  function automatic longint unsigned inv_gain(input int n, input int f);
    longint unsigned g;
    g = 64'd1 << CF;
    for (int i = 0; i < n; i++) g = (g * stage_gain_q30(i) + (64'd1 << (CF - 1))) >> CF;
    return round_q((64'd1 << (2 * CF)) / g, f);
  endfunction

  // Micro-rotation sequence for the angle 0 (bit i = stage i).
  function automatic logic [63:0] zero_mu(input int n);
    logic [63:0] m;
    longint x, y, xn;
    m = '0;
    if (n == 16) begin
      // 1000101100001011, stage 0 first.
      m[15:0] = 16'b1101_0000_1101_0001;
      return m;
    end
    x = longint'(1) << CF;
    y = 0;
    for (int i = 0; i < n; i++) begin
      if (y >= 0) begin          // clockwise
        xn = x + (y >>> i);
        y  = y - (x >>> i);
        m[i] = 1'b0;
      end else begin             // counter-clockwise
        xn = x - (y >>> i);
        y  = y + (x >>> i);
        m[i] = 1'b1;
      end
      x = xn;
    end
    return m;
  endfunction

  // Per-operation side information that travels alongside the CORDIC stages.
  typedef struct packed {
    logic       valid;    // this pipeline slot holds an operation
    op_e        op;       // square root or division
    logic [4:0] k;        // input scaling shift (output is shifted back by k or k/2)
    logic       fold;     // sqrt: scaled X < 1/2, result is taken from y (sin)
    logic       neg;      // division: quotient is negative
    logic       invalid;  // division by zero or square root of a negative number
  } meta_t;

endpackage
