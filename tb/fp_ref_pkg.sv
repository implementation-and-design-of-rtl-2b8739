// Reference model of single precision add, subtract and multiply for the
// testbenches. It works on exact values: every operand is turned into an
// integer times a power of two, the exact sum or product is formed in a
// 320-bit integer, and one rounding step brings it back to the 32-bit
// format in the requested mode (0 nearest-even, 1 toward zero, 2 toward
// +inf, 3 toward -inf). Subnormals, overflow and the special values are
// handled the IEEE 754 way; every NaN result is 0x7FC00000.
package fp_ref_pkg;

  localparam int BW = 320;

  typedef struct {
    logic [31:0] res;
    logic        ine;
    logic        ovf;
    logic        snan;
    logic        qnan;
    logic        inf;
    logic        zero;
    logic        special;
  } ref_t;

  // Round (-1)^s * m * 2^e2 to single precision.
  function automatic ref_t round_sp(input logic s, input logic [BW-1:0] m,
                                    input int e2, input int rm);
    ref_t r;
    int p, u, lsb, sh, biased;
    logic [BW-1:0] q, rem, half;
    logic up;
    r = '{default: 0};
    if (m == '0) begin
      r.res  = {s, 31'b0};
      r.zero = 1;
      return r;
    end
    p = 0;
    for (int i = 0; i < BW; i++) if (m[i]) p = i;
    u   = p + e2;
    lsb = (u - 23 > -149) ? u - 23 : -149;
    sh  = lsb - e2;
    if (sh <= 0) begin
      q   = m << (-sh);
      rem = '0;
      half = '0;
      up  = 0;
    end else begin
      q    = m >> sh;
      rem  = m & ((BW'(1) << sh) - BW'(1));
      half = BW'(1) << (sh - 1);
      case (rm)
        0: up = (rem > half) || ((rem == half) && q[0]);
        1: up = 0;
        2: up = !s && (rem != 0);
        default: up = s && (rem != 0);
      endcase
    end
    q = q + BW'(up);
    if (q == (BW'(1) << 24)) begin
      q   = q >> 1;
      lsb = lsb + 1;
    end
    r.ine = (rem != 0);
    if (q < (BW'(1) << 23)) begin
      r.res = {s, 8'd0, q[22:0]};           // subnormal or zero
    end else begin
      biased = lsb + 150;
      if (biased >= 255) begin
        r.ovf = 1;
        r.ine = 1;
        if (rm == 1 || (rm == 2 && s) || (rm == 3 && !s)) r.res = {s, 8'hFE, 23'h7FFFFF};
        else                                             r.res = {s, 8'hFF, 23'h0};
      end else begin
        r.res = {s, 8'(biased), q[22:0]};
      end
    end
    r.zero = (r.res[30:0] == 0);
    r.inf  = (r.res[30:0] == {8'hFF, 23'h0});
    return r;
  endfunction

  function automatic ref_t fp_op(input int op, input int rm,
                                 input logic [31:0] a, input logic [31:0] b);
    ref_t r;
    logic sa, sb, a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    int ea, eb, emin;
    logic [BW-1:0] ma, mb, ia, ib, mag;
    logic s;
    sa = a[31];
    sb = b[31] ^ (op == 1);
    a_nan = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    b_nan = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    a_inf = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    b_inf = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    a_zero = (a[30:0] == 0);
    b_zero = (b[30:0] == 0);
    ea = (a[30:23] == 0) ? 1 : int'(a[30:23]);
    eb = (b[30:23] == 0) ? 1 : int'(b[30:23]);
    ma = BW'({a[30:23] != 0, a[22:0]});
    mb = BW'({b[30:23] != 0, b[22:0]});
    r = '{default: 0};
    r.snan = (a_nan && !a[22]) || (b_nan && !b[22]);
    r.special = 1;
    if (a_nan || b_nan) begin
      r.res = 32'h7FC00000;
    end else if (op >= 2) begin
      if ((a_inf && b_zero) || (a_zero && b_inf)) r.res = 32'h7FC00000;
      else if (a_inf || b_inf) r.res = {a[31] ^ b[31], 8'hFF, 23'h0};
      else begin
        r = round_sp(a[31] ^ b[31], ma * mb, ea + eb - 300, rm);
        r.snan = 0;
      end
    end else begin
      if (a_inf && b_inf && (sa != sb)) r.res = 32'h7FC00000;
      else if (a_inf) r.res = {sa, 8'hFF, 23'h0};
      else if (b_inf) r.res = {sb, 8'hFF, 23'h0};
      else begin
        emin = (ea < eb) ? ea : eb;
        ia = ma << (ea - emin);
        ib = mb << (eb - emin);
        if (sa == sb) begin
          mag = ia + ib;
          s   = sa;
        end else if (ia >= ib) begin
          mag = ia - ib;
          s   = sa;
        end else begin
          mag = ib - ia;
          s   = sb;
        end
        if (mag == 0) s = (sa == sb) ? sa : (rm == 3);
        r = round_sp(s, mag, emin - 150, rm);
        r.snan = 0;
      end
    end
    if (r.special) begin
      r.qnan = (r.res == 32'h7FC00000);
      r.inf  = (r.res[30:0] == {8'hFF, 23'h0});
    end
    return r;
  endfunction

  // Random operand biased toward interesting encodings.
  function automatic logic [31:0] rand_operand();
    logic [31:0] v;
    int k;
    v = $urandom;
    k = $urandom_range(0, 19);
    case (k)
      0: v[30:0] = 31'h0;                          // zero
      1: v[30:0] = {8'hFF, 23'h0};                 // infinity
      2: v[30:0] = {8'hFF, 1'b1, 22'($urandom)};   // quiet NaN
      3: v[30:0] = {8'hFF, 1'b0, 22'($urandom) | 22'h1}; // signalling NaN
      4, 5: v[30:23] = 8'h00;                      // subnormal
      6, 7: v[30:23] = 8'($urandom_range(1, 20));  // tiny
      8, 9: v[30:23] = 8'($urandom_range(235, 254)); // huge
      10: v[22:0] = 23'h7FFFFF;
      default: if (v[30:23] == 8'hFF) v[30:23] = 8'h80;
    endcase
    return v;
  endfunction

endpackage
