// fx_ref_pkg: reference arithmetic for the testbenches of the buck converter
// HIL model. Fixed-point values are held as plain integer codes (value =
// code * 2^lsb) in 64-bit integers, and every conversion is done with integer
// division and comparisons rather than bit slicing, so that it is an
// independent check of the RTL. buck_ref_step is a code-exact model of one
// integration step of buck_hil_top at its default formats.
package fx_ref_pkg;

  // overflow events seen by ref_resize since the last clear
  longint ovf_count = 0;

  // Convert code v with LSB 2^in_l into sfixed(out_h downto out_l).
  // trunc: 1 = truncate, 0 = round to nearest, ties to even.
  // wrap:  1 = wrap,     0 = saturate.
  function automatic longint ref_resize(longint v, int in_l, int out_h, int out_l,
                                        bit trunc, bit wrap);
    longint p, q, r, maxv, minv, m;
    int     d, w;
    d = out_l - in_l;
    if (d > 0) begin
      p = longint'(1) << d;
      if (v >= 0) q = v / p;
      else        q = -((-v + p - 1) / p);   // floor division
      r = v - q * p;                         // 0 <= r < p
      if (!trunc) begin
        if (2 * r > p) q = q + 1;
        else if (2 * r == p && (q % 2) != 0) q = q + 1;
      end
    end else begin
      q = v * (longint'(1) << (-d));
    end
    w    = out_h - out_l + 1;
    m    = longint'(1) << w;
    maxv = (m / 2) - 1;
    minv = -(m / 2);
    if (q > maxv || q < minv) begin
      ovf_count++;
      if (!wrap) q = (q > maxv) ? maxv : minv;
      else begin
        q = ((q % m) + m) % m;
        if (q > maxv) q = q - m;
      end
    end
    return q;
  endfunction

  // default formats of the model (LSB exponents / MSB exponents)
  localparam int IL_H = 6,  IL_L = -18;
  localparam int VC_H = 5,  VC_L = -19;
  localparam int DTC_L = -24, DTL_L = -21, GL_L = -12;
  localparam int INCI_H = -4, INCI_L = -18;
  localparam int INCV_H = -6, INCV_L = -19;
  localparam int IAUX_H = 6, IAUX_L = -8;
  localparam int VAUX_H = 5, VAUX_L = -6;
  localparam int IIN_H = 6,  IIN_L = -5;
  localparam int IOUT_H = 3, IOUT_L = -8;
  localparam int VCFB_H = 5, VCFB_L = -6;
  localparam int ILFB_H = 6, ILFB_L = -8;

  // constant codes: round(dt/C * 2^24), round(dt/L * 2^21), round(1/R * 2^12)
  // for dt = 20 ns, C = 220 uF, L = 22 uH, R = 2.5 ohm
  localparam longint DTC_CODE = 1525;
  localparam longint DTL_CODE = 1907;
  localparam longint GL_CODE  = 1638;

  typedef struct {
    longint il, vc;          // next state codes
    longint iin, vo, iout;   // output codes for the current state
    int     vl_case;         // 0: Q on, 1: Q off and iL > 0, 2: Q off and iL <= 0
  } step_t;

  function automatic step_t buck_ref_step(bit q, longint vin, longint il, longint vc,
                                          bit trunc, bit wrap);
    step_t  s;
    longint ilfb, vcfb, vfull, vaux, iout, iaux, inci, incv;
    ilfb = ref_resize(il, IL_L, ILFB_H, ILFB_L, trunc, wrap);
    vcfb = ref_resize(vc, VC_L, VCFB_H, VCFB_L, trunc, wrap);
    if (q) begin
      vfull = vin - vcfb; s.vl_case = 0;
    end else if (ilfb > 0) begin
      vfull = -vcfb;      s.vl_case = 1;
    end else begin
      vfull = 0;          s.vl_case = 2;
    end
    vaux = ref_resize(vfull, VCFB_L, VAUX_H, VAUX_L, trunc, wrap);
    iout = ref_resize(GL_CODE * vcfb, GL_L + VCFB_L, IOUT_H, IOUT_L, trunc, wrap);
    iaux = ref_resize(ilfb - iout, ILFB_L, IAUX_H, IAUX_L, trunc, wrap);
    inci = ref_resize(DTL_CODE * vaux, DTL_L + VAUX_L, INCI_H, INCI_L, trunc, wrap);
    incv = ref_resize(DTC_CODE * iaux, DTC_L + IAUX_L, INCV_H, INCV_L, trunc, wrap);
    s.il   = ref_resize(il + inci, IL_L, IL_H, IL_L, trunc, wrap);
    s.vc   = ref_resize(vc + incv, VC_L, VC_H, VC_L, trunc, wrap);
    s.iin  = q ? ref_resize(ilfb, ILFB_L, IIN_H, IIN_L, trunc, wrap) : 0;
    s.vo   = vcfb;
    s.iout = iout;
    return s;
  endfunction

endpackage
