// lung_ref_pkg -- reference arithmetic for the lung model testbenches.
//
// Recomputes the two-compartment model with 64-bit integers, written apart
// from the RTL's fixed-point helpers: Q23.8 quotient (a*256)/b truncated
// toward zero (0 when b is 0), Q23.8 product (a*b) shifted right by 8 with
// sign (floor), results wrapped to 32 bits. Constants are the RTL defaults.
package lung_ref_pkg;

  localparam longint R_VBR_0   = 'h9600;
  localparam longint R_COM_BR  = 'h100;
  localparam longint R_VALV_0  = 'h9C400;
  localparam longint R_COM_ALV = 'h1000;
  localparam longint R_RBR     = 'h800;
  localparam longint R_RALV    = 'h400;
  localparam longint R_CAIR    = 'h100;

  typedef struct {
    int qbr, vbr, qalv, valv;
  } st_t;

  typedef struct {
    int qbr_t, vbr_t, qalv_t, valv_t, pbr, palv, fbr, falv, cbr, calv;
  } der_t;

  function automatic int w32(longint x);
    return int'(x);
  endfunction

  function automatic int rdiv(longint a, longint b);
    if (b == 0) return 0;
    return w32((a * 256) / b);
  endfunction

  function automatic int rmul(longint a, longint b);
    longint p;
    p = a * b;
    if (p < 0) return w32(-((-p + 255) / 256));  // floor division by 256
    return w32(p / 256);
  endfunction

  function automatic der_t rhs(st_t s, int pair);
    der_t d;
    d.cbr    = rdiv(longint'(s.qbr), longint'(s.vbr));
    d.calv   = rdiv(longint'(s.qalv), longint'(s.valv));
    d.pbr    = rdiv(longint'(w32(longint'(s.vbr) - R_VBR_0)), R_COM_BR);
    d.palv   = rdiv(longint'(w32(longint'(s.valv) - R_VALV_0)), R_COM_ALV);
    d.fbr    = rdiv(longint'(w32(longint'(pair) - longint'(d.pbr))), R_RBR);
    d.falv   = rdiv(longint'(w32(longint'(d.pbr) - longint'(d.palv))), R_RALV);
    d.qbr_t  = w32(longint'(rmul(longint'(d.fbr), longint'(w32(R_CAIR + longint'(d.cbr))))) +
                   longint'(rmul(longint'(d.falv), longint'(w32(longint'(d.calv) - longint'(d.cbr))))));
    d.qalv_t = rmul(longint'(d.falv), longint'(w32(longint'(d.cbr) + longint'(d.calv))));
    d.vbr_t  = w32(longint'(d.fbr) - longint'(d.falv));
    d.valv_t = d.falv;
    return d;
  endfunction

  function automatic st_t init_state();
    st_t s;
    s.qbr = int'(R_VBR_0);  s.vbr  = int'(R_VBR_0);
    s.qalv = int'(R_VALV_0); s.valv = int'(R_VALV_0);
    return s;
  endfunction

  // one forward-Euler time step with dt = 1
  function automatic st_t step(st_t s, int pair);
    der_t d;
    st_t  n;
    d = rhs(s, pair);
    n.qbr  = w32(longint'(s.qbr)  + longint'(d.qbr_t));
    n.vbr  = w32(longint'(s.vbr)  + longint'(d.vbr_t));
    n.qalv = w32(longint'(s.qalv) + longint'(d.qalv_t));
    n.valv = w32(longint'(s.valv) + longint'(d.valv_t));
    return n;
  endfunction

endpackage
