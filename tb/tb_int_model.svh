// Floating-point reference of one interrupt-block pass, shared by the
// testbenches. Returns v_ip, v_in and v_ip + v_in per phase (Q14, rounded
// to the nearest integer) and which of the corner cases occurred.
function automatic real rabs(input real x);
  return (x < 0.0) ? -x : x;
endfunction

typedef struct {
  real vp[3];
  real vn[3];
  real vs[3];
  int  dt_sign[3];
  int  np_sign[3];
  bit  clamped;
} int_ref_t;

function automatic int_ref_t int_ref(input int alpha, input int beta, input int ia, input int ib,
                                     input int ic, input int udc1, input int udc2, input int kp,
                                     input int tdt, input int ton, input int toff, input int tss);
  int_ref_t r;
  real v[3], mx, mn, du_dt, mag, s, pp, nn;
  int cur[3];
  longint q, dd;
  cur = '{ia, ib, ic};
  q = (longint'(tdt + ton + toff) * 16384) / tss;
  if (q > 8192) q = 8192;
  du_dt = real'(q);
  v[0] = alpha;
  v[1] = -0.5 * alpha + 0.8660254037844386 * beta;
  v[2] = -0.5 * alpha - 0.8660254037844386 * beta;
  for (int p = 0; p < 3; p++) begin
    r.dt_sign[p] = (cur[p] > 0) ? 1 : (cur[p] < 0) ? -1 : 0;
    v[p] += r.dt_sign[p] * du_dt;
  end
  mx = v[0]; mn = v[0];
  for (int p = 1; p < 3; p++) begin
    if (v[p] > mx) mx = v[p];
    if (v[p] < mn) mn = v[p];
  end
  dd  = longint'(udc1 - udc2);
  mag = real'((longint'(kp) * (dd < 0 ? -dd : dd)) / 256);
  if (mag > 16384.0) mag = 16384.0;
  r.clamped = 0;
  for (int p = 0; p < 3; p++) begin
    pp = (v[p] - mn) / 2.0;
    nn = (v[p] - mx) / 2.0;
    s  = pp + nn - 16384.0;
    r.np_sign[p] = ((dd > 0) ? 1 : (dd < 0) ? -1 : 0) * ((s > 0.5) ? 1 : (s < -0.5) ? -1 : 0);
    pp += r.np_sign[p] * mag;
    nn += r.np_sign[p] * mag;
    if (pp < 0.0)      begin pp = 0.0;      r.clamped = 1; end
    if (pp > 16384.0)  begin pp = 16384.0;  r.clamped = 1; end
    if (nn > 0.0)      begin nn = 0.0;      r.clamped = 1; end
    if (nn < -16384.0) begin nn = -16384.0; r.clamped = 1; end
    r.vp[p] = pp;
    r.vn[p] = nn;
    r.vs[p] = pp + nn;
  end
  return r;
endfunction
