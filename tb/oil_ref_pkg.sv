// Reference model of the oil monitor's arithmetic, for testbenches.
// Slope in real arithmetic from the mean-centred least-squares formula,
// percentage drop, the default fuzzy partitions / rules / centroid, and the
// remaining-life extrapolation, all written independently of the RTL.
package oil_ref_pkg;

  // Q.8 slope of ys against xs, truncated toward zero, saturated to 16 bits.
  function automatic int ref_slope_q8(int xs[$], int ys[$]);
    real mx = 0.0, my = 0.0, sxx = 0.0, sxy = 0.0, q;
    int  n = xs.size();
    int  e;
    foreach (xs[i]) begin mx += xs[i]; my += ys[i]; end
    mx /= n; my /= n;
    foreach (xs[i]) begin
      sxx += (xs[i] - mx) * (xs[i] - mx);
      sxy += (xs[i] - mx) * (ys[i] - my);
    end
    if (sxx < 1e-9) return 0;
    q = sxy / sxx * 256.0;
    e = $rtoi(q + ((q >= 0) ? 1e-9 : -1e-9));
    if (e > 32767) e = 32767;
    if (e < -32768) e = -32768;
    return e;
  endfunction

  function automatic int ref_drop_pct(int r, int c);
    return (r == 0 || c >= r) ? 0 : (100 * (r - c)) / r;
  endfunction

  function automatic int part(int v, int b1, int b2, int b3, int k);
    case (k)
      0: return (v <= b1) ? 255 : (v >= b2) ? 0 : 255 * (b2 - v) / (b2 - b1);
      1: return (v <= b1 || v >= b3) ? 0 :
                (v <= b2) ? 255 * (v - b1) / (b2 - b1) : 255 * (b3 - v) / (b3 - b2);
      default: return (v <= b2) ? 0 : (v >= b3) ? 255 : 255 * (v - b2) / (b3 - b2);
    endcase
  endfunction

  // Defuzzified severity for slope (Q.8), drop (%) and hour.
  function automatic int ref_severity(int s, int d, int h);
    int rate = (s < 0) ? -s : 0;
    int n = 255, w = 0, c = 0, e;
    int mr, md, mh;
    mr = part(rate, 512, 768, 1024, 0); md = part(d, 30, 45, 50, 0); mh = part(h, 200, 300, 400, 0);
    n = (mr < md) ? mr : md; n = (n < mh) ? n : mh;
    mr = part(rate, 512, 768, 1024, 1); md = part(d, 30, 45, 50, 1); mh = part(h, 200, 300, 400, 1);
    w = (mr > md) ? mr : md; w = (w > mh) ? w : mh;
    mr = part(rate, 512, 768, 1024, 2); md = part(d, 30, 45, 50, 2); mh = part(h, 200, 300, 400, 2);
    w = (mr > w) ? mr : w;      // a steep slope is a warning sign only
    c = (md > mh) ? md : mh;
    e = (n + w + c == 0) ? 0 : (128 * w + 255 * c) / (n + w + c);
    return (e > 255) ? 255 : e;
  endfunction

  // Remaining hours to %T = ref/2 at slope s (Q.8); 0 at critical (cond 2).
  function automatic int ref_remaining(int s, int r, int c, int cond);
    real margin = real'(c) - real'(r / 2);
    real rate = (s < 0) ? -real'(s) / 256.0 : 0.0;
    longint e;
    if (cond == 2) return 0;
    if (margin <= 0.0) return 0;
    if (rate == 0.0) return 65535;
    e = longint'($floor(margin / rate + 1e-9));
    return (e > 65535) ? 65535 : int'(e);
  endfunction

endpackage
