// pid_ref_pkg: integer reference model of the controller arithmetic, used by
// the testbenches to compute expected values independently of the RTL.
// All values are plain integers holding the raw fixed-point words:
// ERR Q8.8, gains Q4.8, TS Q0.8, terms Q12.8, KS Q0.8.
package pid_ref_pkg;

  localparam longint TERM_LIM = 524287;  // largest Q12.8 magnitude, 2^19 - 1

  function automatic longint clamp(input longint v, input longint lo, input longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Divide by 2^n rounding toward zero, then limit to the term range.
  function automatic longint scale_tz(input longint v, input int n);
    longint m;
    m = (v < 0) ? -v : v;
    m = m / (longint'(1) << n);
    if (m > TERM_LIM) m = TERM_LIM;
    return (v < 0) ? -m : m;
  endfunction

  // Floor division by 2^n, i.e. rounding x/2^n to nearest after adding half.
  function automatic longint round_half_up(input longint v, input int n);
    longint t;
    t = v + (longint'(1) << (n - 1));
    if (t >= 0) return t / (longint'(1) << n);
    return -((-t + (longint'(1) << n) - 1) / (longint'(1) << n));
  endfunction

  function automatic longint err_ref(input longint sp, input longint y);
    return clamp(sp - y, -128, 127) * 256;
  endfunction

  function automatic longint p_ref(input longint kp, input longint err);
    return scale_tz(err * kp, 8);
  endfunction

  function automatic longint i_ref(input longint iprev, input longint ki,
                                   input longint ts, input longint err);
    return clamp(iprev + scale_tz(err * ki * ts, 16), -TERM_LIM, TERM_LIM);
  endfunction

  function automatic longint quot_ref(input longint kd, input longint ts);
    return (ts == 0) ? 64'hFFFFF : (kd * 256) / ts;
  endfunction

  function automatic longint d_ref(input longint kd, input longint ts,
                                   input longint err, input longint eprev);
    return scale_tz(clamp(err - eprev, -32768, 32767) * quot_ref(kd, ts), 8);
  endfunction

  function automatic longint out_ref(input longint p, input longint i, input longint d);
    return clamp(round_half_up(p + i + d, 8), -2048, 2047);
  endfunction

  function automatic longint model_ref(input longint ystate, input longint u, input longint ks);
    return clamp(round_half_up(u * ks + ystate * ks, 8), -2048, 2047);
  endfunction

endpackage
