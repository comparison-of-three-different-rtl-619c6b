// svpwm_ref_pkg: floating-point reference model used by the testbenches.
//
// It recomputes from first principles what the modulator should deliver:
// the sine-table value at the table grid (2*sin rounded to 1/32767 of full
// scale), the reference vector in the alpha'-beta' and g-h frames, and the
// average phase levels that a set of mapping times produces. Nothing here
// shares code with the design.
package svpwm_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // 2*sin of a 16-bit binary angle as read from a 256-point-per-turn table
  function automatic real ref_twosin(input int unsigned ang);
    int unsigned aq;
    real x, sv;
    aq = (ang & 32'hFF00) % 65536;
    x  = 2.0 * PI * real'(aq) / 65536.0;
    sv = $sin(x);
    if (sv >= 0.0) return  real'($rtoi(32767.0 * sv + 0.5)) / 16384.0;
    else           return -real'($rtoi(-32767.0 * sv + 0.5)) / 16384.0;
  endfunction

  // alpha'-beta' components: (L-1) m sin(theta +/- pi/3)
  function automatic void model_ab(input real m, input int unsigned theta, input int levels,
                                 output real va, output real vb);
    va = real'(levels - 1) * m * ref_twosin((theta + 10923) % 65536) / 2.0;
    vb = real'(levels - 1) * m * ref_twosin((theta + 65536 - 10923) % 65536) / 2.0;
  endfunction

  // g-h components (length (L-1)*(sqrt(3)/2)*m) of the vector actually produced: the angle inside the
  // sector is truncated to the table grid, then turned back by s*pi/3
  function automatic void model_gh(input real m, input int unsigned theta, input int levels,
                                 output real vg, output real vh, output int s);
    int unsigned starts [6] = '{0, 10923, 21846, 32768, 43691, 54614};
    int unsigned phi;
    real c1, s1, a1, b1, ang, ca, sa;
    s   = int'((theta * 6) / 65536);
    phi = theta - starts[s];
    c1  = ref_twosin(phi + 16384) / 2.0;
    s1  = ref_twosin(phi) / 2.0;
    a1  = real'(levels - 1) * m * c1 * $sqrt(3.0) / 2.0;
    b1  = real'(levels - 1) * m * s1 * $sqrt(3.0) / 2.0;
    // turn (a1, b1) by s*60 degrees
    ang = real'(s) * PI / 3.0;
    ca  = $cos(ang);
    sa  = $sin(ang);
    vg  = (a1 * ca - b1 * sa) - (a1 * sa + b1 * ca) / $sqrt(3.0);
    vh  = 2.0 * (a1 * sa + b1 * ca) / $sqrt(3.0);
  endfunction

  // duty of a switch with mapping time t (on while carrier >= t)
  function automatic real duty(input int unsigned t);
    return 1.0 - real'(t) / 65536.0;
  endfunction

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

endpackage
