// ransac_ref_pkg: reference model of the fitness score used by the
// testbenches. It works on plain integers and evaluates the same fixed-point
// rules as the hardware, written out directly:
//   fit   = x1*H0 + y1*H1 + H2*2^7            (12 fraction bits)
//   |d|   = floor(|x2*2^12 - fit| / 2^6)      (6 fraction bits), at most 2047
//   score = min(|dx|^2 + |dy|^2, thdist^2)    (12 fraction bits)
//   sum   = running sum, limited to 2^21 - 1
package ransac_ref_pkg;

  localparam longint SCORE_MAX = (64'd1 << 21) - 1;

  function automatic longint ref_axis(input longint a, input longint b,
                                      input longint c, input longint ha,
                                      input longint hb, input longint hc);
    // a, b: x1, y1; c: x2 or y2; ha, hb: Q4.12 terms; hc: Q11.5 term
    longint fit, d;
    fit = a * ha + b * hb + hc * 128;
    d   = c * 4096 - fit;
    if (d < 0) d = -d;
    d = d / 64;
    if (d > 2047) d = 2047;
    return d;
  endfunction

  function automatic longint ref_point_score(
      input longint x1, input longint y1, input longint x2, input longint y2,
      input longint h0, input longint h1, input longint h2,
      input longint h3, input longint h4, input longint h5,
      input longint thd2);
    longint dx, dy, s;
    dx = ref_axis(x1, y1, x2, h0, h1, h2);
    dy = ref_axis(x1, y1, y2, h3, h4, h5);
    s  = dx * dx + dy * dy;
    return (s < thd2) ? s : thd2;
  endfunction

  function automatic longint ref_add(input longint acc, input longint s);
    return (acc + s > SCORE_MAX) ? SCORE_MAX : acc + s;
  endfunction

  // 16-bit two's complement from a signed integer
  function automatic logic [15:0] to16(input longint v);
    return v[15:0];
  endfunction

endpackage
