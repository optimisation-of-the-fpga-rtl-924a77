// tb_cnn_ref -- reference arithmetic for the testbenches.
//
// A direct, sample-by-sample model of the network arithmetic, written without
// any of the pipelining of the design: a causal convolution
//     s[f][t] = b_f * 2^10 + sum_c sum_j w_f[c][j] * x_c[t - j*d]
// (samples before t = 0 count as zero), followed by the activation. Values are
// integers in the 18-bit, 10-fractional-bit format; sums carry 20 fractional
// bits. The sigmoid table is evaluated from exp() directly, the piecewise
// linear sigmoid from its segment definition, and ReLU/linear outputs saturate
// at the 18-bit limits. Coefficients of one feature map are stored as
// {bias, w[0][0..k-1], w[1][0..k-1], ...}, the order of the feature map's
// coefficient registers.
package tb_cnn_ref;

  localparam int ACT_LUT  = 0;
  localparam int ACT_PLAN = 1;
  localparam int ACT_RELU = 2;
  localparam int ACT_NONE = 3;

  localparam longint DMAX = 131071;
  localparam longint DMIN = -131072;

  // Floor division by 2^n of a signed value.
  function automatic longint fdiv(input longint v, input int n);
    longint q;
    q = v / (longint'(1) << n);
    if (v < 0 && q * (longint'(1) << n) != v) q = q - 1;
    return q;
  endfunction

  function automatic int sig_lut(input longint s);
    longint a;
    real x;
    a = fdiv(s, 15);
    if (a > 255) a = 255;
    if (a < -256) a = -256;
    x = real'(a) / 32.0;
    return $rtoi(1024.0 / (1.0 + $exp(-x)) + 0.5);
  endfunction

  function automatic int sig_plan(input longint s);
    longint m;
    longint ax;
    longint f;
    m  = (s < 0) ? -s : s;
    ax = fdiv(m, 10);           // |x| with 10 fractional bits
    if (ax >= 5 * 1024)              f = 1024;
    else if (m * 8 >= 19 * (longint'(1) << 20)) f = fdiv(ax, 5) + 864;
    else if (ax >= 1024)             f = fdiv(ax, 3) + 640;
    else                             f = fdiv(ax, 2) + 512;
    return int'((s < 0) ? 1024 - f : f);
  endfunction

  function automatic int act_ref(input int act, input longint s);
    longint v;
    case (act)
      ACT_LUT:  return sig_lut(s);
      ACT_PLAN: return sig_plan(s);
      default: begin
        v = fdiv(s, 10);
        if (act == ACT_RELU && v < 0) v = 0;
        if (v > DMAX) v = DMAX;
        if (v < DMIN) v = DMIN;
        return int'(v);
      end
    endcase
  endfunction

  // One layer. x is cin*T long (channel-major), coefs holds fm*(1+cin*k)
  // entries starting at coff, y is fm*T long. Returns the number of sums that
  // were negative (useful to count ReLU clipping).
  function automatic int layer_ref(input int cin, input int fm, input int k,
                                   input int d, input int act, input int T,
                                   input int x[], input int coefs[],
                                   input int coff, output int y[]);
    int nneg;
    nneg = 0;
    y = new[fm * T];
    for (int f = 0; f < fm; f++) begin
      int base;
      base = coff + f * (1 + cin * k);
      for (int t = 0; t < T; t++) begin
        longint s;
        s = longint'(coefs[base]) * 1024;
        for (int c = 0; c < cin; c++)
          for (int j = 0; j < k; j++)
            if (t - j * d >= 0)
              s += longint'(coefs[base + 1 + c * k + j]) * longint'(x[c * T + t - j * d]);
        if (s < 0) nneg++;
        y[f * T + t] = act_ref(act, s);
      end
    end
    return nneg;
  endfunction

  // Whole energy network: trigger layers on the ADC stream x, then energy
  // layers on {x, trigger}. Coefficients are in chain order (trigger layer 0
  // first). Returns the energy and trigger outputs per sample, the number of
  // negative energy-layer sums (ReLU clipping) and of trigger-layer outputs
  // (any layer) at the ends of the sigmoid range.
  function automatic void net_ref(input int tnl, input int tks[], input int tds[],
                                  input int tfms[], input int tact,
                                  input int enl, input int eks[], input int eds[],
                                  input int efms[], input int T, input int x[],
                                  input int coefs[], output int energy[],
                                  output int trig[], output int nneg, output int nsat);
    int a[];
    int b[];
    int off, cin;
    a = x; off = 0; cin = 1; nneg = 0; nsat = 0;
    for (int l = 0; l < tnl; l++) begin
      void'(layer_ref(cin, tfms[l], tks[l], tds[l], tact, T, a, coefs, off, b));
      off += tfms[l] * (1 + cin * tks[l]);
      cin = tfms[l];
      a = b;
      foreach (a[i]) if (a[i] <= 0 || a[i] >= 1024) nsat++;
    end
    trig = new[T];
    for (int t = 0; t < T; t++) trig[t] = a[t];
    b = new[2 * T];
    for (int t = 0; t < T; t++) begin b[t] = x[t]; b[T + t] = trig[t]; end
    a = b; cin = 2;
    for (int l = 0; l < enl; l++) begin
      nneg += layer_ref(cin, efms[l], eks[l], eds[l], ACT_RELU, T, a, coefs, off, b);
      off += efms[l] * (1 + cin * eks[l]);
      cin = efms[l];
      a = b;
    end
    energy = new[T];
    for (int t = 0; t < T; t++) energy[t] = a[t];
  endfunction

endpackage
