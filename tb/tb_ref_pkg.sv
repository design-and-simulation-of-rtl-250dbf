// tb_ref_pkg: reference models used by the testbenches of the generalized modulator.
//
// Everything here is written from the definitions, not from the RTL: symbol points
// from real cos/sin, OVSF codes from the recursive code tree, scrambling sequences
// from the two m-sequences run step by step (c2 by actually advancing 16777232
// chips), and RRC taps from the closed-form impulse response.
package tb_ref_pkg;
  import sdr_pkg::*;

  localparam int AMP = 4096;
  localparam int OSR = 4;
  localparam int NTAPS = 49;

  // Point of the circle of radius AMP at angle m*pi/8.
  function automatic int pt_i(int m);
    return $rtoi($floor(AMP * $cos(3.14159265358979 * m / 8.0) + 0.5));
  endfunction
  function automatic int pt_q(int m);
    return $rtoi($floor(AMP * $sin(3.14159265358979 * m / 8.0) + 0.5));
  endfunction

  // OVSF code c(sf, n), chip k, as +1/-1, built by the tree recursion
  // c(2sf, 2n) = (c(sf,n), c(sf,n)), c(2sf, 2n+1) = (c(sf,n), -c(sf,n)).
  function automatic int ovsf(int sf, int n, int k);
    int half;
    if (sf == 1) return 1;
    half = sf / 2;
    if (k < half) return ovsf(half, n / 2, k);
    return (n % 2) ? -ovsf(half, n / 2, k - half) : ovsf(half, n / 2, k - half);
  endfunction

  // One step of x (x^25+x^3+1) and y (x^25+x^3+x^2+x+1); bit k holds x(i+k).
  function automatic logic [24:0] step_x(logic [24:0] s);
    return {s[3] ^ s[0], s[24:1]};
  endfunction
  function automatic logic [24:0] step_y(logic [24:0] s);
    return {s[3] ^ s[2] ^ s[1] ^ s[0], s[24:1]};
  endfunction

  // Fill c1[i], c2[i] for i = 0..n-1 of long code number `code`.
  function automatic void long_code(int unsigned code, int n, ref bit c1[], ref bit c2[]);
    logic [24:0] x, y, xs, ys;
    x = {1'b1, code[23:0]};
    y = '1;
    xs = x; ys = y;
    for (int i = 0; i < 16777232; i++) begin
      xs = step_x(xs);
      ys = step_y(ys);
    end
    c1 = new[n];
    c2 = new[n];
    for (int i = 0; i < n; i++) begin
      c1[i] = x[0] ^ y[0];
      c2[i] = xs[0] ^ ys[0];
      x = step_x(x); y = step_y(y);
      xs = step_x(xs); ys = step_y(ys);
    end
  endfunction

  // Root raised cosine tap at time t (in symbols), roll-off a.
  function automatic real rrc(real t, real a);
    real pi;
    pi = 3.14159265358979;
    if (t == 0.0) return 1.0 - a + 4.0 * a / pi;
    if ((t * t - 1.0 / (16.0 * a * a)) < 1e-9 && (t * t - 1.0 / (16.0 * a * a)) > -1e-9)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * a)) +
                               (1.0 - 2.0 / pi) * $cos(pi / (4.0 * a)));
    return ($sin(pi * t * (1.0 - a)) + 4.0 * a * t * $cos(pi * t * (1.0 + a))) /
           (pi * t * (1.0 - (4.0 * a * t) * (4.0 * a * t)));
  endfunction

  // NTAPS RRC taps at OSR samples per symbol, Q1.14 with the peak at 16384.
  function automatic void rrc_taps(real a, ref int h[NTAPS]);
    real pk;
    pk = rrc(0.0, a);
    for (int k = 0; k < NTAPS; k++)
      h[k] = $rtoi($floor(rrc(real'(k - NTAPS / 2) / OSR, a) / pk * 16384.0 + 0.5));
  endfunction

  // Reference rounding of the FIR sums: (a + 2^(s-1)) >> s, saturated to w bits.
  function automatic longint rnd_sat(longint a, int s, int w);
    longint r;
    r = (a + (longint'(1) << (s - 1))) >>> s;
    if (r > (longint'(1) << (w - 1)) - 1) r = (longint'(1) << (w - 1)) - 1;
    if (r < -(longint'(1) << (w - 1)))    r = -(longint'(1) << (w - 1));
    return r;
  endfunction

  // Whole transmit chain, from the start of a burst after a restart: bits in,
  // expected pulse-shaped samples out. coef holds the three filter banks.
  function automatic void chain_model(mod_cfg_t c, bit bits[$], logic [15:0] coef[147],
                                      ref longint out_i[$], ref longint out_q[$]);
    int lv[$], si[$], sq[$], ci[$], cq[$];
    int bl, sfi, sfq, nchip, bank;
    bit r1[], r2[];
    bl = int'(c.burst_len);
    // precoder and NRZ
    for (int k = 0; k < bits.size(); k++) begin
      bit beta, prev;
      prev = (k % bl == 0) ? 1'b1 : bits[k-1];
      beta = c.precoder_on ? (bits[k] ^ prev) : bits[k];
      case (c.nrz)
        NRZ_PLUS:  lv.push_back(beta ? -1 : 1);
        NRZ_MINUS: lv.push_back(beta ? 1 : -1);
        default:   lv.push_back(int'(beta));
      endcase
    end
    // symbol mapping
    if (c.mod_num == MOD_DUAL && c.i_len != 0) begin
      for (int k = 0; k < lv.size(); k++) begin
        int p;
        p = k % bl;
        if (p < int'(c.i_len)) si.push_back(lv[k] * AMP);
        else if (p < int'(c.i_len + c.q_len)) sq.push_back(lv[k] * AMP);
      end
    end else begin
      int gray[8] = '{7, 3, 2, 0, 1, 5, 4, 6};
      int nb, ph, sym;
      nb = (c.mod_num == MOD_GMSK) ? 1 : (c.mod_num == MOD_DUAL) ? 3 : 2;
      ph = 0;
      for (int k = 0; k + nb <= lv.size(); k += nb) begin
        int b[3], m, d;
        sym = (k % bl) / nb;
        if (sym == 0) ph = 0;
        for (int n = 0; n < nb; n++)
          b[n] = (c.nrz == NRZ_OFF) ? lv[k+n] : (lv[k+n] < 0);
        case (c.mod_num)
          MOD_GMSK: begin
            d = lv[k];
            si.push_back(d * pt_i(4 * (sym % 4)));
            sq.push_back(d * pt_q(4 * (sym % 4)));
          end
          MOD_PI4DQPSK: begin
            ph += (b[0] == 0 && b[1] == 0) ? 2 : (b[0] == 0) ? 6 : (b[1] == 1) ? -6 : -2;
            si.push_back(pt_i(ph));
            sq.push_back(pt_q(ph));
          end
          MOD_QPSK: begin
            si.push_back(b[0] ? -pt_i(2) : pt_i(2));
            sq.push_back(b[1] ? -pt_q(2) : pt_q(2));
          end
          default: begin
            int v;
            v = b[0] * 4 + b[1] * 2 + b[2];
            for (int n = 0; n < 8; n++) if (gray[n] == v) m = 2 * n;
            si.push_back(pt_i(m));
            sq.push_back(pt_q(m));
          end
        endcase
      end
    end
    // spreading
    sfi = 1 << c.sf_i_log2;
    sfq = 1 << c.sf_q_log2;
    nchip = si.size() * sfi;
    if (sq.size() * sfq < nchip) nchip = sq.size() * sfq;
    for (int k = 0; k < nchip; k++) begin
      ci.push_back(si[k / sfi] * ovsf(sfi, int'(c.code_i), k % sfi));
      cq.push_back(sq[k / sfq] * ovsf(sfq, int'(c.code_q), k % sfq));
    end
    // weighting and scrambling (frame of 38400 chips)
    if (c.scramble_on) begin
      long_code(int'(c.scr_code), (nchip < 38400) ? nchip : 38400, r1, r2);
      for (int k = 0; k < nchip; k++) begin
        int wi, wq, a, b, i;
        i = k % 38400;
        wi = (ci[k] * int'(c.beta_d)) >>> 4;
        wq = (cq[k] * int'(c.beta_c)) >>> 4;
        a = r1[i] ? -1 : 1;
        b = a * ((i % 2) ? -1 : 1) * (r2[i - i % 2] ? -1 : 1);
        ci[k] = wi * a - wq * b;
        cq[k] = wi * b + wq * a;
      end
    end
    // pulse shaping
    bank = int'(c.filter_num) - 1;
    for (int k = 0; k < nchip; k++)
      for (int p = 0; p < OSR; p++) begin
        longint ai, aq;
        ai = 0; aq = 0;
        for (int j = 0; p + j * OSR < NTAPS; j++)
          if (k - j >= 0) begin
            ai += longint'($signed(coef[bank * NTAPS + p + j * OSR])) * ci[k - j];
            aq += longint'($signed(coef[bank * NTAPS + p + j * OSR])) * cq[k - j];
          end
        out_i.push_back(rnd_sat(ai, 14, 18));
        out_q.push_back(rnd_sat(aq, 14, 18));
      end
  endfunction

  // K = 9 convolutional encoder with 8 zero tail bits; register {u_k .. u_(k-8)},
  // outputs ^(r & G) for G = 561, 753 (rate 1/2) or 557, 663, 711 (rate 1/3).
  function automatic void conv_encode(bit u[$], bit r13, ref logic [2:0] sym[$]);
    logic [8:0] r;
    r = '0;
    sym = {};
    for (int k = 0; k < u.size() + 8; k++) begin
      r = {(k < u.size()) ? u[k] : 1'b0, r[8:1]};
      if (r13) sym.push_back({^(r & 9'o711), ^(r & 9'o663), ^(r & 9'o557)});
      else     sym.push_back({1'b0, ^(r & 9'o753), ^(r & 9'o561)});
    end
  endfunction

  // 12-bit CRC, g(D) = D^12 + D^11 + D^3 + D^2 + D + 1, by long division; the parity
  // bits are appended to d, highest coefficient first.
  function automatic void add_crc12(ref bit d[$]);
    bit g[13] = '{1, 1, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1};
    bit w[$];
    int n;
    n = d.size();
    w = d;
    for (int k = 0; k < 12; k++) w.push_back(1'b0);
    for (int k = 0; k < n; k++)
      if (w[k]) for (int j = 0; j < 13; j++) w[k + j] ^= g[j];
    for (int k = 0; k < 12; k++) d.push_back(w[n + k]);
  endfunction

endpackage
