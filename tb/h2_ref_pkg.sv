// h2_ref_pkg -- reference model of the HIPERLAN/2 transmit processing, for testbenches.
//
// Written from the standard's formulas, independently of the RTL: scrambling
// (x^7+x^4+1), K=7 (133,171) coding, puncturing (3/4, 9/16), the two-step interleaver,
// Gray mapping and the OFDM subcarrier layout. Testbenches use it to compute the
// points a burst must carry and to check the RTL's outputs against them.
package h2_ref_pkg;

  function automatic int ref_nbpsc(int mode);
    case (mode) 0, 1: return 1; 2, 3: return 2; 4, 5: return 4; default: return 6; endcase
  endfunction

  function automatic int ref_ndbps(int mode);
    int t[7] = '{24, 36, 48, 72, 108, 144, 216};
    return t[mode];
  endfunction

  function automatic int ref_nsym(int nbytes, int mode);
    return (nbytes * 8 + 6 + ref_ndbps(mode) - 1) / ref_ndbps(mode);
  endfunction

  // scrambled payload bits followed by zero tail and pad bits
  function automatic void ref_bits(input byte unsigned data[$], input int mode, input int seed,
                                   output bit out[$]);
    bit [6:0] s;
    int total;
    s = 7'(seed);
    out.delete();
    foreach (data[i]) begin
      for (int b = 0; b < 8; b++) begin
        bit fb;
        fb = s[6] ^ s[3];
        s  = {s[5:0], fb};
        out.push_back(data[i][b] ^ fb);
      end
    end
    total = ref_nsym(data.size(), mode) * ref_ndbps(mode);
    while (out.size() < total) out.push_back(1'b0);
  endfunction

  function automatic void ref_encode(input bit in[$], output bit a[$], output bit b[$]);
    bit [6:0] r;
    r = '0;
    a.delete(); b.delete();
    foreach (in[i]) begin
      r = {in[i], r[6:1]};
      a.push_back(r[6] ^ r[4] ^ r[3] ^ r[1] ^ r[0]);   // 133 octal
      b.push_back(r[6] ^ r[5] ^ r[4] ^ r[3] ^ r[0]);   // 171 octal
    end
  endfunction

  function automatic void ref_puncture(input bit a[$], input bit b[$], input int mode,
                                       output bit out[$]);
    out.delete();
    foreach (a[i]) begin
      bit ka, kb;
      ka = 1; kb = 1;
      if (mode == 1 || mode == 3 || mode == 5 || mode == 6) begin
        ka = (i % 3) != 2; kb = (i % 3) != 1;
      end else if (mode == 4) begin
        ka = (i % 9) != 4; kb = (i % 9) != 8;
      end
      if (ka) out.push_back(a[i]);
      if (kb) out.push_back(b[i]);
    end
  endfunction

  function automatic int ref_perm(int k, int n, int nb);
    int s, i;
    s = (nb / 2 > 1) ? nb / 2 : 1;
    i = (n / 16) * (k % 16) + k / 16;
    return s * (i / s) + (i + n - (16 * i) / n) % s;
  endfunction

  function automatic void ref_interleave(input bit in[$], input int mode, output bit out[$]);
    int n;
    n = 48 * ref_nbpsc(mode);
    out = in;
    for (int base = 0; base + n <= in.size(); base += n)
      for (int k = 0; k < n; k++) out[base + ref_perm(k, n, ref_nbpsc(mode))] = in[base + k];
  endfunction

  function automatic int ref_level(int g, int nb);
    case (nb)
      1: return g ? 1 : -1;
      2: case (g) 0: return -3; 1: return -1; 3: return 1; default: return 3; endcase
      default: case (g) 0: return -7; 1: return -5; 3: return -3; 2: return -1;
                        6: return 1; 7: return 3; 5: return 5; default: return 7; endcase
    endcase
  endfunction

  // mapped points (in level units) of a whole burst, 48 per OFDM symbol
  function automatic void ref_points(input byte unsigned data[$], input int mode,
                                     input int seed, output int pi[$], output int pq[$]);
    bit bits[$], a[$], b[$], p[$], il[$];
    int nb;
    ref_bits(data, mode, seed, bits);
    ref_encode(bits, a, b);
    ref_puncture(a, b, mode, p);
    ref_interleave(p, mode, il);
    nb = ref_nbpsc(mode);
    pi.delete(); pq.delete();
    for (int i = 0; i + nb <= il.size(); i += nb) begin
      case (nb)
        1: begin pi.push_back(ref_level(il[i], 1)); pq.push_back(0); end
        2: begin pi.push_back(ref_level(il[i], 1)); pq.push_back(ref_level(il[i+1], 1)); end
        4: begin pi.push_back(ref_level({il[i], il[i+1]}, 2));
                 pq.push_back(ref_level({il[i+2], il[i+3]}, 2)); end
        default: begin pi.push_back(ref_level({il[i], il[i+1], il[i+2]}, 3));
                       pq.push_back(ref_level({il[i+3], il[i+4], il[i+5]}, 3)); end
      endcase
    end
  endfunction

  // carrier number (-26..26) of data subcarrier d
  function automatic int ref_carrier(int d);
    int c = -26;
    int n = 0;
    while (1) begin
      if (c != 0 && c != 7 && c != -7 && c != 21 && c != -21) begin
        if (n == d) return c;
        n++;
      end
      c++;
    end
  endfunction

  // pilot polarity p_n, n = 0, 1, ... (x^7+x^4+1 from all ones, 1 -> -1)
  function automatic int ref_pol(int n);
    bit [6:0] s = 7'h7f;
    bit fb;
    for (int i = 0; i <= n; i++) begin fb = s[6] ^ s[3]; s = {s[5:0], fb}; end
    return fb ? -1 : 1;
  endfunction

endpackage
