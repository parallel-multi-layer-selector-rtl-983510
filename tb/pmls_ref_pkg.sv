// pmls_ref_pkg: reference model of the PMLS S-box datapath for the
// testbenches. It is written separately from the RTL, with plain 64-bit
// integer arithmetic (and a double-precision Lorenz integrator as a sanity
// model), so that the bit-exact fixed-point results can be compared.
//
// Fixed-point conventions (must match the design, see the README):
// state Q4.28 at 2^-7 of the physical value, coefficients Q8.24, products
// truncated toward minus infinity.
package pmls_ref_pkg;

  typedef struct {
    longint x;
    longint y;
    longint z;
  } rvec_t;

  typedef struct {
    real x;
    real y;
    real z;
  } dvec_t;

  // wrap a wide value to a signed 32-bit word
  function automatic longint wrap32(longint v);
    int w;
    w = int'(v);
    return longint'(w);
  endfunction

  // floor(a*b / 2^sh) with a*b fitting in 64 bits
  function automatic longint mulsh(longint a, longint b, int sh);
    return (a * b) >>> sh;
  endfunction

  function automatic rvec_t ref_deriv(rvec_t s, longint sigma, longint r, longint beta);
    rvec_t d;
    d.x = wrap32(mulsh(wrap32(s.y - s.x), sigma, 24));
    d.y = wrap32(wrap32(mulsh(s.x, r, 24)) - s.y - mulsh(s.x, s.z, 21));
    d.z = wrap32(mulsh(s.x, s.y, 21) - wrap32(mulsh(s.z, beta, 24)));
    return d;
  endfunction

  function automatic rvec_t ref_rk4(rvec_t s, longint sigma, longint r, longint beta, longint h);
    rvec_t k1, k2, k3, k4, p, n;
    longint hh, h6;
    hh = h >>> 1;
    h6 = h / 6;
    k1 = ref_deriv(s, sigma, r, beta);
    p.x = wrap32(s.x + wrap32(mulsh(k1.x, hh, 24)));
    p.y = wrap32(s.y + wrap32(mulsh(k1.y, hh, 24)));
    p.z = wrap32(s.z + wrap32(mulsh(k1.z, hh, 24)));
    k2 = ref_deriv(p, sigma, r, beta);
    p.x = wrap32(s.x + wrap32(mulsh(k2.x, hh, 24)));
    p.y = wrap32(s.y + wrap32(mulsh(k2.y, hh, 24)));
    p.z = wrap32(s.z + wrap32(mulsh(k2.z, hh, 24)));
    k3 = ref_deriv(p, sigma, r, beta);
    p.x = wrap32(s.x + wrap32(mulsh(k3.x, h, 24)));
    p.y = wrap32(s.y + wrap32(mulsh(k3.y, h, 24)));
    p.z = wrap32(s.z + wrap32(mulsh(k3.z, h, 24)));
    k4 = ref_deriv(p, sigma, r, beta);
    n.x = wrap32(s.x + wrap32(mulsh(k1.x + 2*k2.x + 2*k3.x + k4.x, h6, 24)));
    n.y = wrap32(s.y + wrap32(mulsh(k1.y + 2*k2.y + 2*k3.y + k4.y, h6, 24)));
    n.z = wrap32(s.z + wrap32(mulsh(k1.z + 2*k2.z + 2*k3.z + k4.z, h6, 24)));
    return n;
  endfunction

  // physical-unit Lorenz derivative and RK4 step in double precision
  function automatic dvec_t d_deriv(dvec_t s, real sigma, real r, real beta);
    dvec_t d;
    d.x = sigma * (s.y - s.x);
    d.y = r * s.x - s.y - s.x * s.z;
    d.z = s.x * s.y - beta * s.z;
    return d;
  endfunction

  function automatic dvec_t d_add(dvec_t a, dvec_t b, real c);
    dvec_t o;
    o.x = a.x + c * b.x;
    o.y = a.y + c * b.y;
    o.z = a.z + c * b.z;
    return o;
  endfunction

  function automatic dvec_t d_rk4(dvec_t s, real sigma, real r, real beta, real h);
    dvec_t k1, k2, k3, k4, o;
    k1 = d_deriv(s, sigma, r, beta);
    k2 = d_deriv(d_add(s, k1, h / 2.0), sigma, r, beta);
    k3 = d_deriv(d_add(s, k2, h / 2.0), sigma, r, beta);
    k4 = d_deriv(d_add(s, k3, h), sigma, r, beta);
    o.x = s.x + h / 6.0 * (k1.x + 2.0 * k2.x + 2.0 * k3.x + k4.x);
    o.y = s.y + h / 6.0 * (k1.y + 2.0 * k2.y + 2.0 * k3.y + k4.y);
    o.z = s.z + h / 6.0 * (k1.z + 2.0 * k2.z + 2.0 * k3.z + k4.z);
    return o;
  endfunction

  // Q4.28 scaled state -> physical value
  function automatic real to_phys(longint v);
    return real'(v) / 2.0 ** 21;
  endfunction

  // X = mod(floor(v * 2^14), 256) for a Q4.28 word v, by integer division
  function automatic int ref_mod256(longint v);
    longint q, rem;
    rem = v % 16384;
    if (rem < 0) rem += 16384;
    q = (v - rem) / 16384;     // floor(v / 2^14)
    q = q % 256;
    if (q < 0) q += 256;
    return int'(q);
  endfunction

  // two-layer selector written from the selection tables
  function automatic int ref_select(int X, int Y, int Z, output int sel1, output int sel2);
    int s1, s2, s3;
    sel1 = (X >= 128 ? 1 : 0) + (Z >= 128 ? 1 : 0);
    case (sel1)
      0:       begin s1 = X; s2 = Y; s3 = Z; end
      1, 2:    begin s1 = Z; s2 = X; s3 = Y; end
      default: begin s1 = Y; s2 = Z; s3 = X; end
    endcase
    sel2 = (s1 >= 128 ? 1 : 0) + (s3 >= 128 ? 1 : 0);
    case (sel2)
      0:       return s1;
      1:       return s2;
      2:       return s3;
      default: return s1;
    endcase
  endfunction

  // Result of one whole S-box generation.
  typedef struct {
    int  stream[$];    // every selector byte, all attempts in order
    int  sel1[$];      // layer-1 select code of each byte
    int  sel2[$];      // layer-2 select code of each byte
    int  table_q[$];   // S-box, S(a) = table_q[a], when done
    int  attempts;
    bit  done;
    int  repeats;      // rejected repeats in the final attempt
  } gen_result_t;

  // Generation procedure: RK4 samples -> Mod(256) -> selector; drop the
  // first discard samples of an attempt, keep first appearances, restart
  // with r + r_step after num_samples samples, at most max_attempts times.
  function automatic void ref_generate(longint sigma, longint r, longint beta, longint h,
                                       longint x0, longint y0, longint z0,
                                       int discard, int num_samples, int max_attempts,
                                       longint r_step, ref gen_result_t res);
    rvec_t s;
    int    b, c1, c2;
    bit    seen[256];
    res.stream.delete();
    res.sel1.delete();
    res.sel2.delete();
    res.done     = 0;
    res.attempts = 0;
    for (int a = 0; a < max_attempts && !res.done; a++) begin
      res.attempts = a + 1;
      res.table_q.delete();
      res.repeats = 0;
      foreach (seen[i]) seen[i] = 0;
      s.x = x0;
      s.y = y0;
      s.z = z0;
      for (int n = 0; n < num_samples && !res.done; n++) begin
        s = ref_rk4(s, sigma, r + longint'(a) * r_step, beta, h);
        b = ref_select(ref_mod256(s.x), ref_mod256(s.y), ref_mod256(s.z), c1, c2);
        res.stream.push_back(b);
        res.sel1.push_back(c1);
        res.sel2.push_back(c2);
        if (n >= discard) begin
          if (seen[b]) res.repeats++;
          else begin
            seen[b] = 1;
            res.table_q.push_back(b);
            if (res.table_q.size() == 256) res.done = 1;
          end
        end
      end
    end
  endfunction

endpackage
