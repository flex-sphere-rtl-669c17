// flex_ref_pkg: reference model and stimulus helpers for the Flex-Sphere
// testbenches.
//
// The model computes the detector's arithmetic in 64-bit integers and
// reals, written from the algorithm rather than from the RTL: a node's
// child at level i uses e = z_i - R_ii*s, T = T_parent + floor(e^2 / 2^10)
// (Q.8 squared to Q.6), saturated at 65534, with 65535 marking a path that
// went through an out-of-range candidate. Below the two fully expanded
// levels the child is the odd integer nearest to z_i / R_ii (computed with
// the given 1/R_ii, halves rounded up), clipped to [-q, q]. The detected
// vector is the minimum over the 64 paths; on equal distances the path
// whose level-(M-1) candidate index is lower wins, then the lower level-M
// index.
package flex_ref_pkg;
  import flex_pkg::*;

  localparam longint RMAX = 65535;
  localparam longint RSAT = 65534;

  typedef struct {
    longint r    [M][M];   // R_{k,l} at [k-1][l-1], Q.8
    longint rinv [M];      // Q.12
    longint y    [M];      // Q.8
    int     q    [M];
    int     mt;
    int     s    [M];      // transmitted real symbols
  } prob_t;

  function automatic longint ref_ped(input longint parent, input longint e);
    longint t;
    if (parent == RMAX) return RMAX;
    t = parent + ((e * e) / 1024);
    return (t > RSAT) ? RSAT : t;
  endfunction

  function automatic int ref_slice(input longint z, input longint rinv, input int q);
    real x;
    int  n;
    x = real'(z * rinv) / 1048576.0;
    n = 2 * int'($floor((x + 1.0) / 2.0 + 0.5)) - 1;
    if (n < -q) n = -q;
    if (n >  q) n =  q;
    return n;
  endfunction

  // Symbols of the best path, its distance; syms indexed level-1.
  task automatic ref_detect(input prob_t p, output int syms [M], output longint ped);
    longint best;
    int     lowest;
    best   = -1;
    lowest = M + 1 - 2 * p.mt;
    for (int j = 0; j < NCH; j++) begin
      for (int c = 0; c < NCH; c++) begin
        longint z [M];
        longint t;
        int     sv [M];
        for (int k = 0; k < M; k++) begin
          z[k]  = p.y[k];
          sv[k] = 0;
        end
        t = 0;
        for (int lv = M; lv >= lowest; lv--) begin
          int s;
          if (lv == M)          s = 2 * c - 7;
          else if (lv == M - 1) s = 2 * j - 7;
          else                  s = ref_slice(z[lv-1], p.rinv[lv-1], p.q[lv-1]);
          if (lv >= M - 1 && (s > p.q[lv-1] || s < -p.q[lv-1])) t = RMAX;
          else t = ref_ped(t, z[lv-1] - p.r[lv-1][lv-1] * s);
          sv[lv-1] = s;
          for (int k = 0; k < lv - 1; k++) z[k] = z[k] - p.r[k][lv-1] * s;
        end
        if (best < 0 || t < best) begin
          best = t;
          syms = sv;
        end
      end
    end
    ped = best;
  endtask

  function automatic int rand_q();
    case ($urandom_range(2))
      0:       return 1;
      1:       return 3;
      default: return 7;
    endcase
  endfunction

  // Random channel: R_ii in [0.75, 3], off-diagonal in [-1.5, 1.5]; symbols
  // per complex stream with a random order (both levels of a stream share
  // q); y' = R s plus uniform noise of +-noise/256.
  function automatic prob_t gen_prob(input int mt, input int noise, input bit same_q);
    prob_t p;
    int    qs;
    p.mt = mt;
    qs   = rand_q();
    for (int k = 0; k < M; k++) begin
      for (int l = 0; l < M; l++) begin
        if (l < k)       p.r[k][l] = 0;
        else if (l == k) p.r[k][l] = 192 + longint'($urandom_range(576));
        else             p.r[k][l] = longint'($urandom_range(768)) - 384;
      end
      p.rinv[k] = (4096 * 256 + p.r[k][k] / 2) / p.r[k][k];
    end
    for (int a = 0; a < M / 2; a++) begin
      int qa;
      qa = same_q ? qs : rand_q();
      p.q[2*a] = qa;
      p.q[2*a+1] = qa;
    end
    for (int k = 0; k < M; k++) p.s[k] = 2 * int'($urandom_range(p.q[k])) - p.q[k];
    for (int k = 0; k < M; k++) begin
      p.s[k] = (p.s[k] % 2 == 0) ? p.s[k] + 1 : p.s[k];
      if (p.s[k] > p.q[k]) p.s[k] = p.q[k];
    end
    for (int k = 0; k < M; k++) begin
      p.y[k] = 0;
      for (int l = k; l < M; l++) p.y[k] += p.r[k][l] * p.s[l];
      if (noise > 0) p.y[k] += longint'($urandom_range(2 * noise)) - noise;
    end
    return p;
  endfunction
endpackage
