// tb_ref_pkg - floating-point reference models shared by the testbenches.
//
// chan_model: the up-converter written directly from its definition, not from
// its polyphase structure. Input sample n, placed on channels k0(n) and/or
// k1(n), contributes to output m as
//   x(n) * h(m - n*M/2) * exp(j*2*pi*k*m/M),
// with h the M*K-tap prototype. dc_model: y = x - floor(d), d += y / 2^MU.
package tb_ref_pkg;
  import nmdfb_pkg::*;

  localparam real PI = 3.14159265358979323846;

  function automatic real rabs(real v);
    return v < 0 ? -v : v;
  endfunction

  function automatic real rsat(real v);
    return v > 32767.0 ? 32767.0 : (v < -32768.0 ? -32768.0 : v);
  endfunction

  class chan_model;
    int M, K, P, NT;
    real h [];
    real xr [$], xi [$];
    int k0 [$], k1 [$];
    bit e0 [$], e1 [$];

    function new(int m, int k);
      M = m; K = k; P = m / 2; NT = m * k;
      h = new[NT];
      for (int j = 0; j < NT; j++) h[j] = real'(proto_coef(j, m, k)) / 131072.0;
    endfunction

    function void push(real r, real i, int ka, int kb, bit ea, bit eb);
      xr.push_back(r); xi.push_back(i);
      k0.push_back(ka); k1.push_back(kb);
      e0.push_back(ea); e1.push_back(eb);
    endfunction

    function void out(int m, output real yr, output real yi);
      real ar, ai, c, s;
      int lo, hi, j, kk;
      yr = 0; yi = 0;
      hi = m / P;
      if (hi > xr.size() - 1) hi = xr.size() - 1;
      lo = (m - NT + 1 + P - 1) / P;
      if (lo < 0) lo = 0;
      for (int n = lo; n <= hi; n++) begin
        j = m - n * P;
        if (j >= 0 && j < NT) begin
          ar = xr[n] * h[j];
          ai = xi[n] * h[j];
          for (int l = 0; l < 2; l++) begin
            if ((l == 0) ? e0[n] : e1[n]) begin
              kk = (l == 0) ? k0[n] : k1[n];
              c = $cos(2.0 * PI * real'((kk * m) % M) / M);
              s = $sin(2.0 * PI * real'((kk * m) % M) / M);
              yr += ar * c - ai * s;
              yi += ar * s + ai * c;
            end
          end
        end
      end
    endfunction
  endclass

  class dc_model;
    real d;
    int mu;
    function new(int m);
      mu = m; d = 0;
    endfunction
    function real step(real x);
      real y;
      y = rsat(x - $floor(d));
      d = d + y / real'(1 << mu);
      return y;
    endfunction
  endclass
endpackage
