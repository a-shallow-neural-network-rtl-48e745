// tb_ref_pkg: integer reference models used by the testbenches.
// They re-derive, from the arithmetic rules of the design (Q3.12 words,
// products with 24 fraction bits, truncating rescale, saturation), what
// each stage must produce, without using any design module.
package tb_ref_pkg;

  function automatic int sat16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int leaky(int z);
    return (z >= 0) ? z : int'($floor(real'(z) * 655.0 / 65536.0));
  endfunction

  function automatic int htanh(int z);
    return (z > 4096) ? 4096 : (z < -4096) ? -4096 : z;
  endfunction

  // One fully connected layer; w is row-major (out x in), b has out words.
  // Zero coefficients contribute nothing (pruning does not change the
  // arithmetic result, only skips work).
  function automatic void layer(input int x[], input int w[], input int b[],
                                input int n_in, input int n_out, input bit is_out,
                                output int y[]);
    longint a;
    int z;
    y = new[n_out];
    for (int j = 0; j < n_out; j++) begin
      a = longint'(b[j]) * 4096;
      for (int i = 0; i < n_in; i++) a += longint'(w[j*n_in + i]) * longint'(x[i]);
      z = sat16(a >>> 12);
      y[j] = is_out ? htanh(z) : leaky(z);
    end
  endfunction

  // Exact kernel factor exp(-gamma * max(t - trace(Z^T Z), 0)) in real
  // arithmetic, Vx and Vy row-major n x t in Q3.12.
  function automatic real kernel_real(input int vx[], input int vy[], input int n, input int t,
                                      input real gamma);
    real tr, d, arg;
    tr = 0.0;
    for (int i = 0; i < t; i++)
      for (int j = 0; j < t; j++) begin
        d = 0.0;
        for (int r = 0; r < n; r++) d += real'(vx[r*t+i]) * real'(vy[r*t+j]) / (4096.0 * 4096.0);
        tr += d * d;
      end
    arg = real'(t) - tr;
    if (arg < 0.0) arg = 0.0;
    return $exp(-gamma * arg);
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
