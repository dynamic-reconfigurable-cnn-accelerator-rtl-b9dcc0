// tb_ref_pkg: reference models used by the testbenches.  They compute the
// layers directly from their definitions on plain integer queues, with the
// same Q8.8 number format and rounding as the hardware (accumulate exactly,
// arithmetic shift right by 8, saturate to 16 bits, then ReLU), but without
// any of its tiling, banking or streaming.
package tb_ref_pkg;

  typedef int q_t[$];

  function automatic int requant_ref(longint acc, bit relu);
    longint v;
    v = acc >>> 8;
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    if (relu && v < 0) v = 0;
    return int'(v);
  endfunction

  // weights [m][n][i][j], bias [m], input [n][y][x]  ->  output [m][r][c]
  function automatic q_t conv_ref(q_t wt, q_t b, q_t x, int n_in, int n_out,
                                  int h, int w, int k, int s, bit relu);
    q_t o;
    int r_out, c_out;
    longint acc;
    r_out = (h - k) / s + 1;
    c_out = (w - k) / s + 1;
    for (int m = 0; m < n_out; m++)
      for (int r = 0; r < r_out; r++)
        for (int c = 0; c < c_out; c++) begin
          acc = longint'(b[m]) <<< 8;
          for (int n = 0; n < n_in; n++)
            for (int i = 0; i < k; i++)
              for (int j = 0; j < k; j++)
                acc += longint'(wt[((m * n_in + n) * k + i) * k + j]) *
                       longint'(x[(n * h + s * r + i) * w + s * c + j]);
          o.push_back(requant_ref(acc, relu));
        end
    return o;
  endfunction

  // 2x2 stride-2 max pooling of [ch][h][w]
  function automatic q_t pool_ref(q_t x, int ch, int h, int w);
    q_t o;
    int mx;
    for (int c = 0; c < ch; c++)
      for (int r = 0; r < h / 2; r++)
        for (int q = 0; q < w / 2; q++) begin
          mx = x[(c * h + 2 * r) * w + 2 * q];
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++)
              if (x[(c * h + 2 * r + dy) * w + 2 * q + dx] > mx)
                mx = x[(c * h + 2 * r + dy) * w + 2 * q + dx];
          o.push_back(mx);
        end
    return o;
  endfunction

  // weights [o][i], bias [o], input [i]
  function automatic q_t fc_ref(q_t wt, q_t b, q_t x, int n_in, int n_out, bit relu);
    q_t o;
    longint acc;
    for (int m = 0; m < n_out; m++) begin
      acc = longint'(b[m]) <<< 8;
      for (int i = 0; i < n_in; i++)
        acc += longint'(wt[m * n_in + i]) * longint'(x[i]);
      o.push_back(requant_ref(acc, relu));
    end
    return o;
  endfunction

  // random Q8.8 value in [-lim, lim)
  function automatic int rnd(int lim);
    return int'($urandom_range(2 * lim - 1)) - lim;
  endfunction

endpackage
