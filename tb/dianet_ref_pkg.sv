// dianet_ref_pkg: reference model of the DiaNet PE array for testbenches.
// It evaluates a configured array with plain integer arithmetic (no shifts
// of signed vectors), row by row, and also predicts the cycle in which each
// PE's output becomes valid when all input features are written at once.
package dianet_ref_pkg;
  import dianet_pkg::*;

  function automatic longint floordiv(longint a, longint b);
    if (a >= 0) return a / b;
    return -((-a + b - 1) / b);
  endfunction

  function automatic longint ref_z(pe_cfg_t c, longint a0, longint a1, longint x, longint s);
    longint ps, v;
    ps = 0;
    if (c.use_a0) ps += a0 * longint'($signed(c.w0));
    if (c.use_a1) ps += a1 * longint'($signed(c.w1));
    if (c.use_x)  ps += x  * longint'($signed(c.wx));
    v = floordiv(ps, longint'(1) << FRAC_W) + longint'($signed(c.bias));
    case (c.act)
      ACT_RELU: if (v < 0) v = 0;
      ACT_LR8:  if (v < 0) v = floordiv(v, 8);
      ACT_LR16: if (v < 0) v = floordiv(v, 16);
      default: ;
    endcase
    if (c.use_skip) v += s;
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  // Evaluate the array. xv/xp/xt: feature value, presence and the cycle
  // from which it is valid, per PE. Returns values, valid
  // flags and the first cycle each output is valid.
  task automatic eval_array(input int rows, input int cols, input pe_cfg_t cfg[],
                            input longint xv[], input bit xp[], input int xt[],
                            output longint z[], output bit v[], output int tv[]);
    int n;
    n = rows * cols;
    z = new[n]; v = new[n]; tv = new[n];
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        int i, ia0, ia1, isk, t;
        bit ok;
        pe_cfg_t k;
        longint a0, a1, s;
        i = r * cols + c;
        k = cfg[i];
        z[i] = 0; v[i] = 0; tv[i] = -1;
        if (!k.en) continue;
        ia0 = -1; ia1 = -1; isk = -1;
        if (r > 0) begin
          if (k.expand) begin
            if (c > 0) ia0 = i - cols - 1;
            ia1 = i - cols;
          end else begin
            ia0 = i - cols;
            if (c < cols - 1) ia1 = i - cols + 1;
          end
        end
        if (r > 1) isk = i - 2 * cols;
        ok = 1; t = 0;
        a0 = 0; a1 = 0; s = 0;
        if (k.use_a0) begin
          if (ia0 < 0 || !v[ia0]) ok = 0; else begin a0 = z[ia0]; if (tv[ia0] > t) t = tv[ia0]; end
        end
        if (k.use_a1) begin
          if (ia1 < 0 || !v[ia1]) ok = 0; else begin a1 = z[ia1]; if (tv[ia1] > t) t = tv[ia1]; end
        end
        if (k.use_skip) begin
          if (isk < 0 || !v[isk]) ok = 0; else begin s = z[isk]; if (tv[isk] > t) t = tv[isk]; end
        end
        if (k.use_x) begin
          if (!xp[i]) ok = 0; else if (xt[i] > t) t = xt[i];
        end
        if (!ok) continue;
        z[i] = ref_z(k, a0, a1, k.use_x ? xv[i] : 0, s);
        v[i] = 1;
        tv[i] = t + 1;
      end
  endtask

  // Scan-chain bit stream for a configuration: {cfg[n-1], ..., cfg[0]},
  // MSB first, as MEM_DW-bit words, with leading pad bits.
  function automatic void cfg_words(input pe_cfg_t cfg[], output logic [MEM_DW-1:0] w[]);
    int n, total, nw, pad, b;
    n = cfg.size();
    total = n * CFG_W;
    nw = (total + MEM_DW - 1) / MEM_DW;
    pad = nw * MEM_DW - total;
    w = new[nw];
    foreach (w[j]) w[j] = '0;
    b = pad;
    for (int i = n - 1; i >= 0; i--)
      for (int k = CFG_W - 1; k >= 0; k--) begin
        logic [CFG_W-1:0] bits;
        bits = cfg[i];
        w[b / MEM_DW][MEM_DW - 1 - (b % MEM_DW)] = bits[k];
        b++;
      end
  endfunction
endpackage
