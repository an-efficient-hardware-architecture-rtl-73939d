// tq_ref_pkg: reference model of the H.264 transform and quantisation chain
// for the testbenches, written with plain integer arithmetic.
//
// reference() takes the 384 residual samples of a macroblock (input register
// file order), the luma and chroma QPs, the intra flag and the Intra 16x16
// flag, and returns every expected level (27 block slots x 16 positions) and
// every expected reconstructed residual sample (26 blocks x 16).  It follows
// the H.264 definitions: 4x4 integer transform, Hadamard transforms of the
// DC blocks (luma result halved), quantisation with MF, f = 2^qbits/3 or /6
// and qbits = 15 + QP/6, rescaling with V, inverse transform with the >>1
// terms and (x+32)>>6, DC normalisation (x+32)>>6 for luma and >>5 for
// chroma.  The 15-bit data limit and 16-bit saturation of the quantiser are
// modelled; ovf is set if any transform intermediate would not fit in 16 bits.
// The model is untimed (a function call); the cycle checks are in the
// testbenches.  The arithmetic is the standard's.  Like the hardware, the
// model rescales a DC block before its inverse Hadamard; both steps are linear
// and the rounding shifts line up, so this equals the standard's order exactly.
package tq_ref_pkg;
  int mf_t [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                      '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};
  int v_t  [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                      '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};

  // set when an intermediate value leaves the 16-bit range of the datapath
  bit ovf;

  function automatic int cls_of(input int p);
    int i = p / 4, j = p % 4;
    if (i % 2 == 0 && j % 2 == 0) return 0;
    if (i % 2 == 1 && j % 2 == 1) return 1;
    return 2;
  endfunction

  function automatic int sat(input longint v);
    return (v > 32767) ? 32767 : int'(v);
  endfunction

  function automatic void rng(input int v);
    if (v > 32767 || v < -32768) ovf = 1'b1;
  endfunction

  function automatic int quant(input int w, input int qp, input int c, input bit dc, input bit it);
    longint a, f, r;
    int qb = 15 + qp / 6;
    a = (w < 0) ? -w : w;
    if (a > 32767) a = 32767;
    f = (longint'(1) << qb) / (it ? 3 : 6);
    if (dc) r = (a * mf_t[qp % 6][0] + 2 * f) >> (qb + 1);
    else    r = (a * mf_t[qp % 6][c] + f) >> qb;
    return (w < 0) ? -sat(r) : sat(r);
  endfunction

  function automatic int dequant(input int z, input int qp, input int c);
    longint a = (z < 0) ? -z : z;
    longint r = (a * v_t[qp % 6][c]) << (qp / 6);
    return (z < 0) ? -sat(r) : sat(r);
  endfunction

  // forward integer transform (m=0) or Hadamard (m=1) of a 4x4 block
  function automatic void fwd4(input int x [16], input bit had, output int y [16]);
    int cf [4][4] = '{'{1,1,1,1}, '{2,1,-1,-2}, '{1,-1,-1,1}, '{1,-2,2,-1}};
    int hd [4][4] = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
    int t [16];
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 4; k++) begin
        t[r*4+k] = 0;
        for (int j = 0; j < 4; j++) t[r*4+k] += (had ? hd[k][j] : cf[k][j]) * x[r*4+j];
        rng(t[r*4+k]);
      end
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 4; k++) begin
        y[i*4+k] = 0;
        for (int r = 0; r < 4; r++) y[i*4+k] += (had ? hd[i][r] : cf[i][r]) * t[r*4+k];
        rng(y[i*4+k]);
      end
  endfunction

  function automatic void inv4(input int d [16], output int y [16]);
    int t [16];
    for (int r = 0; r < 4; r++) begin
      int e0 = d[r*4] + d[r*4+2], e1 = d[r*4] - d[r*4+2];
      int e2 = (d[r*4+1] >>> 1) - d[r*4+3], e3 = d[r*4+1] + (d[r*4+3] >>> 1);
      t[r*4] = e0 + e3; t[r*4+1] = e1 + e2; t[r*4+2] = e1 - e2; t[r*4+3] = e0 - e3;
      for (int k = 0; k < 4; k++) rng(t[r*4+k]);
    end
    for (int c = 0; c < 4; c++) begin
      int e0 = t[c] + t[8+c], e1 = t[c] - t[8+c];
      int e2 = (t[4+c] >>> 1) - t[12+c], e3 = t[4+c] + (t[12+c] >>> 1);
      int o [4];
      o[0] = e0 + e3; o[1] = e1 + e2; o[2] = e1 - e2; o[3] = e0 - e3;
      for (int i = 0; i < 4; i++) begin
        rng(o[i]); rng(o[i] + 32);
        y[i*4+c] = (o[i] + 32) >>> 6;
      end
    end
  endfunction

  function automatic void had2(input int a [4], output int y [4]);
    y[0] = a[0] + a[1] + a[2] + a[3];
    y[1] = a[0] - a[1] + a[2] - a[3];
    y[2] = a[0] + a[1] - a[2] - a[3];
    y[3] = a[0] - a[1] - a[2] + a[3];
    for (int i = 0; i < 4; i++) rng(y[i]);
  endfunction

  function automatic int in_base(input int b);
    return (b >= 18) ? (b - 2) * 16 : b * 16;
  endfunction

  function automatic void reference(input int res [384], input int qy, input int qc, input bit it,
                                    input bit m16, output int exp_z [27][16], output int exp_rec [26][16]);
    int dc [24];
    int dcrec [24];
    ovf = 1'b0;
    for (int s = 0; s < 27; s++) for (int p = 0; p < 16; p++) exp_z[s][p] = 0;
    // forward 4x4 blocks
    for (int b = 0; b < 26; b++) begin
      int x [16], w [16];
      int qp;
      bit div;
      if (b == 16 || b == 17) continue;
      qp  = (b >= 18) ? qc : qy;
      div = (b >= 18) || m16;
      for (int p = 0; p < 16; p++) x[p] = res[in_base(b) + p];
      fwd4(x, 1'b0, w);
      for (int p = 0; p < 16; p++) exp_z[b][p] = quant(w[p], qp, cls_of(p), 1'b0, it);
      if (div) begin
        dc[(b >= 18) ? b - 2 : b] = w[0];
        exp_z[b][0] = 0;
      end
    end
    // luma DC
    if (m16) begin
      int d [16], y [16], c [16], f [16];
      for (int p = 0; p < 16; p++) d[p] = dc[p];
      fwd4(d, 1'b1, y);
      for (int p = 0; p < 16; p++) begin
        exp_z[26][p] = quant(y[p] >>> 1, qy, 0, 1'b1, it);
        c[p] = dequant(exp_z[26][p], qy, 0);
      end
      fwd4(c, 1'b1, f);
      for (int p = 0; p < 16; p++) begin rng(f[p] + 32); dcrec[p] = (f[p] + 32) >>> 6; end
    end
    // chroma DC
    for (int cc = 0; cc < 2; cc++) begin
      int d [4], y [4], c [4], f [4];
      for (int p = 0; p < 4; p++) d[p] = dc[16 + 4*cc + p];
      had2(d, y);
      for (int p = 0; p < 4; p++) begin
        exp_z[16+cc][p] = quant(y[p], qc, 0, 1'b1, it);
        c[p] = dequant(exp_z[16+cc][p], qc, 0);
      end
      had2(c, f);
      for (int p = 0; p < 4; p++) dcrec[16 + 4*cc + p] = f[p] >>> 5;
    end
    // reconstruction
    for (int b = 0; b < 26; b++) begin
      int d [16], y [16];
      int qp;
      if (b == 16 || b == 17) continue;
      qp = (b >= 18) ? qc : qy;
      for (int p = 0; p < 16; p++) d[p] = dequant(exp_z[b][p], qp, cls_of(p));
      if (b >= 18 || m16) d[0] = dcrec[(b >= 18) ? b - 2 : b];
      inv4(d, y);
      for (int p = 0; p < 16; p++) exp_rec[b][p] = y[p];
    end
  endfunction

endpackage
