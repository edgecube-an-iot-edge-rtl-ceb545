// tb_ref_pkg: golden model of the person-detection network for the
// testbenches, written with plain nested loops over whole tensors (no
// streaming), plus random parameter generation.
//
// Network: 3x3 conv, 4 filters, zero "same" padding, rescale to int8;
// 2x2/2 max pool; dense 9216 -> 8 with ReLU and rescale; dense 8 -> 2;
// argmax (lowest index on ties). Rescale: round(acc * M / 2^S), halves
// rounded up, saturated to [-128, 127].
package tb_ref_pkg;

  typedef struct {
    int cw [4][9];
    int cb [4];
    int cm, cs;
    int d1w [];        // [n*8 + u]
    int d1b [8];
    int d1m, d1s;
    int d2w [8][2];
    int d2b [2];
  } net_t;

  typedef struct {
    int logit [2];
    int cls;
    int hidden [8];
    int n_sat;         // number of rescales that saturated
    int n_relu0;       // hidden units clipped by ReLU
  } result_t;

  function automatic int rescale(longint acc, int m, int s, ref int n_sat);
    longint p, q;
    p = acc * longint'(m);
    if (s > 0) q = (p + (longint'(1) << (s - 1)));
    else       q = p;
    // floor division by 2^s (arithmetic shift on a 64-bit value)
    q = q >>> s;
    if (q > 127)  begin n_sat++; return 127;  end
    if (q < -128) begin n_sat++; return -128; end
    return int'(q);
  endfunction

  function automatic int s8(int v);
    return ((v & 32'h80) != 0) ? (v & 32'hff) - 256 : (v & 32'hff);
  endfunction

  // img is H*W bytes in raster order
  function automatic result_t run(ref net_t n, ref byte unsigned img [], input int W, input int H);
    result_t r;
    int fm [];
    int pl [];
    int PW, PH;
    r.n_sat = 0;
    r.n_relu0 = 0;
    fm = new[H * W * 4];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        for (int f = 0; f < 4; f++) begin
          longint acc = n.cb[f];
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++) begin
              int yy = y + dy, xx = x + dx;
              if (yy >= 0 && yy < H && xx >= 0 && xx < W)
                acc += longint'(img[yy*W + xx]) * n.cw[f][(dy+1)*3 + (dx+1)];
            end
          fm[(y*W + x)*4 + f] = rescale(acc, n.cm, n.cs, r.n_sat);
        end
    PW = W / 2; PH = H / 2;
    pl = new[PH * PW * 4];
    for (int y = 0; y < PH; y++)
      for (int x = 0; x < PW; x++)
        for (int f = 0; f < 4; f++) begin
          int m = -1000;
          for (int a = 0; a < 2; a++)
            for (int b = 0; b < 2; b++)
              if (fm[((2*y+a)*W + 2*x+b)*4 + f] > m) m = fm[((2*y+a)*W + 2*x+b)*4 + f];
          pl[(y*PW + x)*4 + f] = m;
        end
    for (int u = 0; u < 8; u++) begin
      longint acc = 0;
      for (int i = 0; i < PH*PW*4; i++) acc += longint'(pl[i]) * n.d1w[i*8 + u];
      acc += n.d1b[u];
      if (acc < 0) begin acc = 0; r.n_relu0++; end
      r.hidden[u] = rescale(acc, n.d1m, n.d1s, r.n_sat);
    end
    for (int o = 0; o < 2; o++) begin
      longint acc = n.d2b[o];
      for (int i = 0; i < 8; i++) acc += longint'(r.hidden[i]) * n.d2w[i][o];
      r.logit[o] = int'(acc);
    end
    r.cls = (r.logit[1] > r.logit[0]) ? 1 : 0;
    return r;
  endfunction

  function automatic int srand8();
    return s8(int'($urandom_range(0, 255)));
  endfunction

  // Random parameters scaled so that activations use most of the 8-bit range.
  function automatic void random_net(ref net_t n, input int n_feat);
    for (int f = 0; f < 4; f++) begin
      for (int k = 0; k < 9; k++) n.cw[f][k] = srand8();
      n.cb[f] = int'($urandom_range(0, 20000)) - 10000;
    end
    n.cm = int'($urandom_range(1, 3));
    n.cs = 11;
    n.d1w = new[n_feat * 8];
    foreach (n.d1w[i]) n.d1w[i] = srand8();
    for (int u = 0; u < 8; u++) n.d1b[u] = int'($urandom_range(0, 4000)) - 2000;
    n.d1m = 1;
    n.d1s = 6 + $clog2(n_feat) / 2;
    for (int i = 0; i < 8; i++) for (int o = 0; o < 2; o++) n.d2w[i][o] = srand8();
    for (int o = 0; o < 2; o++) n.d2b[o] = int'($urandom_range(0, 200)) - 100;
  endfunction

  // Parameter-bus writes that load net n (address map of edgecube_pkg).
  function automatic void param_writes(ref net_t n, ref int unsigned a [$], ref int unsigned d [$]);
    a.delete(); d.delete();
    for (int f = 0; f < 4; f++) for (int k = 0; k < 9; k++) begin a.push_back(f*9 + k); d.push_back(n.cw[f][k] & 32'hff); end
    for (int f = 0; f < 4; f++) begin a.push_back(36 + f); d.push_back(n.cb[f]); end
    a.push_back(40); d.push_back(n.cm);
    a.push_back(41); d.push_back(n.cs);
    for (int u = 0; u < 8; u++) begin a.push_back(64 + u); d.push_back(n.d1b[u]); end
    a.push_back(72); d.push_back(n.d1m);
    a.push_back(73); d.push_back(n.d1s);
    for (int i = 0; i < 8; i++) for (int o = 0; o < 2; o++) begin a.push_back(96 + i*2 + o); d.push_back(n.d2w[i][o] & 32'hff); end
    for (int o = 0; o < 2; o++) begin a.push_back(112 + o); d.push_back(n.d2b[o]); end
    foreach (n.d1w[i]) begin a.push_back((1 << 17) | i); d.push_back(n.d1w[i] & 32'hff); end
  endfunction

endpackage
