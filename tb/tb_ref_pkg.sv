// tb_ref_pkg: reference model of the MCluster fabric for the testbenches.
//
// Written independently of the RTL: the cell functions come from the printed
// truth table of the cell (as 4-entry truth vectors indexed by {A,B}), the
// layer links from the shuffle-and-pair description, and configuration
// fields are read bit by bit from a dynamic array holding the bitstream.
package tb_ref_pkg;

  // Truth vectors indexed by {a,b} for codes {V_BA,V_BB,V_BC} = 0..7:
  // NAND, AND, ~A|B, A&~B, A|~B, ~A&B, OR, NOR.
  localparam bit [3:0] LC_TT [8] = '{4'b0111, 4'b1000, 4'b1011, 4'b0100,
                                     4'b1101, 4'b0010, 4'b1110, 4'b0001};

  function automatic bit lc_ref(int code, bit a, bit b);
    return LC_TT[code][{a, b}];
  endfunction

  // Read an unsigned field of width w starting at bit off.
  function automatic int unsigned field(const ref bit cfg[], input int off, input int w);
    int unsigned v = 0;
    for (int k = 0; k < w; k++) v |= int'(cfg[off + k]) << k;
    return v;
  endfunction

  function automatic int unsigned selw(int nsrc);
    return (nsrc <= 2) ? 1 : $clog2(nsrc);
  endfunction

  // One D x W cluster. in[] holds 2W inputs, result in out[].
  function automatic void mcl_ref(int d, int w, const ref bit cfg[], input int off,
                                  const ref bit in[], ref bit out[]);
    bit y[], ny[];
    y = new[w];
    ny = new[w];
    for (int j = 0; j < w; j++)
      y[j] = lc_ref(field(cfg, off + 3*j, 3), in[2*j], in[2*j+1]);
    for (int n = 1; n < d; n++) begin
      bit lines[];
      lines = new[2*w];
      // pre-shuffle line p = 2*cell + copy; post line 2j+k takes pre line j + k*w
      for (int j = 0; j < w; j++) begin
        bit a, b;
        a = y[(j) / 2];
        b = y[(j + w) / 2];
        ny[j] = lc_ref(field(cfg, off + 3*(n*w + j), 3), a, b);
      end
      y = ny;
      ny = new[w];
    end
    out = y;
  endfunction


  // ---------------------------------------------------------------------
  // CLB and fabric geometry, computed here from the layout description.
  // ---------------------------------------------------------------------
  typedef struct {
    int d, w, n, i, nclb, npi, npo;
  } geom_t;

  function automatic int ble_bits(geom_t g);  return g.d * g.w * 3 + g.w;        endfunction
  function automatic int lsel(geom_t g);      return selw(g.i + g.w * g.n);      endfunction
  function automatic int clb_bits(geom_t g);
    return g.n * ble_bits(g) + g.n * 2 * g.w * lsel(g);
  endfunction
  function automatic int gsel(geom_t g);      return selw(g.npi + g.nclb * g.w * g.n); endfunction
  function automatic int gr_bits(geom_t g);   return (g.nclb * g.i + g.npo) * gsel(g); endfunction
  function automatic int top_bits(geom_t g);  return gr_bits(g) + g.nclb * clb_bits(g);  endfunction

  function automatic void put(ref bit cfg[], input int off, input int w, input int unsigned v);
    for (int k = 0; k < w; k++) cfg[off + k] = v[k];
  endfunction

  // Combinational view of one CLB. q holds the BLE flip-flops (n*w), cin the
  // CLB inputs. out (n*w) is iterated to its fixed point (the configuration
  // has no combinational loop); nxt returns the values the flip-flops take at
  // the next edge.
  function automatic void clb_eval(geom_t g, const ref bit cfg[], input int off,
                                   const ref bit cin[], const ref bit q[],
                                   ref bit out[], ref bit nxt[]);
    int bb = ble_bits(g), sb = lsel(g);
    out = new[g.n * g.w];
    nxt = new[g.n * g.w];
    foreach (out[k]) out[k] = 0;
    for (int pass = 0; pass <= g.n; pass++) begin
      for (int b = 0; b < g.n; b++) begin
        bit iv[], ov[];
        iv = new[2 * g.w];
        for (int k = 0; k < 2 * g.w; k++) begin
          int unsigned s = field(cfg, off + g.n * bb + (b * 2 * g.w + k) * sb, sb);
          if (s < g.i) iv[k] = cin[s];
          else if (s < g.i + g.w * g.n) iv[k] = out[s - g.i];
          else iv[k] = 0;
        end
        mcl_ref(g.d, g.w, cfg, off + b * bb, iv, ov);
        for (int j = 0; j < g.w; j++) begin
          nxt[b * g.w + j] = ov[j];
          out[b * g.w + j] = cfg[off + b * bb + g.d * g.w * 3 + j] ? q[b * g.w + j] : ov[j];
        end
      end
    end
  endfunction

  // Whole fabric: q[c] flattened as c*n*w + m. Returns fabric outputs and
  // next flip-flop values.
  function automatic void top_eval(geom_t g, const ref bit cfg[], const ref bit pi[],
                                   const ref bit q[], ref bit po[], ref bit nxt[]);
    int gs = gsel(g), cb = clb_bits(g), gb = gr_bits(g), nw = g.n * g.w;
    bit cout[];
    cout = new[g.nclb * nw];
    nxt = new[g.nclb * nw];
    po = new[g.npo];
    foreach (cout[k]) cout[k] = 0;
    for (int pass = 0; pass <= g.nclb; pass++) begin
      for (int c = 0; c < g.nclb; c++) begin
        bit cin[], qc[], oc[], nc[];
        cin = new[g.i];
        qc = new[nw];
        for (int k = 0; k < g.i; k++) begin
          int unsigned s = field(cfg, (c * g.i + k) * gs, gs);
          cin[k] = (s < g.npi) ? pi[s] : (s < g.npi + g.nclb * nw) ? cout[s - g.npi] : 1'b0;
        end
        for (int m = 0; m < nw; m++) qc[m] = q[c * nw + m];
        clb_eval(g, cfg, gb + c * cb, cin, qc, oc, nc);
        for (int m = 0; m < nw; m++) begin
          cout[c * nw + m] = oc[m];
          nxt[c * nw + m] = nc[m];
        end
      end
    end
    for (int p = 0; p < g.npo; p++) begin
      int unsigned s = field(cfg, (g.nclb * g.i + p) * gs, gs);
      po[p] = (s < g.npi) ? pi[s] : (s < g.npi + g.nclb * nw) ? cout[s - g.npi] : 1'b0;
    end
  endfunction

  // Mechanism counters filled in by the generators.
  typedef struct {
    int reg_out, comb_out, local_fb, inter_clb, tie_off, from_pi;
  } mech_t;

  // Random configuration of CLB c (at offset off) without combinational
  // loops: a BLE input may take a combinational BLE output only from a BLE
  // with a lower index.
  function automatic void gen_clb(geom_t g, ref bit cfg[], input int off, ref mech_t m);
    int bb = ble_bits(g), sb = lsel(g), nsrc = g.i + g.w * g.n;
    bit regd[];
    regd = new[g.n * g.w];
    for (int b = 0; b < g.n; b++) begin
      for (int k = 0; k < g.d * g.w; k++) put(cfg, off + b * bb + 3 * k, 3, $urandom_range(0, 7));
      for (int j = 0; j < g.w; j++) begin
        regd[b * g.w + j] = 1'($urandom);
        cfg[off + b * bb + g.d * g.w * 3 + j] = regd[b * g.w + j];
        if (regd[b * g.w + j]) m.reg_out++; else m.comb_out++;
      end
    end
    for (int b = 0; b < g.n; b++) begin
      for (int k = 0; k < 2 * g.w; k++) begin
        int unsigned s;
        int r = $urandom_range(0, 9);
        if (r == 0) s = nsrc + $urandom_range(0, (1 << sb) - 1 - nsrc);
        else if (r < 6) s = $urandom_range(0, g.i - 1);
        else begin
          int tries = 0;
          do begin
            s = g.i + $urandom_range(0, g.w * g.n - 1);
            tries++;
          end while (!regd[s - g.i] && (s - g.i) / g.w >= b && tries < 1000);
          if (!regd[s - g.i] && (s - g.i) / g.w >= b) s = $urandom_range(0, g.i - 1);
        end
        if (s >= nsrc) m.tie_off++; else if (s >= g.i) m.local_fb++;
        put(cfg, off + g.n * bb + (b * 2 * g.w + k) * sb, sb, s);
      end
    end
  endfunction

  // Random loop-free configuration of the whole fabric: a CLB input may take
  // an output of a CLB with a lower index, or any registered output.
  function automatic void gen_top(geom_t g, ref bit cfg[], ref mech_t m);
    int gs = gsel(g), cb = clb_bits(g), gb = gr_bits(g), nw = g.n * g.w;
    int nsrc = g.npi + g.nclb * nw;
    cfg = new[top_bits(g)];
    for (int c = 0; c < g.nclb; c++) gen_clb(g, cfg, gb + c * cb, m);
    for (int t = 0; t < g.nclb * g.i + g.npo; t++) begin
      int unsigned s;
      int r = $urandom_range(0, 9);
      int c = t / g.i;
      if (r == 0) s = nsrc + $urandom_range(0, (1 << gs) - 1 - nsrc);
      else if (r < 5 || (t < g.nclb * g.i && c == 0 && r < 7)) s = $urandom_range(0, g.npi - 1);
      else begin
        bit ok;
        int tries = 0;
        do begin
          int unsigned o;
          s = g.npi + $urandom_range(0, nsrc - g.npi - 1);
          o = s - g.npi;
          ok = (t >= g.nclb * g.i) || (o / nw < c) ||
               cfg[gb + (o / nw) * cb + ((o % nw) / g.w) * ble_bits(g)
                   + g.d * g.w * 3 + (o % g.w)];
          tries++;
        end while (!ok && tries < 1000);
        if (!ok) s = $urandom_range(0, g.npi - 1);
      end
      if (s >= nsrc) m.tie_off++;
      else if (s >= g.npi) m.inter_clb++;
      else m.from_pi++;
      put(cfg, t * gs, gs, s);
    end
  endfunction

endpackage
