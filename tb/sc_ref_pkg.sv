// sc_ref_pkg: cycle-accurate reference model of the stochastic MLP, used by
// the layer, top-level and full-size testbenches.
//
// The model is written from the equations, not from the RTL: the LFSR step is
// computed as the parity of the state under the tap mask 8'hB8 (taps
// 8,6,5,4), streams are evaluated with plain loops, and the decoders are
// integers. One call of cycle() evaluates every stream of the current cycle
// and then advances the state exactly as one enabled clock edge does.
package sc_ref_pkg;

  function automatic bit [7:0] ref_lfsr_step(bit [7:0] s);
    return {s[6:0], ^(s & 8'hB8)};
  endfunction

  function automatic bit [7:0] ref_seed(int unsigned idx);
    return 8'(((idx * 97) % 255) + 1);
  endfunction

  function automatic int ref_clip(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // One fully connected layer.
  class layer_ref;
    int n_in, n_out;
    bit [7:0] wp[], wn[];        // [j*n_in + k]
    int       cp[], cn[];        // update counters
    bit [7:0] rp[], rn[];        // column LFSR states
    bit [2:0] hist[];            // activation history per neuron
    // stream values of the current cycle
    bit hp[], hn[], u[], v[], bpp[], bpn[];
    int clip_events;

    function new(int n_in, int n_out, int layer, int seed_base);
      this.n_in = n_in; this.n_out = n_out;
      wp = new[n_in*n_out]; wn = new[n_in*n_out];
      cp = new[n_in*n_out]; cn = new[n_in*n_out];
      rp = new[n_in]; rn = new[n_in];
      hist = new[n_out];
      hp = new[n_out]; hn = new[n_out]; u = new[n_out]; v = new[n_out];
      bpp = new[n_in]; bpn = new[n_in];
      clip_events = 0;
      for (int k = 0; k < n_in; k++) begin
        rp[k] = ref_seed(seed_base + k);
        rn[k] = ref_seed(seed_base + n_in + k);
      end
      for (int j = 0; j < n_out; j++) begin
        hist[j] = 0;
        for (int k = 0; k < n_in; k++) begin
          wp[j*n_in+k] = 8'((j*29 + k*13 + 0*7 + layer*3 + 5) % 32);
          wn[j*n_in+k] = 8'((j*29 + k*13 + 1*7 + layer*3 + 5) % 32);
          cp[j*n_in+k] = 0; cn[j*n_in+k] = 0;
        end
      end
    endfunction

    function void clear();
      foreach (hist[j]) hist[j] = 0;
      foreach (cp[i]) begin cp[i] = 0; cn[i] = 0; end
    endfunction

    function bit wpb(int j, int k); return rp[k] < wp[j*n_in+k]; endfunction
    function bit wnb(int j, int k); return rn[k] < wn[j*n_in+k]; endfunction

    // forward part of the cycle
    function void eval_fwd(bit x[]);
      for (int j = 0; j < n_out; j++) begin
        hp[j] = 0; hn[j] = 0;
        for (int k = 0; k < n_in; k++) begin
          if (x[k] && wpb(j, k)) hp[j] = 1;
          if (x[k] && wnb(j, k)) hn[j] = 1;
        end
        u[j] = hp[j] && !hn[j];
        v[j] = (u[j] || hist[j][0]) && (hist[j][1] || hist[j][2]);
      end
    endfunction

    // error sent back, given the deltas
    function void eval_bp(bit dp[], bit dn[]);
      for (int k = 0; k < n_in; k++) begin
        bpp[k] = 0; bpn[k] = 0;
        for (int j = 0; j < n_out; j++) begin
          if ((dp[j] && !hn[j] && wpb(j,k)) || (dn[j] && hp[j] && wnb(j,k))) bpp[k] = 1;
          if ((dn[j] && !hn[j] && wpb(j,k)) || (dp[j] && hp[j] && wnb(j,k))) bpn[k] = 1;
        end
      end
    endfunction

    // clock edge with en = 1
    function void step(bit x[], bit dp[], bit dn[], bit eta);
      for (int j = 0; j < n_out; j++) begin
        for (int k = 0; k < n_in; k++) begin
          int i = j*n_in + k;
          if (eta && x[k]) begin
            // excitatory weight: +delta*(1-hn), shunting: -delta*hp
            if (!hn[j]) cp[i] += int'(dp[j]) - int'(dn[j]);
            if (hp[j])  cn[i] += int'(dn[j]) - int'(dp[j]);
          end
        end
        hist[j] = {hist[j][1:0], u[j]};
      end
      foreach (rp[k]) begin rp[k] = ref_lfsr_step(rp[k]); rn[k] = ref_lfsr_step(rn[k]); end
    endfunction

    function void apply();
      foreach (wp[i]) begin
        int a = int'(wp[i]) + cp[i];
        int b = int'(wn[i]) + cn[i];
        if (a != ref_clip(a) || b != ref_clip(b)) clip_events++;
        wp[i] = 8'(ref_clip(a));
        wn[i] = 8'(ref_clip(b));
      end
    endfunction
  endclass

  // Whole network.
  class mlp_ref;
    int nx, nv, ny;
    layer_ref hid, out;
    bit [7:0] rx[], rt[], reta;
    bit [7:0] eta;
    int ycnt[];
    bit xb[], vb[], yb[], ep[], en[];
    // event counters for coverage
    int n_shunt, n_err_p, n_err_n, n_bp;

    function new(int nx, int nv, int ny, bit [7:0] eta);
      this.nx = nx; this.nv = nv; this.ny = ny; this.eta = eta;
      hid = new(nx, nv, 0, nx);
      out = new(nv, ny, 1, 3*nx);
      rx = new[nx]; rt = new[ny]; ycnt = new[ny];
      xb = new[nx]; vb = new[nv]; yb = new[ny]; ep = new[ny]; en = new[ny];
      foreach (rx[k]) rx[k] = ref_seed(k);
      foreach (rt[i]) rt[i] = ref_seed(3*nx + 2*nv + i);
      reta = ref_seed(3*nx + 2*nv + ny);
      n_shunt = 0; n_err_p = 0; n_err_n = 0; n_bp = 0;
    endfunction

    function void clear();
      hid.clear(); out.clear();
      foreach (ycnt[i]) ycnt[i] = 0;
    endfunction

    function void cycle(bit [7:0] xv[], bit [7:0] tv[]);
      bit eb;
      foreach (xb[k]) xb[k] = rx[k] < xv[k];
      eb = reta < eta;
      hid.eval_fwd(xb);
      foreach (vb[j]) vb[j] = hid.v[j];
      out.eval_fwd(vb);
      foreach (yb[i]) begin
        bit t = rt[i] < tv[i];
        yb[i] = out.v[i];
        ep[i] = t && !yb[i];
        en[i] = yb[i] && !t;
        n_err_p += int'(ep[i]); n_err_n += int'(en[i]);
        n_shunt += int'(out.hp[i] && out.hn[i]);
      end
      foreach (vb[j]) n_shunt += int'(hid.hp[j] && hid.hn[j]);
      out.eval_bp(ep, en);
      foreach (vb[j]) n_bp += int'(out.bpp[j] || out.bpn[j]);
      hid.eval_bp(out.bpp, out.bpn);
      out.step(vb, ep, en, eb);
      hid.step(xb, out.bpp, out.bpn, eb);
      foreach (ycnt[i]) ycnt[i] += int'(yb[i]);
      foreach (rx[k]) rx[k] = ref_lfsr_step(rx[k]);
      foreach (rt[i]) rt[i] = ref_lfsr_step(rt[i]);
      reta = ref_lfsr_step(reta);
    endfunction

    function void apply();
      hid.apply(); out.apply();
    endfunction
  endclass

endpackage
