// iced_ref_pkg: reference model of the ICED algorithm used by the
// testbenches. It restates the arithmetic of the specification directly
// (integer division, no hardware structure): normalization with a 16-bit
// shift, fade cycles from TOA differences with a carried remainder, the
// nearest-active / lightest search with lower-index ties, the update and
// overwrite rules (running average rounded to nearest) with weight halving at the maximum, and the inverse
// normalization.
package iced_ref_pkg;

  function automatic logic [15:0] ref_norm(logic [15:0] din, logic [15:0] mn, logic [15:0] mx);
    longint unsigned q;
    if (din <= mn) return 16'h0;
    if (din >= mx) return 16'hFFFF;
    q = (longint'(din - mn) << 16) / longint'(mx - mn);
    return (q > 65535) ? 16'hFFFF : 16'(q);
  endfunction

  function automatic logic [15:0] ref_undo(logic [15:0] n, logic [15:0] mn, logic [15:0] mx);
    longint unsigned p;
    p = longint'(16'(mx - mn)) * longint'(n);
    return 16'(mn + 16'(p >> 16));
  endfunction

  function automatic int unsigned ref_l1(logic [15:0] a, logic [15:0] b, logic [15:0] c, logic [15:0] d);
    int unsigned x, y;
    x = (a >= c) ? a - c : c - a;
    y = (b >= d) ? b - d : d - b;
    return x + y;
  endfunction

  class iced_model;
    int n;
    logic [15:0] c_rf[], c_pw[], w[];
    logic [31:0] last[], pri[];
    logic [31:0] toa_prev, rem;
    // configuration
    int unsigned threshold = 100;
    logic [31:0] fade_len = 3000;
    logic [15:0] max_weight = 4096;
    logic [15:0] rf_min = 0, rf_max = 16'hFFFF, pw_min = 0, pw_max = 16'hFFFF;
    // last result
    int          o_id;
    bit          o_new;
    logic [15:0] o_rf, o_pw, o_w, o_rf_norm, o_pw_norm, o_fade;
    logic [15:0] x_rf, x_pw;       // normalized input
    logic [31:0] o_pri;
    int          o_faded_out;  // clusters whose weight fell to zero this step
    bit          o_halved;     // the weight was halved at the maximum
    bit          o_evict;      // a new cluster replaced an active one

    function new(int n_clusters);
      n = n_clusters;
      c_rf = new[n]; c_pw = new[n]; w = new[n]; last = new[n]; pri = new[n];
      foreach (c_rf[j]) begin c_rf[j] = 0; c_pw[j] = 0; w[j] = 0; last[j] = 0; pri[j] = 0; end
      toa_prev = 0; rem = 0;
    endfunction

    function int active_count();
      int a = 0;
      foreach (w[j]) if (w[j] != 0) a++;
      return a;
    endfunction

    function void step(logic [15:0] rf, logic [15:0] pw, logic [31:0] toa);
      longint unsigned elapsed, f;
      logic [15:0] xr, xp, wf[];
      int nearest, light;
      int unsigned dn, d;
      xr = ref_norm(rf, rf_min, rf_max);
      xp = ref_norm(pw, pw_min, pw_max);
      x_rf = xr; x_pw = xp;
      elapsed = longint'(32'(toa - toa_prev)) + longint'(rem);
      f   = elapsed / fade_len;
      rem = 32'(elapsed % fade_len);
      toa_prev = toa;
      if (f > 65535) f = 65535;
      o_fade = 16'(f);
      wf = new[n];
      o_faded_out = 0;
      foreach (w[j]) begin
        wf[j] = (w[j] > 16'(f)) ? w[j] - 16'(f) : 16'h0;
        if (w[j] != 0 && wf[j] == 0) o_faded_out++;
      end
      nearest = -1; light = 0; dn = 0;
      for (int j = 0; j < n; j++) begin
        if (wf[j] != 0) begin
          d = ref_l1(xr, xp, c_rf[j], c_pw[j]);
          if (nearest < 0 || d < dn) begin nearest = j; dn = d; end
        end
        if (wf[j] < wf[light]) light = j;
      end
      o_halved = 0;
      o_evict = 0;
      for (int j = 0; j < n; j++) w[j] = wf[j];
      if (nearest >= 0 && dn < threshold) begin
        longint unsigned wi;
        o_id = nearest; o_new = 0;
        c_rf[nearest] = 16'((longint'(c_rf[nearest]) * wf[nearest] + xr + (longint'(wf[nearest]) + 1) / 2) / (longint'(wf[nearest]) + 1));
        c_pw[nearest] = 16'((longint'(c_pw[nearest]) * wf[nearest] + xp + (longint'(wf[nearest]) + 1) / 2) / (longint'(wf[nearest]) + 1));
        wi = longint'(wf[nearest]) + 1;
        if (wi >= max_weight) begin w[nearest] = max_weight >> 1; o_halved = 1; end
        else w[nearest] = 16'(wi);
        pri[nearest]  = toa - last[nearest];
        last[nearest] = toa;
      end else begin
        o_id = light; o_new = 1;
        o_evict = wf[light] != 0;
        c_rf[light] = xr; c_pw[light] = xp; w[light] = 1;
        last[light] = toa; pri[light] = 0;
      end
      o_rf_norm = c_rf[o_id]; o_pw_norm = c_pw[o_id];
      o_rf  = ref_undo(c_rf[o_id], rf_min, rf_max);
      o_pw  = ref_undo(c_pw[o_id], pw_min, pw_max);
      o_w   = w[o_id];
      o_pri = pri[o_id];
    endfunction
  endclass

endpackage
