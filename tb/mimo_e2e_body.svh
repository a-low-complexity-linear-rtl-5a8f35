// mimo_e2e_body.svh: body of the end-to-end detector testbench, shared by
// tb_mimo_core (default size, top level) and mimo_e2e_bench (any size,
// instantiated by tb_mimo_workloads). The including module declares the
// parameters NT, NR, LANES, NSUB and STANDALONE and the variables done,
// checks and failures, and instantiates the core (named dut) after this
// file, connected by name to the signals declared here. What the test
// does is described in tb_mimo_core.sv.

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid, in_ready;
  cpf_t              in_y [NR];
  cpf_t              in_h [NR][NT];
  cpf_t              in_sigma2 [NR];
  mod_t              in_mod;
  det_t              in_det;
  logic              in_zf;
  logic              out_valid, out_ready, out_last, busy;
  logic [IW-1:0]     out_strm;
  cpf_t              out_z, out_scale;
  logic signed [3:0] out_dec_re, out_dec_im;
  logic              tx_valid, tx_sym_valid;
  mod_t              tx_mod;
  logic [5:0]        tx_bits;
  logic signed [3:0] tx_i, tx_q;
  cpf_t              tx_sym;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_mode [4];
  int n_mod [4];
  int n_tries = 0;
  int n_cancel = 0, n_reorder = 0, n_stall = 0, n_hold = 0, n_tx = 0, n_lat = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial if (STANDALONE) begin
    #(10 * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid && !out_ready) n_stall++;
    if (in_valid && !in_ready) n_hold++;
  end

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * ($itor($urandom % 1000001) / 1000000.0);
  endfunction

  // expected cycles from the accepting edge to the first result (linear mode)
  function automatic int lin_latency();
    int b1, bn, bn1, b2;
    b1  = 1 + 2;
    bn  = (NR + LANES - 1) / LANES + 2;
    bn1 = (NR + 1 + LANES - 1) / LANES + 2;
    b2  = (2 + LANES - 1) / LANES + 2;
    return NR * b1 + b1 + 1 + NT * (bn + bn1 + NR * b2 + b1) + NT * 2 * bn + 1;
  endfunction

  // reference run; returns 0 if a decision or ordering is too close to a tie
  function automatic bit reference(mat_t h, vec_t y0, real s2 [MAXN], mod_t m, det_t d,
                                   output int order [NT], output cplx_t shat [NT],
                                   output real sref [NT], output int dre [NT], output int dim [NT],
                                   output real erel);
    logic [MAXN-1:0] mask;
    vec_t  y;
    mat_t  r, ri;
    cplx_t z [NT];
    real   s [NT];
    int    lv;
    bit    ok;
    real   mg;
    ok = 1;
    y  = y0;
    lv = levels(m);
    mask = '0;
    for (int i = 0; i < NT; i++) mask[i] = 1'b1;
    erel = 0.0;
    for (int stage = 0; stage < NT; stage++) begin
      int b;
      real ma, mb, kap;
      r  = build_r(h, s2, mask, NR, NT);
      ri = minv(r, NR);
      // condition estimate of the full matrix: NR * max|R| * max|R^-1|;
      // expected relative error ~ kappa * 2^-13
      ma = 0.0; mb = 0.0;
      for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) begin
        if (cabs2(r[i][j]) > ma) ma = cabs2(r[i][j]);
        if (cabs2(ri[i][j]) > mb) mb = cabs2(ri[i][j]);
      end
      kap = NR * $sqrt(ma * mb);
      if (stage == 0) begin
        if (kap > 400.0) ok = 0;
        erel = kap * pow2(-13);
      end
      for (int i = 0; i < NT; i++) if (mask[i]) est(h, ri, y, i, NR, z[i], s[i]);
      if (d == DET_LINEAR) begin
        for (int i = 0; i < NT; i++) begin
          order[i] = i;
          shat[i]  = cx(z[i].re / s[i], z[i].im / s[i]);
          sref[i]  = s[i];
        end
        break;
      end
      b = -1;
      for (int i = 0; i < NT; i++) if (mask[i] && (b < 0 || s[i] > s[b])) b = i;
      for (int i = 0; i < NT; i++)
        if (mask[i] && i != b && s[b] - s[i] < 0.2 * (1.0 - s[b]) + pow2(-13)) ok = 0;
      order[stage] = b;
      shat[stage]  = cx(z[b].re / s[b], z[b].im / s[b]);
      sref[stage]  = s[b];
      mg = 0.02 + 3.0 * erel * (1.0 + lv);
      dre[stage]   = slice_ref(shat[stage].re, lv);
      dim[stage]   = (m == MOD_BPSK) ? 0 : slice_ref(shat[stage].im, lv);
      for (int l = -(lv - 2); l <= lv - 2; l += 2) begin
        if ((shat[stage].re - l) < mg && (l - shat[stage].re) < mg) ok = 0;
        if (m != MOD_BPSK && (shat[stage].im - l) < mg && (l - shat[stage].im) < mg) ok = 0;
      end
      for (int rr = 0; rr < NR; rr++)
        y[rr] = csub(y[rr], cmul(h[rr][b], cx(real'(dre[stage]), real'(dim[stage]))));
      mask[b] = 1'b0;
    end
    mg = 0.02 + 3.0 * erel * (1.0 + lv);
    if (d == DET_LINEAR)
      for (int i = 0; i < NT; i++) begin
        dre[i] = slice_ref(shat[i].re, lv);
        dim[i] = (m == MOD_BPSK) ? 0 : slice_ref(shat[i].im, lv);
        for (int l = -(lv - 2); l <= lv - 2; l += 2) begin
          if ((shat[i].re - l) < mg && (l - shat[i].re) < mg) ok = 0;
          if (m != MOD_BPSK && (shat[i].im - l) < mg && (l - shat[i].im) < mg) ok = 0;
        end
      end
    return ok;
  endfunction

  task automatic run_one(int mode, mod_t m);
    mat_t  h;
    vec_t  y;
    real   s2 [MAXN], s2ref [MAXN];
    int    order [NT], dre [NT], dim [NT];
    cplx_t shat [NT];
    real   sref [NT];
    det_t  d;
    bit    zf, ok;
    int    lv, t_acc, t_first;
    real   kfac, erel;
    d  = (mode >= 2) ? DET_ITERATIVE : DET_LINEAR;
    zf = (mode == 1 || mode == 3);
    lv = levels(m);
    do begin
      int xs_re [NT], xs_im [NT];
      for (int k = 0; k < NT; k++) begin
        xs_re[k] = 2 * ($urandom % lv) - (lv - 1);
        xs_im[k] = (m == MOD_BPSK) ? 0 : 2 * ($urandom % lv) - (lv - 1);
      end
      for (int r = 0; r < NR; r++) begin
        s2[r] = urand(0.005, 0.1);
        s2ref[r] = zf ? pow2(ZF_EXP - 1) : s2[r];
        for (int k = 0; k < NT; k++) begin
          h[r][k] = cx(urand(-1.0, 1.0), urand(-1.0, 1.0));
          // quantise as the core sees it
          h[r][k] = from_cpf(to_cpf(h[r][k]));
        end
      end
      for (int r = 0; r < NR; r++) begin
        real sd;
        sd = $sqrt(s2[r]);
        y[r] = cx(urand(-sd, sd), urand(-sd, sd));
        for (int k = 0; k < NT; k++) y[r] = cadd(y[r], cmul(h[r][k], cx(real'(xs_re[k]), real'(xs_im[k]))));
        y[r] = from_cpf(to_cpf(y[r]));
        s2[r] = from_cpf(to_cpf(cx(s2[r], 0.0))).re;
        if (!zf) s2ref[r] = s2[r];
      end
      ok = reference(h, y, s2ref, m, d, order, shat, sref, dre, dim, erel);
      n_tries++;
    end while (!ok);

    // drive
    @(negedge clk);
    for (int r = 0; r < NR; r++) begin
      in_y[r] = to_cpf(y[r]);
      in_sigma2[r] = to_cpf(cx(s2[r], 0.0));
      for (int k = 0; k < NT; k++) in_h[r][k] = to_cpf(h[r][k]);
    end
    in_mod = m;
    in_det = d;
    in_zf  = zf;
    in_valid = 1'b1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    t_acc = cycle;
    @(negedge clk);
    in_valid = 1'b0;
    kfac = 0.0;
    for (int n = 0; n < NT; n++) begin
      cplx_t zh, sh, e;
      real   scv;
      // wait for a result while applying random back-pressure
      forever begin
        @(negedge clk);
        out_ready = ($urandom % 4) != 0;
        @(posedge clk);
        if (out_valid && out_ready) break;
      end
      if (n == 0) t_first = cycle;
      zh  = from_cpf(out_z);
      scv = from_cpf(out_scale).re;
      sh  = cx(zh.re / scv, zh.im / scv);
      e   = csub(sh, shat[n]);
      check(int'(out_strm) == order[n], $sformatf("mode %0d result %0d stream %0d expected %0d",
                                                   mode, n, out_strm, order[n]));
      check(cabs2(e) < (16.0 * erel * erel + 1.0e-8) * (1.0 + cabs2(shat[n])),
            $sformatf("mode %0d stream %0d estimate (%f,%f) expected (%f,%f)", mode, order[n],
                      sh.re, sh.im, shat[n].re, shat[n].im));
      check(int'(out_dec_re) == dre[n] && int'(out_dec_im) == dim[n],
            $sformatf("mode %0d stream %0d decision %0d,%0d expected %0d,%0d", mode, order[n],
                      out_dec_re, out_dec_im, dre[n], dim[n]));
      check(out_last == (n == NT - 1), "out_last");
      if (d == DET_LINEAR || n == 0) begin
        if (n == 0) kfac = scv / sref[n];
        else check((scv / sref[n] - kfac) < 4.0 * erel * kfac && (kfac - scv / sref[n]) < 4.0 * erel * kfac,
                   $sformatf("mode %0d stream %0d scale factor %f vs %f", mode, n, scv / sref[n], kfac));
      end
    end
    @(negedge clk);
    out_ready = 1'b1;
    if (d == DET_LINEAR) begin
      check(t_first - t_acc >= lin_latency(), $sformatf("latency %0d expected at least %0d",
                                                          t_first - t_acc, lin_latency()));
      n_lat++;
    end
    n_mode[mode]++;
    n_mod[int'(m)]++;
    if (d == DET_ITERATIVE) begin
      n_cancel += NT - 1;
      if (order[0] != 0 || order[1] != 1) n_reorder++;
    end
  endtask

  localparam int ZF_EXP = -5;

  // exact latency check with no back-pressure
  task automatic latency_probe();
    int t_acc, t_first;
    @(negedge clk);
    for (int r = 0; r < NR; r++) begin
      in_y[r] = to_cpf(cx(1.0, 0.5));
      in_sigma2[r] = to_cpf(cx(0.05, 0.0));
      for (int k = 0; k < NT; k++) in_h[r][k] = to_cpf(cx((r == k) ? 1.0 : 0.2, 0.1 * k));
    end
    in_det = DET_LINEAR;
    in_zf = 1'b0;
    in_mod = MOD_QPSK;
    out_ready = 1'b1;
    in_valid = 1'b1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    t_acc = cycle;
    // keep offering a sub-carrier while the core is busy: it must be held off
    repeat (10) begin
      @(posedge clk);
      check(!in_ready && busy, "input held off while busy");
    end
    @(negedge clk);
    in_valid = 1'b0;
    do @(posedge clk); while (!out_valid);
    t_first = cycle;
    check(t_first - t_acc == lin_latency(), $sformatf("latency %0d expected %0d",
                                                      t_first - t_acc, lin_latency()));
    for (int n = 1; n < NT; n++) @(posedge clk);
    @(posedge clk);
    check(!out_valid && in_ready, "core idle after NT back-to-back results");
  endtask

  task automatic tx_test();
    for (int v = 0; v < 64; v++) begin
      for (int mm = 0; mm < 4; mm++) begin
        int nb, li, lq, g, b;
        @(negedge clk);
        tx_valid = 1'b1;
        tx_mod   = mod_t'(mm);
        tx_bits  = 6'(v);
        @(negedge clk);
        tx_valid = 1'b0;
        nb = (mm == 0) ? 1 : (mm == 1) ? 1 : (mm == 2) ? 2 : 3;
        // gray-to-binary per axis, b0 = most significant
        g = 0; for (int i = 0; i < nb; i++) g = (g << 1) | int'(v[i]);
        b = g; for (int s = 1; s < nb; s++) b = b ^ (g >> s);
        li = 2 * b - ((1 << nb) - 1);
        if (mm == 0) lq = 0;
        else begin
          g = 0; for (int i = 0; i < nb; i++) g = (g << 1) | int'(v[nb + i]);
          b = g; for (int s = 1; s < nb; s++) b = b ^ (g >> s);
          lq = 2 * b - ((1 << nb) - 1);
        end
        check(tx_sym_valid && int'(tx_i) == li && int'(tx_q) == lq &&
              from_cpf(tx_sym).re == real'(li) && from_cpf(tx_sym).im == real'(lq),
              $sformatf("mapper mod %0d bits %0d: %0d,%0d expected %0d,%0d", mm, v, tx_i, tx_q, li, lq));
        n_tx++;
      end
    end
  endtask

  initial begin
    in_valid = 1'b0;
    out_ready = 1'b1;
    tx_valid = 1'b0;
    tx_mod = MOD_BPSK;
    tx_bits = '0;
    in_mod = MOD_BPSK;
    in_det = DET_LINEAR;
    in_zf = 1'b0;
    for (int r = 0; r < NR; r++) begin
      in_y[r] = CPF_ZERO;
      in_sigma2[r] = CPF_ZERO;
      for (int k = 0; k < NT; k++) in_h[r][k] = CPF_ZERO;
    end
    for (int i = 0; i < 4; i++) begin n_mode[i] = 0; n_mod[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    latency_probe();
    tx_test();
    for (int s = 0; s < NSUB; s++) begin
      run_one(s % 4, mod_t'((s / 4) % 4));
    end
    for (int i = 0; i < 4; i++) begin
      check(n_mode[i] > 0, $sformatf("mode %0d never ran", i));
      check(n_mod[i] > 0, $sformatf("modulation %0d never ran", i));
    end
    check(n_cancel > 0, "no cancellation");
    check(n_reorder > 0, "no re-ordering");
    check(n_stall > 0, "no output stall");
    check(n_tx > 0, "mapper never used");
    check(n_hold > 0, "input never held off");
    check(n_lat > 0, "latency never checked");
    $display("sub-carriers generated %0d, used %0d", n_tries, NSUB);
    $display("mechanisms: LMMSE %0d ZF %0d IMMSE %0d IZF %0d cancel %0d reorder %0d stall %0d tx %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_cancel, n_reorder, n_stall, n_tx);
    if (STANDALONE) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    done = 1'b1;
  end

