// tb_difmad_datapath: self-checking test of the detector datapath.
//
// The datapath is sequenced by the detector state machine (difmad_fsm)
// and fed random sub-carriers (3x3 channel, noise variances 0.005..0.1).
// Besides the final results, the testbench inspects the datapath's state
// at the points where the recursion has a closed form:
//   - after DET, ADJ[r] / DET must equal 1 / sigma2[r] (the rescaled
//     adjugate and determinant of Rww),
//   - after a linear run, P / c must equal R^-1 for R = Rww + H H^H,
//     element by element, with R^-1 from a double-precision inverse,
//   - z_i / scale_i must equal h_i^H R^-1 y / h_i^H R^-1 h_i,
//   - in iterative mode, after the first cancellation y must equal the
//     input y minus h_b times the first decision.
// Tolerances scale with an estimate of the condition number of R.
module tb_difmad_datapath;
  import difmad_pkg::*;
  import difmad_tb_pkg::*;

  localparam int NT = 3;
  localparam int NR = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid, in_ready, load, load_p0, res_valid, out_valid, out_last, busy;
  logic              out_ready;
  cpf_t              in_y [NR];
  cpf_t              in_h [NR][NT];
  cpf_t              in_sigma2 [NR];
  mod_t              in_mod;
  det_t              in_det, det_mode;
  logic              in_zf;
  ctrl_t             ctrl;
  logic [NT-1:0]     active;
  logic [IW-1:0]     best, out_strm;
  cpf_t              out_z, out_scale;
  logic signed [3:0] dre, dim;

  difmad_fsm #(.NT(NT), .NR(NR), .LANES(1)) u_fsm (
    .clk, .rst_n, .in_valid, .in_ready, .det_mode, .res_valid, .best, .active, .ctrl, .load,
    .load_p0, .out_valid, .out_ready, .out_strm, .out_last, .busy);

  difmad_datapath #(.NT(NT), .NR(NR), .LANES(1)) dut (
    .clk, .rst_n, .load, .in_y, .in_h, .in_sigma2, .in_mod, .in_det, .in_zf, .ctrl, .load_p0,
    .active, .res_valid, .best, .det_mode, .out_strm, .out_z, .out_scale,
    .out_dec_re(dre), .out_dec_im(dim));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #(10 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * ($itor($urandom % 1000001) / 1000000.0);
  endfunction

  task automatic run(det_t d);
    mat_t  h, r, ri;
    vec_t  y;
    real   s2 [MAXN];
    real   ma, mb, kap, tol;
    cplx_t c, e;
    logic [MAXN-1:0] all;
    int    b;
    // generate a reasonably conditioned sub-carrier
    do begin
      for (int i = 0; i < NR; i++) begin
        s2[i] = from_cpf(to_cpf(cx(urand(0.005, 0.1), 0.0))).re;
        y[i]  = from_cpf(to_cpf(cx(urand(-3.0, 3.0), urand(-3.0, 3.0))));
        for (int k = 0; k < NT; k++) h[i][k] = from_cpf(to_cpf(cx(urand(-1.0, 1.0), urand(-1.0, 1.0))));
      end
      all = '1;
      r  = build_r(h, s2, all, NR, NT);
      ri = minv(r, NR);
      ma = 0.0; mb = 0.0;
      for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) begin
        if (cabs2(r[i][j]) > ma) ma = cabs2(r[i][j]);
        if (cabs2(ri[i][j]) > mb) mb = cabs2(ri[i][j]);
      end
      kap = NR * $sqrt(ma * mb);
    end while (kap > 400.0);
    tol = 4.0 * kap * pow2(-13);
    @(negedge clk);
    for (int i = 0; i < NR; i++) begin
      in_y[i] = to_cpf(y[i]);
      in_sigma2[i] = to_cpf(cx(s2[i], 0.0));
      for (int k = 0; k < NT; k++) in_h[i][k] = to_cpf(h[i][k]);
    end
    in_det = d;
    in_zf = 1'b0;
    in_mod = MOD_QAM16;
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    // after DET completes: ADJ[r] / DET = 1 / sigma2[r]
    while (!load_p0) @(posedge clk);
    for (int i = 0; i < NR; i++) begin
      real q;
      q = from_cpf(dut.ADJ[i]).re / from_cpf(dut.DET).re;
      check((q * s2[i] - 1.0) < 1e-4 && (1.0 - q * s2[i]) < 1e-4,
            $sformatf("ADJ/DET row %0d = %g, expected %g", i, q, 1.0 / s2[i]));
    end
    if (d == DET_LINEAR) begin
      // after the last update: P / c = R^-1
      while (!(ctrl.op == OP_W && ctrl.first)) @(posedge clk);
      c = from_cpf(dut.CS);
      for (int i = 0; i < NR; i++)
        for (int j = 0; j < NR; j++) begin
          e = csub(cdiv(from_cpf(dut.P[i][j]), c), ri[i][j]);
          check(cabs2(e) < tol * tol * mb, $sformatf("P/c[%0d][%0d] off by %g", i, j, $sqrt(cabs2(e))));
        end
      for (int n = 0; n < NT; n++) begin
        cplx_t zr, sh, est_hw;
        real   sr;
        do @(posedge clk); while (!out_valid);
        est(h, ri, y, n, NR, zr, sr);
        sh = cx(zr.re / sr, zr.im / sr);
        est_hw = cdiv(from_cpf(out_z), from_cpf(out_scale));
        check(int'(out_strm) == n && cabs2(csub(est_hw, sh)) < tol * tol * (1.0 + cabs2(sh)),
              $sformatf("stream %0d estimate (%f,%f) expected (%f,%f)", n, est_hw.re, est_hw.im, sh.re, sh.im));
      end
    end else begin
      cplx_t dv;
      vec_t  ynew;
      do @(posedge clk); while (!out_valid);
      b  = int'(out_strm);
      dv = cx(real'(dre), real'(dim));
      for (int i = 0; i < NR; i++) ynew[i] = csub(y[i], cmul(h[i][b], dv));
      // wait until the cancellation has been written back
      while (!(ctrl.op == OP_CANCEL && res_valid)) @(posedge clk);
      @(posedge clk);
      #1;
      for (int i = 0; i < NR; i++) begin
        e = csub(from_cpf(dut.Y[i]), ynew[i]);
        check(cabs2(e) < 1e-8 * (1.0 + cabs2(ynew[i])),
              $sformatf("cancelled y[%0d] = (%f,%f) expected (%f,%f)", i, from_cpf(dut.Y[i]).re,
                        from_cpf(dut.Y[i]).im, ynew[i].re, ynew[i].im));
      end
      check(active[b] == 1'b0, "detected stream left active");
      for (int n = 1; n < NT; n++) do @(posedge clk); while (!out_valid);
    end
    @(posedge clk);
    while (!in_ready) @(posedge clk);
  endtask

  initial begin
    in_valid = 1'b0;
    out_ready = 1'b1;
    in_det = DET_LINEAR;
    in_zf = 1'b0;
    in_mod = MOD_BPSK;
    for (int i = 0; i < NR; i++) begin
      in_y[i] = CPF_ZERO;
      in_sigma2[i] = CPF_ZERO;
      for (int k = 0; k < NT; k++) in_h[i][k] = CPF_ZERO;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 40; k++) run((k % 2 != 0) ? DET_ITERATIVE : DET_LINEAR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
