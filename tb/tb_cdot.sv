// tb_cdot: self-checking test of the folded complex dot-product unit.
//
// Random dot products of 1 to 5 terms, with random conjugation and
// negation flags and operand exponents spread over a wide range, are fed
// to units with LANES = 1 (folded) and LANES = 3 (unfolded). Each result is
// compared with the same sum computed in double precision from the
// quantised operands; the tolerance is a few units in the last mantissa
// place of the largest term. The number of cycles from the first beat to
// out_valid is checked: out_valid rises on the second clock edge after the
// last of ceil(n/LANES) beats, so a
// 3-term dot product takes three beats at LANES = 1 and one at LANES = 3.
module tb_cdot;
  import difmad_pkg::*;
  import difmad_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  v1, f1, l1, ov1;
  term_t t1 [1];
  cpf_t  r1;
  logic  v3, f3, l3, ov3;
  term_t t3 [3];
  cpf_t  r3;

  cdot #(.LANES(1)) dut1 (.clk, .rst_n, .in_valid(v1), .in_first(f1), .in_last(l1),
                          .in_terms(t1), .out_valid(ov1), .out_res(r1));
  cdot #(.LANES(3)) dut3 (.clk, .rst_n, .in_valid(v3), .in_first(f3), .in_last(l3),
                          .in_terms(t3), .out_valid(ov3), .out_res(r3));

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

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

  function automatic cpf_t rnd_cpf(int espread);
    real sc;
    sc = pow2(int'($urandom % (2 * espread + 1)) - espread);
    return to_cpf(cx(urand(-1.0, 1.0) * sc, urand(-1.0, 1.0) * sc));
  endfunction

  task automatic one(int n, int espread);
    term_t tt [5];
    cplx_t ref_v, p, got;
    real   mag, tol;
    int    nb, t0, lat;
    ref_v = cx(0.0, 0.0);
    mag = 0.0;
    for (int i = 0; i < n; i++) begin
      tt[i].a = rnd_cpf(espread);
      tt[i].b = rnd_cpf(espread);
      tt[i].conj_a = $urandom % 2;
      tt[i].neg = $urandom % 2;
      p = cmul(tt[i].conj_a ? cconj(from_cpf(tt[i].a)) : from_cpf(tt[i].a), from_cpf(tt[i].b));
      if (tt[i].neg) p = cx(-p.re, -p.im);
      ref_v = cadd(ref_v, p);
      if (cabs2(p) > mag) mag = cabs2(p);
    end
    if (cabs2(ref_v) > mag) mag = cabs2(ref_v);
    tol = 4.0e-9 * mag + 1.0e-30;   // about 2^-14 relative, on squared magnitude
    // LANES = 1: n beats
    nb = n;
    for (int b = 0; b < nb; b++) begin
      @(negedge clk);
      v1 = 1'b1; f1 = (b == 0); l1 = (b == nb - 1);
      t1[0] = tt[b];
      if (b == 0) t0 = cycle;
    end
    @(negedge clk);
    v1 = 1'b0; f1 = 1'b0; l1 = 1'b0;
    lat = 0;
    while (!ov1) begin @(posedge clk); #1; lat = cycle - t0; end
    got = from_cpf(r1);
    checks++;
    if (cabs2(csub(got, ref_v)) > tol) begin
      failures++;
      $display("FAIL lanes=1 n=%0d got (%g,%g) expected (%g,%g)", n, got.re, got.im, ref_v.re, ref_v.im);
      for (int i = 0; i < n; i++) $display("  a=%p b=%p c=%0d n=%0d", tt[i].a, tt[i].b, tt[i].conj_a, tt[i].neg);
    end
    checks++;
    if (lat != nb + 1) begin
      failures++;
      $display("FAIL lanes=1 n=%0d latency %0d expected %0d", n, lat, nb + 1);
    end
    // LANES = 3
    nb = (n + 2) / 3;
    for (int b = 0; b < nb; b++) begin
      @(negedge clk);
      v3 = 1'b1; f3 = (b == 0); l3 = (b == nb - 1);
      for (int l = 0; l < 3; l++) begin
        t3[l].a = CPF_ZERO; t3[l].b = CPF_ZERO; t3[l].conj_a = 0; t3[l].neg = 0;
        if (b * 3 + l < n) t3[l] = tt[b * 3 + l];
      end
      if (b == 0) t0 = cycle;
    end
    @(negedge clk);
    v3 = 1'b0; f3 = 1'b0; l3 = 1'b0;
    lat = 0;
    while (!ov3) begin @(posedge clk); #1; lat = cycle - t0; end
    got = from_cpf(r3);
    checks++;
    if (cabs2(csub(got, ref_v)) > tol) begin
      failures++;
      $display("FAIL lanes=3 n=%0d got (%g,%g) expected (%g,%g)", n, got.re, got.im, ref_v.re, ref_v.im);
    end
    checks++;
    if (lat != nb + 1) begin
      failures++;
      $display("FAIL lanes=3 n=%0d latency %0d expected %0d", n, lat, nb + 1);
    end
  endtask

  initial begin
    v1 = 0; f1 = 0; l1 = 0; v3 = 0; f3 = 0; l3 = 0;
    t1[0].a = CPF_ZERO; t1[0].b = CPF_ZERO; t1[0].conj_a = 0; t1[0].neg = 0;
    for (int l = 0; l < 3; l++) t3[l] = t1[0];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) one(1 + k % 5, (k % 3 == 0) ? 0 : 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
