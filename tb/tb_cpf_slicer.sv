// tb_cpf_slicer: self-checking test of the division-free slicer.
//
// Random unnormalised estimates z and positive scale values s, with
// exponents spread so that z/s covers the whole constellation and beyond,
// are sliced for all four modulations. The expected level per axis is the
// nearest odd integer to the quotient z/s, computed with real division and
// clamped to the constellation; cases within 1e-4 of a decision threshold
// are skipped. The cpf_t form of the decision must equal the integer level.
module tb_cpf_slicer;
  import difmad_pkg::*;
  import difmad_tb_pkg::*;

  cpf_t              z, s, dec;
  mod_t              m;
  logic signed [3:0] dre, dim;

  cpf_slicer dut (.z(z), .scale(s), .modulation(m), .dec_re(dre), .dec_im(dim), .dec(dec));

  int checks = 0, failures = 0;
  int n_clamp = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * ($itor($urandom % 1000001) / 1000000.0);
  endfunction

  function automatic bit near_thr(real v, int lv);
    for (int l = -(lv - 2); l <= lv - 2; l += 2)
      if ((v - l) < 1e-4 && (l - v) < 1e-4) return 1;
    return 0;
  endfunction

  initial begin
    for (int k = 0; k < 20000; k++) begin
      real sv, qr, qi;
      cplx_t zv;
      int lv, er, ei;
      m  = mod_t'(k % 4);
      lv = levels(m);
      sv = urand(0.5, 1.0) * pow2(int'($urandom % 41) - 20);
      qr = urand(-1.3, 1.3) * lv;
      qi = urand(-1.3, 1.3) * lv;
      if (k % 50 == 0) qr = qr * 40.0;    // far outside the constellation
      s  = to_cpf(cx(sv, 0.0));
      z  = to_cpf(cx(qr * sv, qi * sv));
      #1;
      zv = from_cpf(z);
      sv = from_cpf(s).re;
      qr = zv.re / sv;
      qi = zv.im / sv;
      if (near_thr(qr, lv) || near_thr(qi, lv)) continue;
      er = slice_ref(qr, lv);
      ei = (m == MOD_BPSK) ? 0 : slice_ref(qi, lv);
      if (qr > lv || qr < -lv) n_clamp++;
      checks++;
      if (int'(dre) != er || int'(dim) != ei || from_cpf(dec).re != real'(er) ||
          from_cpf(dec).im != real'(ei)) begin
        failures++;
        if (failures < 10)
          $display("FAIL mod %0d q=(%f,%f): got %0d,%0d expected %0d,%0d", m, qr, qi, dre, dim, er, ei);
      end
    end
    checks++;
    if (n_clamp == 0) begin
      failures++;
      $display("FAIL no clamped case");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
