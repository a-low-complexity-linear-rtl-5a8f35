// difmad_datapath: datapath of the division-free MIMO detector core.
//
// For one sub-carrier it holds the channel matrix H (NR x NT), the received
// vector y, the per-antenna noise variances sigma2, and the working state of
// the recursion: the unnormalised inverse P (NR x NR), its scalar c, the
// vector u, the scalar d, and per stream the unnormalised estimate Z and the
// scale value SC. A bank of NR complex dot-product units (cdot) does all the
// arithmetic; the operation in ctrl selects which register elements feed
// each unit's terms, and the unit results are written back when res_valid
// pulses. Unit r works on row r of P.
//
// Mathematics. With R_k = Rww + sum_{j<=k} h_j h_j^H, the detector keeps
// P_k / c_k = R_k^-1 without dividing: from u = P h, d = c + h^H u the
// matrix inversion lemma gives P_k = d P - u u^H and c_k = c d. It starts
// from P_0 = adj(Rww), c_0 = det(Rww). The outputs are z_i = h_i^H P y and
// scale_i = h_i^H P h_i; the MMSE estimate is z_i / scale_i, in which c and
// any common factor of P cancel, so the division is left to the consumer.
// Because only the ratio P / c matters, this datapath removes c's exponent
// from c and every P exponent after each update (a power-of-two rescale,
// no division), and computes adj(Rww) with the sigma2 exponents factored
// out, so the 6-bit exponent range holds for any noise level. Both rescales
// are this design's choice. In ZF mode every sigma2 is replaced by
// 2^(ZF_SIGMA2_EXP - 1), a small variance that approximates the ZF limit.
//
// The hard decision of the stream selected by ctrl.strm comes from a
// cpf_slicer; it is used for successive cancellation in iterative mode and
// is also returned with each result. best is the active stream with the
// largest scale value, the ordering rule of iterative detection (the
// largest h^H R^-1 h is the largest post-detection SINR).
//
// Timing: load and load_p0 act in one cycle; an operation's result is
// written in the cycle res_valid is high. All registers reset to zero.
module difmad_datapath
  import difmad_pkg::*;
#(
  parameter int NT            = 3,
  parameter int NR            = 3,
  parameter int LANES         = 1,
  parameter int ZF_SIGMA2_EXP = -5
) (
  input  logic              clk,
  input  logic              rst_n,
  // sub-carrier input, captured on load
  input  logic              load,
  input  cpf_t              in_y      [NR],
  input  cpf_t              in_h      [NR][NT],
  input  cpf_t              in_sigma2 [NR],
  input  mod_t              in_mod,
  input  det_t              in_det,
  input  logic              in_zf,
  // control from the state machine
  input  ctrl_t             ctrl,
  input  logic              load_p0,
  input  logic [NT-1:0]     active,
  output logic              res_valid,
  output logic [IW-1:0]     best,
  output det_t              det_mode,
  // result of stream out_strm
  input  logic [IW-1:0]     out_strm,
  output cpf_t              out_z,
  output cpf_t              out_scale,
  output logic signed [3:0] out_dec_re,
  output logic signed [3:0] out_dec_im
);

  if (NR < 2) begin : g_nr_check
    $error("difmad_datapath needs NR >= 2");
  end

  localparam int KW = (NT > 1) ? $clog2(NT) : 1;   // stream index width
  localparam int QW = $clog2(NR);                  // antenna index width
  localparam cpf_t ZF_SIGMA2 = '{re: BM'(2 ** (BM - 2)), im: '0, e: BE'(ZF_SIGMA2_EXP)};

  cpf_t H   [NR][NT];
  cpf_t Y   [NR];
  cpf_t SG  [NR];
  cpf_t ADJ [NR];
  cpf_t P   [NR][NR];
  cpf_t U   [NR];
  cpf_t Z   [NT];
  cpf_t SC  [NT];
  cpf_t DET, CS, DD;
  mod_t mod_q;

  logic [KW-1:0] ks, os;    // selected stream, output stream
  logic [QW-1:0] qi;        // step / column index
  assign ks = ctrl.strm[KW-1:0];
  assign os = out_strm[KW-1:0];
  assign qi = ctrl.idx[QW-1:0];

  // ---------------- slicer for the selected stream ----------------
  cpf_t              dec;
  logic signed [3:0] dec_re, dec_im;

  cpf_slicer u_slicer (
    .z         (Z[ks]),
    .scale     (SC[ks]),
    .modulation(mod_q),
    .dec_re    (dec_re),
    .dec_im    (dec_im),
    .dec       (dec)
  );

  assign out_z      = Z[os];
  assign out_scale  = SC[os];
  assign out_dec_re = dec_re;
  assign out_dec_im = dec_im;

  // ---------------- operand selection ----------------
  function automatic cpf_t exp_only(int e);
    cpf_t x;
    x    = CPF_ONE;
    x.e  = (e > EMAX) ? BE'(EMAX) : (e < EMIN) ? BE'(EMIN) : BE'(e);
    return x;
  endfunction

  function automatic term_t mk(cpf_t a, cpf_t b, logic cj, logic ng);
    term_t t;
    t.a      = a;
    t.b      = b;
    t.conj_a = cj;
    t.neg    = ng;
    return t;
  endfunction

  term_t terms [NR][LANES];

  always_comb begin
    int t;
    for (int r = 0; r < NR; r++) begin
      for (int l = 0; l < LANES; l++) begin
        t = int'(ctrl.beat) * LANES + l;
        terms[r][l] = mk(CPF_ZERO, CPF_ZERO, 1'b0, 1'b0);
        case (ctrl.op)
          OP_ADJ: if (t == 0) begin
            // factor sigma2[q] = m * 2^e: multiply row r != q by m, row q by 2^-e
            if (int'(qi) == r)
              terms[r][l] = mk(ADJ[r], exp_only(1 - int'(SG[qi].e)), 1'b0, 1'b0);
            else
              terms[r][l] = mk(ADJ[r], '{re: SG[qi].re, im: SG[qi].im, e: '0},
                               1'b0, 1'b0);
          end
          OP_DET: if (t == 0 && r == 0) terms[r][l] = mk(ADJ[0], SG[0], 1'b0, 1'b0);
          OP_U, OP_W: if (t < NR) terms[r][l] = mk(P[r][t], H[t][ks], 1'b0, 1'b0);
          OP_D: if (r == 0) begin
            if (t < NR)       terms[r][l] = mk(H[t][ks], U[t], 1'b1, 1'b0);
            else if (t == NR) terms[r][l] = mk(CS, CPF_ONE, 1'b0, 1'b0);
          end
          OP_P: begin
            if (t == 0) terms[r][l] = mk(DD, P[r][qi], 1'b0, 1'b0);
            if (t == 1) terms[r][l] = mk(U[qi], U[r], 1'b1, 1'b1);
          end
          OP_C: if (t == 0 && r == 0) terms[r][l] = mk(CS, DD, 1'b0, 1'b0);
          OP_ZS: if (t < NR) begin
            if (r == 0) terms[r][l] = mk(U[t], Y[t], 1'b1, 1'b0);
            if (r == 1) terms[r][l] = mk(H[t][ks], U[t], 1'b1, 1'b0);
          end
          OP_CANCEL: begin
            if (t == 0) terms[r][l] = mk(Y[r], CPF_ONE, 1'b0, 1'b0);
            if (t == 1) terms[r][l] = mk(H[r][ks], dec, 1'b0, 1'b1);
          end
          default: ;
        endcase
      end
    end
  end

  // ---------------- dot-product bank ----------------
  logic unit_valid [NR];
  cpf_t res        [NR];

  for (genvar r = 0; r < NR; r++) begin : g_unit
    cdot #(.LANES(LANES)) u_cdot (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (ctrl.issue),
      .in_first (ctrl.first),
      .in_last  (ctrl.last),
      .in_terms (terms[r]),
      .out_valid(unit_valid[r]),
      .out_res  (res[r])
    );
  end

  assign res_valid = unit_valid[0];

  // ---------------- ordering ----------------
  always_comb begin
    int b;
    b = 0;
    for (int i = NT - 1; i >= 0; i--)
      if (active[i]) b = i;
    for (int i = 0; i < NT; i++)
      if (active[i] && cpf_gt(SC[i], SC[b])) b = i;
    best = IW'(b);
  end

  // power-of-two rescale of one value by 2^-sh
  function automatic cpf_t rescale(cpf_t x, int sh);
    cpf_t r;
    int   e;
    e = int'(x.e) - sh;
    r = x;
    if (x.re == 0 && x.im == 0) r = CPF_ZERO;
    else if (e < EMIN)          r = CPF_ZERO;
    else if (e > EMAX)          r.e = BE'(EMAX);
    else                        r.e = BE'(e);
    return r;
  endfunction

  // ---------------- write-back ----------------
  cpf_t cnew;
  assign cnew = cpf_real(res[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NR; r++) begin
        Y[r]   <= CPF_ZERO;
        SG[r]  <= CPF_ZERO;
        ADJ[r] <= CPF_ZERO;
        U[r]   <= CPF_ZERO;
        for (int c = 0; c < NT; c++) H[r][c] <= CPF_ZERO;
        for (int c = 0; c < NR; c++) P[r][c] <= CPF_ZERO;
      end
      for (int i = 0; i < NT; i++) begin
        Z[i]  <= CPF_ZERO;
        SC[i] <= CPF_ZERO;
      end
      DET      <= CPF_ZERO;
      CS       <= CPF_ZERO;
      DD       <= CPF_ZERO;
      mod_q    <= MOD_BPSK;
      det_mode <= DET_LINEAR;
    end else begin
      if (load) begin
        for (int r = 0; r < NR; r++) begin
          Y[r]   <= in_y[r];
          SG[r]  <= in_zf ? ZF_SIGMA2 : in_sigma2[r];
          ADJ[r] <= CPF_ONE;
          for (int c = 0; c < NT; c++) H[r][c] <= in_h[r][c];
        end
        mod_q    <= in_mod;
        det_mode <= in_det;
      end
      if (load_p0) begin
        for (int r = 0; r < NR; r++)
          for (int c = 0; c < NR; c++)
            P[r][c] <= (r == c) ? ADJ[r] : CPF_ZERO;
        CS <= DET;
      end
      if (res_valid) begin
        case (ctrl.op)
          OP_ADJ: for (int r = 0; r < NR; r++) ADJ[r] <= res[r];
          OP_DET: DET <= cpf_real(res[0]);
          OP_U, OP_W: for (int r = 0; r < NR; r++) U[r] <= res[r];
          OP_D: DD <= cpf_real(res[0]);
          OP_P: for (int r = 0; r < NR; r++) P[r][qi] <= res[r];
          OP_C: begin
            // c <- c*d, then rescale c and P together so that c stays in [1, 2)
            CS   <= rescale(cnew, int'(cnew.e) - 1);
            for (int r = 0; r < NR; r++)
              for (int c = 0; c < NR; c++)
                P[r][c] <= rescale(P[r][c], int'(cnew.e) - 1);
          end
          OP_ZS: begin
            Z[ks]  <= res[0];
            SC[ks] <= cpf_real(res[1]);
          end
          OP_CANCEL: for (int r = 0; r < NR; r++) Y[r] <= res[r];
          default: ;
        endcase
      end
    end
  end

endmodule
