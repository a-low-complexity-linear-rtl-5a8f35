// difmad_pkg: number format, types and arithmetic helpers shared by the
// division-free MIMO detector (DIFMAD) core.
//
// Every value in the datapath is a complex pseudo-floating-point number:
// an 18-bit two's-complement mantissa for the real part, one for the
// imaginary part, and a 6-bit two's-complement exponent shared by both.
// The value is (re + j*im) * 2^(e - (BM-1)), so a normalised number has
// max(|re|,|im|) in [2^(BM-2), 2^(BM-1)) and a magnitude in [0.5, 1) * 2^e.
// The 18-bit mantissa and 6-bit exponent are the precisions the detector
// was sized with; sharing one exponent between the real and imaginary part
// is this design's choice (it removes the alignment step from a complex
// multiply). Real quantities (noise variances, scale values, the scalar of
// the unnormalised inverse) use the same type with im = 0.
//
// Normalisation rounds to nearest (half up); alignment inside a dot
// product truncates bits far below the output precision. An exponent above EMAX saturates at EMAX, one
// below EMIN flushes the value to zero. Zero is stored as re = im = 0,
// e = EMIN.
package difmad_pkg;

  parameter int BM = 18;                 // mantissa bits (sign included)
  parameter int BE = 6;                  // exponent bits (sign included)
  localparam int EMIN = -(2 ** (BE - 1));
  localparam int EMAX = (2 ** (BE - 1)) - 1;
  localparam int AW   = 2 * BM + 4;      // accumulator width in a dot-product unit
  localparam int IW   = 4;               // width of stream / antenna / step indices

  typedef struct packed {
    logic signed [BM-1:0] re;
    logic signed [BM-1:0] im;
    logic signed [BE-1:0] e;
  } cpf_t;

  // One term of a complex dot product: conj_a selects conj(a)*b, neg negates it.
  typedef struct packed {
    cpf_t a;
    cpf_t b;
    logic conj_a;
    logic neg;
  } term_t;

  typedef enum logic [1:0] {MOD_BPSK, MOD_QPSK, MOD_QAM16, MOD_QAM64} mod_t;
  typedef enum logic {DET_LINEAR, DET_ITERATIVE} det_t;

  // Operations the state machine asks of the dot-product bank.
  typedef enum logic [3:0] {
    OP_NONE,
    OP_ADJ,     // one factor of adj(Rww): ADJ[r] *= (q == r) ? 1 : sigma2[q]
    OP_DET,     // DET = ADJ[0] * sigma2[0] = det(Rww)
    OP_U,       // U[r] = sum_c P[r][c] h_k[c]
    OP_D,       // D = c + h_k^H U
    OP_P,       // P[r][q] = D P[r][q] - U[r] conj(U[q])
    OP_C,       // c = c * D
    OP_W,       // U[r] = sum_c P[r][c] h_i[c]        (w_i = P h_i)
    OP_ZS,      // Z[i] = w_i^H y,  SC[i] = h_i^H w_i
    OP_CANCEL   // y[r] = y[r] - h_i[r] * decision_i
  } op_t;

  // Control word from the state machine to the datapath.
  typedef struct packed {
    op_t           op;
    logic          issue;   // a beat of terms is presented this cycle
    logic          first;   // first beat of the operation
    logic          last;    // last beat of the operation
    logic [IW-1:0] strm;    // stream k (update) or i (output, cancel)
    logic [IW-1:0] idx;     // step q of OP_ADJ, column q of OP_P
    logic [IW-1:0] beat;    // beat number within the operation
  } ctrl_t;

  localparam cpf_t CPF_ZERO = '{re: '0, im: '0, e: BE'(EMIN)};
  localparam cpf_t CPF_ONE  = '{re: BM'(2 ** (BM - 2)), im: '0, e: BE'(1)};

  // Terms each operation feeds to every dot-product unit.
  function automatic int op_terms(op_t op, int nr);
    case (op)
      OP_ADJ, OP_DET, OP_C: return 1;
      OP_U, OP_W, OP_ZS:    return nr;
      OP_D:                 return nr + 1;
      OP_P, OP_CANCEL:      return 2;
      default:              return 0;
    endcase
  endfunction

  // Number of significant bits of a two's-complement value (sign excluded).
  function automatic int sigbits(logic signed [AW-1:0] x);
    int n;
    n = 0;
    for (int i = 0; i < AW - 1; i++)
      if (x[i] != x[AW-1]) n = i + 1;
    return n;
  endfunction

  // Normalise a wide complex value x * 2^(ea - 2*(BM-1)) into a cpf_t.
  function automatic cpf_t cpf_norm(logic signed [AW-1:0] xr, logic signed [AW-1:0] xi,
                                    int ea);
    cpf_t r;
    int nb, sh, e;
    logic signed [AW-1:0] tr, ti;
    nb = sigbits(xr);
    if (sigbits(xi) > nb) nb = sigbits(xi);
    sh = nb - (BM - 1);
    e  = sh + ea - (BM - 1);
    if (sh > 0) begin
      // round to nearest: add half an output LSB, then shift
      tr = (xr + $signed(AW'(1) << (sh - 1))) >>> sh;
      ti = (xi + $signed(AW'(1) << (sh - 1))) >>> sh;
      if (sigbits(tr) > BM - 1 || sigbits(ti) > BM - 1) begin
        tr = tr >>> 1;
        ti = ti >>> 1;
        e  = e + 1;
      end
    end else begin
      tr = xr <<< (-sh);
      ti = xi <<< (-sh);
    end
    if (nb == 0 || e < EMIN) begin
      r = CPF_ZERO;
    end else begin
      r.re = tr[BM-1:0];
      r.im = ti[BM-1:0];
      r.e  = (e > EMAX) ? BE'(EMAX) : BE'(e);
    end
    return r;
  endfunction

  // Keep the real part only and renormalise (for values that are real by construction).
  function automatic cpf_t cpf_real(cpf_t x);
    logic signed [AW-1:0] xr;
    xr = AW'(x.re);
    return cpf_norm(xr, '0, int'(x.e) + (BM - 1));
  endfunction

  // a > b for real, normalised, positive values (compares the real parts).
  // A value that is zero or negative counts as smaller than any positive one.
  function automatic logic cpf_gt(cpf_t a, cpf_t b);
    logic ap, bp;
    ap = (a.re > 0);
    bp = (b.re > 0);
    if (!ap) return 1'b0;
    if (!bp) return 1'b1;
    if (a.e != b.e) return a.e > b.e;
    return a.re > b.re;
  endfunction

endpackage
