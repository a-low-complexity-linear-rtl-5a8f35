// cdot: folded complex dot-product unit in pseudo-floating point.
//
// Computes sum_t s_t * op(a_t) * b_t, where op() is identity or complex
// conjugation (conj_a) and s_t = -1 when the term's neg flag is set. The
// complex dot product is the one building block of the detector: every
// step of the division-free inverse recursion and of the symbol estimate
// is expressed as such a sum.
//
// Folding: the unit holds LANES complex multipliers and accepts LANES terms
// per cycle ("beat"); a dot product of n terms takes ceil(n/LANES) beats.
// With LANES = 1 a 3-term dot product takes three cycles, which is the
// folding of the 3x3 receiver clocked at 60 MHz; LANES = 3 computes it in
// one cycle as the unfolded 20 MHz receiver does.
//
// Pipeline: stage 1 registers the exact products (36-bit mantissas, summed
// exponent). Stage 2 aligns the products and the running accumulator to
// the largest exponent (right shift, truncating), adds them, and on the
// last beat normalises the sum back to an 18/6-bit cpf_t into out_res.
// out_valid is a one-cycle pulse two cycles after the beat marked in_last.
// A beat marked in_first discards the previous accumulator. The internal
// multiplier and accumulator widths are this design's choice.
module cdot
  import difmad_pkg::*;
#(
  parameter int LANES = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  term_t in_terms [LANES],
  output logic  out_valid,
  output cpf_t  out_res
);

  localparam int EW = BE + 2;   // width of a summed exponent

  // ---------------- stage 1: complex multiply ----------------
  logic                 p_valid, p_first, p_last;
  logic signed [AW-1:0] p_re [LANES];
  logic signed [AW-1:0] p_im [LANES];
  logic signed [EW-1:0] p_e  [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_first <= 1'b0;
      p_last  <= 1'b0;
      for (int l = 0; l < LANES; l++) begin
        p_re[l] <= '0;
        p_im[l] <= '0;
        p_e[l]  <= EW'(2 * EMIN);
      end
    end else begin
      p_valid <= in_valid;
      p_first <= in_first;
      p_last  <= in_last;
      if (in_valid) begin
        for (int l = 0; l < LANES; l++) begin
          logic signed [2*BM-1:0] rr, ii, ri, ir;
          logic signed [AW-1:0]   sr, si;
          logic signed [BM-1:0]   ai;
          ai = in_terms[l].conj_a ? -in_terms[l].a.im : in_terms[l].a.im;
          rr = in_terms[l].a.re * in_terms[l].b.re;
          ii = ai * in_terms[l].b.im;
          ri = in_terms[l].a.re * in_terms[l].b.im;
          ir = ai * in_terms[l].b.re;
          sr = AW'(rr) - AW'(ii);
          si = AW'(ri) + AW'(ir);
          p_re[l] <= in_terms[l].neg ? -sr : sr;
          p_im[l] <= in_terms[l].neg ? -si : si;
          p_e[l]  <= EW'(in_terms[l].a.e) + EW'(in_terms[l].b.e);
        end
      end
    end
  end

  // ---------------- stage 2: align, accumulate, normalise ----------------
  logic signed [AW-1:0] acc_re, acc_im;
  logic signed [EW-1:0] acc_e;
  logic signed [AW-1:0] sum_re, sum_im;
  logic signed [EW-1:0] emax;

  always_comb begin
    int sh;
    sh   = 0;
    emax = p_first ? p_e[0] : acc_e;
    for (int l = 0; l < LANES; l++)
      if (p_e[l] > emax) emax = p_e[l];
    if (p_first) begin
      sum_re = '0;
      sum_im = '0;
    end else begin
      sh = int'(emax) - int'(acc_e);
      if (sh >= AW) begin
        sum_re = '0;
        sum_im = '0;
      end else begin
        sum_re = acc_re >>> sh;
        sum_im = acc_im >>> sh;
      end
    end
    for (int l = 0; l < LANES; l++) begin
      sh = int'(emax) - int'(p_e[l]);
      if (sh < AW) begin
        sum_re = sum_re + (p_re[l] >>> sh);
        sum_im = sum_im + (p_im[l] >>> sh);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re    <= '0;
      acc_im    <= '0;
      acc_e     <= EW'(2 * EMIN);
      out_valid <= 1'b0;
      out_res   <= CPF_ZERO;
    end else begin
      out_valid <= p_valid && p_last;
      if (p_valid) begin
        acc_re <= sum_re;
        acc_im <= sum_im;
        acc_e  <= emax;
        if (p_last) out_res <= cpf_norm(sum_re, sum_im, int'(emax));
      end
    end
  end

endmodule
