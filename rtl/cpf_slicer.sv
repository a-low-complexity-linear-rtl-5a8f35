// cpf_slicer: division-free hard decision of a detector output.
//
// The detector never divides: for stream i it delivers the unnormalised
// estimate z = h^H P y together with its scale value s = h^H P h, and the
// symbol estimate is z / s. This slicer finds the constellation point
// nearest to z / s without dividing, by comparing each axis of z against
// multiples of s: the level per axis is -(M-1) + 2 * #{k : x > k*s} for the
// thresholds k = -(M-2), ..., -2, 0, 2, ..., (M-2), with M = 2, 2, 4 or 8
// levels per axis for BPSK, QPSK, 16-QAM and 64-QAM (BPSK decides the real
// axis only). Both operands are first brought to a common exponent; the
// shift is clamped at BM+4 bits, beyond which the larger operand decides
// every comparison anyway. Ties resolve to the lower level.
//
// Constellation points are the odd integers -(M-1)..(M-1) per axis; the
// per-modulation normalisation of the transmit constellation is taken to
// be part of the channel matrix H. The decision is returned both as small
// integers and as a cpf_t for the cancellation step. Purely combinational.
//
// Successive cancellation needs a decision on each detected symbol before
// it is subtracted from y; the decision rule itself (threshold compare
// against multiples of the scale value) is this design's choice.
module cpf_slicer
  import difmad_pkg::*;
(
  input  cpf_t              z,
  input  cpf_t              scale,
  input  mod_t              modulation,
  output logic signed [3:0] dec_re,
  output logic signed [3:0] dec_im,
  output cpf_t              dec
);

  localparam int SHMAX = BM + 4;
  localparam int XW    = BM + SHMAX + 4;

  function automatic logic signed [3:0] slice_axis(logic signed [BM-1:0] xm,
                                                   logic signed [BE-1:0] xe,
                                                   logic signed [BM-1:0] sm,
                                                   logic signed [BE-1:0] se,
                                                   int m);
    logic signed [XW-1:0] x, s, t;
    int d, lvl;
    d = int'(xe) - int'(se);
    x = XW'(xm);
    s = XW'(sm);
    if (d > 0) x = x <<< ((d > SHMAX) ? SHMAX : d);
    if (d < 0) s = s <<< ((-d > SHMAX) ? SHMAX : -d);
    lvl = -(m - 1);
    for (int k = -6; k <= 6; k += 2) begin
      if (k >= -(m - 2) && k <= (m - 2)) begin
        t = s * k;
        if (x > t) lvl += 2;
      end
    end
    return 4'(lvl);
  endfunction

  int m;
  always_comb begin
    case (modulation)
      MOD_QAM16: m = 4;
      MOD_QAM64: m = 8;
      default:   m = 2;
    endcase
    dec_re = slice_axis(z.re, z.e, scale.re, scale.e, m);
    dec_im = (modulation == MOD_BPSK) ? 4'sd0 : slice_axis(z.im, z.e, scale.re, scale.e, m);
    // value of level L: L * 2^(BM-5) * 2^(4-(BM-1)) = L
    dec.re = BM'(dec_re) <<< (BM - 5);
    dec.im = BM'(dec_im) <<< (BM - 5);
    dec.e  = BE'(4);
  end

endmodule
